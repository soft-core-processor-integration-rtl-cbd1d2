// mt_pipe_reg: a pipeline register multiplied for every hardware thread.
//
// The register holds NTHREADS copies of a payload of type T. All copies share
// the same data input; only the copy selected by task_select is written, and
// only while the scheduler enables the pipeline (en_scpu) and the stage is not
// stalled. A flush writes an all-zero payload (a bubble) into the selected
// copy. The output is the selected copy, multiplexed internally, so the rest
// of the datapath sees a single register whose contents change in one clock
// edge when the scheduler switches threads. Copies of threads that are not
// selected keep their value, which is what lets a preempted thread resume
// exactly where it stopped.
// Timing: write on the rising clock edge; the output is combinational in
// task_select. Reset (synchronous, active high) clears every copy.
// Following the resource-multiplication scheme of the design; the per-copy
// write enable and the zero bubble are this implementation's choices.
module mt_pipe_reg #(
  parameter type T        = logic [31:0],
  parameter int  NTHREADS = 4,
  localparam int TW       = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [TW-1:0] task_select,
  input  logic          en_scpu,
  input  logic          stall,
  input  logic          flush,
  input  T              d,
  output T              q
);
  T copies [NTHREADS];

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < NTHREADS; i++) copies[i] <= '0;
    end else if (en_scpu) begin
      if (flush)       copies[task_select] <= T'('0);
      else if (!stall) copies[task_select] <= d;
    end
  end

  assign q = copies[task_select];
endmodule
