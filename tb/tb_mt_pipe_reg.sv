// tb_mt_pipe_reg: checks that each thread's copy of a multiplied pipeline
// register is written only while that thread is selected and enabled, holds
// on stall, takes a bubble on flush (even while stalled) and is read back
// through the output multiplexer. A reference model keeps one copy per thread.
module tb_mt_pipe_reg;
  localparam int N = 4;
  logic clock = 0, reset = 1, en = 0, stall = 0, flush = 0;
  logic [1:0] sel = 0;
  logic [15:0] d = 0, q;
  logic [15:0] model [N];
  int checks = 0, failures = 0;

  mt_pipe_reg #(.T(logic [15:0]), .NTHREADS(N)) dut (
    .clock, .reset, .task_select(sel), .en_scpu(en), .stall, .flush, .d, .q);

  always #5 clock = ~clock;
  initial begin repeat (5000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    foreach (model[i]) model[i] = '0;
    @(posedge clock); #1 reset = 0;
    for (int k = 0; k < 1000; k++) begin
      sel = 2'($urandom_range(0, N - 1));
      en = ($urandom_range(0, 9) != 0);
      stall = ($urandom_range(0, 4) == 0);
      flush = ($urandom_range(0, 6) == 0);
      d = 16'($urandom);
      #1;
      checks++;
      if (q !== model[sel]) begin failures++; $display("FAIL read thread %0d: %h vs %h", sel, q, model[sel]); end
      @(posedge clock);
      if (en) begin
        if (flush) model[sel] = '0;
        else if (!stall) model[sel] = d;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
