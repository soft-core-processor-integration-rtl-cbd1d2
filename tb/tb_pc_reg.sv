// tb_pc_reg: checks the per-thread program counters: reset addresses
// RESET_BASE + i*RESET_STRIDE, write of the selected copy only, hold on
// stall, and the scheduler's trap-cell load overriding both.
module tb_pc_reg;
  localparam int N = 4;
  logic clock = 0, reset = 1, en = 0, stall = 0, nsel = 0;
  logic [1:0] sel = 0;
  logic [31:0] pnhse = 0, pin = 0, pout;
  logic [31:0] model [N];
  int checks = 0, failures = 0;

  pc_reg #(.NTHREADS(N), .RESET_BASE(32'h100), .RESET_STRIDE(32'h400)) dut (
    .clock, .reset, .task_select(sel), .en_scpu(en), .stall, .pc_nhse_sel(nsel),
    .pc_nhse(pnhse), .pc_in(pin), .pc_out(pout));

  always #5 clock = ~clock;
  initial begin repeat (5000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge clock); @(posedge clock); #1 reset = 0;
    for (int i = 0; i < N; i++) begin
      sel = 2'(i); #1; checks++;
      if (pout !== 32'h100 + 32'h400 * i) begin failures++; $display("FAIL reset pc %0d = %h", i, pout); end
      model[i] = 32'h100 + 32'h400 * i;
    end
    for (int k = 0; k < 800; k++) begin
      sel = 2'($urandom_range(0, N - 1));
      en = ($urandom_range(0, 7) != 0);
      stall = ($urandom_range(0, 3) == 0);
      nsel = ($urandom_range(0, 9) == 0);
      pin = $urandom; pnhse = $urandom;
      #1; checks++;
      if (pout !== model[sel]) begin failures++; $display("FAIL pc %0d: %h vs %h", sel, pout, model[sel]); end
      @(posedge clock);
      if (en) begin
        if (nsel) model[sel] = pnhse;
        else if (!stall) model[sel] = pin;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
