// tb_register_file: random writes and reads against a reference model of
// NTHREADS independent banks; checks r0 stays zero, that a thread only ever
// sees its own bank, and that nothing is written while the pipeline is off.
module tb_register_file;
  localparam int N = 4;
  logic clock = 0, reset = 1, en = 0, we = 0;
  logic [1:0] sel = 0;
  logic [4:0] r1 = 0, r2 = 0, wr = 0;
  logic [31:0] wd = 0, d1, d2;
  logic [31:0] model [N][32];
  int checks = 0, failures = 0;

  register_file #(.NTHREADS(N)) dut (
    .clock, .reset, .task_select(sel), .en_scpu(en), .read_reg1(r1), .read_reg2(r2),
    .write_reg(wr), .write_data(wd), .reg_write(we), .read_data1(d1), .read_data2(d2));

  always #5 clock = ~clock;
  initial begin repeat (10000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    foreach (model[t, r]) model[t][r] = '0;
    @(posedge clock); #1 reset = 0;
    for (int k = 0; k < 3000; k++) begin
      sel = 2'($urandom_range(0, N - 1));
      en = ($urandom_range(0, 7) != 0);
      we = ($urandom_range(0, 1) != 0);
      wr = 5'($urandom); r1 = 5'($urandom); r2 = (k % 5 == 0) ? 5'd0 : 5'($urandom);
      wd = $urandom;
      #1; checks += 2;
      if (d1 !== model[sel][r1]) begin failures++; $display("FAIL t%0d r%0d: %h vs %h", sel, r1, d1, model[sel][r1]); end
      if (d2 !== model[sel][r2]) begin failures++; $display("FAIL t%0d r%0d: %h vs %h", sel, r2, d2, model[sel][r2]); end
      @(posedge clock);
      if (en && we && wr != 0) model[sel][wr] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
