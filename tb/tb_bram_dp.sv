// tb_bram_dp: random byte-enabled writes on port B checked against a model
// array; reads on both ports (asynchronous, same-cycle ready) compared to the
// model, including addresses past DEPTH, which read as zero and ignore writes.
module tb_bram_dp;
  localparam int DEPTH = 1000, AW = 10;
  logic clock = 0;
  logic [AW-1:0] addra = 0, addrb = 0;
  logic rea = 0, reb = 0;
  logic [3:0] web = 0;
  logic [31:0] dinb = 0, douta, doutb;
  logic dreadya, dreadyb;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  bram_dp #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clock = ~clock;
  initial begin repeat (20000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      addra = AW'($urandom_range(0, 1023)); addrb = AW'($urandom_range(0, 1023));
      rea = 1'($urandom); reb = 1'($urandom);
      web = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'b0000;
      dinb = $urandom;
      #1;
      chk("douta", douta, (int'(addra) < DEPTH) ? model[addra] : 32'h0);
      chk("doutb", doutb, (int'(addrb) < DEPTH) ? model[addrb] : 32'h0);
      chk("dreadya", 32'(dreadya), 32'(rea));
      chk("dreadyb", 32'(dreadyb), 32'(reb || web != 0));
      @(posedge clock);
      if (int'(addrb) < DEPTH)
        for (int b = 0; b < 4; b++) if (web[b]) model[addrb][8*b +: 8] = dinb[8*b +: 8];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
