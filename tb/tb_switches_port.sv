// tb_switches_port: random switch patterns and requests; Switch_out must
// show the switches sampled one clock earlier and Ack must follow the
// one-clock-after-request handshake.
module tb_switches_port;
  logic clock = 0, reset = 1, Read = 0, Write = 0, Ack;
  logic [7:0] Switch_in = 0, Switch_out, m_sw;
  logic m_ack;
  int checks = 0, failures = 0;

  switches_port dut (.*);

  always #5 clock = ~clock;
  initial begin repeat (5000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    @(posedge clock); #1 reset = 0; m_sw = 0; m_ack = 0;
    chk("reset", Switch_out, 0);
    for (int n = 0; n < 2000; n++) begin
      Read = 1'($urandom); Write = 1'($urandom); Switch_in = 8'($urandom);
      @(posedge clock);
      m_sw = Switch_in; m_ack = (Read || Write) && !m_ack;
      #1;
      chk("Ack", 32'(Ack), 32'(m_ack)); chk("Switch_out", Switch_out, m_sw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
