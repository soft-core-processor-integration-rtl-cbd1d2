// tb_led_port: random read/write requests against a model of the LED
// register: a write is latched on the first clock of a request, Ack rises
// one clock after the request and drops for one clock after each
// acknowledgement; DataOut always shows the LED value.
module tb_led_port;
  logic clock = 0, reset = 1, Read = 0, Write = 0, Ack;
  logic [14:0] dataIn = 0;
  logic [13:0] DataOut, LED, m_led;
  logic m_ack;
  int checks = 0, failures = 0;

  led_port #(.WIDTH(14)) dut (.*);

  always #5 clock = ~clock;
  initial begin repeat (5000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    @(posedge clock); #1 reset = 0; m_led = 0; m_ack = 0;
    chk("reset LED", LED, 0);
    for (int n = 0; n < 2000; n++) begin
      Read = 1'($urandom); Write = !Read && 1'($urandom); dataIn = 15'($urandom);
      @(posedge clock);
      if (Write && !m_ack) m_led = dataIn[13:0];
      m_ack = (Read || Write) && !m_ack;
      #1;
      chk("Ack", 32'(Ack), 32'(m_ack)); chk("LED", LED, m_led); chk("DataOut", DataOut, m_led);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
