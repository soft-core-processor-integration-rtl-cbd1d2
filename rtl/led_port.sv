// led_port: memory-mapped LED output register.
//
// A store that hits the LED region writes dataIn[WIDTH-1:0] into the LED
// register, which drives the board LEDs; a load returns the register. Every
// access is acknowledged one clock after it is requested (Ack high for one
// clock), so the processor waits one cycle on each LED access.
// Ports and widths follow the SoC diagram (15-bit data in, 14 LEDs); the
// one-clock acknowledge is this design's own choice.
module led_port #(
  parameter int WIDTH = 14
) (
  input  logic             clock,
  input  logic             reset,
  input  logic [14:0]      dataIn,
  input  logic             Read,
  input  logic             Write,
  output logic [WIDTH-1:0] DataOut,
  output logic             Ack,
  output logic [WIDTH-1:0] LED
);
  always_ff @(posedge clock) begin
    if (reset) begin
      LED <= '0;
      Ack <= 1'b0;
    end else begin
      Ack <= (Read || Write) && !Ack;
      if (Write && !Ack) LED <= dataIn[WIDTH-1:0];
    end
  end
  assign DataOut = LED;
endmodule
