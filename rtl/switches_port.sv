// switches_port: memory-mapped input port for the board switches.
//
// The switch levels are sampled into a register every clock (one flip-flop of
// resynchronisation); a load that hits the switch region returns the sampled
// value, acknowledged one clock after the request (Ack high for one clock).
// Writes are acknowledged and ignored.
// Ports follow the SoC diagram (8 switches); sampling and acknowledge timing
// are this design's own.
module switches_port (
  input  logic       clock,
  input  logic       reset,
  input  logic       Read,
  input  logic       Write,
  input  logic [7:0] Switch_in,
  output logic [7:0] Switch_out,
  output logic       Ack
);
  logic [7:0] sampled;
  always_ff @(posedge clock) begin
    if (reset) begin
      sampled <= '0;
      Ack     <= 1'b0;
    end else begin
      sampled <= Switch_in;
      Ack     <= (Read || Write) && !Ack;
    end
  end
  assign Switch_out = sampled;
endmodule
