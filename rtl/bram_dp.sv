// bram_dp: dual-port on-chip memory shared by instructions and data
// (the BRAM_592KB_Wrapper of the SoC).
//
// DEPTH 32-bit words, default 151552 words = 592 KiB, addressed by an 18-bit
// word address on each port. Port A serves instruction fetch (read only),
// port B the data side (read, and write with four byte enables, web[3] being
// bits 31:24). Reads are asynchronous and each port answers its request in
// the same cycle (dready = request), so the pipeline sees zero wait states;
// writes happen on the rising clock edge. Addresses at or beyond DEPTH read
// zero and ignore writes.
// At time zero the array is cleared and then, if INIT_FILE is not empty,
// loaded with $readmemh.
// From the published design: the two ports, their widths and the 592 KB size. This
// design's own: the asynchronous read with same-cycle ready (the original
// wraps a vendor block RAM with a one-clock read).
module bram_dp #(
  parameter int    DEPTH     = 151552,
  parameter int    AW        = 18,
  parameter string INIT_FILE = ""
) (
  input  logic          clock,
  // port A: instructions
  input  logic [AW-1:0] addra,
  input  logic          rea,
  output logic [31:0]   douta,
  output logic          dreadya,
  // port B: data
  input  logic [AW-1:0] addrb,
  input  logic          reb,
  input  logic [3:0]    web,
  input  logic [31:0]   dinb,
  output logic [31:0]   doutb,
  output logic          dreadyb
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'h0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clock) begin
    if (32'(addrb) < DEPTH) begin
      for (int b = 0; b < 4; b++)
        if (web[b]) mem[addrb][8*b +: 8] <= dinb[8*b +: 8];
    end
  end

  assign douta   = (32'(addra) < DEPTH) ? mem[addra] : 32'h0;
  assign doutb   = (32'(addrb) < DEPTH) ? mem[addrb] : 32'h0;
  assign dreadya = rea;
  assign dreadyb = reb || (web != 4'b0000);
endmodule
