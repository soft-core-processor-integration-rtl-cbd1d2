// compare_unit: the decode-stage condition testing unit.
//
// Combinational. Compares the two (forwarded) register operands read in ID
// and reports the branch conditions the control unit needs: A == B, A > 0,
// A >= 0, A < 0 and A <= 0 (signed). Branches are resolved in ID, so these
// flags are valid in the same cycle the branch is decoded.
module compare_unit (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        cmp_eq,
  output logic        cmp_gz,
  output logic        cmp_gez,
  output logic        cmp_lz,
  output logic        cmp_lez
);
  assign cmp_eq  = (a == b);
  assign cmp_lz  = a[31];
  assign cmp_gez = ~a[31];
  assign cmp_gz  = ~a[31] & (a != 32'h0);
  assign cmp_lez = a[31] | (a == 32'h0);
endmodule
