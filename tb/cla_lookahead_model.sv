// Behavioural model of an external carry-lookahead unit for expanding the
// 4-bit ALU to wider words (the role of an HC182 next to HC181 slices).
// It is not part of the ALU design: testbenches use it to show that the
// ALU's P-bar and G-bar outputs carry what expansion needs.
//
// From the group generate/propagate of each slice (low active, as the ALU
// drives them) and the word's carry input (low active), it forms the carry
// into each slice: c[j+1] = G[j] | P[j] & c[j], c[0] = carry in.  The carries
// are returned low active, ready for the slices' cn inputs.  Combinational.
module cla_lookahead_model #(
  parameter int unsigned SLICES = 4
) (
  input  logic              cn,
  input  logic [SLICES-1:0] p_n,
  input  logic [SLICES-1:0] g_n,
  output logic [SLICES-1:0] slice_cn,  // carry into slice j, low active
  output logic              cout_n     // carry out of the word, low active
);
  logic [SLICES:0] c;
  always_comb begin
    c[0] = ~cn;
    for (int j = 0; j < SLICES; j++) c[j+1] = ~g_n[j] | (~p_n[j] & c[j]);
    slice_cn = ~c[SLICES-1:0];
    cout_n   = ~c[SLICES];
  end
endmodule
