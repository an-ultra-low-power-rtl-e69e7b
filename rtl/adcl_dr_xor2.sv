// Dual-rail exclusive OR built from ADCL NAND/NOR cells in two stages:
// u = a & ~b and v = ~a & b in the first stage, y = u | v in the second.
// Exclusive OR is not a basic ADCL cell; it is composed from NAND and NOR
// cells as the ALU's complex gates are.  Latency: two clk_phi edges (one
// supply period); a and b must be applied on the same edge.
module adcl_dr_xor2
  import adcl_pkg::*;
(
  input  logic clk_phi,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  y
);
  dr_t u, v;

  adcl_dr_and2 u_u (.clk_phi(clk_phi), .a(a),         .b(dr_not(b)), .y(u));
  adcl_dr_and2 u_v (.clk_phi(clk_phi), .a(dr_not(a)), .b(b),         .y(v));
  adcl_dr_or2  u_y (.clk_phi(clk_phi), .a(u),         .b(v),         .y(y));
endmodule
