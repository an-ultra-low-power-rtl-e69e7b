// Dual-rail AND of two dual-rail signals from one stage of ADCL cells.
// y.t = NOR(a.f, b.f) = a & b and y.f = NAND(a.t, b.t) = ~(a & b).
// Latency: one clk_phi edge (half a supply period).
module adcl_dr_and2
  import adcl_pkg::*;
(
  input  logic clk_phi,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  y
);
  adcl_nor2  u_t (.clk_phi(clk_phi), .a(a.f), .b(b.f), .y(y.t));
  adcl_nand2 u_f (.clk_phi(clk_phi), .a(a.t), .b(b.t), .y(y.f));
endmodule
