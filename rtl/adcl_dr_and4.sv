// Dual-rail 4-input AND as a two-stage tree of ADCL 2-input cells:
// y = (a[0] & a[1]) & (a[2] & a[3]).  Unused inputs are tied to DR_ONE.
// Latency: two clk_phi edges; all inputs must be applied on the same edge.
module adcl_dr_and4
  import adcl_pkg::*;
(
  input  logic clk_phi,
  input  dr_t  a [4],
  output dr_t  y
);
  dr_t lo, hi;

  adcl_dr_and2 u_lo (.clk_phi(clk_phi), .a(a[0]), .b(a[1]), .y(lo));
  adcl_dr_and2 u_hi (.clk_phi(clk_phi), .a(a[2]), .b(a[3]), .y(hi));
  adcl_dr_and2 u_y  (.clk_phi(clk_phi), .a(lo),   .b(hi),   .y(y));
endmodule
