// Dual-rail delay line of ADCL inverters for path balancing.
//
// Each stage inverts both rails and swaps them, so the value is kept while it
// is delayed by one clk_phi edge (half a supply period).  Any delay, odd or
// even, can thus be matched without changing polarity.
// Interface: a -> y, y = a delayed by STAGES clk_phi edges; STAGES = 0 is a
// plain connection.
module adcl_dr_delay
  import adcl_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic clk_phi,
  input  dr_t  a,
  output dr_t  y
);
  dr_t chain [STAGES+1];

  assign chain[0] = a;
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    adcl_inv u_t (.clk_phi(clk_phi), .a(chain[i].f), .y(chain[i+1].t));
    adcl_inv u_f (.clk_phi(clk_phi), .a(chain[i].t), .y(chain[i+1].f));
  end
  assign y = chain[STAGES];
endmodule
