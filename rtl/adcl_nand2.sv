// ADCL 2-input NAND cell, digital model.
//
// Same timing model as adcl_inv: the gate output follows the sine-wave supply,
// so y = ~(a & b) appears half a supply period (one clk_phi rising edge) after
// the inputs.  clk_phi has one rising edge per half period of V_phi.
//
// Interface: a, b -> y.  Latency: one clk_phi edge.  The truth table follows
// the ADCL NAND cell; the clocked representation of the supply is this model's
// own choice.  No reset.
module adcl_nand2 (
  input  logic clk_phi,
  input  logic a,
  input  logic b,
  output logic y
);
  always_ff @(posedge clk_phi) y <= ~(a & b);
endmodule
