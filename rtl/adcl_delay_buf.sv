// ADCL delay buffer: a chain of ADCL inverters used to re-time a signal.
//
// Because every ADCL gate delays its output by half a supply period, the
// inputs of a gate must be produced by paths of the same number of gate
// stages, or the gate combines values from different supply cycles.  A path
// that is too short is lengthened with ADCL inverters.  Two inverters in
// cascade give one full supply period of delay and the original polarity,
// which is the buffer drawn in front of the 5-input NAND (default PAIRS = 1).
//
// Interface: a -> y, y equals a delayed by 2*PAIRS clk_phi edges (PAIRS supply
// periods).  PAIRS > 1 chains further inverter pairs, which is this design's
// generalisation.  No reset.
module adcl_delay_buf #(
  parameter int unsigned PAIRS = 1
) (
  input  logic clk_phi,
  input  logic a,
  output logic y
);
  logic [2*PAIRS:0] chain;

  assign chain[0] = a;
  for (genvar i = 0; i < 2 * PAIRS; i++) begin : g_inv
    adcl_inv u_inv (.clk_phi(clk_phi), .a(chain[i]), .y(chain[i+1]));
  end
  assign y = chain[2*PAIRS];
endmodule
