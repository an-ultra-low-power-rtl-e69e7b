// ADCL 5-input NAND gate built from 2-input ADCL cells with path balancing.
//
// Structure: G1 = NAND(in1, in2) and G2 = NAND(in3, in4) in the first stage,
// G3 = NOR(G1, G2) (the AND of in1..in4) in the second, and
// G4 = NAND(G3, in5') in the third, where in5' is in5 passed through a delay
// buffer of two ADCL inverters.  The buffer makes in5 reach G4 on the same
// supply half-period as the result of G1/G2 -> G3, so all five inputs that
// G4 combines were applied on the same clk_phi edge.
//
// Interface: in[4:0] (in[0] = IN1 ... in[4] = IN5) -> y = ~&in.
// Latency: 3 clk_phi edges (1.5 supply periods); a new input word may be
// applied on every edge.  The gate names, the buffered IN5 path and the NAND
// function follow the 5-input NAND of the ADCL ALU.  The output is taken at G4;
// the further output element of the original drawing is not modelled.
module adcl_nand5 (
  input  logic       clk_phi,
  input  logic [4:0] in,
  output logic       y
);
  logic g1, g2, g3, in5_d;

  adcl_nand2     u_g1  (.clk_phi(clk_phi), .a(in[0]), .b(in[1]), .y(g1));
  adcl_nand2     u_g2  (.clk_phi(clk_phi), .a(in[2]), .b(in[3]), .y(g2));
  adcl_nor2      u_g3  (.clk_phi(clk_phi), .a(g1),    .b(g2),    .y(g3));
  adcl_delay_buf #(.PAIRS(1)) u_buf (.clk_phi(clk_phi), .a(in[4]), .y(in5_d));
  adcl_nand2     u_g4  (.clk_phi(clk_phi), .a(g3),    .b(in5_d), .y(y));
endmodule
