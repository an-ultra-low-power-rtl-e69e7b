// Expandable 4-bit ALU in adiabatic dynamic CMOS logic (ADCL), top level.
//
// An HC181-compatible ALU (16 logic and 16 arithmetic functions of two 4-bit
// words, selected by S3..S0 and M, with carry lookahead and P-bar / G-bar
// outputs for expansion) whose gates are powered by a sine-wave supply V_phi.
// Each gate delays its result by half a supply period, so the network is
// path-balanced and behaves as a pipeline clocked by the supply; clk_phi
// stands for V_phi with one rising edge per half period.
//
// The function result F is not read directly: since the result bits come
// from the network at stage counts that need not match, F is taken into an
// output register on a rising edge of the strobe cl and read from there.
// P-bar, G-bar, Cn+4 and A=B come straight from the network.
//
// Timing (clk_phi edges after new operands): F ready for the cl strobe after
// 10 edges (5 supply periods); p_n after 5, g_n after 7, cn4 after 10, aeqb
// after 12 (aeqb is formed from the network's F, not from the register).
// Operands may change on every clk_phi edge.
//
// Follows the source design: the pin set A, B, S, M, Cn, F, P, G, A=B, V_phi,
// CL, the function table, the output register read with CL.  This design's
// own choices: the cn4 carry output (added for HC181 compatibility), the use
// of a clock to stand for the supply, and the internal gate network.
module adcl_alu181 (
  input  logic       clk_phi,  // V_phi: one rising edge per half supply period
  input  logic       cl,       // output register strobe
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn,
  output logic [3:0] f,        // registered function output
  output logic       p_n,
  output logic       g_n,
  output logic       cn4,
  output logic       aeqb
);
  logic [3:0] f_net;

  adcl_alu4_core u_core (
    .clk_phi, .a, .b, .s, .m, .cn,
    .f(f_net), .p_n, .g_n, .cn4, .aeqb
  );

  adcl_out_reg #(.WIDTH(4)) u_oreg (.cl, .d(f_net), .q(f));
endmodule
