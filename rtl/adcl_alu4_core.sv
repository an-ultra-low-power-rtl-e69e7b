// HC181-compatible 4-bit ALU core as a path-balanced network of ADCL cells.
//
// Function: with M = 1 the ALU forms one of 16 bitwise logic functions of A
// and B chosen by S[3:0]; with M = 0 it forms one of 16 arithmetic functions
// of the 4-bit words A and B, with the carry input cn.  Port polarities are
// those of the HC181 in its active-high reading: cn and cn4 are low-active
// carries, p_n and g_n are the low-active carry-propagate and carry-generate
// outputs used to expand to wider words with a carry-lookahead unit, and aeqb
// is high when F = 1111.  The same pins read with inverted A, B and F give the
// active-low function set.
//
// How it works: each bit forms
//   p = A | (B & S0) | (~B & S1)       (propagate)
//   g = (A & ~B & S2) | (A & B & S3)   (generate)
// so that an arithmetic result is the sum p + g + carry-in.  The carries into
// bits 1..3 come from a carry-lookahead network (sums of products of p, g and
// the carry in) instead of a ripple chain, and F = (p ^ g) ^ (M | carry): the
// carry is masked to 1 in logic mode, which gives F = ~(p ^ g).
// Every gate is an ADCL cell whose output trails its inputs by half a supply
// period, so every gate input is brought to the same stage count with
// inverter delays.  Signals are carried dual-rail (value and complement from
// the same stage), which lets AND/OR/XOR be formed from NAND2/NOR2 cells only
// and any odd or even delay be matched.  The 5-input product p3 p2 p1 p0 c0 of
// the carry output uses the buffered 5-input NAND gate.
//
// Timing (clk_phi edges after the operands are applied; clk_phi has one edge
// per half period of V_phi):  p_n 5, g_n 7, f 10, cn4 10, aeqb 12.  Because all
// paths are balanced, a new operand set may be applied on every edge and each
// result appears that many edges later.  The outputs of different depths are
// not aligned to each other; f is meant to be captured by the output register.
//
// What follows the source design: the HC181 function set, internal carry
// lookahead, P-bar and G-bar outputs, NAND/NOR/NOT cells only, inverter delay
// buffers, the buffered 5-input NAND.  This design's own choices: the exact
// gate network (the HC181 equations mapped onto dual-rail NAND/NOR cells), the
// cn4 carry output, and the operand inputs being available in both polarities
// from the conventional CMOS input interface (modelled by dr_of).
module adcl_alu4_core
  import adcl_pkg::*;
(
  input  logic       clk_phi,  // one rising edge per half period of V_phi
  input  logic [3:0] a,        // operand A3..A0
  input  logic [3:0] b,        // operand B3..B0
  input  logic [3:0] s,        // function select S3..S0
  input  logic       m,        // 1: logic, 0: arithmetic
  input  logic       cn,       // carry in, low active (active-high data)
  output logic [3:0] f,        // function output F3..F0, unregistered
  output logic       p_n,      // carry propagate, low active
  output logic       g_n,      // carry generate, low active
  output logic       cn4,      // carry out, low active (active-high data)
  output logic       aeqb      // high when F = 1111
);
  // ---- stage 0: CMOS input interface, both polarities -------------------
  dr_t A [4], B [4], S [4];
  dr_t M0, C0;  // C0: active-high carry into bit 0

  for (genvar i = 0; i < 4; i++) begin : g_in
    assign A[i] = dr_of(a[i]);
    assign B[i] = dr_of(b[i]);
    assign S[i] = dr_of(s[i]);
  end
  assign M0 = dr_of(m);
  assign C0 = dr_of(~cn);

  // ---- stages 1..3: propagate and generate per bit --------------------
  dr_t S2_1, S3_1;
  adcl_dr_delay #(.STAGES(1)) u_s2 (.clk_phi, .a(S[2]), .y(S2_1));
  adcl_dr_delay #(.STAGES(1)) u_s3 (.clk_phi, .a(S[3]), .y(S3_1));

  dr_t P [4], G [4];  // valid at stage 3

  for (genvar i = 0; i < 4; i++) begin : g_pg
    dr_t bs0, nbs1, anb, ab, a2, o1, x2, x3;
    adcl_dr_and2 u_bs0  (.clk_phi, .a(B[i]),         .b(S[0]), .y(bs0));
    adcl_dr_and2 u_nbs1 (.clk_phi, .a(dr_not(B[i])), .b(S[1]), .y(nbs1));
    adcl_dr_and2 u_anb  (.clk_phi, .a(A[i]),         .b(dr_not(B[i])), .y(anb));
    adcl_dr_and2 u_ab   (.clk_phi, .a(A[i]),         .b(B[i]), .y(ab));
    adcl_dr_or2  u_o1   (.clk_phi, .a(bs0),          .b(nbs1), .y(o1));
    adcl_dr_and2 u_x2   (.clk_phi, .a(anb),          .b(S2_1), .y(x2));
    adcl_dr_and2 u_x3   (.clk_phi, .a(ab),           .b(S3_1), .y(x3));
    adcl_dr_delay #(.STAGES(2)) u_a2 (.clk_phi, .a(A[i]), .y(a2));
    adcl_dr_or2  u_p    (.clk_phi, .a(a2),           .b(o1),   .y(P[i]));
    adcl_dr_or2  u_g    (.clk_phi, .a(x2),           .b(x3),   .y(G[i]));
  end

  dr_t C0_3;
  adcl_dr_delay #(.STAGES(3)) u_c0_3 (.clk_phi, .a(C0), .y(C0_3));

  // ---- stages 4..5: product terms of the carry lookahead --------------
  // Term names: t<carry>_<n>; all valid at stage 5.
  dr_t t1_0, t1_1;
  dr_t t2_0, t2_1, t2_2;
  dr_t t3_0, t3_1, t3_2, t3_3;
  dr_t tg_0, tg_1, tg_2, tg_3;
  dr_t Pall;

  // carry into bit 1: g0 | p0 c0
  adcl_dr_and4 u_t1_0 (.clk_phi, .a('{G[0], DR_ONE, DR_ONE, DR_ONE}), .y(t1_0));
  adcl_dr_and4 u_t1_1 (.clk_phi, .a('{P[0], C0_3,   DR_ONE, DR_ONE}), .y(t1_1));
  // carry into bit 2: g1 | p1 g0 | p1 p0 c0
  adcl_dr_and4 u_t2_0 (.clk_phi, .a('{G[1], DR_ONE, DR_ONE, DR_ONE}), .y(t2_0));
  adcl_dr_and4 u_t2_1 (.clk_phi, .a('{P[1], G[0],   DR_ONE, DR_ONE}), .y(t2_1));
  adcl_dr_and4 u_t2_2 (.clk_phi, .a('{P[1], P[0],   C0_3,   DR_ONE}), .y(t2_2));
  // carry into bit 3: g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
  adcl_dr_and4 u_t3_0 (.clk_phi, .a('{G[2], DR_ONE, DR_ONE, DR_ONE}), .y(t3_0));
  adcl_dr_and4 u_t3_1 (.clk_phi, .a('{P[2], G[1],   DR_ONE, DR_ONE}), .y(t3_1));
  adcl_dr_and4 u_t3_2 (.clk_phi, .a('{P[2], P[1],   G[0],   DR_ONE}), .y(t3_2));
  adcl_dr_and4 u_t3_3 (.clk_phi, .a('{P[2], P[1],   P[0],   C0_3}),   .y(t3_3));
  // group generate: g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0
  adcl_dr_and4 u_tg_0 (.clk_phi, .a('{G[3], DR_ONE, DR_ONE, DR_ONE}), .y(tg_0));
  adcl_dr_and4 u_tg_1 (.clk_phi, .a('{P[3], G[2],   DR_ONE, DR_ONE}), .y(tg_1));
  adcl_dr_and4 u_tg_2 (.clk_phi, .a('{P[3], P[2],   G[1],   DR_ONE}), .y(tg_2));
  adcl_dr_and4 u_tg_3 (.clk_phi, .a('{P[3], P[2],   P[1],   G[0]}),   .y(tg_3));
  // group propagate: p3 p2 p1 p0
  adcl_dr_and4 u_pall (.clk_phi, .a('{P[3], P[2],   P[1],   P[0]}),   .y(Pall));

  assign p_n = Pall.f;  // stage 5

  // ---- stages 6..7: carry sums ---------------------------------------
  dr_t C [4];  // active-high carry into bit i, valid at stage 7
  dr_t Gall;

  adcl_dr_delay #(.STAGES(4)) u_c0_7 (.clk_phi, .a(C0_3), .y(C[0]));
  adcl_dr_or4 u_c1 (.clk_phi, .a('{t1_0, t1_1, DR_ZERO, DR_ZERO}), .y(C[1]));
  adcl_dr_or4 u_c2 (.clk_phi, .a('{t2_0, t2_1, t2_2,    DR_ZERO}), .y(C[2]));
  adcl_dr_or4 u_c3 (.clk_phi, .a('{t3_0, t3_1, t3_2,    t3_3}),    .y(C[3]));
  adcl_dr_or4 u_gg (.clk_phi, .a('{tg_0, tg_1, tg_2,    tg_3}),    .y(Gall));

  assign g_n = Gall.f;  // stage 7

  // ---- stages 4..10: function outputs --------------------------------
  dr_t M7;
  adcl_dr_delay #(.STAGES(7)) u_m7 (.clk_phi, .a(M0), .y(M7));

  dr_t F [4];  // stage 10
  for (genvar i = 0; i < 4; i++) begin : g_f
    dr_t hs5, hs8, k8;
    adcl_dr_xor2 u_hs  (.clk_phi, .a(P[i]), .b(G[i]), .y(hs5));   // stage 5
    adcl_dr_delay #(.STAGES(3)) u_hs8 (.clk_phi, .a(hs5), .y(hs8));
    adcl_dr_or2  u_k   (.clk_phi, .a(M7),   .b(C[i]), .y(k8));    // stage 8
    adcl_dr_xor2 u_f   (.clk_phi, .a(hs8),  .b(k8),   .y(F[i]));  // stage 10
    assign f[i] = F[i].t;
  end

  // ---- carry out through the buffered 5-input NAND -------------------
  // n5 = ~(p3 p2 p1 p0 c0) at stage 6; cn4 = ~(G | p3 p2 p1 p0 c0).
  logic n5_6, n5_8, c4_9;
  dr_t  ng8;
  adcl_nand5 u_nand5 (
    .clk_phi,
    .in ({C0_3.t, P[3].t, P[2].t, P[1].t, P[0].t}),
    .y  (n5_6)
  );
  adcl_delay_buf #(.PAIRS(1)) u_n5_8 (.clk_phi, .a(n5_6), .y(n5_8));
  adcl_dr_delay #(.STAGES(1)) u_ng8 (.clk_phi, .a(dr_not(Gall)), .y(ng8));
  adcl_nand2 u_c4  (.clk_phi, .a(ng8.t), .b(n5_8), .y(c4_9));   // stage 9
  adcl_inv   u_cn4 (.clk_phi, .a(c4_9),  .y(cn4));              // stage 10

  // ---- A=B comparator output: all F bits high -------------------------
  dr_t Fall;
  adcl_dr_and4 u_aeqb (.clk_phi, .a('{F[0], F[1], F[2], F[3]}), .y(Fall));
  assign aeqb = Fall.t;  // stage 12
endmodule
