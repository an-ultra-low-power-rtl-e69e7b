// Expansion test: ALU slices combined into wider words.
//
// A 16-bit ALU from four slices whose carries come from an external
// lookahead unit fed by the slices' P-bar and G-bar outputs, and an 8-bit ALU
// from two slices rippling Cn+4 into the next slice's Cn.  Random operands and
// all 32 functions are applied and held; once the slowest path has settled
// (lookahead: G-bar 7 edges, then F 10 edges; ripple: Cn+4 10 edges, then F
// 10 edges) the results are strobed with CL and compared with the function
// table applied to the whole word.  The lookahead carry into an upper slice
// and the ripple carry must each be seen active.
module tb_adcl_alu_expansion;
  import alu181_ref_pkg::*;

  localparam int HOLD = 24;

  logic clk_phi = 1'b0, cl = 1'b0;
  logic [15:0] a, b, f16;
  logic [3:0]  s;
  logic        m, cn;
  logic [3:0]  p_n, g_n, slice_cn, cn4_16, aeqb16;
  logic        cout16_n;
  logic [7:0]  f8;
  logic [1:0]  p8_n, g8_n, cn4_8, aeqb8;
  int checks = 0, failures = 0, n_cla_carry = 0, n_ripple_carry = 0;

  always #5 clk_phi = ~clk_phi;

  for (genvar j = 0; j < 4; j++) begin : g_w16
    adcl_alu181 u_alu (
      .clk_phi, .cl, .a(a[4*j +: 4]), .b(b[4*j +: 4]), .s, .m, .cn(slice_cn[j]),
      .f(f16[4*j +: 4]), .p_n(p_n[j]), .g_n(g_n[j]), .cn4(cn4_16[j]), .aeqb(aeqb16[j])
    );
  end
  cla_lookahead_model #(.SLICES(4)) u_cla (
    .cn, .p_n, .g_n, .slice_cn, .cout_n(cout16_n)
  );

  for (genvar j = 0; j < 2; j++) begin : g_w8
    adcl_alu181 u_alu (
      .clk_phi, .cl, .a(a[4*j +: 4]), .b(b[4*j +: 4]), .s, .m,
      .cn(j == 0 ? cn : cn4_8[0]),
      .f(f8[4*j +: 4]), .p_n(p8_n[j]), .g_n(g8_n[j]), .cn4(cn4_8[j]), .aeqb(aeqb8[j])
    );
  end

  // Whole-word reference: X and Y are the bitwise operand functions of the
  // table, applied nibble by nibble; the word result is X + Y + carry in.
  function automatic logic [16:0] word_ref(input logic [15:0] wa, wb, input int bits);
    logic [15:0] x, y, lf;
    logic [7:0]  xy;
    logic [16:0] sum;
    for (int j = 0; j < 4; j++) begin
      xy = arith_xy(s, wa[4*j +: 4], wb[4*j +: 4]);
      x[4*j +: 4]  = xy[7:4];
      y[4*j +: 4]  = xy[3:0];
      lf[4*j +: 4] = logic_fn(s, wa[4*j +: 4], wb[4*j +: 4]);
    end
    if (bits == 8) begin
      x[15:8] = '0; y[15:8] = '0; lf[15:8] = '0;
    end
    sum = {1'b0, x} + {1'b0, y} + {16'b0, ~cn};
    if (bits == 8) return {8'b0, sum[8], m ? lf[7:0] : sum[7:0]};
    return {sum[16], m ? lf : sum[15:0]};
  endfunction

  initial begin
    logic [16:0] r16, r8;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk_phi);
      a  = 16'($urandom);
      b  = ($urandom_range(0, 3) == 0) ? ~a : 16'($urandom);
      s  = 4'(k);
      m  = 1'(k >> 4);
      cn = 1'($urandom);
      repeat (HOLD) @(negedge clk_phi);
      #1 cl = 1'b1;
      #1 cl = 1'b0;
      r16 = word_ref(a, b, 16);
      r8  = word_ref(a, b, 8);
      checks += 3;
      if (f16 != r16[15:0]) failures++;
      if (cout16_n != ~r16[16]) failures++;
      if (f8 != r8[7:0]) failures++;
      if (!m) begin
        checks++;
        if (cn4_8[1] != ~r8[8]) failures++;
        if (slice_cn[3:1] != 3'b111) n_cla_carry++;
        if (!cn4_8[0]) n_ripple_carry++;
      end
      if (failures == 1) $display("FAIL a=%h b=%h s=%h m=%b cn=%b f16=%h ref=%h", a, b, s, m, cn, f16, r16);
    end
    $display("COUNT lookahead_carries=%0d ripple_carries=%0d", n_cla_carry, n_ripple_carry);
    checks += 2;
    if (n_cla_carry == 0) failures++;
    if (n_ripple_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * (HOLD + 2) + 100) @(posedge clk_phi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
