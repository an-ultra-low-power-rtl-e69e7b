// Self-checking testbench of adcl_alu4_core.
// A new random operand set (A, B, S, M, Cn) is applied on every clk_phi edge,
// so the test only passes if every path of the network is balanced.  Each
// output is compared with the function-table reference at its own latency:
// p_n 5, g_n 7, f 10, cn4 10, aeqb 12 edges.  After the stream, a held operand
// set checks that outputs appear exactly at their latency and not earlier.
module tb_adcl_alu4_core;
  import alu181_ref_pkg::*;
  import adcl_pkg::*;

  localparam int unsigned N = 4000;
  localparam int LAT_P = LAT_P_N, LAT_G = LAT_G_N, LAT_C = LAT_CN4, LAT_E = LAT_AEQB;

  logic clk_phi = 1'b0;
  logic [3:0] a, b, s, f;
  logic m, cn, p_n, g_n, cn4, aeqb;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic [3:0] a, b, s;
    logic m, cn;
  } in_t;
  in_t hist [N];

  adcl_alu4_core dut (.clk_phi, .a, .b, .s, .m, .cn, .f, .p_n, .g_n, .cn4, .aeqb);

  always #5 clk_phi = ~clk_phi;

  task automatic check(input bit ok, input string what, input int j);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at step %0d", what, j);
    end
  endtask

  task automatic check_step(input int j);
    ref_t r;
    if (j >= LAT_F) begin
      r = alu_ref(hist[j-LAT_F].a, hist[j-LAT_F].b, hist[j-LAT_F].s, hist[j-LAT_F].m, hist[j-LAT_F].cn);
      check(f == r.f, "f", j);
    end
    if (j >= LAT_C) begin
      r = alu_ref(hist[j-LAT_C].a, hist[j-LAT_C].b, hist[j-LAT_C].s, hist[j-LAT_C].m, hist[j-LAT_C].cn);
      check(cn4 == ~r.c4, "cn4", j);
    end
    if (j >= LAT_G) begin
      r = alu_ref(hist[j-LAT_G].a, hist[j-LAT_G].b, hist[j-LAT_G].s, hist[j-LAT_G].m, hist[j-LAT_G].cn);
      check(g_n == ~r.gen, "g_n", j);
    end
    if (j >= LAT_P) begin
      r = alu_ref(hist[j-LAT_P].a, hist[j-LAT_P].b, hist[j-LAT_P].s, hist[j-LAT_P].m, hist[j-LAT_P].cn);
      if (!r.gen) check(p_n == ~r.prop, "p_n", j);
    end
    if (j >= LAT_E) begin
      r = alu_ref(hist[j-LAT_E].a, hist[j-LAT_E].b, hist[j-LAT_E].s, hist[j-LAT_E].m, hist[j-LAT_E].cn);
      check(aeqb == r.aeqb, "aeqb", j);
    end
  endtask

  initial begin
    ref_t r;
    for (int j = 0; j < N; j++) begin
      @(negedge clk_phi);
      check_step(j);
      hist[j] = in_t'($urandom);
      {a, b, s, m, cn} = hist[j];
    end
    // Latency: hold an input whose F differs from the previous one.
    @(negedge clk_phi);
    {a, b, s, m, cn} = {4'h5, 4'h3, 4'h9, 1'b0, 1'b1};  // 5 plus 3 = 8
    repeat (LAT_F - 1) @(posedge clk_phi);
    @(negedge clk_phi);
    r = alu_ref(4'h5, 4'h3, 4'h9, 1'b0, 1'b1);
    check(f != r.f || hist[N-1] == {4'h5, 4'h3, 4'h9, 1'b0, 1'b1}, "f too early", N);
    @(negedge clk_phi);
    check(f == r.f, "f at latency", N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 200) @(posedge clk_phi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
