// End-to-end testbench of the ADCL 4-bit ALU (top level, default parameters).
//
// Phase 1, static operation: for every select code S, both modes M and both
//   carry inputs, with edge-case and random operands, the operands are held,
//   the outputs are checked after the network latency, F is strobed into the
//   output register with CL and checked there, and the register is checked to
//   hold F while the operands change before the next strobe.
// Phase 2, active-low reading: the same pins read with inverted A, B and F
//   must give the active-low column of the function table.
// Phase 3, streamed operation: new operands on every clk_phi edge, CL strobed
//   on every edge; the register must show the result of the operands applied
//   10 edges earlier.
// Each mechanism of the design is counted and must occur at least once.
module tb_adcl_alu181;
  import alu181_ref_pkg::*;

  localparam int LAT_F = 10, LAT_E = 12;

  logic clk_phi = 1'b0, cl = 1'b0;
  logic [3:0] a, b, s, f;
  logic m, cn, p_n, g_n, cn4, aeqb;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_logic, n_arith, n_cin, n_cout, n_lookahead, n_gen, n_prop, n_aeqb;
  int n_hold, n_active_low, n_stream;

  adcl_alu181 dut (.clk_phi, .cl, .a, .b, .s, .m, .cn, .f, .p_n, .g_n, .cn4, .aeqb);

  always #5 clk_phi = ~clk_phi;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h s=%h m=%b cn=%b f=%h", what, a, b, s, m, cn, f);
    end
  endtask

  task automatic strobe();
    #1 cl = 1'b1;
    #1 cl = 1'b0;
  endtask

  // Apply operands at a negative clk_phi edge and wait until every output
  // has settled.
  task automatic apply_and_wait(input logic [3:0] ai, bi, si, input logic mi, ci);
    @(negedge clk_phi);
    {a, b, s, m, cn} = {ai, bi, si, mi, ci};
    repeat (LAT_E) @(negedge clk_phi);
  endtask

  task automatic static_op(input logic [3:0] ai, bi, si, input logic mi, ci);
    ref_t r;
    logic [3:0] held;
    apply_and_wait(ai, bi, si, mi, ci);
    r = alu_ref(ai, bi, si, mi, ci);
    check(cn4 == ~r.c4, "cn4");
    check(g_n == ~r.gen, "g_n");
    if (!r.gen) check(p_n == ~r.prop, "p_n");
    check(aeqb == r.aeqb, "aeqb");
    strobe();
    check(f == r.f, "f registered");
    if (mi) n_logic++; else n_arith++;
    if (!mi && !ci) n_cin++;
    if (r.c4) n_cout++;
    if (r.gen) n_gen++;
    if (!r.gen && r.prop) n_prop++;
    if (r.aeqb) n_aeqb++;
    // carry into bit 3 that only the p2 p1 p0 c0 lookahead term produces
    if (!mi && !ci) begin
      logic [7:0] xy;
      logic [3:0] pp, gg;
      xy = arith_xy(si, ai, bi);
      pp = xy[7:4] | xy[3:0];
      gg = xy[7:4] & xy[3:0];
      if (pp[2] && pp[1] && pp[0] && !gg[2] && !gg[1] && !gg[0]) n_lookahead++;
    end
    // the register must hold while the network output moves
    held = f;
    @(negedge clk_phi);
    {a, b} = {~ai, ~bi};
    repeat (LAT_F + 1) @(negedge clk_phi);
    check(f == held, "register hold");
    n_hold++;
  endtask

  // Active-low reading: operands and result inverted on the pins.
  task automatic active_low_op(input logic [3:0] al, bl, si, input logic mi, ci,
                               input logic [3:0] expect_l);
    apply_and_wait(~al, ~bl, si, mi, ci);
    strobe();
    check(~f == expect_l, "active-low");
    n_active_low++;
  endtask

  initial begin
    logic [3:0] av [6] = '{4'h0, 4'hF, 4'h5, 4'hA, 4'h7, 4'h9};
    logic [3:0] bv [6] = '{4'h0, 4'hF, 4'hA, 4'h5, 4'h9, 4'h7};
    logic [3:0] x, y;
    logic [3:0] hist_a [64], hist_b [64], hist_s [64];
    logic       hist_m [64], hist_c [64];
    ref_t r;

    {n_logic, n_arith, n_cin, n_cout, n_lookahead, n_gen, n_prop, n_aeqb} = '0;
    {n_hold, n_active_low, n_stream} = '0;

    // ---- phase 1: every function, both modes, both carries -------------
    for (int si = 0; si < 16; si++)
      for (int mi = 0; mi < 2; mi++)
        for (int ci = 0; ci < 2; ci++) begin
          for (int k = 0; k < 6; k++) static_op(av[k], bv[k], 4'(si), 1'(mi), 1'(ci));
          repeat (2) static_op(4'($urandom), 4'($urandom), 4'(si), 1'(mi), 1'(ci));
        end

    // ---- phase 2: active-low reading of the table ------------------------
    for (int k = 0; k < 8; k++) begin
      x = 4'($urandom);
      y = 4'($urandom);
      active_low_op(x, y, 4'h0, 1'b1, 1'b1, ~x);          // NOT A
      active_low_op(x, y, 4'hB, 1'b1, 1'b1, x | y);       // A + B
      active_low_op(x, y, 4'hE, 1'b1, 1'b1, x & y);       // AB
      active_low_op(x, y, 4'hA, 1'b1, 1'b1, y);           // B
      active_low_op(x, y, 4'h5, 1'b1, 1'b1, ~y);          // NOT B
      active_low_op(x, y, 4'h9, 1'b1, 1'b1, x ^ y);       // A xor B
      active_low_op(x, y, 4'h3, 1'b1, 1'b1, 4'hF);        // logic 1
      active_low_op(x, y, 4'hC, 1'b1, 1'b1, 4'h0);        // logic 0
      active_low_op(x, y, 4'hF, 1'b1, 1'b1, x);           // A
      active_low_op(x, y, 4'h0, 1'b0, 1'b0, x - 4'd1);    // A minus 1
      active_low_op(x, y, 4'h1, 1'b0, 1'b0, (x & y) - 4'd1); // AB minus 1
      active_low_op(x, y, 4'h3, 1'b0, 1'b0, 4'hF);        // minus 1
      active_low_op(x, y, 4'h6, 1'b0, 1'b0, x - y - 4'd1);// A minus B minus 1
      active_low_op(x, y, 4'h9, 1'b0, 1'b0, x + y);       // A plus B
      active_low_op(x, y, 4'hC, 1'b0, 1'b0, x + x);       // A plus A
      active_low_op(x, y, 4'hF, 1'b0, 1'b0, x);           // A
    end

    // ---- phase 3: streamed operands, one result per clk_phi edge --------
    for (int j = 0; j < 600; j++) begin
      @(negedge clk_phi);
      if (j >= LAT_F) begin
        r = alu_ref(hist_a[(j-LAT_F)%64], hist_b[(j-LAT_F)%64], hist_s[(j-LAT_F)%64],
                    hist_m[(j-LAT_F)%64], hist_c[(j-LAT_F)%64]);
        strobe();
        check(f == r.f, "streamed f");
        n_stream++;
      end
      {hist_a[j%64], hist_b[j%64], hist_s[j%64], hist_m[j%64], hist_c[j%64]} = 14'($urandom);
      {a, b, s, m, cn} = {hist_a[j%64], hist_b[j%64], hist_s[j%64], hist_m[j%64], hist_c[j%64]};
    end

    $display("COUNT logic_ops=%0d arith_ops=%0d carry_in=%0d carry_out=%0d lookahead_c3=%0d",
             n_logic, n_arith, n_cin, n_cout, n_lookahead);
    $display("COUNT group_generate=%0d group_propagate=%0d a_eq_b=%0d register_hold=%0d active_low=%0d streamed=%0d",
             n_gen, n_prop, n_aeqb, n_hold, n_active_low, n_stream);
    check(n_logic > 0, "no logic op");        check(n_arith > 0, "no arithmetic op");
    check(n_cin > 0, "no carry in");          check(n_cout > 0, "no carry out");
    check(n_lookahead > 0, "no lookahead");   check(n_gen > 0, "no generate");
    check(n_prop > 0, "no propagate");        check(n_aeqb > 0, "no A=B");
    check(n_hold > 0, "no register hold");    check(n_active_low > 0, "no active-low");
    check(n_stream > 0, "no streaming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk_phi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
