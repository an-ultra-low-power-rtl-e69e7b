// Dynamic functional tests of the ADCL 4-bit ALU, run like the original chip's scope tests.
//
// Eight operations are run with square waves on A0 and B0 and the result read
// through the output register with CL strobes, as in the scope measurements of
// the original chip:
//   active-low logic   A+B, AB            active-low arithmetic  A minus 1, AB minus 1
//   active-high logic  (A+B)-bar, A xor B active-high arithmetic A plus AB, A plus B
// and, last, the condition used for the power estimate: active-low A plus B
// with B0 at 15 kHz and the supply at 450 kHz, i.e. B0 toggling every 15
// supply periods (30 clk_phi edges).  Choices of this testbench: A0 toggles
// at half the B0 rate, the other operand bits stay at their inactive level,
// and CL strobes 20 edges after each B0 transition.  Each strobe checks F
// against the function table, and F0 must change during every operation.
module tb_adcl_dynamic_tests;
  import alu181_ref_pkg::*;

  localparam int SUPPLY_KHZ = 450, B0_KHZ = 15;
  localparam int B0_HALF_EDGES = SUPPLY_KHZ / B0_KHZ;  // B0 half period: 15 supply periods = 30 edges
  localparam int STROBE_AT = 20;

  typedef struct {
    string      name;
    logic [3:0] s;
    logic       m;
    logic       active_low;
  } op_t;

  logic clk_phi = 1'b0, cl = 1'b0;
  logic [3:0] a, b, s, f;
  logic m, cn, p_n, g_n, cn4, aeqb;
  int checks = 0, failures = 0;

  adcl_alu181 dut (.clk_phi, .cl, .a, .b, .s, .m, .cn, .f, .p_n, .g_n, .cn4, .aeqb);

  always #5 clk_phi = ~clk_phi;

  op_t ops [9] = '{
    '{"active-low A+B",        4'hB, 1'b1, 1'b1},
    '{"active-low AB",         4'hE, 1'b1, 1'b1},
    '{"active-low A minus 1",  4'h0, 1'b0, 1'b1},
    '{"active-low AB minus 1", 4'h1, 1'b0, 1'b1},
    '{"active-high (A+B)-bar", 4'h1, 1'b1, 1'b0},
    '{"active-high A xor B",   4'h6, 1'b1, 1'b0},
    '{"active-high A plus AB", 4'h8, 1'b0, 1'b0},
    '{"active-high A plus B",  4'h9, 1'b0, 1'b0},
    '{"power condition: active-low A plus B", 4'h9, 1'b0, 1'b1}
  };

  initial begin
    logic a0, b0, f0_prev;
    int f0_changes, strobes;
    ref_t r;
    logic [3:0] pa, pb;
    for (int k = 0; k < 9; k++) begin
      f0_changes = 0;
      strobes = 0;
      @(negedge clk_phi);
      s  = ops[k].s;
      m  = ops[k].m;
      // carry input inactive: Cn = H in the active-high reading, L in the
      // active-low reading (as in the function table headings)
      cn = ops[k].active_low ? 1'b0 : 1'b1;
      for (int phase = 0; phase < 8; phase++) begin
        b0 = phase[0];
        a0 = phase[1];
        pa = {3'b000, a0};
        pb = {3'b000, b0};
        a = ops[k].active_low ? ~pa : pa;
        b = ops[k].active_low ? ~pb : pb;
        for (int e = 0; e < B0_HALF_EDGES; e++) begin
          @(negedge clk_phi);
          if (e == STROBE_AT) begin
            #1 cl = 1'b1;
            #1 cl = 1'b0;
            r = alu_ref(a, b, s, m, cn);
            checks++;
            if (f != r.f) begin
              failures++;
              $display("FAIL %s phase %0d: f=%h expected %h", ops[k].name, phase, f, r.f);
            end
            if (strobes > 0 && f[0] != f0_prev) f0_changes++;
            f0_prev = f[0];
            strobes++;
          end
        end
      end
      $display("COUNT %s: strobes=%0d f0_changes=%0d", ops[k].name, strobes, f0_changes);
      checks++;
      if (f0_changes == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * 8 * (B0_HALF_EDGES + 2) + 100) @(posedge clk_phi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
