// Reference model of the HC181 function table for the testbenches.
//
// Written from the function table (active-high reading), independently of the
// gate network: logic results are the 16 Boolean functions of A and B; each
// arithmetic result is the sum X + Y + carry-in of two 4-bit words named by
// the table (a "minus 1" is written as adding 1111).  The carry out is bit 4
// of that sum, the group generate is the carry out with no carry in, and the
// group propagate (checked only when generate is 0) is the carry out with a
// carry in.
package alu181_ref_pkg;
  typedef struct packed {
    logic [3:0] f;
    logic       c4;    // active-high carry out
    logic       gen;   // active-high group generate
    logic       prop;  // active-high group propagate (valid when gen = 0)
    logic       aeqb;
  } ref_t;

  function automatic logic [3:0] logic_fn(input logic [3:0] s, a, b);
    case (s)
      4'h0: return ~a;
      4'h1: return ~(a | b);
      4'h2: return ~a & b;
      4'h3: return 4'h0;
      4'h4: return ~(a & b);
      4'h5: return ~b;
      4'h6: return a ^ b;
      4'h7: return a & ~b;
      4'h8: return ~a | b;
      4'h9: return ~(a ^ b);
      4'hA: return b;
      4'hB: return a & b;
      4'hC: return 4'hF;
      4'hD: return a | ~b;
      4'hE: return a | b;
      default: return a;
    endcase
  endfunction

  // Operands X and Y of the arithmetic function: result = X plus Y plus cin.
  function automatic logic [7:0] arith_xy(input logic [3:0] s, a, b);
    case (s)
      4'h0: return {a,        4'h0};
      4'h1: return {a | b,    4'h0};
      4'h2: return {a | ~b,   4'h0};
      4'h3: return {4'hF,     4'h0};
      4'h4: return {a,        a & ~b};
      4'h5: return {a | b,    a & ~b};
      4'h6: return {a,        ~b};
      4'h7: return {a & ~b,   4'hF};
      4'h8: return {a,        a & b};
      4'h9: return {a,        b};
      4'hA: return {a | ~b,   a & b};
      4'hB: return {a & b,    4'hF};
      4'hC: return {a,        a};
      4'hD: return {a | b,    a};
      4'hE: return {a | ~b,   a};
      default: return {a,     4'hF};
    endcase
  endfunction

  // Pin-level reference; cn is the low-active carry input.
  function automatic ref_t alu_ref(input logic [3:0] a, b, s, input logic m, cn);
    ref_t r;
    logic [7:0] xy;
    logic [4:0] sum, sum0, sum1;
    xy   = arith_xy(s, a, b);
    sum  = {1'b0, xy[7:4]} + {1'b0, xy[3:0]} + {4'b0, ~cn};
    sum0 = {1'b0, xy[7:4]} + {1'b0, xy[3:0]};
    sum1 = sum0 + 5'd1;
    r.f    = m ? logic_fn(s, a, b) : sum[3:0];
    r.c4   = sum[4];
    r.gen  = sum0[4];
    r.prop = sum1[4];
    r.aeqb = (r.f == 4'hF);
    return r;
  endfunction
endpackage
