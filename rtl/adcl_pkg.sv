// Shared types and constants for the ADCL 4-bit ALU.
//
// dr_t is a dual-rail signal: t carries the value and f its complement, both
// produced by the same gate stage.  Logic built only from NAND2/NOR2 cells
// can then form AND, OR and XOR without a separate inverter stage, and a
// signal can be delayed by any number of half supply periods (an inverter
// applied to the opposite rail), which is what path balancing in an ADCL
// network needs.  The dual-rail encoding is this design's own choice.
package adcl_pkg;
  typedef struct packed {
    logic t;  // true rail
    logic f;  // complement rail
  } dr_t;

  localparam dr_t DR_ONE  = '{t: 1'b1, f: 1'b0};
  localparam dr_t DR_ZERO = '{t: 1'b0, f: 1'b1};

  // Gate stages (clk_phi edges) from the operand inputs to each output of
  // adcl_alu4_core.
  localparam int unsigned LAT_PG    = 3;   // internal propagate / generate
  localparam int unsigned LAT_P_N   = 5;   // P-bar output
  localparam int unsigned LAT_G_N   = 7;   // G-bar output
  localparam int unsigned LAT_F     = 10;  // F3..F0
  localparam int unsigned LAT_CN4   = 10;  // Cn+4
  localparam int unsigned LAT_AEQB  = 12;  // A=B

  function automatic dr_t dr_of(input logic v);
    return '{t: v, f: ~v};
  endfunction

  function automatic dr_t dr_not(input dr_t v);
    return '{t: v.f, f: v.t};
  endfunction
endpackage
