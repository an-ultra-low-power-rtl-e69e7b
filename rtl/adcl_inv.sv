// ADCL inverter (NOT) cell, digital model.
//
// An adiabatic dynamic CMOS logic (ADCL) gate is powered by the sine-wave
// supply V_phi instead of a DC rail, and its output follows the supply: the
// result of a gate appears half a supply period after its input.  This cell
// models that timing as a register that takes the inverted input at every
// rising edge of clk_phi, where clk_phi has one rising edge per half period of
// V_phi (twice the supply frequency).
//
// Interface: a -> y = ~a.  Timing: y follows a one clk_phi edge later
// (0.5 supply period).  The truth table and the half-period delay follow the
// inverter described for the ADCL ALU; representing the supply by a clock is
// this model's own choice.  There is no reset: like the real gate, the cell
// holds an arbitrary value until its input has been evaluated once.
module adcl_inv (
  input  logic clk_phi,
  input  logic a,
  output logic y
);
  always_ff @(posedge clk_phi) y <= ~a;
endmodule
