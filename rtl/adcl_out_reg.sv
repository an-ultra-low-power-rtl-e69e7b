// Output register of the ADCL ALU.
//
// The ALU's result bits leave the ADCL network after different numbers of
// gate stages, so they are first collected in this register and then read out
// together: on a rising edge of the data strobe cl the register takes the
// 4-bit function result and holds it until the next strobe.
//
// Interface: cl (strobe), d (from the ALU network) -> q.  Timing: q changes
// only on a rising edge of cl; d must have been stable for the ALU's latency
// before the strobe.  The register and its strobe follow the source design;
// the edge-triggered flip-flop type, the width parameter and the absence of a
// reset (the chip shows no reset pin) are this design's choices.
module adcl_out_reg #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             cl,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge cl) q <= d;
endmodule
