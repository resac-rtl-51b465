// One redundant functional unit of the RESAC adder.
//
// Holds the parts of the adder that are triplicated: the exact MSP adder,
// which adds operand bits N-1..K, and the approximate HOLSP, which forms
// sum bits K-1..K-4 and, through a single AND gate of bits K-1, the carry
// input of the MSP. The lower-order part (bits K-5..0) is not in the unit:
// it is shared by all three units.
//
// Interface: operand bits N-1..K-4 of a and b (the primary inputs are given
// identically to every unit; the bits below are not used by a unit); p = SUM[N..K] (N-K+1 bits, carry overflow
// included), q = SUM[K-1..K-4]. Timing: combinational; the critical path
// is the MSP carry chain, starting at the AND gate.
// The split and the connection through one AND gate follow the design
// description.
module resac_unit
  import resac_pkg::*;
(
  input  logic [ADDER_W-1:LOLSP_W] a,
  input  logic [ADDER_W-1:LOLSP_W] b,
  output logic [MSP_W:0]     p,
  output logic [HOLSP_W-1:0] q
);

  logic cmsp;  // carry from the HOLSP into the MSP

  holsp u_holsp (
    .a   (a[LSP_W-1 -: HOLSP_W]),
    .b   (b[LSP_W-1 -: HOLSP_W]),
    .q   (q),
    .cmsp(cmsp)
  );

  msp_adder #(.WIDTH(MSP_W), .SLICE_W(CLA_W)) u_msp (
    .a   (a[ADDER_W-1:LSP_W]),
    .b   (b[ADDER_W-1:LSP_W]),
    .cin (cmsp),
    .sum (p[MSP_W-1:0]),
    .cout(p[MSP_W])
  );

endmodule
