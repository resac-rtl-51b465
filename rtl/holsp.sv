// Higher-order less significant part (HOLSP) of one RESAC functional unit.
//
// This is the upper four bits of the approximate lower part of an
// M-HERLOA-style adder (lower-part OR adder with hybrid error reduction).
// With x = a3^b3 and g2 = a2&b2 (bit 3 is the most significant HOLSP bit):
//   carry into the MSP  cmsp = a3 & b3
//   q3 = x | g2
//   q2 = (a2 | b2) & ~(g2 & ~x)
//   q1 = a1 | b1 | f,   q0 = a0 | b0 | f,   with f = x & g2
// Bits 1 and 0 are OR-approximated. When bit 2 generates a carry into a bit
// 3 that would pass it on (x = 1), the carry that the MSP cannot see is
// compensated by saturating the whole lower part to ones (f = 1), which
// bounds the error.
//
// Interface: the four operand bits K-1..K-4 of a and b; q = SUM[K-1..K-4];
// cmsp = the carry input of the MSP. Timing: combinational, two or three
// gate levels; the MSP sees only the single AND gate on cmsp.
// The two-input AND that produces the MSP carry and the bit positions
// follow the design description; the q equations are those of the
// published M-HERLOA adder that the design uses, not given in detail here.
module holsp (
  input  logic [resac_pkg::HOLSP_W-1:0] a,
  input  logic [resac_pkg::HOLSP_W-1:0] b,
  output logic [resac_pkg::HOLSP_W-1:0] q,
  output logic                          cmsp
);

  logic x;   // propagate of the top HOLSP bit
  logic g2;  // generate of the next bit down
  logic f;   // saturate the bits below

  always_comb begin
    x    = a[3] ^ b[3];
    g2   = a[2] & b[2];
    f    = x & g2;
    cmsp = a[3] & b[3];
    q[3] = x | g2;
    q[2] = (a[2] | b[2]) & ~(g2 & ~x);
    q[1] = a[1] | b[1] | f;
    q[0] = a[0] | b[0] | f;
  end

endmodule
