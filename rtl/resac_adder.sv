// RESAC adder: a fault-tolerant approximate 32-bit adder.
//
// Triple modular redundancy (TMR) protects an adder by building it three
// times and voting every output bit, at over three times the area and
// power. RESAC instead splits the adder by bit significance. The most
// significant part (MSP, SUM[32..10]) is an exact adder and the
// higher-order less significant part (HOLSP, SUM[9..6]) an approximate
// one; both are triplicated inside three identical functional units and
// voted bit by bit. The lower-order less significant part (LOLSP,
// SUM[5..0]) is built once, unprotected: an upset there changes the result
// by less than 64, which an error-tolerant application such as image
// processing accepts.
//
// In this configuration the LOLSP has no logic at all: every LOLSP sum bit
// is the constant 1, which roughly halves the mean error of ignoring the low bits.
// Since the MSP only waits on a single AND gate of bits 9 for its carry
// input, the critical path is a 22-bit exact add plus one voter.
//
// Interface: a, b (32 bits); sum (33 bits, carry overflow in bit 32).
// Operand bits 5..0 are not read: the constant LOLSP ignores them, so
// lint reports them as unused.
// The voted MSP result M1, voted HOLSP result M2 and LOLSP result R are
// also brought out. Timing: combinational, no clock.
// Part sizes, voters and the shared LOLSP follow the design description.
module resac_adder
  import resac_pkg::*;
(
  input  logic [ADDER_W-1:0] a,
  input  logic [ADDER_W-1:0] b,
  output logic [ADDER_W:0]   sum,
  output logic [MSP_W:0]     m1,   // voted MSP result, SUM[N..K]
  output logic [HOLSP_W-1:0] m2,   // voted HOLSP result, SUM[K-1..K-4]
  output logic [LOLSP_W-1:0] r     // LOLSP result, SUM[K-5..0]
);

  logic [MSP_W:0]     p_a, p_b, p_c;
  logic [HOLSP_W-1:0] q_a, q_b, q_c;

  resac_unit u_fu_a (.a(a[ADDER_W-1:LOLSP_W]), .b(b[ADDER_W-1:LOLSP_W]), .p(p_a), .q(q_a));
  resac_unit u_fu_b (.a(a[ADDER_W-1:LOLSP_W]), .b(b[ADDER_W-1:LOLSP_W]), .p(p_b), .q(q_b));
  resac_unit u_fu_c (.a(a[ADDER_W-1:LOLSP_W]), .b(b[ADDER_W-1:LOLSP_W]), .p(p_c), .q(q_c));

  majority_voter #(.WIDTH(MSP_W + 1)) u_voter1 (
    .x(p_a), .y(p_b), .z(p_c), .v(m1)
  );

  majority_voter #(.WIDTH(HOLSP_W)) u_voter2 (
    .x(q_a), .y(q_b), .z(q_c), .v(m2)
  );

  // LOLSP, common to the three units: every sum bit is a constant 1.
  assign r   = '1;
  assign sum = {m1, m2, r};

endmodule
