// Reference model of the RESAC adder for the testbenches.
//
// Written behaviourally, from the rules of the approximate adder rather
// than from its gates: the MSP is an exact add of the upper bits whose
// carry input is the AND of the two top LSP bits; the HOLSP ORs its bits
// unless bit K-2 generates a carry (then bit K-1 is 1 and bit K-2 is 0),
// and saturates the whole LSP to ones when that carry would also pass
// through bit K-1; the LOLSP bits are all ones.
package resac_ref_pkg;
  import resac_pkg::*;

  function automatic logic [HOLSP_W-1:0] holsp_ref(input logic [HOLSP_W-1:0] a,
                                                    input logic [HOLSP_W-1:0] b);
    logic carry_in2;   // bit K-2 generates a carry
    logic pass3;       // bit K-1 would pass it on
    carry_in2 = a[2] && b[2];
    pass3     = (a[3] != b[3]);
    if (carry_in2 && pass3)
      return '1;
    else if (carry_in2)
      return {1'b1, 1'b0, a[1] || b[1], a[0] || b[0]};
    else
      return {pass3, a[2] || b[2], a[1] || b[1], a[0] || b[0]};
  endfunction

  function automatic logic [MSP_W:0] msp_ref(input logic [ADDER_W-1:0] a,
                                             input logic [ADDER_W-1:0] b);
    logic [MSP_W:0] s;
    s = {1'b0, a[ADDER_W-1:LSP_W]} + {1'b0, b[ADDER_W-1:LSP_W]}
        + {{MSP_W{1'b0}}, (a[LSP_W-1] && b[LSP_W-1])};
    return s;
  endfunction

  function automatic logic [ADDER_W:0] resac_ref(input logic [ADDER_W-1:0] a,
                                                 input logic [ADDER_W-1:0] b);
    return {msp_ref(a, b),
            holsp_ref(a[LSP_W-1 -: HOLSP_W], b[LSP_W-1 -: HOLSP_W]),
            {LOLSP_W{1'b1}}};
  endfunction

endpackage
