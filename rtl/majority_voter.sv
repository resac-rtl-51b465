// Bitwise three-input majority voter.
//
// Each output bit is the majority of the three corresponding input bits,
// v = x&y | y&z | x&z, so a bus is correct as long as no bit position is
// wrong in more than one of the three copies. The voters are the only
// place where the redundant copies meet; they are exact even though the
// units they vote on may compute approximately.
//
// Interface: three WIDTH-bit copies in, one WIDTH-bit voted result out.
// Timing: purely combinational, one AO22-class gate level per bit.
// The equation follows the design description; the width is set by the
// instantiating module (23 bits for the MSP result, 4 for the HOLSP).
module majority_voter #(
  parameter int unsigned WIDTH = 23
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] v
);

  always_comb begin
    v = (x & y) | (y & z) | (x & z);
  end

endmodule
