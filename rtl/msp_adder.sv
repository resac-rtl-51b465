// Exact adder of the most significant part (MSP).
//
// Adds the upper WIDTH bits of the two operands plus a carry input and
// returns WIDTH+1 result bits (the sum and the carry overflow), i.e.
// SUM[N..K] of the full adder. It is a chain of carry look-ahead slices:
// when WIDTH is not a multiple of SLICE_W, a narrower slice of the
// remaining bits sits at the least significant end and the full SLICE_W
// slices follow it. Between slices the carry passes through one AO21
// stage (group generate OR group propagate AND carry in).
//
// Interface: a, b (WIDTH bits), cin; sum (WIDTH bits), cout.
// Timing: combinational. The critical path runs through the slices' group
// carry terms, so it grows with the number of slices, not with WIDTH.
// The 22-bit size built from five 4-bit slices and one 2-bit slice follows
// the design description. Placing the 2-bit slice at the least
// significant end is this design's reading of the delay model, which
// names the last slice of the chain as a 4-bit one.
module msp_adder #(
  parameter int unsigned WIDTH   = resac_pkg::MSP_W,
  parameter int unsigned SLICE_W = resac_pkg::CLA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned REM_W  = WIDTH % SLICE_W;         // narrow slice, LSB end
  localparam int unsigned NFULL  = WIDTH / SLICE_W;         // full slices above it
  localparam int unsigned NSLICE = NFULL + ((REM_W != 0) ? 1 : 0);

  // carry[s] enters slice s; carry[NSLICE] is the carry overflow.
  logic [NSLICE:0] carry;

  assign carry[0] = cin;

  if (REM_W != 0) begin : g_narrow
    cla_block #(.WIDTH(REM_W)) u_slice (
      .a   (a[REM_W-1:0]),
      .b   (b[REM_W-1:0]),
      .cin (carry[0]),
      .sum (sum[REM_W-1:0]),
      .cout(carry[1])
    );
  end

  for (genvar s = 0; s < NFULL; s++) begin : g_slice
    localparam int unsigned LO  = REM_W + s * SLICE_W;
    localparam int unsigned IDX = s + ((REM_W != 0) ? 1 : 0);
    cla_block #(.WIDTH(SLICE_W)) u_slice (
      .a   (a[LO +: SLICE_W]),
      .b   (b[LO +: SLICE_W]),
      .cin (carry[IDX]),
      .sum (sum[LO +: SLICE_W]),
      .cout(carry[IDX+1])
    );
  end

  assign cout = carry[NSLICE];

endmodule
