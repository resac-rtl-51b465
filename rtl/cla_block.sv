// One carry look-ahead adder slice.
//
// Each bit forms a generate g = a&b and a propagate p = a^b. Every internal
// carry is computed directly from the slice's carry in and the g/p terms
// (c[i+1] = g[i] | p[i]&g[i-1] | ... | p[i]&...&p[0]&cin), so no carry
// ripples inside the slice. The carry out is produced as the group
// generate OR group propagate AND carry in, which is the single AO21 stage
// a carry crosses when it passes through an intermediate slice of a chain.
//
// Interface: WIDTH-bit operands a, b and carry in cin; WIDTH-bit sum and
// carry out cout. Timing: combinational.
// The look-ahead slices (4-bit, plus one 2-bit slice) follow the design
// description; the equations are the textbook carry look-ahead ones.
module cla_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH-1:0] c;       // carry into each bit
  logic             grp_g;   // group generate
  logic             grp_p;   // group propagate

  always_comb begin
    g = a & b;
    p = a ^ b;
    // Look-ahead carries, each a sum of products of g, p and cin.
    for (int i = 0; i < int'(WIDTH); i++) begin
      logic term;
      term = cin;
      for (int j = 0; j < i; j++) term = term & p[j];
      c[i] = term;
      for (int j = 0; j < i; j++) begin
        logic t;
        t = g[j];
        for (int k = j + 1; k < i; k++) t = t & p[k];
        c[i] = c[i] | t;
      end
    end
    grp_p = &p;
    grp_g = 1'b0;
    for (int j = 0; j < int'(WIDTH); j++) begin
      logic t;
      t = g[j];
      for (int k = j + 1; k < int'(WIDTH); k++) t = t & p[k];
      grp_g = grp_g | t;
    end
    sum  = p ^ c;
    cout = grp_g | (grp_p & cin);
  end

endmodule
