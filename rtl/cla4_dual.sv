// cla4_dual: 4-bit carry look-ahead adder with two carry-ins, for a carry-select adder.
//
// Adds A3..A0 and B3..B0 twice at once: S03..S00 and Cout0 are the sum and carry-out for
// a carry-in of 0 (Cin0), S13..S10 and Cout1 those for a carry-in of 1 (Cin1). Both are
// formed from the same generate (g = a & b) and propagate (p = a ^ b) signals; every
// internal carry is a two-level look-ahead expression of g, p and the carry-in, so no
// carry ripples through the block. The port set follows the CLA block of the final
// adder; the look-ahead equations are the standard ones.
// Combinational.
module cla4_dual (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] s0,     // sum for carry-in 0
  output logic [3:0] s1,     // sum for carry-in 1
  output logic       cout0,  // carry-out for carry-in 0
  output logic       cout1   // carry-out for carry-in 1
);

  logic [3:0] g, p;
  logic [4:0] c0, c1;  // carries into each bit (index 4 = carry-out)
  logic       gg, gp;  // group generate and group propagate

  always_comb begin
    g = a & b;
    p = a ^ b;
    // Group terms: carries with a carry-in of 0 are the generate terms alone.
    gg = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp = &p;
    c0[0] = 1'b0;
    c0[1] = g[0];
    c0[2] = g[1] | (p[1] & g[0]);
    c0[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
    c0[4] = gg;
    c1[0] = 1'b1;
    c1[1] = g[0] | p[0];
    c1[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0]);
    c1[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0]);
    c1[4] = gg | gp;
    s0    = p ^ c0[3:0];
    s1    = p ^ c1[3:0];
    cout0 = c0[4];
    cout1 = c1[4];
  end

endmodule
