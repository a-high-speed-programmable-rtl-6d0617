// comp42: W-bit 4:2 compression adder.
//
// Reduces four rows a, b, c, d to a sum row and a carry row with
// sum + carry == a + b + c + d (modulo 2^W). Each bit position holds two full adders:
// the first adds a, b, c; its carry goes sideways to the second full adder of the next
// bit, which adds the first sum, d and that sideways carry. The sideways carry never
// depends on the sideways carry of the bit below, so the delay is two full adders
// whatever W is. The carry row is already shifted into place (bit 0 is zero).
// Combinational. The published design names the 4:2 compressor; this two-full-adder form is the
// usual construction and this design's choice.
module comp42 #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1;   // first full adder sum
  logic [W-1:0] co1;  // first full adder carry, to the next bit
  logic [W-1:0] co2;  // second full adder carry, the carry row before the shift
  logic [W-1:0] cin;  // sideways carry into each bit

  always_comb begin
    s1   = a ^ b ^ c;
    co1  = (a & b) | (a & c) | (b & c);
    cin  = {co1[W-2:0], 1'b0};
    sum  = s1 ^ d ^ cin;
    co2  = (s1 & d) | (s1 & cin) | (d & cin);
    carry = {co2[W-2:0], 1'b0};
  end

endmodule
