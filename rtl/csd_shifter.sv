// csd_shifter: one programmable CSD digit (one partial product of a tap).
//
// The 5-bit code selects the operation of the coefficient table: shift the tap input right
// by 0..14 bits (weight 2^0 .. 2^-14), negate it when the sign bit is set, or give zero when
// the four shift bits are all ones. The input is a two's complement word of W bits whose
// lowest bits are guard bits, so the right shift is arithmetic and drops what falls below
// the LSB (truncation toward minus infinity). Negation is the two's complement ~v + 1,
// done inside the digit; folding the +1 into the adder tree would also be possible.
// Purely combinational. The encoding follows the filter's coefficient table; the truncating
// shift and the in-digit negation are this design's choices.
module csd_shifter
  import csd_pkg::*;
#(
  parameter int unsigned W = DATA_W + GUARD  // internal word width
) (
  input  logic [W-1:0] x,     // tap input, aligned with GUARD fraction bits
  input  csd_code_t    code,  // CSD digit code
  output logic [W-1:0] pp     // partial product, code's weight times x
);

  logic [W-1:0] shifted;

  always_comb begin
    shifted = W'($signed(x) >>> code.shift);
    if (code.shift == SHIFT_ZERO) pp = '0;
    else if (code.neg)            pp = ~shifted + W'(1);
    else                          pp = shifted;
  end

endmodule
