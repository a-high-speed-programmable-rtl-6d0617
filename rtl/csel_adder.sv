// csel_adder: final adder of the filter, a carry-select adder built from 4-bit CLAs.
//
// Adds the sum and carry rows left by the compressor tree. The W-bit operands are padded
// to whole 8-bit groups. In each group two dual-carry 4-bit CLAs (cla4_dual) work in
// parallel; the low CLA's two carry-outs pick, through sum selectors, the high CLA's
// results, giving the group's sum and carry-out for a group carry-in of 0 and of 1. The
// carry selectors then pass the actual carry from group to group, each choosing one of
// the two precomputed group results. The critical path is one CLA, the sum selector and
// one carry selector per group. Carry-out and bits above W are dropped by the caller as
// needed (cout is provided).
// Combinational. The two-CLA groups and the sum and carry selectors follow the published design's
// final adder; the padding of W to a multiple of 8 is this design's choice.
module csel_adder #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = (W + 7) / 8;  // 8-bit groups
  localparam int unsigned WP = 8 * NG;       // padded width

  logic [WP-1:0] ap, bp, sp;
  logic [7:0]    gs0 [NG];   // group sum, group carry-in 0
  logic [7:0]    gs1 [NG];   // group sum, group carry-in 1
  logic          gc0 [NG];   // group carry-out, carry-in 0
  logic          gc1 [NG];   // group carry-out, carry-in 1
  logic [NG:0]   gcarry;     // actual carry into each group

  assign ap = WP'(a);
  assign bp = WP'(b);

  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic [3:0] lo_s0, lo_s1, hi_s0, hi_s1;
    logic       lo_c0, lo_c1, hi_c0, hi_c1;

    cla4_dual u_lo (
      .a(ap[8*k +: 4]), .b(bp[8*k +: 4]),
      .s0(lo_s0), .s1(lo_s1), .cout0(lo_c0), .cout1(lo_c1)
    );
    cla4_dual u_hi (
      .a(ap[8*k+4 +: 4]), .b(bp[8*k+4 +: 4]),
      .s0(hi_s0), .s1(hi_s1), .cout0(hi_c0), .cout1(hi_c1)
    );

    // Sum selectors inside the group.
    always_comb begin
      gs0[k] = {lo_c0 ? hi_s1 : hi_s0, lo_s0};
      gc0[k] = lo_c0 ? hi_c1 : hi_c0;
      gs1[k] = {lo_c1 ? hi_s1 : hi_s0, lo_s1};
      gc1[k] = lo_c1 ? hi_c1 : hi_c0;
    end

    // Carry selector between groups.
    assign sp[8*k +: 8] = gcarry[k] ? gs1[k] : gs0[k];
    assign gcarry[k+1]  = gcarry[k] ? gc1[k] : gc0[k];
  end

  assign gcarry[0] = cin;

  if (WP > W) begin : g_pad
    // Bits above W belong to the zero padding; the carry out of bit W-1 is taken from the
    // padded sum, where it lands at bit W.
    assign cout = sp[W];
  end else begin : g_nopad
    assign cout = gcarry[NG];
  end
  assign sum = sp[W-1:0];

endmodule
