// dc_gain: DC gain module at the filter output.
//
// With CSD coefficients the taps' sum is only close to the wanted DC gain. This module
// multiplies the registered filter result Yout' by a programmable correction factor
// 1 + c0 + c1, where c0 and c1 are two further CSD digits (same 5-bit codes as the taps,
// zero codes give a factor of exactly 1), so the correction stays multiplierless. The
// corrected value is rounded to the nearest integer (half rounds up), the GUARD fraction
// bits are dropped, and the result is saturated to the DW-bit two's complement range.
// The input has GUARD fraction bits; two extra integer bits inside hold the correction
// without overflow. Combinational, between the output register and the filter output.
// The published design gives only the purpose of this block (cancelling the DC gain); the
// correction factor, rounding and saturation are this design's choices.
module dc_gain
  import csd_pkg::*;
#(
  parameter int unsigned DW = DATA_W,  // output sample width
  parameter int unsigned GW = GUARD    // fraction bits of the input
) (
  input  logic [DW+GW-1:0] y_in,       // filter result Yout', two's complement
  input  csd_code_t        code [2],   // correction digits c0, c1
  output logic [DW-1:0]    y_out,      // corrected, rounded, saturated sample Yout
  output logic             sat         // saturation happened on this sample
);

  localparam int unsigned XW = DW + GW + 2;  // internal width with two headroom bits

  logic [XW-1:0] y_ext;
  logic [XW-1:0] corr [2];
  logic [XW-1:0] total;
  logic [XW-1:0] rounded;
  logic signed [XW-GW-1:0] whole;

  localparam logic signed [XW-GW-1:0] MAXV = (XW-GW)'((1 << (DW - 1)) - 1);
  localparam logic signed [XW-GW-1:0] MINV = -(XW-GW)'(1 << (DW - 1));

  assign y_ext = XW'($signed(y_in));

  for (genvar i = 0; i < 2; i++) begin : g_corr
    csd_shifter #(.W(XW)) u_digit (
      .x    (y_ext),
      .code (code[i]),
      .pp   (corr[i])
    );
  end

  always_comb begin
    total   = y_ext + corr[0] + corr[1];
    rounded = total + XW'(1 << (GW - 1));
    whole   = $signed(rounded[XW-1:GW]);
    sat     = 1'b0;
    if (whole > MAXV) begin
      y_out = MAXV[DW-1:0];
      sat   = 1'b1;
    end else if (whole < MINV) begin
      y_out = MINV[DW-1:0];
      sat   = 1'b1;
    end else begin
      y_out = whole[DW-1:0];
    end
  end

endmodule
