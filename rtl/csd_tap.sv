// csd_tap: one programmable CSD tap of the filter.
//
// The tap receives the sample x_in of the previous stage (the filter input for tap 0),
// forms three partial products from it with three programmable CSD digits, and passes
// the sample on through its delay register D to the next tap (x_out, one clock later).
// The sample is widened to the internal word by appending GUARD zero fraction bits before
// it enters the digits. The three partial products leave the tap separately: they are
// added together by the shared 4:2 compressor tree, as in the filter's overall structure,
// rather than by a per-tap adder.
// The delay register resets to zero (this design's choice); there is no clock enable, a new
// sample is taken every clock.
module csd_tap
  import csd_pkg::*;
#(
  parameter int unsigned DW = DATA_W,     // sample width
  parameter int unsigned GW = GUARD,      // guard bits
  parameter int unsigned NP = PP_PER_TAP  // digits per tap
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       x_in,        // sample from the previous tap
  input  csd_code_t           code [NP],   // this tap's CSD digits
  output logic [DW+GW-1:0]    pp   [NP],   // partial products
  output logic [DW-1:0]       x_out        // delayed sample to the next tap
);

  logic [DW+GW-1:0] x_wide;
  assign x_wide = {x_in, {GW{1'b0}}};

  for (genvar d = 0; d < NP; d++) begin : g_digit
    csd_shifter #(.W(DW + GW)) u_digit (
      .x    (x_wide),
      .code (code[d]),
      .pp   (pp[d])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_out <= '0;
    else        x_out <= x_in;
  end

endmodule
