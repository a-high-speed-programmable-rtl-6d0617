// csd_fir_top: programmable CSD coefficient FIR filter (18 taps, 10-bit samples).
//
// The filter computes y(n) = sum_k h(k) x(n-k) without multipliers. Every coefficient h(k)
// is a sum of at most three signed powers of two (a CSD number), and every power of two is
// one programmable digit: a 5-bit code that shifts the sample right by 0..14 bits, negates
// it or gives zero. The structure, from input to output:
//   - TAPS csd_tap stages in a chain: tap 0 works on x_in, tap k on x_in delayed k clocks;
//     each gives three partial products (3*TAPS in all);
//   - pp_adder_tree: levels of 4:2 compressors reduce all partial products to a sum row
//     and a carry row, so the tree depth grows with log2(3*TAPS), not with TAPS;
//   - csel_adder: carry-select final adder made of 4-bit carry look-ahead adders;
//   - the output register Yout' (y_raw), DW+GUARD bits with GUARD fraction bits;
//   - dc_gain: programmable DC gain correction, rounding and saturation to DW bits (y_out);
//   - i2c_slave and coef_regs: the coefficient codes are downloaded over I2C into a
//     register bank that drives the digits.
// Timing: a new sample is accepted every clock. x_in is used in the clock it is presented
// (tap 0 has no input register), so y_raw holds y(n) in the clock after x(n) was applied,
// and y_out follows y_raw combinationally: latency one clock. The critical path runs from
// x_in and the tap registers through one digit, the compressor tree and the final adder
// into y_raw.
// Samples are two's complement. Arithmetic inside is modulo 2^(DW+GUARD); the result is
// exact, apart from the truncation of shifted-out bits, whenever it fits that range.
// Register map of the I2C slave: address 3*t + d is digit d (0..2) of tap t, 3*TAPS and
// 3*TAPS+1 are the DC gain correction digits; each register holds a code in bits 4:0.
// The taps, compressor tree, carry-select final adder, output register, DC gain module and
// I2C download follow the published design; the sample format, register map, gain correction
// scheme and I2C protocol are this design's choices.
module csd_fir_top
  import csd_pkg::*;
#(
  parameter int unsigned DW       = DATA_W,  // sample width N
  parameter int unsigned NTAPS    = TAPS,    // number of taps M
  parameter int unsigned GW       = GUARD,   // guard (fraction) bits
  parameter logic [6:0]  I2C_ADDR = 7'h2C    // I2C slave address
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DW-1:0]    x_in,     // input sample, two's complement
  output logic [DW+GW-1:0] y_raw,    // registered filter result Yout', GW fraction bits
  output logic [DW-1:0]    y_out,    // gain-corrected, rounded, saturated sample Yout
  output logic             y_sat,    // y_out was saturated
  input  logic             scl_i,    // I2C clock
  input  logic             sda_i,    // I2C data as seen on the bus
  output logic             sda_oe,   // 1: pull SDA low
  output logic             cfg_busy  // I2C transfer to this device in progress
);

  localparam int unsigned IW   = DW + GW;
  localparam int unsigned NPP  = NTAPS * PP_PER_TAP;
  localparam int unsigned NREG = NPP + 2;

  csd_code_t        codes [NREG];
  csd_code_t        tap_code [NTAPS][PP_PER_TAP];
  csd_code_t        gain_code [2];
  logic [DW-1:0]    x_chain [NTAPS+1];
  logic [IW-1:0]    tap_pp [NTAPS][PP_PER_TAP];
  logic [IW-1:0]    pp [NPP];
  logic [IW-1:0]    tree_sum, tree_carry, y_next;
  logic             add_cout;

  logic             reg_we;
  logic [7:0]       reg_waddr, reg_wdata, reg_raddr, reg_rdata;

  // Coefficient download.
  i2c_slave #(.DEV_ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst_n, .scl_i, .sda_i, .sda_oe,
    .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .busy (cfg_busy)
  );

  coef_regs #(.NREG(NREG)) u_regs (
    .clk, .rst_n,
    .we    (reg_we),
    .waddr (reg_waddr),
    .wdata (reg_wdata),
    .raddr (reg_raddr),
    .rdata (reg_rdata),
    .codes (codes)
  );

  // Taps.
  assign x_chain[0] = x_in;
  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    for (genvar d = 0; d < PP_PER_TAP; d++) begin : g_code
      assign tap_code[t][d]            = codes[PP_PER_TAP*t + d];
      assign pp[PP_PER_TAP*t + d]      = tap_pp[t][d];
    end
    csd_tap #(.DW(DW), .GW(GW), .NP(PP_PER_TAP)) u_tap (
      .clk, .rst_n,
      .x_in  (x_chain[t]),
      .code  (tap_code[t]),
      .pp    (tap_pp[t]),
      .x_out (x_chain[t+1])
    );
  end

  // Partial product adder array and final adder.
  pp_adder_tree #(.W(IW), .N_IN(NPP)) u_tree (
    .pp    (pp),
    .sum   (tree_sum),
    .carry (tree_carry)
  );

  csel_adder #(.W(IW)) u_final (
    .a    (tree_sum),
    .b    (tree_carry),
    .cin  (1'b0),
    .sum  (y_next),
    .cout (add_cout)  // the sum is taken modulo 2^IW
  );

  // Output register Yout'.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_raw <= '0;
    else        y_raw <= y_next;
  end

  // DC gain module.
  assign gain_code[0] = codes[NPP];
  assign gain_code[1] = codes[NPP + 1];

  dc_gain #(.DW(DW), .GW(GW)) u_dc (
    .y_in  (y_raw),
    .code  (gain_code),
    .y_out (y_out),
    .sat   (y_sat)
  );

endmodule
