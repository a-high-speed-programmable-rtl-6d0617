// coef_regs: register bank holding the downloaded CSD coefficient codes.
//
// NREG 5-bit registers, one per CSD digit. The register at address 3*t + d holds digit d
// of tap t; the two registers after the taps' (addresses 3*TAPS and 3*TAPS+1 in the full
// filter) hold the DC gain correction digits. A write (we high for one clock) stores the
// low five bits of wdata at waddr; writes to addresses at or above NREG are ignored. The
// read port is combinational: rdata is the code at raddr in the low five bits, zero for
// an address out of range. Every register resets to the zero code (shift field 4'hF), so
// the filter outputs zero until it is programmed. All codes are presented in parallel on
// `codes` and take effect in the datapath on the clock after the write.
// Bits 7:5 of wdata are not stored (codes are five bits).
// The published design states that coefficients are downloaded through a serial bus controller;
// the address map, read-back and reset value are this design's choices.
module coef_regs
  import csd_pkg::*;
#(
  parameter int unsigned NREG = TAPS * PP_PER_TAP + 2  // number of code registers
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [7:0] waddr,
  input  logic [7:0] wdata,
  input  logic [7:0] raddr,
  output logic [7:0] rdata,
  output csd_code_t  codes [NREG]
);

  localparam int unsigned AW = (NREG > 1) ? $clog2(NREG) : 1;  // register index width

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) codes[i] <= CODE_ZERO;
    end else if (we && (32'(waddr) < NREG)) begin
      codes[waddr[AW-1:0]] <= csd_code_t'(wdata[CODE_W-1:0]);
    end
  end

  always_comb begin
    rdata = '0;
    if (32'(raddr) < NREG) rdata = {{(8 - CODE_W){1'b0}}, codes[raddr[AW-1:0]]};
  end

endmodule
