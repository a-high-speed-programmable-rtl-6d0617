// tb_csd_fir_top: end-to-end test of the programmable CSD FIR filter at its default size
// (10-bit samples, 18 taps, 3 digits per tap, 4 guard bits).
// The filter is programmed over I2C with a bit-banged master, its registers are read back,
// and random samples are streamed through it, one per clock. Every clock, y_raw must equal
// the sum over taps and digits of each digit's value of the sample k clocks old (widened
// by four guard bits, modulo 2^14), one clock after that sample was applied, and y_out must
// equal the gain-corrected, rounded and saturated value of y_raw.
// Phases: (1) after reset, all codes are zero and the output stays zero; (2) a random
// coefficient set with every seventh digit zero and unity DC gain; (3) a symmetric (linear-phase) coefficient set with
// a DC gain correction; (4) reprogramming while samples keep flowing, then large samples
// that saturate the output. Counted events: downloads, read-backs, zero digits, negated
// digits, DC gain corrections, saturations, coefficient changes while streaming; an event
// that never happens counts as a failure.
module tb_csd_fir_top;
  import csd_pkg::*;
  import csd_model_pkg::*;

  localparam int DW = 10, GW = 4, W = DW + GW, NT = 18, NREG = 3 * NT + 2;
  localparam logic [6:0] DEV = 7'h2C;

  logic clk = 0, rst_n = 0;
  logic [DW-1:0] x_in = '0, y_out;
  logic [W-1:0]  y_raw;
  logic          y_sat, sda_oe, cfg_busy;
  logic          scl, sda_low_m, sda_line;

  assign sda_line = ~(sda_low_m | sda_oe);

  csd_fir_top dut (
    .clk, .rst_n, .x_in, .y_raw, .y_out, .y_sat,
    .scl_i(scl), .sda_i(sda_line), .sda_oe, .cfg_busy
  );
  i2c_master_bfm #(.HALF(16)) bfm (.clk, .sda_line, .scl_o(scl), .sda_low(sda_low_m));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_download = 0, n_readback = 0, n_zero_digit = 0, n_neg_digit = 0;
  int n_gain_corr = 0, n_sat = 0, n_live_change = 0;

  logic [4:0] model_codes [NREG];   // codes the checker assumes
  longint     hist [NT];            // hist[k]: sample applied k clocks ago (signed)
  longint     exp_raw;
  logic       exp_valid = 1'b0;
  logic       checking = 1'b0;      // compare outputs against the model
  int         x_mode = 0;           // 0: zero input, 1: random, 2: large random

  // A random nonzero digit code with a shift of at least min_shift.
  function automatic logic [4:0] rand_nonzero(int min_shift);
    int unsigned r;
    logic [3:0] sh;
    r = $urandom;
    sh = 4'(min_shift + int'((r >> 1) % (15 - min_shift)));
    return {r[0], sh};
  endfunction

  function automatic longint model_raw();
    longint acc = 0;
    for (int t = 0; t < NT; t++)
      for (int d = 0; d < 3; d++)
        acc += digit_value(hist[t] * 16, model_codes[3 * t + d]);
    return wrap(acc, W);
  endfunction

  function automatic longint model_out(longint v, output logic s);
    longint q;
    q = floor_div_pow2(v + digit_value(v, model_codes[3 * NT]) +
                       digit_value(v, model_codes[3 * NT + 1]) + 8, 4);
    s = 1'b0;
    if (q > 511)  begin q = 511;  s = 1'b1; end
    if (q < -512) begin q = -512; s = 1'b1; end
    return q;
  endfunction

  // Per-clock stimulus and checking, on the falling edge.
  always @(negedge clk) begin
    longint eo;
    logic   es;
    if (exp_valid && checking) begin
      eo = model_out(exp_raw, es);
      checks += 3;
      if (to_signed(longint'(y_raw), W) != exp_raw) begin
        failures++;
        $display("FAIL y_raw=%0d exp=%0d at %0t", to_signed(longint'(y_raw), W), exp_raw,
                 $time);
      end
      if (to_signed(longint'(y_out), DW) != eo) begin
        failures++;
        $display("FAIL y_out=%0d exp=%0d", to_signed(longint'(y_out), DW), eo);
      end
      if (y_sat != es) begin failures++; $display("FAIL y_sat=%b exp=%b", y_sat, es); end
      if (es) n_sat++;
      if (model_codes[3 * NT][3:0] != 4'hF || model_codes[3 * NT + 1][3:0] != 4'hF)
        n_gain_corr++;
    end
    if (rst_n) begin
      unique case (x_mode)
        0: x_in = '0;
        1: x_in = DW'($urandom);
        default: x_in = ($urandom % 2) ? DW'(10'h1FF - ($urandom % 16)) :
                                         DW'(10'h200 + ($urandom % 16));
      endcase
    end
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k - 1];
    hist[0] = to_signed(longint'(x_in), DW);
    exp_raw = model_raw();
    exp_valid = rst_n;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Download a full code set over I2C; the checker switches to it once written.
  task automatic download(input logic [4:0] c [NREG], input bit live);
    logic [7:0] bytes [];
    logic ok;
    bytes = new[NREG];
    foreach (bytes[i]) bytes[i] = {3'b000, c[i]};
    if (!live) checking = 1'b0;
    bfm.write_regs(DEV, 8'h00, bytes, ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL download not acknowledged"); end
    n_download++;
    if (live) n_live_change++;
    @(negedge clk);
    foreach (model_codes[i]) model_codes[i] = c[i];
    foreach (c[i]) if (i < 3 * NT) begin
      if (c[i][3:0] == 4'hF) n_zero_digit++;
      else if (c[i][4]) n_neg_digit++;
    end
  endtask

  task automatic readback(input logic [4:0] c [NREG]);
    logic [7:0] rd [];
    logic ok;
    bfm.read_regs(DEV, 8'h00, NREG, rd, ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL read-back not acknowledged"); end
    foreach (c[i]) begin
      checks++;
      if (rd[i] != {3'b000, c[i]}) begin
        failures++; $display("FAIL read-back reg %0d = %h, exp %h", i, rd[i], c[i]);
      end
    end
    n_readback++;
  endtask

  task automatic stream(input int mode, input int n);
    x_mode = mode;
    checking = 1'b1;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [4:0] set_a [NREG];
    logic [4:0] set_b [NREG];
    logic [4:0] set_c [NREG];
    foreach (model_codes[i]) model_codes[i] = 5'b01111;
    foreach (hist[i]) hist[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // (1) Reset state: every digit is zero, so the output is zero whatever the input.
    stream(1, 200);

    // (2) Random coefficients, every seventh digit zero, unity DC gain.
    foreach (set_a[i]) set_a[i] = (i % 7 == 3) ? 5'b01111 : rand_nonzero(0);
    set_a[3 * NT] = 5'b01111;
    set_a[3 * NT + 1] = 5'b11111;
    x_mode = 0;
    download(set_a, 1'b0);
    readback(set_a);
    stream(1, 2000);

    // (3) Symmetric coefficients h(k) = h(17 - k), weights 2^-1 .. 2^-14, some digits
    // zero, DC gain 1 + 1/8 - 1/64.
    for (int t = 0; t < NT / 2; t++)
      for (int d = 0; d < 3; d++) begin
        set_b[3 * t + d] = ((3 * t + d) % 5 == 1) ? 5'b01111 : rand_nonzero(1);
        set_b[3 * (NT - 1 - t) + d] = set_b[3 * t + d];
      end
    set_b[3 * NT] = 5'b00011;
    set_b[3 * NT + 1] = 5'b10110;
    x_mode = 0;
    download(set_b, 1'b0);
    readback(set_b);
    stream(1, 2000);

    // (4) Change coefficients while samples flow (checking paused during the burst), then
    // large samples with a gain above one so that the output saturates.
    foreach (set_c[i]) set_c[i] = rand_nonzero(0);
    set_c[3 * NT] = 5'b00001;
    set_c[3 * NT + 1] = 5'b00010;
    checking = 1'b0;
    download(set_c, 1'b1);
    repeat (NT + 2) @(posedge clk);
    stream(2, 1000);
    stream(1, 1000);

    checks += 7;
    if (n_download == 0)    begin failures++; $display("FAIL no download"); end
    if (n_readback == 0)    begin failures++; $display("FAIL no read-back"); end
    if (n_zero_digit == 0)  begin failures++; $display("FAIL no zero digit"); end
    if (n_neg_digit == 0)   begin failures++; $display("FAIL no negated digit"); end
    if (n_gain_corr == 0)   begin failures++; $display("FAIL no DC gain correction"); end
    if (n_sat == 0)         begin failures++; $display("FAIL no saturation"); end
    if (n_live_change == 0) begin failures++; $display("FAIL no live coefficient change"); end
    $display("events: downloads=%0d readbacks=%0d zero_digits=%0d neg_digits=%0d",
             n_download, n_readback, n_zero_digit, n_neg_digit);
    $display("events: gain_corrected_samples=%0d saturated=%0d live_changes=%0d",
             n_gain_corr, n_sat, n_live_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
