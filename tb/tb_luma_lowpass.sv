// tb_luma_lowpass: runs the filter as an 18-tap video luminance low-pass filter.
// The testbench designs the coefficients itself: a Hamming-windowed sinc with cutoff 0.25
// cycles/sample (symmetric, linear phase), each coefficient rounded greedily to at most
// three signed powers of two 2^0 .. 2^-14, and two DC gain digits chosen so that
// (1 + c0 + c1) times the coefficient sum comes close to one. The 56 codes are downloaded
// over I2C. Cosines of several frequencies are then streamed at full rate. For each
// frequency the amplitude of y_out at that frequency over the settled part is compared with the amplitude
// predicted from the quantised coefficients, and the passband (DC, 0.05, 0.1) must have a
// gain within 5 % of one, the stopband (0.4, 0.5) a gain below 1/30.
// Every output sample is also compared exactly with the integer model of the datapath.
module tb_luma_lowpass;
  import csd_pkg::*;
  import csd_model_pkg::*;

  localparam int DW = 10, GW = 4, W = DW + GW, NT = 18, NREG = 3 * NT + 2;
  localparam logic [6:0] DEV = 7'h2C;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 200.0;

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
  logic [4:0] codes [NREG];
  real        hq [NT];          // quantised coefficients
  real        gain;             // quantised DC gain correction factor
  longint     hist [NT];
  longint     exp_raw;
  logic       checking = 1'b0;
  real        freq = 0.0;
  int         n_samp = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Greedy rounding of v to at most nd signed powers of two 2^-p, p = 0..14.
  task automatic quantise(input real v, input int nd, output logic [4:0] c [3], output real q);
    real r, best_err, e;
    int  best_p;
    r = v;
    q = 0.0;
    for (int i = 0; i < 3; i++) c[i] = 5'b01111;
    for (int i = 0; i < nd; i++) begin
      best_p = -1;
      best_err = (r < 0.0) ? -r : r;
      for (int p = 0; p < 15; p++) begin
        e = (r < 0.0) ? (r + 2.0 ** (-p)) : (r - 2.0 ** (-p));
        if (e < 0.0) e = -e;
        if (e < best_err) begin best_err = e; best_p = p; end
      end
      if (best_p < 0) break;
      c[i] = {(r < 0.0) ? 1'b1 : 1'b0, 4'(best_p)};
      q += (r < 0.0) ? -(2.0 ** (-best_p)) : 2.0 ** (-best_p);
      r = v - q;
    end
  endtask

  function automatic longint model_raw();
    longint acc = 0;
    for (int t = 0; t < NT; t++)
      for (int d = 0; d < 3; d++)
        acc += digit_value(hist[t] * 16, codes[3 * t + d]);
    return wrap(acc, W);
  endfunction

  function automatic longint model_out(longint v);
    longint q;
    q = floor_div_pow2(v + digit_value(v, codes[3 * NT]) + digit_value(v, codes[3 * NT + 1])
                       + 8, 4);
    if (q > 511) q = 511;
    if (q < -512) q = -512;
    return q;
  endfunction

  always @(negedge clk) begin
    if (checking) begin
      checks++;
      if (to_signed(longint'(y_raw), W) != exp_raw ||
          to_signed(longint'(y_out), DW) != model_out(exp_raw)) begin
        failures++;
        $display("FAIL sample %0d y_raw=%0d exp=%0d", n_samp, to_signed(longint'(y_raw), W),
                 exp_raw);
      end
    end
    if (rst_n) x_in = DW'($rtoi(AMP * $cos(2.0 * PI * freq * n_samp) + 1000.5) - 1000);
    n_samp++;
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k - 1];
    hist[0] = to_signed(longint'(x_in), DW);
    exp_raw = model_raw();
  end

  // Stream a cosine of frequency f; return the amplitude of y_out at f, measured by
  // correlation with a cosine and a sine over 200 settled samples (a whole number of
  // periods for every frequency used).
  task automatic tone(input real f, output real amp);
    real sc, ss, y;
    freq = f;
    n_samp = 0;
    sc = 0.0;
    ss = 0.0;
    repeat (NT + 4) @(posedge clk);
    checking = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      #1;
      // y_out now holds the response to the sample applied n_samp - 1 clocks after start.
      y = real'(to_signed(longint'(y_out), DW));
      sc += y * $cos(2.0 * PI * f * (n_samp - 1));
      ss += y * $sin(2.0 * PI * f * (n_samp - 1));
    end
    if (f == 0.0 || f == 0.5) amp = ((sc < 0.0) ? -sc : sc) / 200.0;
    else amp = 2.0 * $sqrt(sc * sc + ss * ss) / 200.0;
  endtask

  function automatic real resp(real f);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < NT; k++) begin
      re += hq[k] * $cos(2.0 * PI * f * k);
      im -= hq[k] * $sin(2.0 * PI * f * k);
    end
    return gain * $sqrt(re * re + im * im);
  endfunction

  initial begin
    real h, wdw, s, corr, q, peak, pred, g;
    logic [4:0] c [3];
    logic [7:0] bytes [];
    logic ok;
    real fr [5] = '{0.0, 0.05, 0.1, 0.4, 0.5};

    // Coefficient design and quantisation.
    s = 0.0;
    for (int k = 0; k < NT; k++) begin
      real m;
      m = real'(k) - (NT - 1) / 2.0;
      h = 0.5 * ((m == 0.0) ? 1.0 : $sin(PI * 0.5 * m) / (PI * 0.5 * m));
      wdw = 0.54 - 0.46 * $cos(2.0 * PI * k / (NT - 1));
      quantise(h * wdw, 3, c, hq[k]);
      for (int d = 0; d < 3; d++) codes[3 * k + d] = c[d];
      s += hq[k];
    end
    quantise(1.0 / s - 1.0, 2, c, corr);
    codes[3 * NT] = c[0];
    codes[3 * NT + 1] = c[1];
    gain = 1.0 + corr;
    $display("coefficient sum %f, DC correction factor %f, corrected DC gain %f",
             s, gain, s * gain);
    foreach (hist[i]) hist[i] = 0;

    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    bytes = new[NREG];
    foreach (bytes[i]) bytes[i] = {3'b000, codes[i]};
    bfm.write_regs(DEV, 8'h00, bytes, ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL download"); end

    foreach (fr[i]) begin
      checking = 1'b0;
      tone(fr[i], peak);
      pred = AMP * resp(fr[i]);
      g = peak / AMP;
      $display("f=%0.2f measured amplitude %0.1f predicted %0.1f (gain %0.4f)", fr[i], peak,
               pred, g);
      checks += 2;
      // Output and input rounding and truncation in the digits: allow 2 LSB.
      if (peak > pred + 2.0 || peak < pred - 2.0) begin
        failures++; $display("FAIL amplitude differs from prediction");
      end
      if (fr[i] <= 0.1 && (g < 0.95 || g > 1.05)) begin
        failures++; $display("FAIL passband gain %f", g);
      end
      if (fr[i] >= 0.4 && g > 1.0 / 30.0) begin
        failures++; $display("FAIL stopband gain %f", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
