// tb_dc_gain: checks the DC gain module: y_out must be
// clamp(floor((v + c0(v) + c1(v) + 8) / 16), -512, 511) for the signed input v (four
// fraction bits) and the digit values c0, c1; sat must be set exactly when clamping.
// Random inputs and codes, plus the zero codes (gain 1) and inputs at the range ends.
module tb_dc_gain;
  import csd_pkg::*;
  import csd_model_pkg::*;

  localparam int DW = 10, GW = 4, W = DW + GW;
  logic [W-1:0]  y_in;
  csd_code_t     code [2];
  logic [DW-1:0] y_out;
  logic          sat;
  int checks = 0, failures = 0, n_sat = 0;

  dc_gain #(.DW(DW), .GW(GW)) dut (.y_in, .code, .y_out, .sat);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, t, q, e;
    logic   es;
    for (int n = 0; n < 20000; n++) begin
      if (n < 1000) begin
        code[0] = CODE_ZERO; code[1] = CODE_ZERO;
      end else begin
        code[0] = csd_code_t'(rand_code()); code[1] = csd_code_t'(rand_code());
      end
      y_in = (n % 97 == 0) ? 14'h1FFF : (n % 89 == 0) ? 14'h2000 : W'($urandom);
      #1;
      v = to_signed(longint'(y_in), W);
      t = v + digit_value(v, code[0]) + digit_value(v, code[1]);
      q = floor_div_pow2(t + 8, 4);
      es = 1'b0;
      if (q > 511) begin q = 511; es = 1'b1; end
      if (q < -512) begin q = -512; es = 1'b1; end
      e = q;
      checks += 2;
      if (to_signed(longint'(y_out), DW) != e) begin
        failures++;
        $display("FAIL y_in=%h codes=%b %b y_out=%0d exp=%0d", y_in, code[0], code[1],
                 to_signed(longint'(y_out), DW), e);
      end
      if (sat != es) begin failures++; $display("FAIL sat=%b exp=%b", sat, es); end
      if (es) n_sat++;
      if (n < 1000 && !es && (to_signed(longint'(y_out), DW) != floor_div_pow2(v + 8, 4))) begin
        failures++;
        $display("FAIL unity gain");
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
