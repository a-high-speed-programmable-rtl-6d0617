// tb_csd_tap: checks a tap's three partial products and its one-clock delay register.
// Random samples and codes are applied every clock; pp must equal each digit's value of the
// current sample widened by four guard bits, and x_out must equal the previous sample.
module tb_csd_tap;
  import csd_pkg::*;
  import csd_model_pkg::*;

  localparam int DW = 10, GW = 4, W = DW + GW;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] x_in, x_out, x_prev;
  csd_code_t code [3];
  logic [W-1:0] pp [3];
  int checks = 0, failures = 0;

  csd_tap #(.DW(DW), .GW(GW), .NP(3)) dut (.clk, .rst_n, .x_in, .code, .pp, .x_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs, exp;
    x_in = '0;
    foreach (code[d]) code[d] = CODE_ZERO;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (x_out != 0) begin failures++; $display("FAIL reset x_out=%h", x_out); end
    rst_n = 1;
    x_prev = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      x_in = DW'($urandom);
      foreach (code[d]) code[d] = csd_code_t'(rand_code());
      #1;
      xs = to_signed(longint'(x_in), DW) * 16;
      foreach (code[d]) begin
        exp = wrap(digit_value(xs, code[d]), W);
        checks++;
        if (to_signed(longint'(pp[d]), W) != exp) begin
          failures++;
          $display("FAIL n=%0d d=%0d pp=%h exp=%0d", n, d, pp[d], exp);
        end
      end
      checks++;
      if (x_out != x_prev) begin
        failures++;
        $display("FAIL n=%0d x_out=%h exp=%h", n, x_out, x_prev);
      end
      @(posedge clk);
      x_prev = x_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
