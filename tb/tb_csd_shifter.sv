// tb_csd_shifter: checks one CSD digit against the integer model.
// Every one of the 32 codes is applied to edge values and to random words of the 14-bit
// internal format; the output must equal the digit's value reduced to 14 bits.
module tb_csd_shifter;
  import csd_pkg::*;
  import csd_model_pkg::*;

  localparam int W = 14;
  logic [W-1:0] x, pp;
  csd_code_t    code;
  int checks = 0, failures = 0;

  csd_shifter #(.W(W)) dut (.x, .code, .pp);

  task automatic check_one(logic [W-1:0] xv, logic [4:0] c);
    longint exp;
    x = xv;
    code = csd_code_t'(c);
    #1;
    exp = wrap(digit_value(to_signed(longint'(xv), W), c), W);
    checks++;
    if (to_signed(longint'(pp), W) != exp) begin
      failures++;
      $display("FAIL x=%h code=%b pp=%h exp=%0d", xv, c, pp, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] edges [6] = '{14'h0000, 14'h1FFF, 14'h2000, 14'h3FFF, 14'h0001, 14'h2AAA};
    for (int c = 0; c < 32; c++) begin
      foreach (edges[i]) check_one(edges[i], 5'(c));
      repeat (50) check_one(W'($urandom), 5'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
