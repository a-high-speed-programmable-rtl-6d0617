// tb_cla4_dual: exhaustive check of the dual-carry 4-bit CLA: for all 256 operand pairs,
// {cout0, s0} must be a + b and {cout1, s1} must be a + b + 1.
module tb_cla4_dual;
  logic [3:0] a, b, s0, s1;
  logic cout0, cout1;
  int checks = 0, failures = 0;

  cla4_dual dut (.a, .b, .s0, .s1, .cout0, .cout1);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      {a, b} = 8'(n);
      #1;
      checks += 2;
      if ({cout0, s0} != 5'(a + b)) begin
        failures++; $display("FAIL cin0 a=%h b=%h got %b%h", a, b, cout0, s0);
      end
      if ({cout1, s1} != 5'(a + b + 1)) begin
        failures++; $display("FAIL cin1 a=%h b=%h got %b%h", a, b, cout1, s1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
