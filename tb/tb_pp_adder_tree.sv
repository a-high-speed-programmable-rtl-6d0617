// tb_pp_adder_tree: checks that the tree's sum and carry rows add up to the sum of all
// partial products modulo 2^W. Trees of 54 rows (the full filter), 7 rows (a level with
// three leftover rows) and 2 rows (no compression level) are driven with random rows.
module tb_pp_adder_tree;
  localparam int W = 14;
  logic [W-1:0] pp54 [54];
  logic [W-1:0] pp7  [7];
  logic [W-1:0] pp2  [2];
  logic [W-1:0] s54, k54, s7, k7, s2, k2;
  int checks = 0, failures = 0;

  pp_adder_tree #(.W(W), .N_IN(54)) dut54 (.pp(pp54), .sum(s54), .carry(k54));
  pp_adder_tree #(.W(W), .N_IN(7))  dut7  (.pp(pp7),  .sum(s7),  .carry(k7));
  pp_adder_tree #(.W(W), .N_IN(2))  dut2  (.pp(pp2),  .sum(s2),  .carry(k2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e54, e7, e2;
    for (int n = 0; n < 2000; n++) begin
      e54 = '0; e7 = '0; e2 = '0;
      foreach (pp54[i]) begin pp54[i] = (n == 0) ? '1 : W'($urandom); e54 += pp54[i]; end
      foreach (pp7[i])  begin pp7[i]  = W'($urandom); e7 += pp7[i]; end
      foreach (pp2[i])  begin pp2[i]  = W'($urandom); e2 += pp2[i]; end
      #1;
      checks += 3;
      if (W'(s54 + k54) != e54) begin failures++; $display("FAIL 54 rows n=%0d", n); end
      if (W'(s7 + k7) != e7)    begin failures++; $display("FAIL 7 rows n=%0d", n); end
      if (W'(s2 + k2) != e2)    begin failures++; $display("FAIL 2 rows n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
