// tb_csel_adder: checks the carry-select final adder against a + b + cin at the filter's
// width 14 (padded groups), at 16 (whole groups) and at 5, with random operands, carry
// chains that run through every group, and both carry-in values.
module tb_csel_adder;
  logic [13:0] a14, b14, s14;
  logic [15:0] a16, b16, s16;
  logic [4:0]  a5, b5, s5;
  logic cin, c14, c16, c5;
  int checks = 0, failures = 0;

  csel_adder #(.W(14)) dut14 (.a(a14), .b(b14), .cin, .sum(s14), .cout(c14));
  csel_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin, .sum(s16), .cout(c16));
  csel_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin, .sum(s5),  .cout(c5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      cin = 1'($urandom);
      if (n < 4) begin
        // Full-length carry chains: all ones plus one, and all ones plus all ones.
        a14 = '1; b14 = (n[0]) ? '1 : 14'd0; a16 = '1; b16 = (n[0]) ? '1 : 16'd0;
        a5 = '1; b5 = (n[0]) ? '1 : 5'd0; cin = n[1];
      end else begin
        a14 = 14'($urandom); b14 = 14'($urandom);
        a16 = 16'($urandom); b16 = 16'($urandom);
        a5  = 5'($urandom);  b5  = 5'($urandom);
      end
      #1;
      checks += 3;
      if ({c14, s14} != 15'(a14 + b14 + cin)) begin
        failures++; $display("FAIL W14 a=%h b=%h cin=%b got %b %h", a14, b14, cin, c14, s14);
      end
      if ({c16, s16} != 17'(a16 + b16 + cin)) begin
        failures++; $display("FAIL W16 a=%h b=%h cin=%b", a16, b16, cin);
      end
      if ({c5, s5} != 6'(a5 + b5 + cin)) begin
        failures++; $display("FAIL W5 a=%h b=%h cin=%b", a5, b5, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
