// tb_comp42: checks that sum + carry equals a + b + c + d modulo 2^W for random and
// all-ones inputs, at W = 14 and at W = 3.
module tb_comp42;
  localparam int W = 14;
  logic [W-1:0] a, b, c, d, s, k;
  logic [2:0] a3, b3, c3, d3, s3, k3;
  int checks = 0, failures = 0;

  comp42 #(.W(W)) dut (.a, .b, .c, .d, .sum(s), .carry(k));
  comp42 #(.W(3)) dut3 (.a(a3), .b(b3), .c(c3), .d(d3), .sum(s3), .carry(k3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      if (n == 0) begin a = '1; b = '1; c = '1; d = '1; end
      else begin a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom); end
      #1;
      checks++;
      if (W'(s + k) != W'(a + b + c + d)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h d=%h s=%h k=%h", a, b, c, d, s, k);
      end
      checks++;
      if (k[0] != 1'b0) begin failures++; $display("FAIL carry bit 0 set"); end
    end
    for (int n = 0; n < 4096; n++) begin
      {a3, b3, c3, d3} = 12'(n);
      #1;
      checks++;
      if (3'(s3 + k3) != 3'(a3 + b3 + c3 + d3)) begin
        failures++;
        $display("FAIL W=3 n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
