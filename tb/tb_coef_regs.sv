// tb_coef_regs: checks the coefficient register bank: zero codes after reset, writes
// visible on the parallel outputs and the read port one clock later, only the low five
// bits stored, and writes or reads beyond the last register ignored or read as zero.
module tb_coef_regs;
  import csd_pkg::*;

  localparam int NREG = 56;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = '0, wdata = '0, raddr = '0, rdata;
  csd_code_t codes [NREG];
  logic [4:0] model [NREG];
  int checks = 0, failures = 0;

  coef_regs #(.NREG(NREG)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .codes);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < NREG; i++) begin
      checks++;
      if (codes[i] != model[i]) begin
        failures++; $display("FAIL codes[%0d]=%b exp=%b", i, codes[i], model[i]);
      end
      raddr = 8'(i);
      #1;
      checks++;
      if (rdata != {3'b000, model[i]}) begin
        failures++; $display("FAIL rdata[%0d]=%h exp=%h", i, rdata, model[i]);
      end
    end
    raddr = 8'(NREG + 3);
    #1;
    checks++;
    if (rdata != 0) begin failures++; $display("FAIL out-of-range read %h", rdata); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 5'b01111;
    repeat (2) @(posedge clk);
    #1;
    compare_all();
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 8'($urandom % 64);
      wdata = 8'($urandom);
      @(posedge clk);
      if (we && waddr < NREG) model[waddr] = wdata[4:0];
      #1;
      we = 0;
      if (n % 50 == 0) compare_all();
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
