// tb_i2c_slave: drives the I2C slave with a bit-banged master over a wired-AND SDA line.
// It writes bursts of bytes from several pointers, reads them back with repeated START and
// auto-increment, and checks that a wrong device address is not acknowledged and causes
// no write. The register side is a 256-byte array model in the testbench; every write
// strobe is compared with the expected pointer and byte.
module tb_i2c_slave;
  localparam logic [6:0] DEV = 7'h2C;
  logic clk = 0, rst_n = 0;
  logic scl, sda_low_m, sda_oe, sda_line;
  logic reg_we, busy;
  logic [7:0] reg_waddr, reg_wdata, reg_raddr, reg_rdata;
  logic [7:0] mem [256];
  int checks = 0, failures = 0, n_writes = 0;
  int n_nack = 0, n_reads = 0;

  assign sda_line = ~(sda_low_m | sda_oe);

  i2c_slave #(.DEV_ADDR(DEV)) dut (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda_line), .sda_oe,
    .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata, .busy
  );
  i2c_master_bfm #(.HALF(16)) bfm (.clk, .sda_line, .scl_o(scl), .sda_low(sda_low_m));

  always #5 clk = ~clk;

  assign reg_rdata = mem[reg_raddr];
  always @(posedge clk) if (reg_we) begin
    mem[reg_waddr] <= reg_wdata;
    n_writes++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] wr [];
    logic [7:0] rd [];
    logic [7:0] ptr;
    logic ok, ack;
    int n_before;
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      ptr = 8'($urandom);
      wr = new[1 + ($urandom % 6)];
      foreach (wr[i]) wr[i] = 8'($urandom);
      n_before = n_writes;
      bfm.write_regs(DEV, ptr, wr, ok);
      checks += 2;
      if (!ok) begin failures++; $display("FAIL write not acknowledged"); end
      if (n_writes - n_before != wr.size()) begin
        failures++; $display("FAIL %0d writes, expected %0d", n_writes - n_before, wr.size());
      end
      bfm.read_regs(DEV, ptr, wr.size(), rd, ok);
      n_reads++;
      checks++;
      if (!ok) begin failures++; $display("FAIL read not acknowledged"); end
      foreach (wr[i]) begin
        checks++;
        if (rd[i] != wr[i] || mem[8'(ptr + i)] != wr[i]) begin
          failures++;
          $display("FAIL t=%0d byte %0d read %h mem %h wrote %h", t, i, rd[i],
                   mem[8'(ptr + i)], wr[i]);
        end
      end
    end
    // Wrong address: no acknowledge, no write, bus released.
    n_before = n_writes;
    wr = new[2];
    wr[0] = 8'hAA; wr[1] = 8'h55;
    bfm.write_regs(7'h2D, 8'h10, wr, ok);
    checks += 2;
    if (ok) begin failures++; $display("FAIL wrong address acknowledged"); end
    else n_nack++;
    if (n_writes != n_before) begin failures++; $display("FAIL write to wrong address"); end
    bfm.probe(DEV, ack);
    checks++;
    if (!ack) begin failures++; $display("FAIL probe not acknowledged"); end
    repeat (10) @(posedge clk);
    checks++;
    if (busy || sda_oe) begin failures++; $display("FAIL not idle after STOP"); end
    checks++;
    if (n_nack == 0 || n_reads == 0) begin failures++; $display("FAIL case not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
