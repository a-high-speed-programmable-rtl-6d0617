// i2c_master_bfm: bit-banged I2C master for simulation.
//
// Drives SCL and pulls SDA low through open-drain style outputs; the testbench resolves the
// wired-AND SDA line and feeds it back on sda_line. Each SCL half period lasts HALF clocks;
// SDA only changes in the middle of the SCL low phase, except for START and STOP.
// Tasks: write_regs (pointer + data bytes), read_regs (pointer write, repeated START,
// reads with ACK, NACK on the last byte) and probe (address only, returns the ACK bit).
module i2c_master_bfm #(
  parameter int unsigned HALF = 16
) (
  input  logic clk,
  input  logic sda_line,
  output logic scl_o,
  output logic sda_low
);

  initial begin
    scl_o   = 1'b1;
    sda_low = 1'b0;
  end

  task automatic wait_clk(int unsigned n);
    repeat (n) @(posedge clk);
  endtask

  task automatic start_cond();
    sda_low = 1'b0;
    wait_clk(HALF / 2);
    scl_o = 1'b1;
    wait_clk(HALF);
    sda_low = 1'b1;
    wait_clk(HALF);
    scl_o = 1'b0;
    wait_clk(HALF / 2);
  endtask

  task automatic stop_cond();
    sda_low = 1'b1;
    wait_clk(HALF / 2);
    scl_o = 1'b1;
    wait_clk(HALF);
    sda_low = 1'b0;
    wait_clk(HALF);
  endtask

  // One SCL pulse with SDA set to bit b (1 = released); returns SDA sampled while SCL high.
  task automatic clock_bit(input logic b, output logic sampled);
    sda_low = ~b;
    wait_clk(HALF / 2);
    scl_o = 1'b1;
    wait_clk(HALF);
    sampled = sda_line;
    scl_o = 1'b0;
    wait_clk(HALF / 2);
  endtask

  task automatic write_byte(input logic [7:0] data, output logic ack);
    logic s;
    for (int i = 7; i >= 0; i--) clock_bit(data[i], s);
    clock_bit(1'b1, s);
    ack = ~s;
  endtask

  task automatic read_byte(input logic give_ack, output logic [7:0] data);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      clock_bit(1'b1, s);
      data[i] = s;
    end
    clock_bit(~give_ack, s);
  endtask

  // Write data bytes from register ptr on; ok is 1 when every byte was acknowledged.
  task automatic write_regs(input logic [6:0] dev, input logic [7:0] ptr,
                            input logic [7:0] data [], output logic ok);
    logic ack;
    ok = 1'b1;
    start_cond();
    write_byte({dev, 1'b0}, ack); ok &= ack;
    if (ack) begin
      write_byte(ptr, ack); ok &= ack;
      foreach (data[i]) begin
        write_byte(data[i], ack);
        ok &= ack;
      end
    end
    stop_cond();
  endtask

  // Read n bytes from register ptr on.
  task automatic read_regs(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                           output logic [7:0] data [], output logic ok);
    logic ack;
    data = new[n];
    ok = 1'b1;
    start_cond();
    write_byte({dev, 1'b0}, ack); ok &= ack;
    write_byte(ptr, ack); ok &= ack;
    start_cond();
    write_byte({dev, 1'b1}, ack); ok &= ack;
    for (int i = 0; i < n; i++) read_byte(i != n - 1, data[i]);
    stop_cond();
  endtask

  // Address the device for a write and stop; returns whether it acknowledged.
  task automatic probe(input logic [6:0] dev, output logic ack);
    start_cond();
    write_byte({dev, 1'b0}, ack);
    stop_cond();
  endtask

endmodule
