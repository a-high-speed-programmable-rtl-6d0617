// i2c_slave: slave-mode I2C bus controller used to download filter coefficients.
//
// It answers to the 7-bit address DEV_ADDR and gives access to an 8-bit register space
// through a pointer, in the common register-pointer style:
//   write: START, DEV_ADDR+W, pointer byte, data bytes ... STOP
//          every data byte is written to the pointer, which then increments;
//   read:  START, DEV_ADDR+W, pointer byte, (repeated) START, DEV_ADDR+R, data bytes ... STOP
//          every byte read comes from the pointer, which then increments; the master ends
//          the read with a NACK.
// Any other address is not acknowledged and the controller waits for the next START.
// SCL and SDA are oversampled by the system clock through two-flop synchronisers, and
// their edges, START (SDA falls while SCL is high) and STOP (SDA rises while SCL is high)
// are detected in the clk domain, so clk must be at least about 10 times the SCL rate.
// SDA is open drain: sda_oe high pulls the line low; the controller never stretches SCL.
// The controller changes SDA only after it has seen SCL low.
// Register side: reg_we is a one-clock write strobe with reg_waddr and reg_wdata;
// reg_raddr is the pointer and reg_rdata must return the register at it combinationally.
// The published design names a slave-mode I2C controller that loads the coefficients; the
// address, register protocol and clocking scheme are this design's choices.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h2C  // 7-bit slave address
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl_i,      // SCL line
  input  logic       sda_i,      // SDA line as seen on the bus
  output logic       sda_oe,     // 1: pull SDA low
  output logic       reg_we,
  output logic [7:0] reg_waddr,
  output logic [7:0] reg_wdata,
  output logic [7:0] reg_raddr,
  input  logic [7:0] reg_rdata,
  output logic       busy        // addressed and inside a transfer
);

  typedef enum logic [2:0] {
    ST_IDLE,   // not addressed, wait for START
    ST_RX,     // receiving a byte (address, pointer or data)
    ST_ACK,    // driving the acknowledge bit of a received byte
    ST_TX,     // sending a data byte
    ST_RACK    // reading the master's acknowledge of a sent byte
  } state_t;

  typedef enum logic [1:0] {
    RX_ADDR,   // device address and R/W bit
    RX_PTR,    // register pointer
    RX_DATA    // data to write
  } rx_kind_t;

  logic [2:0] scl_sync, sda_sync;
  logic       scl_rise, scl_fall, start_det, stop_det;

  state_t     state;
  rx_kind_t   kind;
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic [7:0] ptr;
  logic       rw;        // 1: read transfer
  logic       to_tx;     // after this ACK, send data
  logic       mack;      // master acknowledged the sent byte

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= '1;
      sda_sync <= '1;
    end else begin
      scl_sync <= {scl_sync[1:0], scl_i};
      sda_sync <= {sda_sync[1:0], sda_i};
    end
  end

  assign scl_rise  =  scl_sync[1] & ~scl_sync[2];
  assign scl_fall  = ~scl_sync[1] &  scl_sync[2];
  assign start_det =  scl_sync[1] &  scl_sync[2] & ~sda_sync[1] &  sda_sync[2];
  assign stop_det  =  scl_sync[1] &  scl_sync[2] &  sda_sync[1] & ~sda_sync[2];

  assign reg_raddr = ptr;
  assign busy      = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      kind      <= RX_ADDR;
      bitcnt    <= '0;
      shreg     <= '0;
      ptr       <= '0;
      rw        <= 1'b0;
      to_tx     <= 1'b0;
      mack      <= 1'b0;
      sda_oe    <= 1'b0;
      reg_we    <= 1'b0;
      reg_waddr <= '0;
      reg_wdata <= '0;
    end else begin
      reg_we <= 1'b0;
      if (start_det) begin
        state  <= ST_RX;
        kind   <= RX_ADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_det) begin
        state  <= ST_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          ST_IDLE: sda_oe <= 1'b0;

          ST_RX: begin
            if (scl_rise && bitcnt < 4'd8) begin
              shreg  <= {shreg[6:0], sda_sync[1]};
              bitcnt <= bitcnt + 4'd1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              bitcnt <= '0;
              unique case (kind)
                RX_ADDR: begin
                  if (shreg[7:1] == DEV_ADDR) begin
                    rw     <= shreg[0];
                    to_tx  <= shreg[0];
                    sda_oe <= 1'b1;
                    state  <= ST_ACK;
                  end else begin
                    state <= ST_IDLE;
                  end
                end
                RX_PTR: begin
                  ptr    <= shreg;
                  to_tx  <= 1'b0;
                  sda_oe <= 1'b1;
                  state  <= ST_ACK;
                end
                default: begin  // RX_DATA
                  reg_we    <= 1'b1;
                  reg_waddr <= ptr;
                  reg_wdata <= shreg;
                  ptr       <= ptr + 8'd1;
                  to_tx     <= 1'b0;
                  sda_oe    <= 1'b1;
                  state     <= ST_ACK;
                end
              endcase
            end
          end

          ST_ACK: begin
            if (scl_fall) begin
              bitcnt <= '0;
              if (to_tx) begin
                shreg  <= reg_rdata;
                sda_oe <= ~reg_rdata[7];
                state  <= ST_TX;
              end else begin
                sda_oe <= 1'b0;
                kind   <= (kind == RX_ADDR) ? RX_PTR : RX_DATA;
                state  <= ST_RX;
              end
            end
          end

          ST_TX: begin
            if (scl_fall) begin
              if (bitcnt == 4'd7) begin
                sda_oe <= 1'b0;
                ptr    <= ptr + 8'd1;
                state  <= ST_RACK;
              end else begin
                bitcnt <= bitcnt + 4'd1;
                shreg  <= {shreg[6:0], 1'b0};
                sda_oe <= ~shreg[6];
              end
            end
          end

          ST_RACK: begin
            if (scl_rise) begin
              mack <= ~sda_sync[1];
            end else if (scl_fall) begin
              bitcnt <= '0;
              if (mack) begin
                shreg  <= reg_rdata;
                sda_oe <= ~reg_rdata[7];
                state  <= ST_TX;
              end else begin
                state <= ST_IDLE;
              end
            end
          end

          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // A write strobe only ever follows a received data byte of a write transfer.
  assert property (@(posedge clk) disable iff (!rst_n) reg_we |-> !rw)
    else $error("i2c_slave: register write during a read transfer");

endmodule
