// I2C target that gives an I2C controller access to the configuration
// registers (weights, biases, output selection) of the encoder.
//
// Protocol: 7-bit device address DEV_ADDR. A write is START, address+W,
// register address high byte, register address low byte, then any number of
// data bytes, each written to the current register address, which then
// increments. A read sets the register address the same way, then a repeated
// START, address+R, and data bytes from consecutive addresses until the
// controller answers a byte with NACK. The target acknowledges its own
// address and every byte written; it ignores transfers for other addresses.
// Register addresses are AW bits, taken from the low bits of the two address
// bytes. Only the use of I2C for programming the weights comes from the
// design; the register protocol is this implementation's choice (a common
// 16-bit-register-address layout).
//
// Implementation: scl and sda are sampled by clk through two-flop
// synchronizers, so clk must run several times faster than scl (the encoder
// clock of 40 MHz against a 100 kHz to 1 MHz bus). Bits are sampled after a
// rising scl edge and sda is changed after a falling one; a bit counter
// counts rising edges, so the falling edge that ends a START is ignored. sda_oe = 1 pulls
// sda low (open drain); no clock stretching.
//
// Register side: reg_we pulses for one clk with reg_addr and reg_wdata valid.
// reg_rdata must be the combinational read of reg_addr.
module i2c_target #(
  parameter logic [6:0]  DEV_ADDR = 7'h50,
  parameter int unsigned AW       = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          scl,
  input  logic          sda_in,
  output logic          sda_oe,
  output logic          reg_we,
  output logic [AW-1:0] reg_addr,
  output logic [7:0]    reg_wdata,
  input  logic [7:0]    reg_rdata
);

  typedef enum logic [2:0] {ST_IDLE, ST_DEV, ST_REGH, ST_REGL, ST_WRITE, ST_READ} state_t;

  logic [1:0] scl_sync, sda_sync;
  logic       scl_d, sda_d;
  logic       scl_rise, scl_fall, start_c, stop_c;

  state_t     state;
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic [7:0] tx;
  logic       rw;
  logic       nack;
  logic [15:0] addr16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_d    <= 1'b1;
      sda_d    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl};
      sda_sync <= {sda_sync[0], sda_in};
      scl_d    <= scl_sync[1];
      sda_d    <= sda_sync[1];
    end
  end

  assign scl_rise = scl_sync[1] && !scl_d;
  assign scl_fall = !scl_sync[1] && scl_d;
  assign start_c  = scl_sync[1] && scl_d && sda_d && !sda_sync[1];
  assign stop_c   = scl_sync[1] && scl_d && !sda_d && sda_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      bitcnt    <= '0;
      shreg     <= '0;
      tx        <= '0;
      rw        <= 1'b0;
      nack      <= 1'b0;
      sda_oe    <= 1'b0;
      reg_we    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      addr16    <= '0;
    end else begin
      reg_we <= 1'b0;
      if (start_c) begin
        state  <= ST_DEV;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= ST_IDLE;
        sda_oe <= 1'b0;
      end else if (state != ST_IDLE) begin
        if (state == ST_READ) begin
          // Transmit: bit 7 is put out before the first rising edge, bits
          // 6..0 after the following falling edges; the controller's
          // acknowledge is sampled on the ninth rising edge.
          if (scl_rise) begin
            if (bitcnt == 4'd8) nack <= sda_sync[1];
            if (bitcnt < 4'd9)  bitcnt <= bitcnt + 1'b1;
          end
          if (scl_fall) begin
            if (bitcnt >= 4'd1 && bitcnt <= 4'd7) begin
              sda_oe <= !tx[6];
              tx     <= {tx[6:0], 1'b0};
            end else if (bitcnt == 4'd8) begin
              sda_oe   <= 1'b0;
              reg_addr <= reg_addr + 1'b1;
            end else if (bitcnt == 4'd9) begin
              bitcnt <= '0;
              if (nack) begin
                state  <= ST_IDLE;
                sda_oe <= 1'b0;
              end else begin
                tx     <= reg_rdata;
                sda_oe <= !reg_rdata[7];
              end
            end
          end
        end else begin
          // Receive: bits sampled on rising edges 1..8, acknowledge driven
          // from the eighth falling edge to the ninth.
          if (scl_rise) begin
            if (bitcnt < 4'd8) shreg <= {shreg[6:0], sda_sync[1]};
            if (bitcnt < 4'd9) bitcnt <= bitcnt + 1'b1;
          end
          if (scl_fall) begin
            if (bitcnt == 4'd8) begin
              case (state)
                ST_DEV: begin
                  if (shreg[7:1] == DEV_ADDR) begin
                    rw     <= shreg[0];
                    sda_oe <= 1'b1;
                  end else begin
                    state <= ST_IDLE;
                  end
                end
                ST_REGH:  begin addr16[15:8] <= shreg; sda_oe <= 1'b1; end
                ST_REGL:  begin addr16[7:0]  <= shreg; sda_oe <= 1'b1; end
                ST_WRITE: begin
                  reg_we    <= 1'b1;
                  reg_wdata <= shreg;
                  sda_oe    <= 1'b1;
                end
                default: ;
              endcase
            end else if (bitcnt == 4'd9) begin
              // End of the acknowledge slot
              bitcnt <= '0;
              sda_oe <= 1'b0;
              case (state)
                ST_DEV: begin
                  if (rw) begin
                    state  <= ST_READ;
                    tx     <= reg_rdata;
                    sda_oe <= !reg_rdata[7];
                    nack   <= 1'b0;
                  end else begin
                    state <= ST_REGH;
                  end
                end
                ST_REGH:  state <= ST_REGL;
                ST_REGL:  begin state <= ST_WRITE; reg_addr <= addr16[AW-1:0]; end
                ST_WRITE: reg_addr <= reg_addr + 1'b1;
                default: ;
              endcase
            end
          end
        end
      end
    end
  end

endmodule
