// i2c_master -- single-controller I2C master used as the camera control bus.
//
// Two cooperating parts. A bus-clock generator divides the system clock into
// four quarters per SCL period: an internal data clock (high in quarters 2
// and 3) and the SCL waveform (high in quarters 3 and 4), so SCL lags the data
// clock by a quarter period. SDA is changed on the data clock's rising edge
// (middle of SCL low) and sampled on its falling edge (middle of SCL high).
// If SCL is released but a target holds it low (clock stretching) the
// generator stops counting until SCL is seen high.
//
// The command FSM (ready, start, command, slv_ack1, wr, rd, slv_ack2,
// mstr_ack, stop) is advanced on data-clock rising edges. With ena high in
// ready it latches {addr, rw} and data_wr, raises busy and sends a START,
// then the address byte, then one data byte written or read per loop. After
// each byte (slv_ack2 / mstr_ack), if ena is still high, busy drops for one
// bit time: the user may present the next byte. The same address and rw
// continue the transfer; a different one causes a repeated START. With ena
// low the FSM sends STOP and returns to ready. On a read the master ACKs a
// byte only if the user keeps ena, addr and rw unchanged (another read
// follows) and NACKs it otherwise. ack_error is set by any target NACK and
// cleared at the next START. data_rd is updated after the eighth bit of each
// byte read.
//
// The bus is open drain: scl_oe / sda_oe high pull the line low; scl_i /
// sda_i are the wired-AND bus levels. Multi-controller features (arbitration,
// clock synchronisation, START byte, software reset) are left out, as in the
// controller the bridge is built around. The state set, the quarter-period
// clocking and the ACK/NACK rules follow that controller; the split into
// separate drive/sense pins for a two-state simulation is this design's own.
module i2c_master #(
  parameter int INPUT_CLK = 24_180_000,   // system clock, Hz
  parameter int BUS_CLK   = 400_000       // SCL frequency, Hz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ena,
  input  logic [6:0] addr,
  input  logic       rw,         // 0 write, 1 read
  input  logic [7:0] data_wr,
  output logic       busy,
  output logic [7:0] data_rd,
  output logic       ack_error,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       scl_oe,     // 1: pull SCL low
  output logic       sda_oe      // 1: pull SDA low
);

  localparam int DIVIDER = (INPUT_CLK / BUS_CLK) / 4;   // clocks per quarter SCL period
  localparam int CW      = $clog2(DIVIDER * 4 + 1);

  typedef enum logic [3:0] {
    S_READY, S_START, S_COMMAND, S_SLV_ACK1, S_WR, S_RD, S_SLV_ACK2, S_MSTR_ACK, S_STOP
  } state_t;

  state_t          state;
  logic [CW-1:0]   count;
  logic            data_clk, data_clk_prev, scl_clk, scl_ena, stretch;
  logic            sda_int;
  logic [7:0]      addr_rw, data_tx, data_rx;
  logic [2:0]      bit_cnt;
  logic            sda_release;

  // ---------------------------------------------------------------- clock generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count         <= '0;
      stretch       <= 1'b0;
      data_clk      <= 1'b0;
      data_clk_prev <= 1'b0;
      scl_clk       <= 1'b0;
    end else begin
      data_clk_prev <= data_clk;
      if (count == CW'(DIVIDER * 4 - 1))
        count <= '0;
      else if (!stretch)
        count <= count + 1'b1;
      if (count < CW'(DIVIDER)) begin
        scl_clk  <= 1'b0;
        data_clk <= 1'b0;
      end else if (count < CW'(DIVIDER * 2)) begin
        scl_clk  <= 1'b0;
        data_clk <= 1'b1;
      end else if (count < CW'(DIVIDER * 3)) begin
        scl_clk  <= 1'b1;
        stretch  <= scl_clk && !scl_i;  // SCL released last clock, target holds it low
        data_clk <= 1'b1;
      end else begin
        scl_clk  <= 1'b1;
        data_clk <= 1'b0;
      end
    end
  end

  wire data_rise = data_clk && !data_clk_prev;
  wire data_fall = !data_clk && data_clk_prev;
  wire same_cmd  = (addr_rw == {addr, rw});

  // ---------------------------------------------------------------- command FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_READY;
      busy      <= 1'b1;
      scl_ena   <= 1'b0;
      sda_int   <= 1'b1;
      ack_error <= 1'b0;
      bit_cnt   <= 3'd7;
      data_rd   <= '0;
      addr_rw   <= '0;
      data_tx   <= '0;
      data_rx   <= '0;
    end else if (data_rise) begin
      unique case (state)
        S_READY: begin
          if (ena) begin
            busy    <= 1'b1;
            addr_rw <= {addr, rw};
            data_tx <= data_wr;
            state   <= S_START;
          end else begin
            busy    <= 1'b0;
          end
        end
        S_START: begin
          busy    <= 1'b1;
          sda_int <= addr_rw[bit_cnt];
          state   <= S_COMMAND;
        end
        S_COMMAND: begin
          if (bit_cnt == 3'd0) begin
            sda_int <= 1'b1;                 // release for the target's ACK
            bit_cnt <= 3'd7;
            state   <= S_SLV_ACK1;
          end else begin
            bit_cnt <= bit_cnt - 1'b1;
            sda_int <= addr_rw[bit_cnt - 1'b1];
          end
        end
        S_SLV_ACK1: begin
          if (!addr_rw[0]) begin
            sda_int <= data_tx[bit_cnt];
            state   <= S_WR;
          end else begin
            sda_int <= 1'b1;
            state   <= S_RD;
          end
        end
        S_WR: begin
          busy <= 1'b1;
          if (bit_cnt == 3'd0) begin
            sda_int <= 1'b1;
            bit_cnt <= 3'd7;
            state   <= S_SLV_ACK2;
          end else begin
            bit_cnt <= bit_cnt - 1'b1;
            sda_int <= data_tx[bit_cnt - 1'b1];
          end
        end
        S_RD: begin
          busy <= 1'b1;
          if (bit_cnt == 3'd0) begin
            sda_int <= !(ena && same_cmd);   // ACK only if another read follows
            bit_cnt <= 3'd7;
            data_rd <= data_rx;
            state   <= S_MSTR_ACK;
          end else begin
            bit_cnt <= bit_cnt - 1'b1;
          end
        end
        S_SLV_ACK2: begin
          if (ena) begin
            busy    <= 1'b0;
            addr_rw <= {addr, rw};
            data_tx <= data_wr;
            if (same_cmd) begin
              sda_int <= data_wr[bit_cnt];
              state   <= S_WR;
            end else begin
              state   <= S_START;            // repeated START
            end
          end else begin
            state <= S_STOP;
          end
        end
        S_MSTR_ACK: begin
          if (ena) begin
            busy    <= 1'b0;
            addr_rw <= {addr, rw};
            data_tx <= data_wr;
            if (same_cmd) begin
              sda_int <= 1'b1;
              state   <= S_RD;
            end else begin
              state   <= S_START;
            end
          end else begin
            state <= S_STOP;
          end
        end
        S_STOP: begin
          busy  <= 1'b0;
          state <= S_READY;
        end
        default: state <= S_READY;
      endcase
    end else if (data_fall) begin
      case (state)
        S_START: begin
          if (!scl_ena) begin
            scl_ena   <= 1'b1;
            ack_error <= 1'b0;
          end
        end
        S_SLV_ACK1, S_SLV_ACK2: begin
          if (sda_i || ack_error) ack_error <= 1'b1;
        end
        S_RD:   data_rx[bit_cnt] <= sda_i;
        S_STOP: scl_ena <= 1'b0;
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- pin drivers
  always_comb begin
    case (state)
      S_START: sda_release = data_clk_prev;    // SDA falls while SCL is high
      S_STOP:  sda_release = !data_clk_prev;   // SDA rises while SCL is high
      default: sda_release = sda_int;
    endcase
  end

  assign scl_oe = scl_ena && !scl_clk;
  assign sda_oe = !sda_release;

endmodule
