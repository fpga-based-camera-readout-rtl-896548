// i2c_target_model -- behavioural I2C target with a 16-bit-indexed register file.
//
// Models a CCI (camera control) target such as an image sensor: 7-bit
// address ADDR, a 16-bit register index sent high byte first after the
// write address, then data bytes written at the index with auto-increment.
// A read (address with R/W = 1) returns bytes from the current index,
// incrementing it, until the master NACKs. Registers start at
// mem[i] = i[7:0] ^ i[15:8] ^ 8'h5A. Every write is logged in wr_idx/wr_dat
// (wr_count entries). If STRETCH > 0 the target holds SCL low for STRETCH
// clocks after every acknowledge slot (clock stretching); stretch_count
// counts how often it did.
//
// The model samples the bus on the testbench clock clk, which must be much
// faster than SCL. sda_oe / scl_oe pull the line low (open drain); the bus
// levels are inputs.
module i2c_target_model #(
  parameter logic [6:0] ADDR    = 7'h10,
  parameter int         STRETCH = 0
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic sda_oe,
  output logic scl_oe
);

  logic [7:0]  mem [65536];
  logic [15:0] wr_idx [1024];
  logic [7:0]  wr_dat [1024];
  int          wr_count;
  int          start_count, stop_count, read_bytes, stretch_count;

  typedef enum {T_IDLE, T_ADDR, T_IDXH, T_IDXL, T_DATA, T_TX, T_IGNORE} tstate_t;
  tstate_t     st;
  logic        scl_q, sda_q;
  int          cnt;            // SCL rising edges seen in the current 9-bit frame
  logic [7:0]  sh;
  logic [15:0] ptr;
  logic        m_ack, tx_first;
  int          hold;

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i) ^ 8'(i >> 8) ^ 8'h5A;
    wr_count = 0; start_count = 0; stop_count = 0; read_bytes = 0; stretch_count = 0;
    st = T_IDLE; scl_q = 1; sda_q = 1; cnt = 0; sh = 0; ptr = 0; m_ack = 0;
    hold = 0; sda_oe = 0; scl_oe = 0; tx_first = 0;
  end

  always @(posedge clk) begin
    // clock stretching
    if (hold > 0) begin
      hold = hold - 1;
      if (hold == 0) scl_oe <= 1'b0;
    end
    if (scl && scl_q && sda_q && !sda) begin              // START / repeated START
      st = T_ADDR; cnt = 0; sda_oe <= 1'b0; start_count++;
    end else if (scl && scl_q && !sda_q && sda) begin     // STOP
      st = T_IDLE; cnt = 0; sda_oe <= 1'b0; stop_count++;
    end else if (scl && !scl_q && st != T_IDLE) begin     // SCL rising
      if (cnt < 8) begin
        if (st != T_TX) sh = {sh[6:0], sda};
        cnt++;
      end else begin
        if (st == T_TX) m_ack = !sda;
        cnt = 9;
      end
    end else if (!scl && scl_q && st != T_IDLE) begin     // SCL falling
      if (cnt == 8) begin                                 // ACK slot begins
        case (st)
          T_ADDR: begin
            if (sh[7:1] == ADDR) begin
              sda_oe <= 1'b1;
              st = sh[0] ? T_TX : T_IDXH;
              tx_first = sh[0];
            end else begin
              st = T_IGNORE;
            end
          end
          T_IDXH: begin ptr[15:8] = sh; sda_oe <= 1'b1; st = T_IDXL; end
          T_IDXL: begin ptr[7:0]  = sh; sda_oe <= 1'b1; st = T_DATA; end
          T_DATA: begin
            mem[ptr] = sh;
            if (wr_count < 1024) begin wr_idx[wr_count] = ptr; wr_dat[wr_count] = sh; end
            wr_count++;
            ptr = ptr + 1;
            sda_oe <= 1'b1;
          end
          T_TX: begin sda_oe <= 1'b0; ptr = ptr + 1; read_bytes++; end
          default: sda_oe <= 1'b0;
        endcase
      end else if (cnt == 9) begin                        // ACK slot ends
        cnt = 0;
        sda_oe <= 1'b0;
        if (st == T_TX) begin
          if (tx_first) begin              // after the read address: first bit
            tx_first = 1'b0;
            sda_oe <= !mem[ptr][7];
          end else if (m_ack) begin
            sda_oe <= !mem[ptr][7];
          end else begin
            st = T_IGNORE;
          end
          m_ack = 1'b0;
        end
        if (STRETCH > 0 && st != T_IGNORE) begin
          scl_oe <= 1'b1; hold = STRETCH; stretch_count++;
        end
      end else if (st == T_TX && cnt < 8) begin           // next data bit
        sda_oe <= !mem[ptr][7 - cnt];
      end
    end
    scl_q = scl;
    sda_q = sda;
  end

endmodule
