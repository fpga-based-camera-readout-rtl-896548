// cci_broker -- camera control interface broker: runs the sensor's I2C traffic.
//
// The broker sits between a host, the I2C master and the image sensor. It
// holds two queues: fifo_in takes 32-bit commands (see cci_pkg: target, rw,
// 16-bit register index, data byte) and fifo_out returns 32-bit read results
// ({index, byte at index, byte at index+1}). What it does:
//
// Start-up. After reset it copies the start-up sequence (from cci_rom)
//   into fifo_in; the host sees the queue as full meanwhile and cannot write.
//   It then idles until the start button (button1, a high-to-low edge) is
//   pressed, raises the sensor enable output, waits ENABLE_HOLD clocks and
//   works through the queue. When the queue has run dry after the last
//   start-up command (the one that starts streaming) setup_complete is set
//   and the host may write commands.
// Transactions. Each command is one I2C transaction, issued byte by byte
//   through the master's ena/busy handshake by the instruction_ID state
//   (0 idle, 1 address + index high byte, 2 index low byte, 3 data byte or
//   switch to read, 4 last byte). instruction_ID advances on each rising edge
//   of the master's busy, so inputs change only while the master has already
//   latched the previous ones. A write is START, addr+W, index high, index
//   low, data, STOP (32 bits). A read writes the index, then a repeated START,
//   addr+R and two data bytes, ACK then NACK, STOP (40 bits without the
//   repeated address byte); the result goes to fifo_out. Consecutive
//   transactions are separated by INIT_TIME clocks.
// Frame prompt. Once set up, an internal timer fires every FRAME_TIME clocks
//   and the broker sends the per-frame sequence (from cci_rom). Host
//   commands waiting in fifo_in are served first; streaming is high while
//   set up and no host command is waiting.
//
// Timing defaults are those of the bridge for its 24.18 MHz oscillator:
// ENABLE_HOLD = 1 ms, FRAME_TIME = 1/60 s + 1 clock, INIT_TIME = 3500
// clocks, 256-deep queues. Host writes while o_buff_full is high, and results
// that find fifo_out full, are dropped. The exact sequencing (a phase FSM
// around the instruction_ID FSM, 16-bit reads, the button synchroniser)
// is this design's own arrangement of the behaviour the bridge describes.
module cci_broker
  import cci_pkg::*;
#(
  parameter int CLK_HZ      = 24_180_000,
  parameter int ENABLE_HOLD = CLK_HZ / 1000,
  parameter int INIT_TIME   = 3500,
  parameter int FRAME_TIME  = CLK_HZ / 60 + 1,
  parameter int FIFO_DEPTH  = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        button1,
  output logic        enable,
  // host side
  input  logic [31:0] i_data,
  input  logic        i_wr_ena,
  input  logic        i_rd_ena,
  output logic [31:0] o_data,
  output logic        o_buff_empty,
  output logic        o_buff_full,
  // I2C master side
  output logic        i2c_ena,
  output logic [6:0]  i2c_addr,
  output logic        i2c_rw,
  output logic [7:0]  i2c_data_wr,
  input  logic        i2c_busy,
  input  logic [7:0]  i2c_data_rd,
  // status
  output logic        setup_complete,
  output logic        streaming
);

  typedef enum logic [2:0] {PH_LOAD, PH_IDLE, PH_HOLD, PH_GAP, PH_FETCH, PH_XFER} phase_t;
  typedef enum logic [2:0] {IID_IDLE = 3'd0, IID_ADDR = 3'd1, IID_REGLO = 3'd2,
                            IID_DATA = 3'd3, IID_LAST = 3'd4} iid_t;

  localparam int TW = $clog2(((ENABLE_HOLD > INIT_TIME) ? ENABLE_HOLD : INIT_TIME) + 1);
  localparam int FW = $clog2(FRAME_TIME + 1);
  localparam int LW = $clog2(INIT_LEN + 1);
  localparam int XW = $clog2(FRAME_LEN + 1);

  phase_t        phase;
  iid_t          iid;
  logic [TW-1:0] timer;
  logic [FW-1:0] frame_timer;
  logic [LW-1:0] load_idx;
  logic [XW-1:0] frame_idx;
  logic          frame_active;
  logic          from_queue;
  cci_cmd_t      cmd;
  logic [7:0]    rd_hi;
  logic          busy_prev;
  logic [2:0]    btn_sync;

  // command tables
  cci_cmd_t      rom_init, rom_frame;

  cci_rom u_rom (
    .init_idx(7'(load_idx)), .init_cmd(rom_init),
    .frame_idx(2'(frame_idx)), .frame_cmd(rom_frame)
  );

  // queues
  cci_cmd_t      in_din, in_q;
  logic          in_wr, in_rd, in_empty, in_full;
  cci_result_t   out_din;
  logic          out_wr, out_full;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) fifo_in (
    .clk, .rst_n, .din(in_din), .wr_en(in_wr), .rd_en(in_rd),
    .q(in_q), .empty(in_empty), .full(in_full)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) fifo_out (
    .clk, .rst_n, .din(out_din), .wr_en(out_wr), .rd_en(i_rd_ena),
    .q(o_data), .empty(o_buff_empty), .full(out_full)
  );

  wire loading    = (phase == PH_LOAD);
  wire button_hit = btn_sync[2] && !btn_sync[1];        // high-to-low edge
  wire busy_rise  = i2c_busy && !busy_prev;
  wire busy_fall  = !i2c_busy && busy_prev;
  wire gap_over   = (phase == PH_GAP) && (timer == '0);

  assign in_din       = loading ? rom_init : cci_cmd_t'(i_data);
  assign in_wr        = loading || (i_wr_ena && setup_complete);
  assign in_rd        = gap_over && !in_empty;
  assign o_buff_full  = !setup_complete || in_full;
  assign streaming    = setup_complete && in_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= PH_LOAD;
      iid            <= IID_IDLE;
      timer          <= '0;
      frame_timer    <= '0;
      load_idx       <= '0;
      frame_idx      <= '0;
      frame_active   <= 1'b0;
      from_queue     <= 1'b0;
      cmd            <= '0;
      rd_hi          <= '0;
      busy_prev      <= 1'b0;
      btn_sync       <= '1;
      enable         <= 1'b0;
      setup_complete <= 1'b0;
      i2c_ena        <= 1'b0;
      i2c_addr       <= '0;
      i2c_rw         <= 1'b0;
      i2c_data_wr    <= '0;
      out_wr         <= 1'b0;
      out_din        <= '0;
    end else begin
      btn_sync  <= {btn_sync[1:0], button1};
      busy_prev <= i2c_busy;
      out_wr    <= 1'b0;

      // per-frame timer, running once the sensor is set up
      if (setup_complete) begin
        if (frame_timer == '0) begin
          frame_timer  <= FW'(FRAME_TIME - 1);
          frame_active <= 1'b1;
          frame_idx    <= '0;
        end else begin
          frame_timer <= frame_timer - 1'b1;
        end
      end

      unique case (phase)
        PH_LOAD: begin
          load_idx <= load_idx + 1'b1;
          if (load_idx == LW'(INIT_LEN - 1)) phase <= PH_IDLE;
        end
        PH_IDLE: begin
          if (button_hit) begin
            enable <= 1'b1;
            timer  <= TW'(ENABLE_HOLD);
            phase  <= PH_HOLD;
          end
        end
        PH_HOLD: begin
          if (timer == '0) begin
            timer <= TW'(INIT_TIME);
            phase <= PH_GAP;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        PH_GAP: begin
          if (timer != '0) begin
            timer <= timer - 1'b1;
          end else if (!in_empty) begin
            from_queue <= 1'b1;
            phase      <= PH_FETCH;          // in_rd is high in this cycle
          end else if (frame_active && setup_complete) begin
            from_queue  <= 1'b0;
            cmd         <= rom_frame;
            phase       <= PH_XFER;
            iid         <= IID_IDLE;
          end
        end
        PH_FETCH: begin
          cmd   <= in_q;
          phase <= PH_XFER;
          iid   <= IID_IDLE;
        end
        PH_XFER: begin
          unique case (iid)
            IID_IDLE: begin                  // 0: start the transaction
              i2c_ena     <= 1'b1;
              i2c_addr    <= cmd.target;
              i2c_rw      <= RW_WRITE;       // always write the index first
              i2c_data_wr <= cmd.index[15:8];
              iid         <= IID_ADDR;
            end
            IID_ADDR: if (busy_rise) begin   // 1: master took addr + index high
              i2c_data_wr <= cmd.index[7:0];
              iid         <= IID_REGLO;
            end
            IID_REGLO: if (busy_rise) begin  // 2: master took index low
              if (cmd.rw == RW_READ) i2c_rw      <= RW_READ;
              else                   i2c_data_wr <= cmd.data;
              iid <= IID_DATA;
            end
            IID_DATA: if (busy_rise) begin   // 3: data byte / repeated START begun
              if (cmd.rw == RW_WRITE) i2c_ena <= 1'b0;
              iid <= IID_LAST;
            end
            IID_LAST: begin                  // 4: last byte, then STOP
              if (busy_rise && i2c_ena) begin
                rd_hi   <= i2c_data_rd;      // first read byte is complete
                i2c_ena <= 1'b0;
              end else if (busy_fall && !i2c_ena) begin
                if (cmd.rw == RW_READ) begin
                  out_din <= '{index: cmd.index, data: {rd_hi, i2c_data_rd}};
                  out_wr  <= !out_full;
                end
                if (from_queue && in_empty && !setup_complete)
                  setup_complete <= 1'b1;
                if (!from_queue) begin
                  frame_idx <= frame_idx + 1'b1;
                  if (frame_idx == XW'(FRAME_LEN - 1)) frame_active <= 1'b0;
                end
                iid   <= IID_IDLE;
                timer <= TW'(INIT_TIME);
                phase <= PH_GAP;
              end
            end
            default: iid <= IID_IDLE;
          endcase
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
