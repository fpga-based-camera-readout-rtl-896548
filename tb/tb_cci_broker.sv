// tb_cci_broker -- self-checking test of the camera-control broker.
//
// The broker drives the real i2c_master, which talks to a register-file
// target model that also stretches the clock. Reduced timing (8 MHz system
// clock, 50-clock enable hold, 40-clock gap, 6000-clock frame period) keeps
// the run short; the sequencing is the same as at full size.
// Checked:
//   * while the start-up sequence is queued the host sees the queue full and
//     host writes are dropped; nothing happens on the bus before the button;
//   * the button's high-to-low edge raises enable, and the first START comes
//     no earlier than ENABLE_HOLD clocks later;
//   * the target receives the whole start-up sequence in order, then
//     setup_complete and streaming rise;
//   * consecutive transactions are at least INIT_TIME clocks apart;
//   * the per-frame writes repeat every FRAME_TIME clocks;
//   * host writes reach the target, host reads return {index, two bytes}
//     through the output queue, and streaming drops while commands wait.
module tb_cci_broker;
  import cci_pkg::*;

  localparam int CLK_HZ      = 8_000_000;
  localparam int ENABLE_HOLD = 50;
  localparam int INIT_TIME   = 40;
  localparam int FRAME_TIME  = 6000;

  logic        clk = 0, rst_n = 0;
  logic        button1 = 1, enable;
  logic [31:0] i_data = 0, o_data;
  logic        i_wr_ena = 0, i_rd_ena = 0, o_buff_empty, o_buff_full;
  logic        i2c_ena, i2c_rw, i2c_busy;
  logic [6:0]  i2c_addr;
  logic [7:0]  i2c_data_wr, i2c_data_rd;
  logic        setup_complete, streaming, ack_error;
  logic        scl_oe, sda_oe, t_scl_oe, t_sda_oe;
  wire         scl = !(scl_oe || t_scl_oe);
  wire         sda = !(sda_oe || t_sda_oe);

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  cci_broker #(.CLK_HZ(CLK_HZ), .ENABLE_HOLD(ENABLE_HOLD), .INIT_TIME(INIT_TIME),
               .FRAME_TIME(FRAME_TIME)) dut (.*);

  i2c_master #(.INPUT_CLK(CLK_HZ), .BUS_CLK(400_000)) u_i2c (
    .clk, .rst_n, .ena(i2c_ena), .addr(i2c_addr), .rw(i2c_rw), .data_wr(i2c_data_wr),
    .busy(i2c_busy), .data_rd(i2c_data_rd), .ack_error, .scl_i(scl), .sda_i(sda),
    .scl_oe, .sda_oe
  );

  i2c_target_model #(.ADDR(CAM_ADDR), .STRETCH(7)) tgt (
    .clk, .scl, .sda, .sda_oe(t_sda_oe), .scl_oe(t_scl_oe)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // bus monitor: START / STOP times, gaps between transactions
  logic scl_q = 1, sda_q = 1;
  int first_start = -1, last_stop = -1, min_gap = 1 << 30, n_start = 0;
  always @(posedge clk) begin
    if (scl && scl_q && sda_q && !sda) begin
      if (first_start < 0) first_start = cyc;
      if (last_stop >= 0 && cyc - last_stop < min_gap) min_gap = cyc - last_stop;
      last_stop = -1;      // a repeated START inside a read does not count as a gap
      n_start++;
    end
    if (scl && scl_q && !sda_q && sda) last_stop = cyc;
    scl_q <= scl;
    sda_q <= sda;
  end

  // reference copy of the command tables
  logic [6:0] ref_idx = 0;
  cci_cmd_t   ref_init, ref_frame0;
  cci_rom ref_rom (.init_idx(ref_idx), .init_cmd(ref_init), .frame_idx(2'd0), .frame_cmd(ref_frame0));

  // frame prompt times: writes of the first per-frame entry after set-up
  int frame_marks [$];
  int wr_seen = 0;
  always @(posedge clk) begin
    while (wr_seen < tgt.wr_count) begin
      if (setup_complete && tgt.wr_idx[wr_seen] == ref_frame0.index &&
          tgt.wr_dat[wr_seen] == ref_frame0.data)
        frame_marks.push_back(cyc);
      wr_seen++;
    end
  end

  task automatic host_write(input cci_cmd_t c);
    @(negedge clk);
    i_data = c; i_wr_ena = 1;
    @(negedge clk);
    i_wr_ena = 0;
  endtask

  initial begin
    int btn_at, base, rd_cnt;
    cci_result_t r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(o_buff_full && !setup_complete, "queue reported full while loading");
    host_write(wr(16'h7777, 8'h77));                   // must be dropped
    repeat (300) @(negedge clk);
    check(!enable && n_start == 0, "idle before the button");
    button1 = 0;
    btn_at = cyc;
    repeat (5) @(negedge clk);
    button1 = 1;
    check(enable, "enable raised by the button");
    wait (first_start >= 0);
    check(first_start - btn_at >= ENABLE_HOLD, $sformatf("first START %0d clocks after button", first_start - btn_at));
    wait (setup_complete);
    @(negedge clk);
    check(tgt.wr_count == INIT_LEN, $sformatf("%0d writes at set-up end", tgt.wr_count));
    for (int i = 0; i < INIT_LEN; i++) begin
      ref_idx = 7'(i);
      #1;
      check(tgt.wr_idx[i] == ref_init.index && tgt.wr_dat[i] == ref_init.data,
            $sformatf("start-up write %0d: %h=%h", i, tgt.wr_idx[i], tgt.wr_dat[i]));
    end
    check(streaming && !o_buff_full, "streaming after set-up");
    check(tgt.mem[16'h0100] == 8'h01, "sensor told to stream");

    // host traffic: two writes and two reads
    base = tgt.wr_count;
    host_write(wr(16'h0157, 8'h3C));
    @(negedge clk);
    check(!streaming, "streaming low while commands wait");
    host_write(wr(16'h4000, 8'hA1));
    host_write(cci_cmd_t'({CAM_ADDR, RW_READ, 16'h0157, 8'h00}));
    host_write(cci_cmd_t'({CAM_ADDR, RW_READ, 16'h2222, 8'h00}));
    rd_cnt = 0;
    while (rd_cnt < 2) begin
      @(negedge clk);
      if (!o_buff_empty) begin
        i_rd_ena = 1;
        @(negedge clk);
        i_rd_ena = 0;
        @(negedge clk);
        r = o_data;
        if (rd_cnt == 0)
          check(r.index == 16'h0157 && r.data == {8'h3C, tgt.mem[16'h0158]},
                $sformatf("read result %h", o_data));
        else
          check(r.index == 16'h2222 && r.data == {8'h5A, 8'h5A ^ 8'h23 ^ 8'h22},
                $sformatf("read result %h", o_data));
        rd_cnt++;
      end
    end
    check(tgt.mem[16'h4000] == 8'hA1, "host write reached the target");
    check(tgt.mem[16'h7777] != 8'h77, "write during loading was dropped");

    // frame prompts, counted once the host traffic (which goes first) is over
    frame_marks.delete();
    wait (frame_marks.size() >= 5);
    for (int k = 2; k < frame_marks.size(); k++) begin
      int d;
      d = frame_marks[k] - frame_marks[k-1];
      check(d > FRAME_TIME - 800 && d < FRAME_TIME + 800, $sformatf("frame prompt spacing %0d", d));
    end
    check(tgt.mem[16'h015A] == 8'h06 && tgt.mem[16'h015B] == 8'hDF && tgt.mem[16'h0157] == 8'hE0,
          "per-frame registers written");
    check(min_gap >= INIT_TIME, $sformatf("minimum gap %0d clocks", min_gap));
    check(!ack_error, "no NACKs");
    check(tgt.stretch_count > 0, "clock stretching happened");
    $display("transactions %0d, frame prompts %0d", n_start, frame_marks.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
