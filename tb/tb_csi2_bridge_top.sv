// tb_csi2_bridge_top -- end-to-end test of the bridge, both pipelines at once.
//
// Control side: the bridge's I2C pins go to an open-drain bus with a camera
// register-file target model (address 0x10) that stretches the clock after
// every acknowledge. The test presses the start button, checks the whole
// start-up sequence arrives at the target, then sends host writes and reads
// through the command queue while the per-frame register updates run.
// Image side: a CSI-2 transmitter model sends frames on two DDR lanes with a
// random lane skew per packet: frame start/end, line start/end, RAW10 lines,
// a non-pixel packet, and headers with injected errors (single header bit,
// single ECC bit, two ECC bits, two header data bits in a line start).
// Every pixel, fv/lv, every corrected header and every ECC flag is checked.
//
// The internal reset comes from the bridge's own reset generator, so the
// design runs unreset for RST_ASSERT clocks; the bus log is taken from the
// moment the reset is released.
//
// FULL = 0 uses reduced timing (8 MHz control clock, short reset, hold,
// gap and frame period) for a quick run; FULL = 1 instantiates the bridge at
// its default parameters (24.18 MHz, 400 kHz bus, 1 ms enable hold, 3500
// clock gap, 1/60 s frame period, reset at 25000..49900) and is used by
// tb_csi2_bridge_top_full. At the end the test prints how often each
// mechanism was exercised and fails if any of them never happened.
module tb_csi2_bridge_top #(
  parameter bit FULL = 0
);
  import cci_pkg::*;
  import csi2_pkg::*;

  localparam int CLK_HZ      = FULL ? 24_180_000 : 8_000_000;
  localparam int ENABLE_HOLD = FULL ? CLK_HZ / 1000 : 50;
  localparam int INIT_TIME   = FULL ? 3500 : 40;
  localparam int FRAME_TIME  = FULL ? CLK_HZ / 60 + 1 : 6000;
  localparam int RST_ASSERT  = FULL ? 25000 : 20;
  localparam int RST_RELEASE = FULL ? 49900 : 60;
  localparam int HALF_CLK    = FULL ? 10 : 5;       // dck half period is 2
  localparam int WATCHDOG    = FULL ? 3_000_000 : 400_000;
  localparam int LANES       = 2;

  logic             clk = 0, dck = 0;
  logic             button1 = 1, enable;
  logic [31:0]      i_data = 0, o_data;
  logic             i_wr_ena = 0, i_rd_ena = 0, o_buff_empty, o_buff_full;
  logic             o_setup_complete, o_streaming, o_i2c_ack_error;
  logic             scl_oe, sda_oe, t_scl_oe, t_sda_oe;
  wire              scl = !(scl_oe || t_scl_oe);
  wire              sda = !(sda_oe || t_sda_oe);
  logic [LANES-1:0] lanes;
  logic             o_pixel_clk, o_pixel_valid, o_frame_valid, o_line_valid;
  logic [9:0]       o_parallel_pixels;
  logic [23:0]      o_packet_header;
  logic [2:0]       o_ecc_errors;
  logic             ecc_valid, rst_n;

  always #(HALF_CLK) clk = !clk;
  always #2 dck = !dck;

  if (FULL) begin : g_dut
    csi2_bridge_top dut (
      .clk, .button1, .enable, .i_data, .i_wr_ena, .i_rd_ena, .o_data, .o_buff_empty,
      .o_buff_full, .o_setup_complete, .o_streaming, .o_i2c_ack_error,
      .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe,
      .i_mipi_clk(dck), .i_mipi_data(lanes),
      .o_pixel_clk, .o_pixel_valid, .o_parallel_pixels, .o_frame_valid, .o_line_valid,
      .o_packet_header, .o_ecc_errors
    );
    assign ecc_valid = dut.u_ecc.valid;
    assign rst_n     = dut.rst_n;
  end else begin : g_dut
    csi2_bridge_top #(
      .CLK_HZ(CLK_HZ), .ENABLE_HOLD(ENABLE_HOLD), .INIT_TIME(INIT_TIME),
      .FRAME_TIME(FRAME_TIME), .RST_ASSERT(RST_ASSERT), .RST_RELEASE(RST_RELEASE)
    ) dut (
      .clk, .button1, .enable, .i_data, .i_wr_ena, .i_rd_ena, .o_data, .o_buff_empty,
      .o_buff_full, .o_setup_complete, .o_streaming, .o_i2c_ack_error,
      .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe,
      .i_mipi_clk(dck), .i_mipi_data(lanes),
      .o_pixel_clk, .o_pixel_valid, .o_parallel_pixels, .o_frame_valid, .o_line_valid,
      .o_packet_header, .o_ecc_errors
    );
    assign ecc_valid = dut.u_ecc.valid;
    assign rst_n     = dut.rst_n;
  end

  i2c_target_model #(.ADDR(CAM_ADDR), .STRETCH(7)) tgt (
    .clk, .scl, .sda, .sda_oe(t_sda_oe), .scl_oe(t_scl_oe)
  );

  csi2_tx_model #(.LANES(LANES)) tx (.dck, .lane(lanes));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_init_writes = 0, n_button = 0, n_host_writes = 0, n_host_reads = 0;
  int n_repeated_start = 0, n_frame_prompts = 0, n_stretch = 0;
  int n_ecc_clean = 0, n_ecc_corrected = 0, n_ecc_uncorrectable = 0;
  int n_pixels = 0, n_lines = 0, n_frames = 0, n_skewed = 0, n_line_pkts = 0, n_skipped = 0;

  // ------------------------------------------------------------ control-side monitors
  int cyc = 0, rel_cyc = -1, base_wr = 0, btn_at = -1, first_start = -1;
  int last_stop = -1, min_gap = 1 << 30;
  logic scl_q = 1, sda_q = 1, rst_q = 1, in_xfer = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && !rst_q) begin
      rel_cyc = cyc;
      base_wr = tgt.wr_count;
      last_stop = -1;
    end
    rst_q <= rst_n;
    if (rel_cyc >= 0) begin
      if (scl && scl_q && sda_q && !sda) begin
        if (in_xfer) n_repeated_start++;
        if (first_start < 0) first_start = cyc;
        if (last_stop >= 0 && cyc - last_stop < min_gap) min_gap = cyc - last_stop;
        last_stop = -1;
        in_xfer = 1;
      end
      if (scl && scl_q && !sda_q && sda) begin
        last_stop = cyc;
        in_xfer = 0;
      end
    end
    scl_q <= scl;
    sda_q <= sda;
  end

  // reference copy of the command tables
  logic [6:0] ref_idx = 0;
  cci_cmd_t   ref_init, ref_frame0;
  cci_rom ref_rom (.init_idx(ref_idx), .init_cmd(ref_init), .frame_idx(2'd0), .frame_cmd(ref_frame0));

  int frame_marks [$];
  int wr_seen = -1;
  always @(posedge clk) if (rel_cyc >= 0) begin
    if (wr_seen < 0) wr_seen = base_wr;
    while (wr_seen < tgt.wr_count) begin
      if (wr_seen - base_wr >= INIT_LEN && tgt.wr_idx[wr_seen] == ref_frame0.index &&
          tgt.wr_dat[wr_seen] == ref_frame0.data) begin
        frame_marks.push_back(cyc);
        n_frame_prompts++;
      end
      wr_seen++;
    end
  end

  // ------------------------------------------------------------ image-side monitors
  logic [9:0]  exp_px [$];
  logic [26:0] exp_ecc [$];      // {flags[2:0], corrected header[23:0]}
  logic        lv_q = 0, fv_q = 0;
  int          lv_rises = 0, fv_rises = 0;

  always @(posedge dck) if (rel_cyc >= 0 && rst_n) begin
    if (o_pixel_valid) begin
      logic [9:0] e;
      check(exp_px.size() != 0, "unexpected pixel");
      e = exp_px.pop_front();
      check(o_parallel_pixels == e, $sformatf("pixel %h expected %h", o_parallel_pixels, e));
      check(o_frame_valid && o_line_valid, "pixel outside fv/lv");
      n_pixels++;
    end
    if (o_line_valid && !lv_q) lv_rises++;
    if (o_frame_valid && !fv_q) fv_rises++;
    lv_q <= o_line_valid;
    fv_q <= o_frame_valid;
  end

  always @(posedge clk) if (rel_cyc >= 0 && rst_n && ecc_valid) begin
    logic [26:0] e;
    check(exp_ecc.size() != 0, "unexpected header result");
    e = exp_ecc.pop_front();
    check(o_ecc_errors == e[26:24], $sformatf("ECC flags %b expected %b (header %h)",
                                             o_ecc_errors, e[26:24], e[23:0]));
    if (e[26:24] != 3'b100)
      check(o_packet_header == e[23:0], $sformatf("header %h expected %h", o_packet_header, e[23:0]));
    case (o_ecc_errors)
      3'b001:  n_ecc_clean++;
      3'b010:  n_ecc_corrected++;
      3'b100:  n_ecc_uncorrectable++;
      default: ;
    endcase
  end

  // ------------------------------------------------------------ stimulus helpers
  function automatic void rnd_skew(output int s [LANES]);
    for (int l = 0; l < LANES; l++) s[l] = $urandom_range(0, 11);
    if (s[0] != s[1]) n_skewed++;
  endfunction

  task automatic send_short(input logic [5:0] t, input logic [15:0] d, input logic [31:0] flip,
                            input logic [2:0] flags);
    int s [LANES];
    rnd_skew(s);
    exp_ecc.push_back({flags, d, 2'b00, t});
    tx.send(tx.short_pkt(t, d, flip), s);
  endtask

  task automatic send_line(input int width);
    int s [LANES];
    logic [9:0] px [$];
    logic [7:0] pl [$];
    for (int i = 0; i < width; i++) begin
      px.push_back(10'($urandom));
      exp_px.push_back(px[i]);
    end
    pl = tx.raw10(px);
    rnd_skew(s);
    exp_ecc.push_back({3'b001, 16'(pl.size()), 2'b00, DT_RAW10});
    tx.send(tx.long_pkt(DT_RAW10, pl), s);
    n_lines++;
  endtask

  task automatic send_other(input int len);
    int s [LANES];
    logic [7:0] pl [$];
    for (int i = 0; i < len; i++) pl.push_back(8'($urandom));
    rnd_skew(s);
    exp_ecc.push_back({3'b001, 16'(len), 2'b00, 6'h12});
    tx.send(tx.long_pkt(6'h12, pl), s);
    n_skipped++;
  endtask

  // one frame; header errors are injected into the short packets only, whose
  // data field the decoder does not interpret
  task automatic send_frame(input int f, input int nlines, input int maxw);
    int b;
    b = $urandom_range(0, 15);
    send_short(DT_FRAME_START, 16'(f), 32'(1) << (8 + b), 3'b010);        // header bit: corrected
    send_other($urandom_range(1, 9));
    for (int ln = 0; ln < nlines; ln++) begin
      case (ln % 4)
        0: send_short(DT_LINE_START, 16'(ln), 32'h0300_0000, 3'b100);     // two ECC bits
        1: send_short(DT_LINE_START, 16'(ln), 32'h0000_1100, 3'b100);     // two header bits
        2: send_short(DT_LINE_START, 16'(ln), 32'h0400_0000, 3'b010);     // one ECC bit
        default: send_short(DT_LINE_START, 16'(ln), 0, 3'b001);
      endcase
      send_line(4 * $urandom_range(1, maxw / 4));
      send_short(DT_LINE_END, 16'(ln), 0, 3'b001);
      n_line_pkts += 2;
    end
    send_short(DT_FRAME_END, 16'(f), 0, 3'b001);
    n_frames++;
  endtask

  task automatic host_write(input cci_cmd_t c);
    @(negedge clk);
    i_data = c; i_wr_ena = 1;
    @(negedge clk);
    i_wr_ena = 0;
  endtask

  // ------------------------------------------------------------ control sequence
  bit ctrl_done = 0;
  initial begin
    int rd_cnt;
    cci_result_t r;
    wait (rel_cyc >= 0);
    repeat (20) @(negedge clk);
    check(o_buff_full && !o_setup_complete && !enable, "loading after reset");
    repeat (200) @(negedge clk);
    check(first_start < 0, "bus quiet before the button");
    button1 = 0;
    btn_at = cyc;
    n_button++;
    repeat (5) @(negedge clk);
    button1 = 1;
    check(enable, "sensor enable raised");
    wait (first_start >= 0);
    check(first_start - btn_at >= ENABLE_HOLD, $sformatf("first START %0d clocks after button",
                                                        first_start - btn_at));
    wait (o_setup_complete);
    @(negedge clk);
    n_init_writes = tgt.wr_count - base_wr;
    check(n_init_writes == INIT_LEN, $sformatf("%0d start-up writes", n_init_writes));
    for (int i = 0; i < INIT_LEN; i++) begin
      ref_idx = 7'(i);
      #1;
      check(tgt.wr_idx[base_wr + i] == ref_init.index && tgt.wr_dat[base_wr + i] == ref_init.data,
            $sformatf("start-up write %0d", i));
    end
    check(o_streaming, "streaming after set-up");

    host_write(wr(16'h0157, 8'h3C));
    host_write(wr(16'h4000, 8'hA1));
    host_write(cci_cmd_t'({CAM_ADDR, RW_READ, 16'h0157, 8'h00}));
    host_write(cci_cmd_t'({CAM_ADDR, RW_READ, 16'h2222, 8'h00}));
    n_host_writes = 2;
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
          check(r.index == 16'h0157 && r.data == {8'h3C, tgt.mem[16'h0158]}, $sformatf("read %h", o_data));
        else
          check(r.index == 16'h2222 && r.data == {8'h5A, 8'h5B}, $sformatf("read %h", o_data));
        rd_cnt++;
        n_host_reads++;
      end
    end
    check(tgt.mem[16'h4000] == 8'hA1, "host write arrived");
    frame_marks.delete();
    wait (frame_marks.size() >= 3);
    for (int k = 2; k < frame_marks.size(); k++) begin
      int d;
      d = frame_marks[k] - frame_marks[k-1];
      check(d > FRAME_TIME - FRAME_TIME / 8 && d < FRAME_TIME + FRAME_TIME / 8,
            $sformatf("frame prompt spacing %0d", d));
    end
    check(min_gap >= INIT_TIME, $sformatf("minimum gap between transactions %0d", min_gap));
    check(!o_i2c_ack_error, "no NACK");
    ctrl_done = 1;
  end

  // ------------------------------------------------------------ image sequence
  bit img_done = 0;
  initial begin
    wait (rel_cyc >= 0);
    repeat (10) @(negedge clk);
    for (int f = 0; f < (FULL ? 3 : 4); f++) begin
      send_frame(f + 1, FULL ? 8 : 6, FULL ? 48 : 40);
      tx.wait_idle();
      repeat (40) @(posedge clk);
      check(!o_frame_valid && !o_line_valid, "fv/lv low after the frame");
    end
    check(exp_px.size() == 0, $sformatf("%0d pixels missing", exp_px.size()));
    check(exp_ecc.size() == 0, $sformatf("%0d header results missing", exp_ecc.size()));
    check(lv_rises == n_lines && fv_rises == n_frames, "one lv pulse per line, one fv pulse per frame");
    img_done = 1;
  end

  initial begin
    wait (ctrl_done && img_done);
    n_stretch = tgt.stretch_count;
    $display("mechanisms: start-up writes %0d, button presses %0d, host writes %0d, host reads %0d,",
             n_init_writes, n_button, n_host_writes, n_host_reads);
    $display("  repeated STARTs %0d, frame prompts %0d, clock stretches %0d,",
             n_repeated_start, n_frame_prompts, n_stretch);
    $display("  headers clean %0d / corrected %0d / uncorrectable %0d,",
             n_ecc_clean, n_ecc_corrected, n_ecc_uncorrectable);
    $display("  frames %0d, lines %0d, line start/end packets %0d, skipped packets %0d, pixels %0d, skewed packets %0d",
             n_frames, n_lines, n_line_pkts, n_skipped, n_pixels, n_skewed);
    check(n_init_writes == INIT_LEN && n_button > 0 && n_host_writes > 0 && n_host_reads > 0 &&
          n_repeated_start > 0 && n_frame_prompts > 0 && n_stretch > 0, "every control mechanism seen");
    check(n_ecc_clean > 0 && n_ecc_corrected > 0 && n_ecc_uncorrectable > 0 && n_pixels > 0 &&
          n_frames > 0 && n_skewed > 0 && n_skipped > 0, "every image mechanism seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
