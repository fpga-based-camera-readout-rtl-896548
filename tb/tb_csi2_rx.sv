// tb_csi2_rx -- self-checking test of the CSI-2 receiver (two lanes, RAW10).
//
// A transmitter model sends whole frames on two DDR lanes: frame start, a
// number of lines (each optionally framed by line start / line end short
// packets) as RAW10 long packets of random pixels and random width, one
// non-pixel long packet per frame whose payload must be skipped, and frame
// end. Every packet has its own random lane skew of 0..11 bits.
// Checked: every pixel value and their order, pixels only with lv and fv
// high, one lv pulse per line, fv across the frame only, and every decoded
// header (DT, WC) in order.
module tb_csi2_rx;
  import csi2_pkg::*;

  localparam int LANES = 2;

  logic             dck = 0, rst_n = 0;
  logic [LANES-1:0] lane;
  logic [9:0]       pixdata;
  logic             pix_valid, fv, lv, hdr_valid;
  logic [1:0]       vc;
  logic [5:0]       dt;
  logic [15:0]      wc;
  logic [7:0]       ecc;

  int checks = 0, failures = 0;
  logic [9:0]  exp_px [$];
  logic [21:0] exp_hdr [$];       // {wc, dt}
  int n_pix = 0, n_lines = 0, n_hdr = 0, n_frames = 0, lv_rises = 0, fv_rises = 0, n_skipped = 0;
  logic lv_q = 0, fv_q = 0;

  always #2 dck = !dck;

  csi2_tx_model #(.LANES(LANES)) tx (.dck, .lane);

  csi2_rx #(.LANES(LANES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge dck) if (rst_n) begin
    if (pix_valid) begin
      check(exp_px.size() != 0, "unexpected pixel");
      if (exp_px.size() != 0) begin
        logic [9:0] e;
        e = exp_px.pop_front();
        check(pixdata == e, $sformatf("pixel %0d: %h expected %h", n_pix, pixdata, e));
      end
      check(lv && fv, "pixel outside lv/fv");
      n_pix++;
    end
    if (hdr_valid) begin
      check(exp_hdr.size() != 0, "unexpected header");
      if (exp_hdr.size() != 0) begin
        logic [21:0] e;
        e = exp_hdr.pop_front();
        check({wc, dt} == e, $sformatf("header %h/%h expected %h/%h", wc, dt, e[21:6], e[5:0]));
      end
      check(vc == 2'd0, "virtual channel");
      n_hdr++;
    end
    if (lv && !lv_q) lv_rises++;
    if (fv && !fv_q) fv_rises++;
    lv_q <= lv;
    fv_q <= fv;
  end

  function automatic void rnd_skew(output int s [LANES]);
    for (int l = 0; l < LANES; l++) s[l] = $urandom_range(0, 11);
  endfunction

  task automatic send_short(input logic [5:0] t, input logic [15:0] d);
    int s [LANES];
    rnd_skew(s);
    exp_hdr.push_back({d, t});
    tx.send(tx.short_pkt(t, d), s);
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
    exp_hdr.push_back({16'(pl.size()), DT_RAW10});
    tx.send(tx.long_pkt(DT_RAW10, pl), s);
    n_lines++;
  endtask

  task automatic send_other(input int len);
    int s [LANES];
    logic [7:0] pl [$];
    for (int i = 0; i < len; i++) pl.push_back(8'($urandom));
    rnd_skew(s);
    exp_hdr.push_back({16'(len), 6'h12});
    tx.send(tx.long_pkt(6'h12, pl), s);
    n_skipped++;
  endtask

  initial begin
    repeat (4) @(negedge dck);
    rst_n = 1;
    repeat (8) @(negedge dck);
    for (int f = 0; f < 4; f++) begin
      send_short(DT_FRAME_START, 16'(f + 1));
      send_other($urandom_range(1, 9));
      for (int ln = 0; ln < 6; ln++) begin
        bit framed;
        framed = 1'($urandom_range(0, 1));
        if (framed) send_short(DT_LINE_START, 16'(ln + 1));
        send_line(4 * $urandom_range(1, 12));
        if (framed) send_short(DT_LINE_END, 16'(ln + 1));
      end
      send_short(DT_FRAME_END, 16'(f + 1));
      tx.wait_idle();
      repeat (20) @(posedge dck);
      check(!fv && !lv, "fv/lv low after frame end");
      n_frames++;
    end
    check(exp_px.size() == 0, $sformatf("%0d pixels not received", exp_px.size()));
    check(exp_hdr.size() == 0, $sformatf("%0d headers not received", exp_hdr.size()));
    check(lv_rises == n_lines, $sformatf("lv pulses %0d, lines %0d", lv_rises, n_lines));
    check(fv_rises == n_frames, $sformatf("fv pulses %0d, frames %0d", fv_rises, n_frames));
    $display("received %0d pixels, %0d lines, %0d headers, %0d frames, %0d skipped packets",
             n_pix, n_lines, n_hdr, n_frames, n_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge dck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
