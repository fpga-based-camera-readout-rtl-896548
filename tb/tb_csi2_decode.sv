// tb_csi2_decode -- self-checking test of the packet decoder / RAW10 unpacker.
//
// Packets are built byte by byte in the testbench (header with ECC, payload,
// checksum), cut into two-byte lane words (the last word padded with a filler
// byte) and fed with word_stb every four clocks, with idle slots between
// packets. Traffic: frame start/end, line start/end, RAW10 lines of random
// width and pixels, other long packets (skipped), and zero-length long
// packets. Checked: every header field with hdr_valid, one done pulse per
// packet, every pixel in order, lv/fv around the pixels, lv falling after
// each line and fv following frame start / frame end.
module tb_csi2_decode;
  import csi2_pkg::*;

  localparam int LANES = 2;

  logic        clk = 0, rst_n = 0;
  logic        word_stb = 0;
  logic [15:0] word = 0;
  logic        done, hdr_valid, fv, lv, pix_valid;
  logic [1:0]  vc;
  logic [5:0]  dt;
  logic [15:0] wc;
  logic [7:0]  ecc;
  logic [9:0]  pixdata;

  int checks = 0, failures = 0;
  logic [9:0]  exp_px [$];
  logic [31:0] exp_hdr [$];
  int n_done = 0, n_pkts = 0, n_pix = 0, lv_falls = 0, n_lines = 0;
  logic lv_q = 0;

  always #5 clk = !clk;

  csi2_decode #(.LANES(LANES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (hdr_valid) begin
      logic [31:0] e;
      check(exp_hdr.size() != 0, "unexpected header");
      e = exp_hdr.pop_front();
      check({ecc, wc, vc, dt} == e, $sformatf("header %h expected %h", {ecc, wc, vc, dt}, e));
    end
    if (pix_valid) begin
      logic [9:0] e;
      check(exp_px.size() != 0, "unexpected pixel");
      e = exp_px.pop_front();
      check(pixdata == e, $sformatf("pixel %h expected %h", pixdata, e));
      check(lv && fv, "pixel outside lv/fv");
      n_pix++;
    end
    if (!lv && lv_q) lv_falls++;
    lv_q <= lv;
  end

  task automatic send(input logic [7:0] pkt [$]);
    if (pkt.size() % 2) pkt.push_back(8'h5C);        // filler byte in the last word
    for (int i = 0; i < pkt.size(); i += 2) begin
      @(negedge clk);
      word = {pkt[i+1], pkt[i]};
      word_stb = 1;
      @(negedge clk);
      word_stb = 0;
      repeat (2) @(negedge clk);
    end
    repeat (24) @(negedge clk);
    n_pkts++;
  endtask

  task automatic header(input logic [5:0] t, input logic [15:0] w, inout logic [7:0] pkt [$]);
    logic [1:0] v;
    logic [7:0] e;
    v = 2'($urandom);
    e = 8'($urandom);                                // the decoder passes the ECC on unchecked
    pkt = '{{v, t}, w[7:0], w[15:8], e};
    exp_hdr.push_back({e, w, v, t});
  endtask

  task automatic short_pkt(input logic [5:0] t);
    logic [7:0] pkt [$];
    header(t, 16'($urandom), pkt);
    send(pkt);
  endtask

  task automatic long_pkt(input logic [5:0] t, input int npix_or_len);
    logic [7:0] pkt [$];
    logic [7:0] pl [$];
    if (t == DT_RAW10) begin
      for (int g = 0; g < npix_or_len / 4; g++) begin
        logic [9:0] px [4];
        logic [7:0] lsb;
        for (int k = 0; k < 4; k++) begin
          px[k] = 10'($urandom);
          exp_px.push_back(px[k]);
          pl.push_back(px[k][9:2]);
          lsb[2*k +: 2] = px[k][1:0];
        end
        pl.push_back(lsb);
      end
      n_lines++;
    end else begin
      for (int i = 0; i < npix_or_len; i++) pl.push_back(8'($urandom));
    end
    header(t, 16'(pl.size()), pkt);
    foreach (pl[i]) pkt.push_back(pl[i]);
    pkt.push_back(8'($urandom));
    pkt.push_back(8'($urandom));
    send(pkt);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      short_pkt(DT_FRAME_START);
      check(fv, "fv after frame start");
      long_pkt(6'h12, $urandom_range(0, 7));
      long_pkt(6'h2C, 0);
      for (int ln = 0; ln < 5; ln++) begin
        short_pkt(DT_LINE_START);
        long_pkt(DT_RAW10, 4 * $urandom_range(1, 16));
        check(!lv, "lv low after the line");
        short_pkt(DT_LINE_END);
      end
      short_pkt(DT_FRAME_END);
      check(!fv, "fv low after frame end");
    end
    repeat (10) @(negedge clk);
    check(n_done == n_pkts, $sformatf("done pulses %0d, packets %0d", n_done, n_pkts));
    check(exp_hdr.size() == 0 && exp_px.size() == 0, "everything received");
    check(lv_falls == n_lines, $sformatf("lv pulses %0d, lines %0d", lv_falls, n_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
