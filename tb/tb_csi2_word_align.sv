// tb_csi2_word_align -- self-checking test of the sync-byte word aligner.
//
// Each burst is a bit stream of zeros, the sync byte 0xB8 and random payload
// bytes (LSB first), shifted by a random number of leading zero bits (0..15)
// and cut into bytes, which are fed with byte_stb every four clocks like the
// deserialiser does. Checked for each burst: exactly one sync pulse, locked
// afterwards, and out_byte/out_stb giving the payload bytes in order. After
// each burst the aligner is re-armed; idle zero bytes must never lock it.
module tb_csi2_word_align;

  logic       clk = 0, rst_n = 0;
  logic       byte_stb = 0, rearm = 0;
  logic [7:0] byte_in = 0;
  logic       sync, out_stb, locked;
  logic [7:0] out_byte;

  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  int n_sync = 0, n_out = 0, offsets_seen = 0;

  always #5 clk = !clk;

  csi2_word_align dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sync) n_sync++;
    if (out_stb) begin
      n_out++;
      if (exp_q.size() != 0) begin
        logic [7:0] e;
        e = exp_q.pop_front();
        check(out_byte == e, $sformatf("byte %h expected %h", out_byte, e));
      end
    end
  end

  task automatic feed(input logic [7:0] b);
    @(negedge clk);
    byte_in = b; byte_stb = 1;
    @(negedge clk);
    byte_stb = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      bit bits [$];
      int shift, len, sync0;
      logic [7:0] pl [$];
      logic [7:0] b;
      bits.delete();
      pl.delete();
      shift = $urandom_range(0, 15);
      len   = $urandom_range(1, 20);
      for (int i = 0; i < 16 + shift; i++) bits.push_back(1'b0);
      for (int i = 0; i < 8; i++) bits.push_back(1'(8'hB8 >> i));
      for (int k = 0; k < len; k++) begin
        pl.push_back(8'($urandom));
        for (int i = 0; i < 8; i++) bits.push_back(pl[k][i]);
      end
      for (int i = 0; i < 16; i++) bits.push_back(1'b0);
      foreach (pl[k]) exp_q.push_back(pl[k]);
      sync0 = n_sync;
      for (int i = 0; i + 7 < bits.size(); i += 8) begin
        for (int j = 0; j < 8; j++) b[j] = bits[i + j];
        feed(b);
      end
      check(n_sync == sync0 + 1, "one sync per burst");
      check(locked, "locked after the burst");
      check(exp_q.size() == 0, $sformatf("%0d payload bytes missing", exp_q.size()));
      exp_q.delete();
      @(negedge clk);
      rearm = 1;
      @(negedge clk);
      rearm = 0;
      check(!locked, "rearm unlocks");
      for (int i = 0; i < 3; i++) feed(8'h00);
      check(!locked, "idle bytes do not lock");
      offsets_seen++;
    end
    check(offsets_seen == 200, "bursts");
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
