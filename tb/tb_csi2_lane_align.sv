// tb_csi2_lane_align -- self-checking test of the lane merger (two lanes).
//
// Each burst gives both lanes a sync pulse and then a run of bytes at one
// byte every four clocks, with lane 1 started 0..2 byte slots after lane 0
// (or lane 0 after lane 1). The merged words must hold the two lanes' bytes
// of the same position, lane 0 in bits 7:0, in order, regardless of the
// skew. Bytes before a lane's sync are ignored, and flush empties the
// queues between bursts.
module tb_csi2_lane_align;

  localparam int LANES = 2;

  logic              clk = 0, rst_n = 0;
  logic [LANES-1:0]  lane_sync = 0, lane_stb = 0;
  logic [7:0]        lane_byte [LANES];
  logic              flush = 0;
  logic              word_stb;
  logic [8*LANES-1:0] word;

  int checks = 0, failures = 0;
  logic [15:0] exp_q [$];
  int n_words = 0, skews_seen [5];

  always #5 clk = !clk;

  csi2_lane_align #(.LANES(LANES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && word_stb) begin
    n_words++;
    check(exp_q.size() != 0, "unexpected word");
    if (exp_q.size() != 0) begin
      logic [15:0] e;
      e = exp_q.pop_front();
      check(word == e, $sformatf("word %h expected %h", word, e));
    end
  end

  initial begin
    logic [7:0] b0 [$], b1 [$];
    int skew, len;
    lane_byte[0] = 0; lane_byte[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      b0.delete(); b1.delete();
      skew = $urandom_range(0, 4) - 2;     // lane 1 relative to lane 0, in byte slots
      len  = $urandom_range(1, 30);
      skews_seen[skew + 2]++;
      for (int i = 0; i < len; i++) begin
        b0.push_back(8'($urandom));
        b1.push_back(8'($urandom));
        exp_q.push_back({b1[i], b0[i]});
      end
      // slot s: lane 0 sends its item s-4, lane 1 its item s-4-skew; item -1 is the sync
      for (int s = 0; s < len + 8; s++) begin
        int i0, i1;
        i0 = s - 4;
        i1 = s - 4 - skew;
        @(negedge clk);
        lane_sync = 0; lane_stb = 0;
        if (i0 == -1) lane_sync[0] = 1;
        else if (i0 >= 0 && i0 < len) begin lane_stb[0] = 1; lane_byte[0] = b0[i0]; end
        else if (i0 == -2) begin lane_stb[0] = 1; lane_byte[0] = 8'hEE; end   // before sync
        if (i1 == -1) lane_sync[1] = 1;
        else if (i1 >= 0 && i1 < len) begin lane_stb[1] = 1; lane_byte[1] = b1[i1]; end
        else if (i1 == -2) begin lane_stb[1] = 1; lane_byte[1] = 8'hEE; end
        @(negedge clk);
        lane_sync = 0; lane_stb = 0;
        repeat (2) @(negedge clk);
      end
      check(exp_q.size() == 0, $sformatf("%0d words missing", exp_q.size()));
      exp_q.delete();
      @(negedge clk);
      flush = 1;
      @(negedge clk);
      flush = 0;
    end
    check(n_words > 0, "words delivered");
    for (int k = 0; k < 5; k++) check(skews_seen[k] > 0, $sformatf("skew %0d exercised", k - 2));
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
