// tb_dphy_deser -- self-checking test of the DDR lane deserialiser.
//
// A random bit stream is driven DDR (new bit a quarter period after every
// DCK edge). The bytes delivered with byte_stb are unpacked LSB first into a
// received bit stream, which must contain the sent stream at one fixed bit
// offset (the deserialiser does not align; that is the next stage's job).
// Also checked: byte_stb comes exactly every four DCK cycles.
module tb_dphy_deser;

  logic       dck = 0, rst_n = 0, din = 0;
  logic       byte_stb;
  logic [7:0] byte_out;

  int checks = 0, failures = 0;
  bit sent [$], got [$];
  int cyc = 0, last_stb = -1, n_bytes = 0;

  always #2 dck = !dck;

  dphy_deser dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // transmitter: one bit per DCK half period, changing between edges
  bit sending = 0;
  always @(dck) begin
    #1;
    if (sending) begin
      din = 1'($urandom);
      sent.push_back(din);
    end else din = 0;
  end

  always @(posedge dck) begin
    cyc++;
    if (rst_n && byte_stb) begin
      if (last_stb >= 0) check(cyc - last_stb == 4, "byte strobe spacing");
      last_stb = cyc;
      for (int b = 0; b < 8; b++) got.push_back(byte_out[b]);
      n_bytes++;
    end
  end

  initial begin
    int best = -1;
    repeat (3) @(negedge dck);
    rst_n = 1;
    repeat (5) @(negedge dck);
    sending = 1;
    repeat (2000) @(negedge dck);
    sending = 0;
    repeat (10) @(negedge dck);
    // the received stream holds zeros first, then the sent stream
    for (int off = 0; off < 64 && best < 0; off++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 256; i++) if (got[off + i] != sent[i]) ok = 0;
      if (ok) best = off;
    end
    check(best >= 0, "sent stream found in received bytes");
    if (best >= 0)
      for (int i = 0; i < sent.size() && best + i < got.size(); i++)
        check(got[best + i] == sent[i], $sformatf("bit %0d", i));
    check(n_bytes >= 495, $sformatf("%0d bytes received", n_bytes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge dck);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
