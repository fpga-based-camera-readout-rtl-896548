// tb_sync_fifo -- self-checking test of the synchronous FIFO.
//
// A queue model in the testbench mirrors every accepted write and read.
// Phases: fill to full (extra writes must be dropped), drain to empty
// (extra reads must do nothing), then random traffic including reads and
// writes in the same cycle while full. Checks q one clock after each
// accepted read, and empty/full against the model's size every cycle.
module tb_sync_fifo;

  localparam int WIDTH = 32;
  localparam int DEPTH = 16;

  logic             clk = 0, rst_n = 0;
  logic [WIDTH-1:0] din = '0;
  logic             wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] q;
  logic             empty, full;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  logic [WIDTH-1:0] expect_q;
  bit               expect_valid = 0;
  int               full_writes = 0, both_when_full = 0;

  always #5 clk = !clk;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // reference model, updated at each clock edge from the applied inputs
  always @(posedge clk) if (rst_n) begin
    bit do_rd, do_wr;
    if (expect_valid) check(q == expect_q, $sformatf("q %h expected %h", q, expect_q));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    do_rd = rd_en && model.size() != 0;
    do_wr = wr_en && (model.size() != DEPTH || do_rd);
    if (wr_en && model.size() == DEPTH && !rd_en) full_writes++;
    if (wr_en && rd_en && model.size() == DEPTH) both_when_full++;
    expect_valid = 0;
    if (do_rd) begin
      expect_q = model.pop_front();
      expect_valid = 1;
    end
    if (do_wr) model.push_back(din);
  end

  task automatic drive(input bit w, input bit r);
    @(negedge clk);
    wr_en = w; rd_en = r; din = $urandom;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH + 4; i++) drive(1, 0);
    for (int i = 0; i < DEPTH + 4; i++) drive(0, 1);
    for (int i = 0; i < DEPTH; i++) drive(1, 0);
    for (int i = 0; i < 5; i++) drive(1, 1);          // read + write while full
    for (int i = 0; i < 3000; i++) drive($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45);
    for (int i = 0; i < DEPTH + 2; i++) drive(0, 1);
    drive(0, 0);
    @(negedge clk);
    check(full_writes >= 4, "writes to a full FIFO exercised");
    check(both_when_full >= 5, "read and write while full exercised");
    check(empty && model.size() == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
