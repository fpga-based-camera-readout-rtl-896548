// tb_i2c_master -- self-checking test of the I2C master against a register target.
//
// Drives the master through its ena/busy handshake the way the broker does:
// 4-byte register writes (address, index high, index low, data), 2-byte
// register reads (index write, repeated START, two reads with ACK then NACK)
// and a write to an absent address. The target model stretches the clock
// after every acknowledge. Checks: register contents and read data against
// the model's memory, ack_error only on the absent address, START/STOP
// counts, and the SCL period (4 * DIVIDER system clocks when not stretched).
module tb_i2c_master;

  localparam int INPUT_CLK = 8_000_000;
  localparam int BUS_CLK   = 400_000;
  localparam int DIVIDER   = (INPUT_CLK / BUS_CLK) / 4;

  logic       clk = 0, rst_n = 0;
  logic       ena = 0, rw = 0;
  logic [6:0] addr = 0;
  logic [7:0] data_wr = 0, data_rd;
  logic       busy, ack_error;
  logic       scl_oe, sda_oe, t_sda_oe, t_scl_oe;
  wire        scl = !(scl_oe || t_scl_oe);
  wire        sda = !(sda_oe || t_sda_oe);

  int checks = 0, failures = 0;

  always #5 clk = !clk;

  i2c_master #(.INPUT_CLK(INPUT_CLK), .BUS_CLK(BUS_CLK)) dut (
    .clk, .rst_n, .ena, .addr, .rw, .data_wr, .busy, .data_rd, .ack_error,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe
  );

  i2c_target_model #(.ADDR(7'h10), .STRETCH(13)) tgt (
    .clk, .scl, .sda, .sda_oe(t_sda_oe), .scl_oe(t_scl_oe)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // SCL period monitor
  int last_rise = -1, min_period = 1 << 30, max_period = 0, cyc = 0;
  logic scl_q = 1;
  always @(posedge clk) begin
    cyc++;
    if (scl && !scl_q) begin
      if (last_rise >= 0 && cyc - last_rise < 200) begin
        if (cyc - last_rise < min_period) min_period = cyc - last_rise;
        if (cyc - last_rise > max_period) max_period = cyc - last_rise;
      end
      last_rise = cyc;
    end
    scl_q <= scl;
  end

  task automatic wait_busy_rise();
    logic p = busy;
    forever begin
      @(negedge clk);
      if (busy && !p) break;
      p = busy;
    end
  endtask

  task automatic wait_busy_fall();
    logic p = busy;
    forever begin
      @(negedge clk);
      if (!busy && p) break;
      p = busy;
    end
  endtask

  task automatic wait_idle();
    while (busy) @(negedge clk);
  endtask

  task automatic reg_write(input logic [6:0] a, input logic [15:0] idx, input logic [7:0] d);
    wait_idle();
    ena = 1; addr = a; rw = 0; data_wr = idx[15:8];
    wait_busy_rise(); data_wr = idx[7:0];
    wait_busy_rise(); data_wr = d;
    wait_busy_rise(); ena = 0;
    wait_busy_fall();
  endtask

  task automatic reg_read2(input logic [6:0] a, input logic [15:0] idx, output logic [15:0] d);
    wait_idle();
    ena = 1; addr = a; rw = 0; data_wr = idx[15:8];
    wait_busy_rise(); data_wr = idx[7:0];
    wait_busy_rise(); rw = 1;
    wait_busy_rise();                 // repeated START begun
    wait_busy_rise(); d[15:8] = data_rd; ena = 0;
    wait_busy_fall(); d[7:0] = data_rd;
  endtask

  function automatic logic [7:0] init_val(input logic [15:0] i);
    return i[7:0] ^ i[15:8] ^ 8'h5A;
  endfunction

  initial begin
    logic [15:0] rd;
    repeat (5) @(negedge clk);
    rst_n = 1;

    reg_write(7'h10, 16'h0157, 8'hA5);
    check(tgt.mem[16'h0157] == 8'hA5, "write 0x0157 = A5");
    check(!ack_error, "no ack error on write");
    reg_write(7'h10, 16'h3000, 8'h11);
    check(tgt.mem[16'h3000] == 8'h11, "write 0x3000 = 11");
    check(tgt.mem[16'h3001] == init_val(16'h3001), "0x3001 untouched");
    check(tgt.wr_count == 2, "two data bytes written");

    reg_read2(7'h10, 16'h0157, rd);
    check(rd == {8'hA5, init_val(16'h0158)}, $sformatf("read 0x0157 -> %h", rd));
    check(!ack_error, "no ack error on read");
    reg_read2(7'h10, 16'h1234, rd);
    check(rd == {init_val(16'h1234), init_val(16'h1235)}, $sformatf("read 0x1234 -> %h", rd));
    check(tgt.read_bytes == 4, "four bytes read");

    reg_write(7'h22, 16'h0100, 8'h01);
    check(ack_error, "ack error on absent target");
    check(tgt.mem[16'h0100] == init_val(16'h0100), "absent target wrote nothing");

    reg_write(7'h10, 16'h0100, 8'h01);
    check(!ack_error, "ack error cleared by next START");
    check(tgt.mem[16'h0100] == 8'h01, "write 0x0100 = 01");

    repeat (50) @(negedge clk);
    // 4 writes + 2 reads with a repeated START each
    check(tgt.start_count == 8, $sformatf("START count %0d", tgt.start_count));
    check(tgt.stop_count == 6, $sformatf("STOP count %0d", tgt.stop_count));
    check(min_period == 4 * DIVIDER, $sformatf("SCL period %0d clocks", min_period));
    check(tgt.stretch_count > 0 && max_period > 4 * DIVIDER, "clock stretching honoured");
    check(!busy && scl && sda, "bus idle at end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
