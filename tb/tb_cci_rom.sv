// tb_cci_rom -- self-checking test of the camera-control command tables.
//
// The sensor start-up trace (69 register writes, some of them two bytes wide)
// is listed here as {index, value, width} and expanded into single-byte
// writes with auto-incremented indices; the expansion must equal the
// start-up table entries 0 .. INIT_LEN-1, read from cci_rom one by one (the
// table is combinational; each index is given one time unit to settle).
// Also checked: every entry targets the sensor address with a write, the sequence ends by starting streaming,
// out-of-range indices repeat the last entry, the per-frame sequence
// (exposure 0x06DF, gain 0xE0) and the bit layout of the command and result
// words (target in 31:25, rw in 24, index in 23:8, data in 7:0).
module tb_cci_rom;
  import cci_pkg::*;

  logic [6:0] init_idx = 0;
  logic [1:0] frame_idx = 0;
  cci_cmd_t   init_cmd, frame_cmd;

  cci_rom dut (.init_idx, .init_cmd, .frame_idx, .frame_cmd);

  typedef struct { logic [15:0] idx; logic [15:0] val; int unsigned width; } xfer_t;

  localparam int NX = 69;

  xfer_t trace [NX] = '{
    '{16'h0100, 16'h00, 1}, '{16'h30EB, 16'h0C, 1}, '{16'h30EB, 16'h05, 1},
    '{16'h300A, 16'hFF, 1}, '{16'h300B, 16'hFF, 1}, '{16'h30EB, 16'h05, 1},
    '{16'h30EB, 16'h09, 1}, '{16'h0114, 16'h01, 1}, '{16'h0128, 16'h00, 1},
    '{16'h012A, 16'h18, 1}, '{16'h012B, 16'h00, 1}, '{16'h0164, 16'h00, 1},
    '{16'h0165, 16'h00, 1}, '{16'h0166, 16'h0C, 1}, '{16'h0167, 16'hCF, 1},
    '{16'h0168, 16'h00, 1}, '{16'h0169, 16'h00, 1}, '{16'h016A, 16'h09, 1},
    '{16'h016B, 16'h9F, 1}, '{16'h016C, 16'h06, 1}, '{16'h016D, 16'h68, 1},
    '{16'h016E, 16'h04, 1}, '{16'h016F, 16'hD0, 1}, '{16'h0170, 16'h01, 1},
    '{16'h0171, 16'h01, 1}, '{16'h0174, 16'h01, 1}, '{16'h0175, 16'h01, 1},
    '{16'h0301, 16'h05, 1}, '{16'h0303, 16'h01, 1}, '{16'h0304, 16'h03, 1},
    '{16'h0305, 16'h03, 1}, '{16'h0306, 16'h00, 1}, '{16'h0307, 16'h39, 1},
    '{16'h030B, 16'h01, 1}, '{16'h030C, 16'h00, 1}, '{16'h030D, 16'h72, 1},
    '{16'h0624, 16'h06, 1}, '{16'h0625, 16'h68, 1}, '{16'h0626, 16'h04, 1},
    '{16'h0627, 16'hD0, 1}, '{16'h455E, 16'h00, 1}, '{16'h471E, 16'h4B, 1},
    '{16'h4767, 16'h0F, 1}, '{16'h4750, 16'h14, 1}, '{16'h4540, 16'h00, 1},
    '{16'h47B4, 16'h14, 1}, '{16'h4713, 16'h30, 1}, '{16'h478B, 16'h10, 1},
    '{16'h478F, 16'h10, 1}, '{16'h4793, 16'h10, 1}, '{16'h4797, 16'h0E, 1},
    '{16'h479B, 16'h0E, 1}, '{16'h0162, 16'h0D, 1}, '{16'h0163, 16'h78, 1},
    '{16'h018C, 16'h0A, 1}, '{16'h018D, 16'h0A, 1}, '{16'h0309, 16'h0A, 1},
    '{16'h0160, 16'h06E3, 2}, '{16'h015A, 16'h0034, 2}, '{16'h0157, 16'h00, 1},
    '{16'h0158, 16'h0100, 2}, '{16'h0172, 16'h03, 1}, '{16'h0172, 16'h03, 1},
    '{16'h0600, 16'h0000, 2}, '{16'h0602, 16'h03FF, 2}, '{16'h0604, 16'h03FF, 2},
    '{16'h0606, 16'h03FF, 2}, '{16'h0608, 16'h03FF, 2}, '{16'h0100, 16'h01, 1}
  };

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned n = 0;
    cci_cmd_t    c;
    cci_result_t r;
    logic [31:0] w;

    for (int x = 0; x < NX; x++) begin
      for (int unsigned b = 0; b < trace[x].width; b++) begin
        logic [7:0] v;
        v = (trace[x].width == 2 && b == 0) ? trace[x].val[15:8] : trace[x].val[7:0];
        init_idx = 7'(n);
        #1;
        c = init_cmd;
        check(c.target == 7'h10 && c.rw == 1'b0, $sformatf("entry %0d: target/rw", n));
        check(c.index == trace[x].idx + 16'(b) && c.data == v,
              $sformatf("entry %0d: %h=%h, expected %h=%h", n, c.index, c.data, trace[x].idx + 16'(b), v));
        n++;
      end
    end
    check(n == INIT_LEN, $sformatf("start-up length %0d", n));
    init_idx = 7'(INIT_LEN - 1);
    #1;
    c = init_cmd;
    check(c == wr(16'h0100, 8'h01), "last start-up entry starts streaming");
    init_idx = 7'(INIT_LEN + 5);
    #1;
    check(init_cmd == c, "out-of-range entry");
    init_idx = 7'(127);
    #1;
    check(init_cmd == c, "last table index");

    check(FRAME_LEN == 3, "per-frame length");
    frame_idx = 2'd0; #1;
    check(frame_cmd == wr(16'h015A, 8'h06), "frame entry 0");
    frame_idx = 2'd1; #1;
    check(frame_cmd == wr(16'h015B, 8'hDF), "frame entry 1");
    frame_idx = 2'd2; #1;
    check(frame_cmd == wr(16'h0157, 8'hE0), "frame entry 2");
    frame_idx = 2'd3; #1;
    check(frame_cmd == wr(16'h0157, 8'hE0), "frame index past the end");

    c = wr(16'hABCD, 8'hEF);
    w = c;
    check(w == {7'h10, 1'b0, 16'hABCD, 8'hEF}, "command word layout");
    c = cci_cmd_t'({7'h22, 1'b1, 16'h1234, 8'h00});
    check(c.target == 7'h22 && c.rw == RW_READ && c.index == 16'h1234, "command word decode");
    r = '{index: 16'h0157, data: 16'hA5C3};
    w = r;
    check(w == 32'h0157_A5C3, "result word layout");
    check(CAM_ADDR == 7'h10 && RW_WRITE == 1'b0 && RW_READ == 1'b1, "address and rw codes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
