// cci_rom -- the two fixed command sequences of the camera control broker.
//
// A small read-only table, purely combinational: init_idx selects an entry
// of the sensor start-up sequence (INIT_LEN = 77 entries, 0 .. 76) and
// frame_idx an entry of the per-frame prompt (FRAME_LEN = 3 entries). Each
// entry is a 32-bit command word in the cci_pkg format. Indices past the end
// repeat the last entry. No clock: the broker registers what it reads.
//
// The start-up sequence reproduces, in order, the register writes of a
// recorded Raspberry Pi start-up of the IMX219 module, as the bridge does;
// its last entry writes 0x01 to MODE_SELECT (0x0100) and starts streaming.
// Recorded two-byte writes are split into two single-byte writes to
// consecutive indices, because the broker writes one data byte per
// transaction (this design's choice). The per-frame prompt rewrites the
// coarse integration time (0x06DF) and the analogue gain (0xE0) with the
// values the recording sends right after streaming starts. Keeping the
// tables in their own module rather than in the package is this design's
// choice.
module cci_rom
  import cci_pkg::*;
(
  input  logic [6:0] init_idx,
  output cci_cmd_t   init_cmd,
  input  logic [1:0] frame_idx,
  output cci_cmd_t   frame_cmd
);

  // A few IMX219 register indices
  localparam logic [15:0] REG_MODE_SELECT       = 16'h0100;
  localparam logic [15:0] REG_CSI_LANE_MODE     = 16'h0114;
  localparam logic [15:0] REG_DPHY_CTRL         = 16'h0128;
  localparam logic [15:0] REG_EXCK_FREQ         = 16'h012A;
  localparam logic [15:0] REG_ANA_GAIN_GLOBAL   = 16'h0157;
  localparam logic [15:0] REG_COARSE_INTEG_TIME = 16'h015A;
  localparam logic [15:0] REG_FRM_LENGTH        = 16'h0160;
  localparam logic [15:0] REG_LINE_LENGTH       = 16'h0162;
  localparam logic [15:0] REG_X_OUTPUT_SIZE     = 16'h016C;
  localparam logic [15:0] REG_Y_OUTPUT_SIZE     = 16'h016E;
  localparam logic [15:0] REG_CSI_DATA_FORMAT   = 16'h018C;
  localparam logic [15:0] REG_TEST_PATTERN      = 16'h0600;

  // start-up sequence
  always_comb begin
    unique case (init_idx)
      7'd0:  init_cmd = wr(REG_MODE_SELECT, 8'h00);
      7'd1:  init_cmd = wr(16'h30EB, 8'h0C);
      7'd2:  init_cmd = wr(16'h30EB, 8'h05);
      7'd3:  init_cmd = wr(16'h300A, 8'hFF);
      7'd4:  init_cmd = wr(16'h300B, 8'hFF);
      7'd5:  init_cmd = wr(16'h30EB, 8'h05);
      7'd6:  init_cmd = wr(16'h30EB, 8'h09);
      7'd7:  init_cmd = wr(REG_CSI_LANE_MODE, 8'h01);
      7'd8:  init_cmd = wr(REG_DPHY_CTRL, 8'h00);
      7'd9:  init_cmd = wr(REG_EXCK_FREQ, 8'h18);
      7'd10: init_cmd = wr(16'h012B, 8'h00);
      7'd11: init_cmd = wr(16'h0164, 8'h00);
      7'd12: init_cmd = wr(16'h0165, 8'h00);
      7'd13: init_cmd = wr(16'h0166, 8'h0C);
      7'd14: init_cmd = wr(16'h0167, 8'hCF);
      7'd15: init_cmd = wr(16'h0168, 8'h00);
      7'd16: init_cmd = wr(16'h0169, 8'h00);
      7'd17: init_cmd = wr(16'h016A, 8'h09);
      7'd18: init_cmd = wr(16'h016B, 8'h9F);
      7'd19: init_cmd = wr(REG_X_OUTPUT_SIZE, 8'h06);
      7'd20: init_cmd = wr(16'h016D, 8'h68);
      7'd21: init_cmd = wr(REG_Y_OUTPUT_SIZE, 8'h04);
      7'd22: init_cmd = wr(16'h016F, 8'hD0);
      7'd23: init_cmd = wr(16'h0170, 8'h01);
      7'd24: init_cmd = wr(16'h0171, 8'h01);
      7'd25: init_cmd = wr(16'h0174, 8'h01);
      7'd26: init_cmd = wr(16'h0175, 8'h01);
      7'd27: init_cmd = wr(16'h0301, 8'h05);
      7'd28: init_cmd = wr(16'h0303, 8'h01);
      7'd29: init_cmd = wr(16'h0304, 8'h03);
      7'd30: init_cmd = wr(16'h0305, 8'h03);
      7'd31: init_cmd = wr(16'h0306, 8'h00);
      7'd32: init_cmd = wr(16'h0307, 8'h39);
      7'd33: init_cmd = wr(16'h030B, 8'h01);
      7'd34: init_cmd = wr(16'h030C, 8'h00);
      7'd35: init_cmd = wr(16'h030D, 8'h72);
      7'd36: init_cmd = wr(16'h0624, 8'h06);
      7'd37: init_cmd = wr(16'h0625, 8'h68);
      7'd38: init_cmd = wr(16'h0626, 8'h04);
      7'd39: init_cmd = wr(16'h0627, 8'hD0);
      7'd40: init_cmd = wr(16'h455E, 8'h00);
      7'd41: init_cmd = wr(16'h471E, 8'h4B);
      7'd42: init_cmd = wr(16'h4767, 8'h0F);
      7'd43: init_cmd = wr(16'h4750, 8'h14);
      7'd44: init_cmd = wr(16'h4540, 8'h00);
      7'd45: init_cmd = wr(16'h47B4, 8'h14);
      7'd46: init_cmd = wr(16'h4713, 8'h30);
      7'd47: init_cmd = wr(16'h478B, 8'h10);
      7'd48: init_cmd = wr(16'h478F, 8'h10);
      7'd49: init_cmd = wr(16'h4793, 8'h10);
      7'd50: init_cmd = wr(16'h4797, 8'h0E);
      7'd51: init_cmd = wr(16'h479B, 8'h0E);
      7'd52: init_cmd = wr(REG_LINE_LENGTH, 8'h0D);
      7'd53: init_cmd = wr(16'h0163, 8'h78);
      7'd54: init_cmd = wr(REG_CSI_DATA_FORMAT, 8'h0A);
      7'd55: init_cmd = wr(16'h018D, 8'h0A);
      7'd56: init_cmd = wr(16'h0309, 8'h0A);
      7'd57: init_cmd = wr(REG_FRM_LENGTH, 8'h06);
      7'd58: init_cmd = wr(16'h0161, 8'hE3);
      7'd59: init_cmd = wr(REG_COARSE_INTEG_TIME, 8'h00);
      7'd60: init_cmd = wr(16'h015B, 8'h34);
      7'd61: init_cmd = wr(REG_ANA_GAIN_GLOBAL, 8'h00);
      7'd62: init_cmd = wr(16'h0158, 8'h01);
      7'd63: init_cmd = wr(16'h0159, 8'h00);
      7'd64: init_cmd = wr(16'h0172, 8'h03);
      7'd65: init_cmd = wr(16'h0172, 8'h03);
      7'd66: init_cmd = wr(REG_TEST_PATTERN, 8'h00);
      7'd67: init_cmd = wr(16'h0601, 8'h00);
      7'd68: init_cmd = wr(16'h0602, 8'h03);
      7'd69: init_cmd = wr(16'h0603, 8'hFF);
      7'd70: init_cmd = wr(16'h0604, 8'h03);
      7'd71: init_cmd = wr(16'h0605, 8'hFF);
      7'd72: init_cmd = wr(16'h0606, 8'h03);
      7'd73: init_cmd = wr(16'h0607, 8'hFF);
      7'd74: init_cmd = wr(16'h0608, 8'h03);
      7'd75: init_cmd = wr(16'h0609, 8'hFF);
      default: init_cmd = wr(REG_MODE_SELECT, 8'h01);   // 76 and above: start streaming
    endcase
  end

  // per-frame prompt
  always_comb begin
    unique case (frame_idx)
      2'd0:    frame_cmd = wr(REG_COARSE_INTEG_TIME,         8'h06);
      2'd1:    frame_cmd = wr(REG_COARSE_INTEG_TIME + 16'd1, 8'hDF);
      default: frame_cmd = wr(REG_ANA_GAIN_GLOBAL,           8'hE0);   // 2 and above
    endcase
  end


endmodule
