// cci_pkg -- camera control constants and shared types of the CSI-2 bridge.
//
// Holds the camera control interface (CCI) command format, the I2C target
// address of the IMX219 image sensor, the lengths of the two command sequences the broker sends on its own and a
// helper that builds a write command. The sequences themselves live in the
// cci_rom module.
//
// Command word (32 bit, the format of the host command queue):
//   [31:25] 7-bit I2C target address
//   [24]    read/write flag, 1 = read
//   [23:8]  16-bit sensor register index
//   [7:0]   data byte to write (ignored for reads)
// Read-back word (32 bit, the format of the host result queue):
//   [31:16] register index, [15:8] byte at the index, [7:0] byte at index+1.
//
// The field order of the command word follows the order of the bits in the
// I2C transaction, as the bridge describes it; the result word layout and the
// helper are this design's own choices. No timing: constants only.
package cci_pkg;

  // 7-bit I2C address of the IMX219 sensor
  localparam logic [6:0] CAM_ADDR = 7'h10;
  localparam logic       RW_WRITE = 1'b0;
  localparam logic       RW_READ  = 1'b1;

  typedef struct packed {
    logic [6:0]  target;
    logic        rw;
    logic [15:0] index;
    logic [7:0]  data;
  } cci_cmd_t;

  typedef struct packed {
    logic [15:0] index;
    logic [15:0] data;
  } cci_result_t;

  localparam int INIT_LEN  = 77;
  localparam int FRAME_LEN = 3;

  function automatic cci_cmd_t wr(input logic [15:0] index, input logic [7:0] data);
    return '{target: CAM_ADDR, rw: RW_WRITE, index: index, data: data};
  endfunction

endpackage
