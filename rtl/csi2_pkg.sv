// csi2_pkg -- constants and types shared by the CSI-2 image data pipeline.
//
// A CSI-2 packet starts with a 32-bit header sent byte by byte: the data
// identifier (2-bit virtual channel, 6-bit data type), the 16-bit word count
// (low byte first) and an 8-bit ECC over the first 24 bits. Data types below
// 0x10 are short (synchronisation) packets whose word-count field carries a
// frame or line number; long packets carry word-count payload bytes and a
// 16-bit checksum. The numeric codes (sync byte, data types) are those of the
// MIPI CSI-2 / D-PHY standards.
package csi2_pkg;

  // High-speed start-of-transmission sync byte (received LSB first)
  localparam logic [7:0] HS_SYNC = 8'hB8;

  localparam logic [5:0] DT_FRAME_START = 6'h00;
  localparam logic [5:0] DT_FRAME_END   = 6'h01;
  localparam logic [5:0] DT_LINE_START  = 6'h02;
  localparam logic [5:0] DT_LINE_END    = 6'h03;
  localparam logic [5:0] DT_RAW10       = 6'h2B;

  // Packet header as the ECC sees it: bit 0 = first bit on the wire
  typedef struct packed {
    logic [15:0] wc;
    logic [1:0]  vc;
    logic [5:0]  dt;
  } csi2_header_t;

  // Short packets have data types 0x00..0x0F
  function automatic logic is_short(input logic [5:0] dt);
    return dt[5:4] == 2'b00;
  endfunction

endpackage
