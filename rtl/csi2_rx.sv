// csi2_rx -- CSI-2 receiver: D-PHY high-speed lanes in, parallel RAW10 pixels out.
//
// The image data pipeline of the bridge. Per lane a DDR deserialiser turns
// the serial lane into bytes (one per four DCK cycles) and a word aligner
// finds the start-of-transmission sync byte and re-frames the bytes. The
// lane aligner then lines the lanes up against each other and merges them
// into LANES-byte words in round-robin order, and the packet decoder parses
// headers, tracks frame valid (frame start / end short packets) and unpacks
// RAW10 payloads into 10-bit pixels with line valid. The decoder's end of
// packet re-arms the aligners for the next packet.
//
// Interface: dck is the D-PHY clock lane, lane[i] the HS level of data lane i
// (a single-ended stand-in for the differential pair; low-power signalling
// is not decoded: the lanes must sit at HS-0 between packets, as they do
// during the HS preamble). All outputs are in the dck domain: pix_valid
// qualifies pixdata, fv/lv frame the image, and vc/dt/wc/ecc carry the last
// packet header (as received) with a hdr_valid pulse, for the ECC checker.
// Two lanes and RAW10 are the bridge's configuration; the vendor receiver it
// used generates a pixel clock with a PLL, which this design replaces by the
// pix_valid strobe on dck.
module csi2_rx
  import csi2_pkg::*;
#(
  parameter int         LANES  = 2,
  parameter logic [5:0] FORMAT = DT_RAW10
) (
  input  logic             dck,
  input  logic             rst_n,
  input  logic [LANES-1:0] lane,
  output logic [9:0]       pixdata,
  output logic             pix_valid,
  output logic             fv,
  output logic             lv,
  output logic             hdr_valid,
  output logic [1:0]       vc,
  output logic [5:0]       dt,
  output logic [15:0]      wc,
  output logic [7:0]       ecc
);

  logic [LANES-1:0]   des_stb, al_sync, al_stb, al_locked;
  logic [7:0]         des_byte [LANES];
  logic [7:0]         al_byte  [LANES];
  logic               word_stb, done;
  logic [8*LANES-1:0] word;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    dphy_deser u_deser (
      .dck, .rst_n, .din(lane[l]),
      .byte_stb(des_stb[l]), .byte_out(des_byte[l])
    );
    csi2_word_align u_w_align (
      .clk(dck), .rst_n,
      .byte_stb(des_stb[l]), .byte_in(des_byte[l]), .rearm(done),
      .sync(al_sync[l]), .out_stb(al_stb[l]), .out_byte(al_byte[l]),
      .locked(al_locked[l])
    );
  end

  csi2_lane_align #(.LANES(LANES)) u_lane_align (
    .clk(dck), .rst_n,
    .lane_sync(al_sync), .lane_stb(al_stb), .lane_byte(al_byte), .flush(done),
    .word_stb, .word
  );

  csi2_decode #(.LANES(LANES), .FORMAT(FORMAT)) u_decode (
    .clk(dck), .rst_n,
    .word_stb, .word, .done,
    .hdr_valid, .vc, .dt, .wc, .ecc,
    .fv, .lv, .pix_valid, .pixdata
  );

endmodule
