// csi2_decode -- CSI-2 packet decoder and RAW10 pixel unpacker.
//
// Input: merged lane words (LANES bytes, byte 0 first) with word_stb, in the
// DCK domain, at most one word every LANES clocks (the deserialiser delivers
// one word per four DCK cycles, so up to four lanes fit). Each word is
// unloaded into a byte serialiser and the packet is parsed one byte per
// clock:
//   header  DI (VC, DT), WC low, WC high, ECC. After the fourth byte the
//           fields are presented on vc/dt/wc/ecc with hdr_valid for the ECC
//           checker; they are held until the next header.
//   short   (DT < 0x10) frame start sets fv, frame end clears it; line
//           start/end and other short packets only end the packet.
//   long    WC payload bytes, then the 2-byte checksum. If DT equals FORMAT
//           (RAW10, the one pixel format the receiver is built for) every
//           5 payload bytes give 4 pixels: pixel k = {byte k, bits 2k+1:2k of
//           byte 4}. Pixels leave one per clock on pixdata with pix_valid;
//           lv is high from the first to the last pixel of the packet.
//           Payloads of other types are skipped.
// At the end of every packet done pulses for one clock; it re-arms the word
// aligners and flushes the lane merger, and the decoder drops any filler
// bytes still in the serialiser.
//
// The checksum is counted but not checked, and the decoder parses the
// header as received (the separate ECC checker reports and corrects it for
// the host), as in the bridge this follows. A pixel valid strobe in the DCK
// domain replaces that bridge's PLL-made pixel clock: this is this design's
// choice, as is the exact byte-serial structure.
module csi2_decode
  import csi2_pkg::*;
#(
  parameter int          LANES  = 2,
  parameter logic [5:0]  FORMAT = DT_RAW10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               word_stb,
  input  logic [8*LANES-1:0] word,
  output logic               done,
  output logic               hdr_valid,
  output logic [1:0]         vc,
  output logic [5:0]         dt,
  output logic [15:0]        wc,
  output logic [7:0]         ecc,
  output logic               fv,
  output logic               lv,
  output logic               pix_valid,
  output logic [9:0]         pixdata
);

  typedef enum logic [2:0] {P_DI, P_WCL, P_WCH, P_ECC, P_PAYLOAD, P_CRC} pstate_t;

  localparam int SW = $clog2(LANES + 1);

  // byte serialiser
  logic [8*LANES-1:0] ser;
  logic [SW-1:0]      ser_cnt;
  wire                byte_v = (ser_cnt != '0);
  wire  [7:0]         byte_d = ser[7:0];

  pstate_t     ps;
  logic [15:0] remain;        // payload bytes still to come
  logic        crc_second;
  logic        unpack;        // this packet's payload is unpacked
  logic [7:0]  grp [4];       // first four bytes of a RAW10 group
  logic [2:0]  grp_cnt;
  logic [9:0]  pixq [4];      // pixels waiting to leave
  logic [2:0]  pix_left;
  logic        line_end;      // last group of the line has been loaded

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser        <= '0;
      ser_cnt    <= '0;
      ps         <= P_DI;
      remain     <= '0;
      crc_second <= 1'b0;
      unpack     <= 1'b0;
      grp_cnt    <= '0;
      pix_left   <= '0;
      line_end   <= 1'b0;
      done       <= 1'b0;
      hdr_valid  <= 1'b0;
      vc         <= '0;
      dt         <= '0;
      wc         <= '0;
      ecc        <= '0;
      fv         <= 1'b0;
      lv         <= 1'b0;
      pix_valid  <= 1'b0;
      pixdata    <= '0;
      for (int i = 0; i < 4; i++) begin
        grp[i]  <= '0;
        pixq[i] <= '0;
      end
    end else begin
      done      <= 1'b0;
      hdr_valid <= 1'b0;

      // ---------------------------------------------------- serialiser
      if (word_stb && !done) begin
        ser     <= word;
        ser_cnt <= SW'(LANES);
      end else if (byte_v) begin
        ser     <= ser >> 8;
        ser_cnt <= ser_cnt - 1'b1;
      end

      // ---------------------------------------------------- packet parser
      if (byte_v && !done) begin
        unique case (ps)
          P_DI: begin
            dt <= byte_d[5:0];
            vc <= byte_d[7:6];
            ps <= P_WCL;
          end
          P_WCL: begin
            wc[7:0] <= byte_d;
            ps      <= P_WCH;
          end
          P_WCH: begin
            wc[15:8] <= byte_d;
            ps       <= P_ECC;
          end
          P_ECC: begin
            ecc       <= byte_d;
            hdr_valid <= 1'b1;
            if (is_short(dt)) begin
              if (dt == DT_FRAME_START) fv <= 1'b1;
              if (dt == DT_FRAME_END)   fv <= 1'b0;
              done <= 1'b1;
              ps   <= P_DI;
            end else begin
              remain  <= wc;
              unpack  <= (dt == FORMAT);
              grp_cnt <= '0;
              ps      <= (wc == '0) ? P_CRC : P_PAYLOAD;
            end
          end
          P_PAYLOAD: begin
            remain <= remain - 1'b1;
            if (remain == 16'd1) ps <= P_CRC;
            if (unpack) begin
              if (grp_cnt == 3'd4) begin
                for (int k = 0; k < 4; k++) pixq[k] <= {grp[k], byte_d[2*k +: 2]};
                grp_cnt  <= '0;
                line_end <= (remain == 16'd1);
              end else begin
                grp[grp_cnt[1:0]] <= byte_d;
                grp_cnt           <= grp_cnt + 1'b1;
              end
            end
          end
          P_CRC: begin
            crc_second <= !crc_second;
            if (crc_second) begin
              done <= 1'b1;
              ps   <= P_DI;
            end
          end
          default: ps <= P_DI;
        endcase
      end
      if (done) begin
        ser_cnt    <= '0;       // drop filler bytes of the last word
        crc_second <= 1'b0;
      end

      // ---------------------------------------------------- pixel output
      // A group is loaded by the parser when its fifth byte arrives; it is
      // sent in the following four clocks (before the next group can
      // complete, since bytes arrive at most one per clock and a group needs
      // five).
      pix_valid <= 1'b0;
      if (byte_v && !done && ps == P_PAYLOAD && unpack && grp_cnt == 3'd4) begin
        pix_left <= 3'd4;
      end else if (pix_left != '0) begin
        pix_valid <= 1'b1;
        lv        <= 1'b1;
        pixdata   <= pixq[0];
        for (int k = 0; k < 3; k++) pixq[k] <= pixq[k+1];
        pix_left  <= pix_left - 1'b1;
      end else if (line_end) begin
        lv       <= 1'b0;
        line_end <= 1'b0;
      end
    end
  end

endmodule
