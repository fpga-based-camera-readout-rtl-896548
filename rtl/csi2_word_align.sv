// csi2_word_align -- byte alignment of one D-PHY lane on the HS sync byte.
//
// The deserialiser delivers bytes at an arbitrary bit offset. This stage keeps
// the previous and the current byte as a 16-bit window (earlier bits in the
// low half) and, while hunting, compares the eight 8-bit slices window[o+:8],
// o = 0..7, with the start-of-transmission sync byte 0xB8. On a match it
// locks the offset, pulses sync and from the next byte on outputs
// window[o+:8] with out_stb for every input byte: the packet bytes in
// transmitter order. It stays locked until rearm, which the packet decoder
// gives at the end of a packet; rearm also clears the window so that
// leftover packet bits cannot fake a sync.
//
// Interface: byte_stb/byte_in from the deserialiser; out_stb/out_byte and
// sync one clock after the input byte that completes them; locked shows the
// state. All signals are in the DCK domain. The search over all offsets of a
// two-byte window is this design's choice; the stage's role (word alignment
// on the PHY sync sequence) follows the bridge description.
module csi2_word_align
  import csi2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       byte_stb,
  input  logic [7:0] byte_in,
  input  logic       rearm,
  output logic       sync,
  output logic       out_stb,
  output logic [7:0] out_byte,
  output logic       locked
);

  logic [7:0]  prev;
  logic [2:0]  offset;
  logic [15:0] window;
  logic        found;
  logic [2:0]  found_off;

  assign window = {byte_in, prev};

  always_comb begin
    found     = 1'b0;
    found_off = '0;
    for (int o = 7; o >= 0; o--)
      if (window[o +: 8] == HS_SYNC) begin
        found     = 1'b1;
        found_off = 3'(o);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev     <= '0;
      offset   <= '0;
      locked   <= 1'b0;
      sync     <= 1'b0;
      out_stb  <= 1'b0;
      out_byte <= '0;
    end else begin
      sync    <= 1'b0;
      out_stb <= 1'b0;
      if (rearm) begin
        locked <= 1'b0;
        prev   <= '0;
      end else if (byte_stb) begin
        prev <= byte_in;
        if (!locked) begin
          if (found) begin
            locked <= 1'b1;
            offset <= found_off;
            sync   <= 1'b1;
          end
        end else begin
          out_stb  <= 1'b1;
          out_byte <= window[{1'b0, offset} +: 8];
        end
      end
    end
  end

endmodule
