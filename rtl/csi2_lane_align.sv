// csi2_lane_align -- aligns the D-PHY data lanes to each other and merges them.
//
// CSI-2 spreads a packet over N lanes round robin: byte 0 on lane 0, byte 1
// on lane 1, ..., byte N on lane 0 again. Each lane finds its own sync byte,
// and lanes may lock one or more byte times apart (skew). Every lane therefore
// writes its aligned bytes into a small queue of QDEPTH entries, starting
// with the first byte after its sync. When every queue holds a byte, one byte
// is taken from each and presented as a word with word_stb; lane 0's byte is
// in bits 7:0 (the first byte in packet order), lane i's in bits 8*i+7:8*i.
// flush (end of packet, from the decoder) empties all queues; lanes that
// ended a byte early because the packet length is not a multiple of N simply
// contribute filler bytes the decoder does not use.
//
// Timing: word_stb one clock after the last lane byte that completes a word.
// A lane byte that finds its queue full (skew of QDEPTH bytes or more) is
// dropped; the lane skew must stay below that.
// Queue depth and the merge rule are this design's choices; lane-to-lane
// alignment and round-robin order follow the bridge and
// the CSI-2 lane distribution it implements.
module csi2_lane_align #(
  parameter int LANES  = 2,
  parameter int QDEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LANES-1:0]     lane_sync,
  input  logic [LANES-1:0]     lane_stb,
  input  logic [7:0]           lane_byte [LANES],
  input  logic                 flush,
  output logic                 word_stb,
  output logic [8*LANES-1:0]   word
);

  localparam int QW = $clog2(QDEPTH + 1);
  localparam int PW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  logic [7:0]    q    [LANES][QDEPTH];
  logic [PW-1:0] wptr [LANES];
  logic [PW-1:0] rptr [LANES];
  logic [QW-1:0] cnt  [LANES];
  logic [LANES-1:0] armed;     // sync seen, bytes are packet bytes
  logic          all_ready;
  logic [LANES-1:0] push;

  always_comb begin
    all_ready = 1'b1;
    for (int l = 0; l < LANES; l++) begin
      if (cnt[l] == '0) all_ready = 1'b0;
      push[l] = lane_stb[l] && armed[l] && (cnt[l] != QW'(QDEPTH));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_stb <= 1'b0;
      word     <= '0;
      armed    <= '0;
      for (int l = 0; l < LANES; l++) begin
        wptr[l] <= '0;
        rptr[l] <= '0;
        cnt[l]  <= '0;
      end
    end else begin
      word_stb <= 1'b0;
      if (flush) begin
        armed <= '0;
        for (int l = 0; l < LANES; l++) begin
          wptr[l] <= '0;
          rptr[l] <= '0;
          cnt[l]  <= '0;
        end
      end else begin
        if (all_ready) begin
          word_stb <= 1'b1;
          for (int l = 0; l < LANES; l++) word[8*l +: 8] <= q[l][rptr[l]];
        end
        for (int l = 0; l < LANES; l++) begin
          if (lane_sync[l]) armed[l] <= 1'b1;
          if (push[l]) begin
            q[l][wptr[l]] <= lane_byte[l];
            wptr[l] <= (wptr[l] == PW'(QDEPTH - 1)) ? '0 : wptr[l] + 1'b1;
          end
          if (all_ready) rptr[l] <= (rptr[l] == PW'(QDEPTH - 1)) ? '0 : rptr[l] + 1'b1;
          cnt[l] <= cnt[l] + QW'(push[l]) - QW'(all_ready);
        end
      end
    end
  end

endmodule
