// csi2_tx_model -- behavioural MIPI CSI-2 transmitter (D-PHY high-speed lanes).
//
// Builds CSI-2 packets and sends them on LANES data lanes, DDR, clocked by
// the testbench's DCK: a new bit is put on every lane a quarter DCK period
// after each DCK edge, so the receiver samples the middle of every bit on
// both edges. Half the DCK period must be 2 time units.
//
// A burst on one lane is: extra idle bits (per-lane skew), eight zero bits,
// the sync byte 0xB8, the lane's share of the packet bytes (byte i goes to
// lane i mod LANES), then zero bits until all lanes end together plus a gap
// of gap_bits. Every byte goes out LSB first. Between bursts the lanes stay
// at 0.
//
// Helper functions build packet byte lists: short packets (DI, two data
// bytes, ECC), long packets (DI, WC, ECC, payload, 16-bit checksum), and
// RAW10 payloads from pixel lists. The ECC is computed from the parity
// equations of the CSI-2 header code; a flip mask corrupts header or ECC
// bits after the ECC is computed, to test error handling. pkts_sent and
// bytes_sent count traffic.
module csi2_tx_model #(
  parameter int LANES = 2
) (
  input  logic             dck,
  output logic [LANES-1:0] lane
);

  typedef logic [7:0] byte_q_t [$];

  bit bitq [LANES][$];
  int pkts_sent = 0, bytes_sent = 0;

  initial lane = '0;

  always @(dck) begin
    #1;
    for (int l = 0; l < LANES; l++)
      lane[l] = (bitq[l].size() != 0) ? bitq[l].pop_front() : 1'b0;
  end

  function automatic logic [7:0] ecc_of(input logic [23:0] d);
    logic [7:0] p = '0;
    p[0] = d[0]^d[1]^d[2]^d[4]^d[5]^d[7]^d[10]^d[11]^d[13]^d[16]^d[20]^d[21]^d[22]^d[23];
    p[1] = d[0]^d[1]^d[3]^d[4]^d[6]^d[8]^d[10]^d[12]^d[14]^d[17]^d[20]^d[21]^d[22]^d[23];
    p[2] = d[0]^d[2]^d[3]^d[5]^d[6]^d[9]^d[11]^d[12]^d[15]^d[18]^d[20]^d[21]^d[22];
    p[3] = d[1]^d[2]^d[3]^d[7]^d[8]^d[9]^d[13]^d[14]^d[15]^d[19]^d[20]^d[21]^d[23];
    p[4] = d[4]^d[5]^d[6]^d[7]^d[8]^d[9]^d[16]^d[17]^d[18]^d[19]^d[20]^d[22]^d[23];
    p[5] = d[10]^d[11]^d[12]^d[13]^d[14]^d[15]^d[16]^d[17]^d[18]^d[19]^d[21]^d[22]^d[23];
    return p;
  endfunction

  // CRC-16 of the payload (x^16 + x^12 + x^5 + 1, LSB first, seed 0xFFFF)
  function automatic logic [15:0] crc_of(input byte_q_t p);
    logic [15:0] c = 16'hFFFF;
    foreach (p[i])
      for (int b = 0; b < 8; b++)
        c = (c[0] ^ p[i][b]) ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    return c;
  endfunction

  // 4 header bytes; flip[23:0] corrupts header bits, flip[31:24] ECC bits
  function automatic byte_q_t header(input logic [1:0] vc, input logic [5:0] dt,
                                     input logic [15:0] wc, input logic [31:0] flip);
    logic [23:0] h = {wc, vc, dt};
    logic [7:0]  e = ecc_of(h) ^ flip[31:24];
    h ^= flip[23:0];
    return '{h[7:0], h[15:8], h[23:16], e};
  endfunction

  function automatic byte_q_t short_pkt(input logic [5:0] dt, input logic [15:0] data,
                                        input logic [31:0] flip = 0);
    return header(2'd0, dt, data, flip);
  endfunction

  function automatic byte_q_t long_pkt(input logic [5:0] dt, input byte_q_t payload,
                                       input logic [31:0] flip = 0);
    byte_q_t     p = header(2'd0, dt, 16'(payload.size()), flip);
    logic [15:0] c = crc_of(payload);
    foreach (payload[i]) p.push_back(payload[i]);
    p.push_back(c[7:0]);
    p.push_back(c[15:8]);
    return p;
  endfunction

  // RAW10: 4 pixels -> 4 bytes of upper bits + 1 byte of the low bit pairs
  function automatic byte_q_t raw10(input logic [9:0] px [$]);
    byte_q_t p;
    for (int g = 0; g + 3 < px.size(); g += 4) begin
      logic [7:0] lsb = '0;
      for (int k = 0; k < 4; k++) begin
        p.push_back(px[g+k][9:2]);
        lsb[2*k +: 2] = px[g+k][1:0];
      end
      p.push_back(lsb);
    end
    return p;
  endfunction

  // queue one burst; skew[l] delays lane l by that many bits
  task automatic send(input byte_q_t pkt, input int skew [LANES], input int gap_bits = 64);
    int per_lane [LANES];
    int maxlen = 0;
    for (int l = 0; l < LANES; l++) begin
      for (int s = 0; s < skew[l] + 8; s++) bitq[l].push_back(1'b0);
      for (int b = 0; b < 8; b++) bitq[l].push_back(8'hB8 >> b);
      per_lane[l] = 0;
    end
    foreach (pkt[i]) begin
      for (int b = 0; b < 8; b++) bitq[i % LANES].push_back(pkt[i][b]);
      per_lane[i % LANES]++;
    end
    for (int l = 0; l < LANES; l++)
      if (bitq[l].size() > maxlen) maxlen = bitq[l].size();
    for (int l = 0; l < LANES; l++)
      while (bitq[l].size() < maxlen + gap_bits) bitq[l].push_back(1'b0);
    pkts_sent++;
    bytes_sent += pkt.size();
  endtask

  task automatic wait_idle();
    bit any;
    do begin
      @(posedge dck);
      any = 0;
      for (int l = 0; l < LANES; l++) if (bitq[l].size() != 0) any = 1;
    end while (any);
  endtask

endmodule
