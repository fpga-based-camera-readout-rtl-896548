// header_ecc -- CSI-2 packet header error check and single-bit correction.
//
// The 24 header bits {WC, VC, DT} (DT in bits 5:0, VC in 7:6, WC in 23:8) are
// covered by a 6-bit Hamming code plus parity, carried in the header's ECC
// byte (bits 7:6 always zero). Each header bit d has a fixed 8-bit column
// ECC_COL[d]; the expected ECC is the XOR of the columns of all set bits.
// The syndrome (received ECC xor expected ECC) is then classified:
//   zero                       -> no error, header passed on unchanged
//   equal to ECC_COL[d]        -> bit d of the header flipped; it is corrected
//   a single set bit           -> the ECC byte itself was hit; header unchanged
//   anything else              -> two or more bit errors, not correctable
// Flags: no_error, corrected_error, higher_order_error (exactly one is high
// for a checked header). The columns are the code generation table of the
// CSI-2 standard as printed in the bridge documentation (0x07 for bit 0 ...
// 0x3B for bit 23).
//
// Timing: one register stage. A header presented with hdr_valid gives its
// flags and corrected header with valid one clock later. The single output
// register is this design's choice.
module header_ecc
  import csi2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hdr_valid,
  input  logic [7:0]  ecc_in,
  input  logic [1:0]  vc_in,
  input  logic [5:0]  dt_in,
  input  logic [15:0] wc_in,
  output logic        valid,
  output logic        no_error,
  output logic        corrected_error,
  output logic        higher_order_error,
  output logic [23:0] header_out           // {WC, VC, DT}, corrected
);

  localparam logic [7:0] ECC_COL [24] = '{
    8'h07, 8'h0B, 8'h0D, 8'h0E, 8'h13, 8'h15, 8'h16, 8'h19,
    8'h1A, 8'h1C, 8'h23, 8'h25, 8'h26, 8'h29, 8'h2A, 8'h2C,
    8'h31, 8'h32, 8'h34, 8'h38, 8'h1F, 8'h2F, 8'h37, 8'h3B
  };

  logic [23:0] hdr, fixed;
  logic [7:0]  parity, syndrome;
  logic        hit_data, hit_ecc;

  always_comb begin
    hdr    = {wc_in, vc_in, dt_in};
    parity = '0;
    for (int d = 0; d < 24; d++)
      if (hdr[d]) parity ^= ECC_COL[d];
    syndrome = parity ^ ecc_in;
    fixed    = hdr;
    hit_data = 1'b0;
    for (int d = 0; d < 24; d++)
      if (syndrome == ECC_COL[d]) begin
        fixed[d] = ~hdr[d];
        hit_data = 1'b1;
      end
    hit_ecc = (syndrome != '0) && ((syndrome & (syndrome - 8'd1)) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid              <= 1'b0;
      no_error           <= 1'b0;
      corrected_error    <= 1'b0;
      higher_order_error <= 1'b0;
      header_out         <= '0;
    end else begin
      valid <= hdr_valid;
      if (hdr_valid) begin
        no_error           <= (syndrome == '0);
        corrected_error    <= hit_data || hit_ecc;
        higher_order_error <= (syndrome != '0) && !hit_data && !hit_ecc;
        header_out         <= fixed;
      end
    end
  end

endmodule
