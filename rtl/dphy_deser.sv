// dphy_deser -- D-PHY high-speed lane deserialiser (double data rate).
//
// One data lane of the D-PHY carries one bit on each edge of the forward
// clock DCK, least significant bit first. A flop on the rising edge and one
// on the falling edge capture the two bits of each DCK period; on the next
// rising edge both are shifted into an 8-bit register. Every fourth rising
// edge the register holds eight fresh bits: they are presented on byte_out
// with a one-cycle byte_stb. So bytes leave at one quarter of the DCK rate,
// one byte per four DCK cycles, at an arbitrary bit offset relative to the
// byte boundaries of the transmitter: finding that offset is the word
// aligner's job.
//
// The bridge this follows uses a vendor DDR input primitive and a PLL-made
// byte clock for this stage; here the byte rate is a strobe in the DCK
// domain instead of a second clock, which is this design's choice. Bits are
// sampled on both DCK edges, so the data must be stable around both edges
// (centre-aligned, as D-PHY provides). rst_n clears the shift register and
// the byte phase; it is asynchronous.
module dphy_deser (
  input  logic       dck,
  input  logic       rst_n,
  input  logic       din,
  output logic       byte_stb,
  output logic [7:0] byte_out
);

  logic       bit_rise, bit_fall;
  logic [5:0] shreg;       // bits 3..8 back (the two newest are in bit_rise/bit_fall)
  logic [1:0] phase;

  always_ff @(negedge dck or negedge rst_n) begin
    if (!rst_n) bit_fall <= 1'b0;
    else        bit_fall <= din;
  end

  wire [7:0] shreg_next = {bit_fall, bit_rise, shreg};

  always_ff @(posedge dck or negedge rst_n) begin
    if (!rst_n) begin
      bit_rise <= 1'b0;
      shreg    <= '0;
      phase    <= '0;
      byte_stb <= 1'b0;
      byte_out <= '0;
    end else begin
      bit_rise <= din;
      shreg    <= shreg_next[7:2];
      phase    <= phase + 1'b1;
      byte_stb <= (phase == 2'd3);
      if (phase == 2'd3) byte_out <= shreg_next;
    end
  end

endmodule
