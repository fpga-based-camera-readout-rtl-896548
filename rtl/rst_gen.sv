// rst_gen -- power-up reset pulse generator for the camera control side.
//
// The bridge has no external reset: after configuration it makes its own.
// A counter, starting from its power-up value of zero, runs on the system
// clock. reset_n is high at power-up, is pulled low when the counter reaches
// ASSERT_AT and released when it reaches RELEASE_AT; the counter then stops
// and reset_n stays high. With the defaults (25000 and 49900 cycles of the
// 24.18 MHz oscillator) the pulse starts about 1 ms after power-up and lasts
// about 1 ms. The two thresholds are those of the bridge; the counter relies
// on the FPGA's register initial values (declaration initialisers), which is
// how the bridge's own generator works.
module rst_gen #(
  parameter int ASSERT_AT  = 25000,
  parameter int RELEASE_AT = 49900
) (
  input  logic clk,
  output logic reset_n
);

  localparam int CW = $clog2(RELEASE_AT + 1);

  logic [CW-1:0] cnt = '0;
  logic          rst_q = 1'b1;

  always_ff @(posedge clk) begin
    if (cnt == CW'(ASSERT_AT)) begin
      rst_q <= 1'b0;
      cnt   <= cnt + 1'b1;
    end else if (cnt == CW'(RELEASE_AT)) begin
      rst_q <= 1'b1;
    end else if (cnt < CW'(RELEASE_AT)) begin
      cnt   <= cnt + 1'b1;
    end
  end

  assign reset_n = rst_q;

  initial assert (ASSERT_AT < RELEASE_AT) else $error("rst_gen: ASSERT_AT must precede RELEASE_AT");

endmodule
