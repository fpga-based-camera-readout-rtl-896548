// tb_csi2_bridge_top_full -- the end-to-end bridge test at full size.
//
// Runs tb_csi2_bridge_top with FULL = 1: the bridge is instantiated with its
// default parameters (24.18 MHz control clock, 400 kHz I2C, 1 ms enable
// hold, 3500-clock transaction gap, 1/60 s frame period, power-up reset from
// clock 25000 to 49900), so the start-up sequence, the frame prompts and the
// image traffic run with the real timing. About 1.2 million control clocks.
module tb_csi2_bridge_top_full;

  tb_csi2_bridge_top #(.FULL(1)) env ();

endmodule
