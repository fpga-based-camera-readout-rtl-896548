// csi2_bridge_top -- MIPI CSI-2 camera to parallel bridge with camera control.
//
// Two independent pipelines share the chip:
//  * Image data: the sensor's D-PHY clock and two data lanes enter csi2_rx,
//    which deserialises, aligns and decodes them into 10-bit RAW10 pixels
//    with frame valid / line valid. The header of every packet is checked
//    and, where possible, corrected by header_ecc; its three flags and the
//    corrected 24-bit header are outputs for the host.
//  * Control: cci_broker drives i2c_master on the sensor's camera control
//    (I2C) bus. After the internal power-up reset it queues the sensor's
//    start-up sequence, waits for the start button, sends the sequence,
//    then serves host commands from its input queue (read results go to its
//    output queue) and sends a short register update every frame period.
//
// Clocks: clk is the control-side system clock (24.18 MHz on-chip oscillator
// in the bridge); the reset is made internally from it by rst_gen. The image
// side runs on the D-PHY clock i_mipi_clk; its reset is the same reset,
// asserted asynchronously and released in step with i_mipi_clk. The ECC
// checker runs on clk: a header-update toggle crosses into the clk domain
// through three flops, and the header fields, which the decoder holds until
// the next header, are sampled then. This relies on packets being separated
// by more than about four clk periods, which the low-power gap between CSI-2
// packets gives.
//
// The I2C pins are split into sense inputs (scl_i, sda_i, the wired-AND bus
// levels) and pull-down enables (scl_oe, sda_oe), for an open-drain pad
// outside. Pixels come with a pixel-valid strobe and o_pixel_clk, which is
// i_mipi_clk (the bridge's PLL-made pixel clock is not part of this design).
// o_ecc_errors = {two-or-more-bit error, corrected single-bit error, no
// error}. o_buff_full is high while the command queue is full or the sensor
// is still being set up.
module csi2_bridge_top
  import csi2_pkg::*;
#(
  parameter int CLK_HZ      = 24_180_000,
  parameter int BUS_HZ      = 400_000,
  parameter int ENABLE_HOLD = CLK_HZ / 1000,
  parameter int INIT_TIME   = 3500,
  parameter int FRAME_TIME  = CLK_HZ / 60 + 1,
  parameter int RST_ASSERT  = 25000,
  parameter int RST_RELEASE = 49900,
  parameter int LANES       = 2
) (
  input  logic             clk,
  // control
  input  logic             button1,
  output logic             enable,
  input  logic [31:0]      i_data,
  input  logic             i_wr_ena,
  input  logic             i_rd_ena,
  output logic [31:0]      o_data,
  output logic             o_buff_empty,
  output logic             o_buff_full,
  output logic             o_setup_complete,
  output logic             o_streaming,
  output logic             o_i2c_ack_error,
  // camera control bus
  input  logic             scl_i,
  input  logic             sda_i,
  output logic             scl_oe,
  output logic             sda_oe,
  // D-PHY
  input  logic             i_mipi_clk,
  input  logic [LANES-1:0] i_mipi_data,
  // image output
  output logic             o_pixel_clk,
  output logic             o_pixel_valid,
  output logic [9:0]       o_parallel_pixels,
  output logic             o_frame_valid,
  output logic             o_line_valid,
  output logic [23:0]      o_packet_header,
  output logic [2:0]       o_ecc_errors
);

  // ------------------------------------------------------------------ resets
  logic       rst_n, dck_rst_n;
  logic [1:0] dck_rst_sync;

  rst_gen #(.ASSERT_AT(RST_ASSERT), .RELEASE_AT(RST_RELEASE)) u_rst_gen (
    .clk, .reset_n(rst_n)
  );

  always_ff @(posedge i_mipi_clk or negedge rst_n) begin
    if (!rst_n) dck_rst_sync <= '0;
    else        dck_rst_sync <= {dck_rst_sync[0], 1'b1};
  end
  assign dck_rst_n = dck_rst_sync[1];

  // ------------------------------------------------------------------ control pipeline
  logic       i2c_ena, i2c_rw, i2c_busy;
  logic [6:0] i2c_addr;
  logic [7:0] i2c_data_wr, i2c_data_rd;

  cci_broker #(
    .CLK_HZ(CLK_HZ), .ENABLE_HOLD(ENABLE_HOLD), .INIT_TIME(INIT_TIME),
    .FRAME_TIME(FRAME_TIME)
  ) u_cci (
    .clk, .rst_n, .button1, .enable,
    .i_data, .i_wr_ena, .i_rd_ena, .o_data, .o_buff_empty, .o_buff_full,
    .i2c_ena, .i2c_addr, .i2c_rw, .i2c_data_wr, .i2c_busy, .i2c_data_rd,
    .setup_complete(o_setup_complete), .streaming(o_streaming)
  );

  i2c_master #(.INPUT_CLK(CLK_HZ), .BUS_CLK(BUS_HZ)) u_i2c (
    .clk, .rst_n,
    .ena(i2c_ena), .addr(i2c_addr), .rw(i2c_rw), .data_wr(i2c_data_wr),
    .busy(i2c_busy), .data_rd(i2c_data_rd), .ack_error(o_i2c_ack_error),
    .scl_i, .sda_i, .scl_oe, .sda_oe
  );

  // ------------------------------------------------------------------ image pipeline
  logic        hdr_valid;
  logic [1:0]  vc;
  logic [5:0]  dt;
  logic [15:0] wc;
  logic [7:0]  ecc;

  csi2_rx #(.LANES(LANES), .FORMAT(DT_RAW10)) u_rx (
    .dck(i_mipi_clk), .rst_n(dck_rst_n), .lane(i_mipi_data),
    .pixdata(o_parallel_pixels), .pix_valid(o_pixel_valid),
    .fv(o_frame_valid), .lv(o_line_valid),
    .hdr_valid, .vc, .dt, .wc, .ecc
  );

  assign o_pixel_clk = i_mipi_clk;

  // header update toggle, dck -> clk
  logic       hdr_tgl;
  logic [2:0] hdr_tgl_sync;

  always_ff @(posedge i_mipi_clk or negedge dck_rst_n) begin
    if (!dck_rst_n)     hdr_tgl <= 1'b0;
    else if (hdr_valid) hdr_tgl <= !hdr_tgl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hdr_tgl_sync <= '0;
    else        hdr_tgl_sync <= {hdr_tgl_sync[1:0], hdr_tgl};
  end

  wire hdr_new = hdr_tgl_sync[2] ^ hdr_tgl_sync[1];

  logic no_error, corrected_error, higher_order_error;

  header_ecc u_ecc (
    .clk, .rst_n, .hdr_valid(hdr_new),
    .ecc_in(ecc), .vc_in(vc), .dt_in(dt), .wc_in(wc),
    .valid(), .no_error, .corrected_error, .higher_order_error,
    .header_out(o_packet_header)
  );

  assign o_ecc_errors = {higher_order_error, corrected_error, no_error};

endmodule
