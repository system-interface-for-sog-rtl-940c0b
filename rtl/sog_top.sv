// sog_top: system interface and timing controller for a system-on-glass
// qVGA panel, together with the graphics-controller transmitter that feeds
// it.
//
// Data path: gc_serializer reads the frame buffer in colour-sequential order
// (all red sub-pixels of a line, then green, then blue). It sends one 6-bit
// sub-pixel per MCLK on six LVDS lanes, with DE and MCLK on two more lanes
// (lvds_tx). On the glass, eight lvds_rx receivers recover the lanes. At
// power-up lvds_offset_cal trims their offsets. The data and DE are then
// captured by D flip-flops clocked by the received MCLK (rx_capture).
// timing_generator derives HST, SLE, HLE, PSC, VST and VClk from DE alone.
// data_driver loads one colour of a line into its holding latch, and
// scan_driver selects the gate line. The output stages, the 1:3 PSC column
// switches and the pixels are analog, so their inputs are brought out as
// ports: hold, psc and gate.
//
// Because the data arrive in driving order at one sub-pixel per clock, the
// receiver needs neither a line memory nor a PLL. This follows the document.
// The receiver offsets in RX_OFFSET_MV are example values for the process
// spread. The cal_clk calibration clock, and holding the glass logic in
// reset until calibration is done, are this design's choices.
//
// Clocks: clk is the controller's dot clock (15 MHz in the target
// application) and is forwarded as MCLK. mclk_rx is the received copy that
// clocks all glass-side logic. cal_clk runs the calibration only.
module sog_top
  import sog_pkg::*;
#(
  parameter int unsigned CH     = H_ACTIVE,
  parameter int unsigned LINES  = V_LINES,
  parameter int unsigned HGAP   = H_GAP,
  parameter int unsigned VBLANK = V_BLANK,
  parameter real RX_OFFSET_MV [N_LANES] =
    '{-420.0, 385.0, 95.0, -130.0, 510.0, -55.0, 210.0, -275.0}
) (
  input  logic                   clk,
  input  logic                   cal_clk,
  input  logic                   rst_n,
  // graphics controller frame buffer
  output logic [$clog2(CH)-1:0]  fb_x,
  output logic [$clog2(LINES)-1:0] fb_y,
  input  logic [3*GRAY_BITS-1:0] fb_rgb,
  output logic                   frame_start,
  // receiver calibration status
  output logic                   cal_done,
  output logic [TRIM_BITS-1:0]   rx_trim [N_LANES],
  // panel-side signals
  output logic                   mclk_rx,
  output logic                   hst,
  output logic                   sle,
  output logic                   hle,
  output color_e                 psc,
  output logic                   vst,
  output logic                   vclk,
  output gray_t                  hold [CH],
  output logic [LINES-1:0]       gate
);

  localparam int unsigned LANE_MCLK = GRAY_BITS;
  localparam int unsigned LANE_DE   = GRAY_BITS + 1;

  // ---------------- graphics controller side ----------------
  gray_t tx_d;
  logic  tx_de, tx_mclk;

  gc_serializer #(.H(CH), .V(LINES), .HGAP(HGAP), .VBLANK(VBLANK)) u_gc (
    .clk, .rst_n, .fb_x, .fb_y, .fb_rgb,
    .tx_d, .tx_de, .tx_mclk, .frame_start
  );

  logic [N_LANES-1:0] lane_bit;
  assign lane_bit = {tx_de, tx_mclk, tx_d};

  real lane_p [N_LANES];
  real lane_n [N_LANES];
  logic [N_LANES-1:0] rx_out;
  logic cal_en;

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    lvds_tx u_tx (.d(lane_bit[i]), .out_p(lane_p[i]), .out_n(lane_n[i]));
    lvds_rx #(.OFFSET_MV(RX_OFFSET_MV[i]), .TRIM_BITS(TRIM_BITS)) u_rx (
      .in_p(lane_p[i]), .in_n(lane_n[i]), .cal_en, .trim(rx_trim[i]), .out(rx_out[i])
    );
  end

  // ---------------- glass side ----------------
  lvds_offset_cal #(.N_CH(N_LANES), .TRIM_BITS(TRIM_BITS)) u_cal (
    .clk(cal_clk), .rst_n, .comp(rx_out), .cal_en, .trim(rx_trim), .cal_done
  );

  assign mclk_rx = rx_out[LANE_MCLK];

  // glass logic leaves reset only after calibration, synchronised to mclk_rx
  logic [1:0] drv_rst_sync;
  logic       drv_rst_n;
  always_ff @(posedge mclk_rx or negedge rst_n) begin
    if (!rst_n) drv_rst_sync <= '0;
    else        drv_rst_sync <= {drv_rst_sync[0], cal_done};
  end
  assign drv_rst_n = drv_rst_sync[1];

  gray_t d_q, d_tc;
  logic  de_q;

  rx_capture u_cap (
    .mclk(mclk_rx), .rst_n(drv_rst_n),
    .d(rx_out[GRAY_BITS-1:0]), .de(rx_out[LANE_DE]), .d_q, .de_q
  );

  timing_generator u_tcon (
    .mclk(mclk_rx), .rst_n(drv_rst_n), .d_in(d_q), .de_in(de_q),
    .d_out(d_tc), .hst, .sle, .hle, .psc, .vst, .vclk
  );

  data_driver #(.CH(CH)) u_dd (
    .hclk(mclk_rx), .rst_n(drv_rst_n), .hst, .d(d_tc), .sle, .hle, .hold
  );

  scan_driver #(.LINES(LINES)) u_sd (
    .mclk(mclk_rx), .rst_n(drv_rst_n), .vst, .vclk, .gate
  );

endmodule
