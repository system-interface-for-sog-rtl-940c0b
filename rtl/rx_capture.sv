// rx_capture: source-synchronous capture of the received LVDS lanes.
//
// There is no PLL on the glass. The six data lanes and DE are sampled by D
// flip-flops clocked by the MCLK that the graphics controller sends along
// with them, as a DDR DRAM interface does. This follows the document. The
// transmitter changes data on the falling MCLK edge, so the rising edge
// samples the middle of each bit. That edge choice is this design's.
// Reset clears the flip-flops so DE reads low until real data arrive.
//
// Timing: d_q and de_q show what was on the lanes one rising mclk edge
// earlier.
module rx_capture
  import sog_pkg::*;
(
  input  logic  mclk,
  input  logic  rst_n,
  input  gray_t d,
  input  logic  de,
  output gray_t d_q,
  output logic  de_q
);

  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      de_q <= 1'b0;
    end else begin
      d_q  <= d;
      de_q <= de;
    end
  end

endmodule
