// gc_serializer: graphics-controller side of the interface.
//
// The panel has no line memory. The graphics controller therefore sends the
// sub-pixels in the order the data driver uses them: all 240 red values of a
// line, a short gap with DE low, all green values, a gap, all blue values, a
// gap, then the next line. After the last line it keeps DE low for V_BLANK
// extra clocks (vertical blanking). Each transfer is one 6-bit sub-pixel per
// MCLK, bit i on lane TXi, so six data lanes, DE and MCLK leave the chip.
// The colour-sequential order, the six lanes, DE and the forwarded MCLK follow
// the document. Starting with vertical blanking, the blanking lengths and
// the frame-buffer port are this design's choices.
//
// Frame buffer port: fb_x/fb_y address a pixel. fb_rgb is read back
// combinationally in the same cycle as {R,G,B}, 6 bits each.
//
// Timing: the counters run on the rising edge of clk. tx_d and tx_de are
// re-registered on the falling edge, so they change half a period before
// the rising edge at which the receiver samples them (centre-aligned,
// source-synchronous). tx_mclk is clk itself, wired straight through.
module gc_serializer
  import sog_pkg::*;
#(
  parameter int unsigned H       = H_ACTIVE,
  parameter int unsigned V       = V_LINES,
  parameter int unsigned HGAP    = H_GAP,
  parameter int unsigned VBLANK  = V_BLANK
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // frame buffer read port
  output logic [$clog2(H)-1:0]  fb_x,
  output logic [$clog2(V)-1:0]  fb_y,
  input  logic [3*GRAY_BITS-1:0] fb_rgb,
  // to the LVDS transmitters
  output gray_t                 tx_d,
  output logic                  tx_de,
  output logic                  tx_mclk,
  // one-cycle pulse at the first clock of every frame (vertical blanking start)
  output logic                  frame_start
);

  localparam int unsigned SLOT = H + HGAP;   // clocks per colour period

  logic                      in_vblank;
  logic [$clog2(VBLANK+1)-1:0] vcnt;
  logic [$clog2(SLOT)-1:0]   xcnt;
  color_e                    color;
  logic [$clog2(V)-1:0]      ycnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_vblank <= 1'b1;
      vcnt      <= '0;
      xcnt      <= '0;
      color     <= COL_R;
      ycnt      <= '0;
    end else if (in_vblank) begin
      if (32'(vcnt) == VBLANK - 1) begin
        in_vblank <= 1'b0;
        vcnt      <= '0;
      end else begin
        vcnt <= vcnt + 1'b1;
      end
    end else if (32'(xcnt) != SLOT - 1) begin
      xcnt <= xcnt + 1'b1;
    end else begin
      xcnt <= '0;
      if (color != COL_B) begin
        color <= color_e'(color + 2'd1);
      end else begin
        color <= COL_R;
        if (32'(ycnt) == V - 1) begin
          ycnt      <= '0;
          in_vblank <= 1'b1;
        end else begin
          ycnt <= ycnt + 1'b1;
        end
      end
    end
  end

  assign frame_start = !in_vblank ? 1'b0 : (vcnt == '0);

  logic active;
  assign active = !in_vblank && (32'(xcnt) < H);
  assign fb_x   = active ? xcnt[$clog2(H)-1:0] : '0;
  assign fb_y   = ycnt;

  gray_t sub_pixel;
  always_comb begin
    unique case (color)
      COL_R:   sub_pixel = fb_rgb[3*GRAY_BITS-1:2*GRAY_BITS];
      COL_G:   sub_pixel = fb_rgb[2*GRAY_BITS-1:GRAY_BITS];
      default: sub_pixel = fb_rgb[GRAY_BITS-1:0];
    endcase
  end

  // launch on the falling edge: centre-aligned with the forwarded clock
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_d  <= '0;
      tx_de <= 1'b0;
    end else begin
      tx_d  <= active ? sub_pixel : '0;
      tx_de <= active;
    end
  end

  assign tx_mclk = clk;

endmodule
