// timing_generator: timing controller of the driving circuit.
//
// Everything the panel needs is derived from DE and the forwarded MCLK
// alone. No line memory or PLL is used, and no sync codes are embedded in
// the data.
//  - A DE-low stretch of at least VBLANK_DET clocks is vertical blanking.
//    The next DE rise starts a frame: VST rises and the colour count
//    restarts at red.
//  - Every DE rise starts one colour period: HST pulses for one clock
//    together with the first sub-pixel on d_out, and PSC is set to the
//    colour now arriving (00 red, 01 green, 10 blue).
//  - Every DE fall means one colour has been fully transferred. SLE pulses
//    for one clock, and HLE pulses one clock later.
//  - VClk, the scan clock, rises at the start of each line (the red period)
//    and falls at the start of the green period. VST stays high from the
//    first DE rise of a frame to the second, so the scan driver finds it
//    high at the first VClk rise.
// That HST and VST start when DE arrives, that SLE and HLE rise when a
// colour is complete, that PSC changes while DE is high, and the PSC codes
// 00/01/10, all follow the document. The blanking threshold, the one-clock
// widths, the HLE-after-SLE order and where VClk and VST fall are this
// design's choices. Until the first vertical blanking has been seen, all
// outputs stay low.
//
// Timing: all outputs are registered. d_out is d_in delayed by one clock,
// so HST lines up with the first sub-pixel of a colour on d_out. SLE comes
// H clocks after HST when DE is high for H clocks.
module timing_generator
  import sog_pkg::*;
#(
  parameter int unsigned VBLANK_MIN = VBLANK_DET
) (
  input  logic   mclk,
  input  logic   rst_n,
  input  gray_t  d_in,
  input  logic   de_in,
  output gray_t  d_out,
  output logic   hst,
  output logic   sle,
  output logic   hle,
  output color_e psc,
  output logic   vst,
  output logic   vclk
);

  logic                            de_prev;
  logic [$clog2(VBLANK_MIN+1)-1:0] low_cnt;
  logic                            synced;
  color_e                          color;

  logic   de_rise, de_fall, new_frame, frame_ok;
  color_e next_color;

  assign de_rise   = de_in && !de_prev;
  assign de_fall   = !de_in && de_prev;
  assign new_frame = de_rise && (low_cnt == ($clog2(VBLANK_MIN+1))'(VBLANK_MIN));
  assign frame_ok  = synced || new_frame;

  always_comb begin
    if (new_frame)            next_color = COL_R;
    else if (color == COL_B)  next_color = COL_R;
    else                      next_color = color_e'(color + 2'd1);
  end

  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      de_prev <= 1'b0;
      low_cnt <= '0;
      synced  <= 1'b0;
      color   <= COL_B;
      d_out   <= '0;
      hst     <= 1'b0;
      sle     <= 1'b0;
      hle     <= 1'b0;
      psc     <= COL_R;
      vst     <= 1'b0;
      vclk    <= 1'b0;
    end else begin
      de_prev <= de_in;
      if (de_in)
        low_cnt <= '0;
      else if (low_cnt != ($clog2(VBLANK_MIN+1))'(VBLANK_MIN))
        low_cnt <= low_cnt + 1'b1;

      d_out <= d_in;
      hst   <= de_rise && frame_ok;
      sle   <= de_fall && synced;
      hle   <= sle;

      if (de_rise && frame_ok) begin
        synced <= 1'b1;
        color  <= next_color;
        psc    <= next_color;
        vst    <= new_frame;
        if (next_color == COL_R)      vclk <= 1'b1;
        else if (next_color == COL_G) vclk <= 1'b0;
      end
    end
  end

endmodule
