// data_driver: digital part of the column (data) driver.
//
// The driver has CH channels, and each channel's output drives three
// sub-pixel columns through the 1:3 PSC switches. A colour is loaded in
// three stages:
//  - Shift register (CH stages): HST enters a single token that moves one
//    stage per Hclk. The token position selects the channel that samples
//    the shared 6-bit bus D.
//  - Sampling latch (CH x 6 bits): channel 0 samples D in the HST clock,
//    and channel i samples when the token is in stage i-1. HST opens the
//    sampling window and SLE closes it, so a stray token after the colour
//    is complete cannot overwrite data.
//  - Holding latch (CH x 6 bits): HLE copies the sampling latch as a whole.
//    The holding latch feeds the output stages while the next colour is
//    sampled.
// The three stages, their CH = 240 size and the HST/Hclk/D/SLE/HLE inputs
// follow the document's panel architecture. Using the token as the sampling
// address and SLE as the window close are this design's choices.
// Hclk is the MCLK, one sub-pixel per clock.
//
// CH must be at least 3.
//
// Timing: hst and the first sub-pixel arrive in the same clock, then one
// sub-pixel per clock. hold changes on the clock edge that ends an hle
// cycle.
module data_driver
  import sog_pkg::*;
#(
  parameter int unsigned CH = H_ACTIVE
) (
  input  logic  hclk,
  input  logic  rst_n,
  input  logic  hst,
  input  gray_t d,
  input  logic  sle,
  input  logic  hle,
  output gray_t hold [CH]
);

  logic [CH-2:0] token;   // token[i] selects channel i+1 next clock
  logic          window;
  gray_t         samp [CH];
  logic [CH-1:0] sel;

  assign sel = {token, hst};

  always_ff @(posedge hclk or negedge rst_n) begin
    if (!rst_n) begin
      token  <= '0;
      window <= 1'b0;
    end else begin
      token <= {token[CH-3:0], hst};
      if (hst)      window <= 1'b1;
      else if (sle) window <= 1'b0;
    end
  end

  // sampling latch
  always_ff @(posedge hclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CH; i++) samp[i] <= '0;
    end else begin
      for (int i = 0; i < CH; i++)
        if (sel[i] && (hst || window)) samp[i] <= d;
    end
  end

  // holding latch
  always_ff @(posedge hclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CH; i++) hold[i] <= '0;
    end else if (hle) begin
      for (int i = 0; i < CH; i++) hold[i] <= samp[i];
    end
  end

endmodule
