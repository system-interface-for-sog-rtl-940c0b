// scan_driver: gate-line shift register of the scan driver.
//
// VST is shifted into stage 0 at each rising edge of VClk, and the token
// moves one gate line per VClk period. Gate line k is on while stage k
// holds the token, so one line is selected per line time from the top of
// the frame down. The document names the scan driver and its VST and VClk
// inputs. The shift register is this design's reading of it. The
// register runs on the MCLK, and a VClk rise is found by comparing VClk
// with its value one clock earlier.
//
// Timing: gate changes one mclk edge after the clock in which vclk is first
// seen high.
module scan_driver
  import sog_pkg::*;
#(
  parameter int unsigned LINES = V_LINES
) (
  input  logic             mclk,
  input  logic             rst_n,
  input  logic             vst,
  input  logic             vclk,
  output logic [LINES-1:0] gate
);

  logic vclk_prev;

  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      vclk_prev <= 1'b0;
      gate      <= '0;
    end else begin
      vclk_prev <= vclk;
      if (vclk && !vclk_prev) gate <= {gate[LINES-2:0], vst};
    end
  end

endmodule
