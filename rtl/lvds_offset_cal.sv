// lvds_offset_cal: power-up offset compensation for the LVDS receivers.
//
// The LTPS receivers can have an input offset larger than the LVDS swing.
// After reset this block shorts the inputs of all N_CH receivers (cal_en
// high) and finds each receiver's trim code at once, by a binary search over
// TRIM_BITS steps. Each step sets the bit under test, waits SETTLE clocks,
// and reads the comparator. A 1 means the offset left is still positive, so
// the bit is cleared again. The search ends on the largest code whose
// residual is not positive, so the residual lies in (-1 LSB, 0]. Then
// cal_en drops, cal_done rises and the codes are held until the next reset.
// Normal reception then needs no time set aside for offset cancellation.
// Compensating digitally at power-up and reusing the result follows the
// document. The binary search, the settling wait and the calibration clock
// are this design's choices.
//
// Timing: calibration takes TRIM_BITS * (SETTLE + 1) clocks of clk after
// reset.
module lvds_offset_cal #(
  parameter int unsigned N_CH      = 8,
  parameter int unsigned TRIM_BITS = 7,
  parameter int unsigned SETTLE    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_CH-1:0]      comp,      // receiver outputs
  output logic                 cal_en,    // short receiver inputs
  output logic [TRIM_BITS-1:0] trim [N_CH],
  output logic                 cal_done
);

  typedef enum logic [1:0] {S_SETTLE, S_DECIDE, S_DONE} state_e;

  state_e                          state;
  logic [$clog2(TRIM_BITS)-1:0]    bit_idx;
  logic [$clog2(SETTLE+1)-1:0]     wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_SETTLE;
      bit_idx  <= $clog2(TRIM_BITS)'(TRIM_BITS - 1);
      wait_cnt <= '0;
      for (int c = 0; c < N_CH; c++) trim[c] <= TRIM_BITS'(1) << (TRIM_BITS - 1);
    end else begin
      unique case (state)
        S_SETTLE: begin
          if (wait_cnt == $clog2(SETTLE+1)'(SETTLE - 1)) begin
            wait_cnt <= '0;
            state    <= S_DECIDE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_DECIDE: begin
          for (int c = 0; c < N_CH; c++) begin
            if (comp[c]) trim[c][bit_idx] <= 1'b0;
            if (bit_idx != 0) trim[c][bit_idx - 1] <= 1'b1;
          end
          if (bit_idx == 0) begin
            state <= S_DONE;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= S_SETTLE;
          end
        end
        default: ;
      endcase
    end
  end

  assign cal_en   = (state != S_DONE);
  assign cal_done = (state == S_DONE);

endmodule
