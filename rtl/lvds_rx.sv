// lvds_rx: behavioural model of the offset-compensated LVDS receiver front
// end (an analog comparator; not synthesizable logic).
//
// The LTPS comparator has an input-referred offset OFFSET_MV. This can be
// larger than the LVDS swing, so an uncompensated receiver would read a
// constant level. A digital trim code adds a correction of
// (trim - 2**(TRIM_BITS-1)) * LSB_MV, so the mid code means no correction.
// While cal_en is high the two inputs are shorted together. The output then
// shows only the sign of the offset that is left, and the calibration logic
// (lvds_offset_cal) searches the trim code on it at power-up. The code is
// then kept for normal operation.
// That the offset is compensated digitally at power-up and the code reused
// follows the document. The shorting switch, the trim DAC and its 7-bit,
// 10 mV resolution (range -640..+630 mV, residual under 10 mV) are this
// model's choices.
// Port timing: out is combinational in the inputs and trim, with no delay.
module lvds_rx #(
  parameter real         OFFSET_MV = 0.0,
  parameter int unsigned TRIM_BITS = 7,
  parameter real         LSB_MV    = 10.0
) (
  input  real                  in_p,
  input  real                  in_n,
  input  logic                 cal_en,
  input  logic [TRIM_BITS-1:0] trim,
  output logic                 out
);

  real diff_mv;
  real corr_mv;

  always_comb begin
    corr_mv = (real'(trim) - real'(2 ** (TRIM_BITS - 1))) * LSB_MV;
    diff_mv = cal_en ? 0.0 : (in_p - in_n);
    out     = (diff_mv + OFFSET_MV + corr_mv) > 0.0;
  end

endmodule
