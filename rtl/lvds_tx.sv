// lvds_tx: behavioural model of an LVDS line driver (not synthesizable logic;
// it stands for an analog output stage of the graphics controller).
//
// A logic 1 drives out_p above out_n by SWING_MV, a logic 0 the reverse,
// around a common-mode level VCM_MV. Voltages are real numbers in millivolts.
// The document only names LVDS signalling. The 350 mV swing and 1.2 V common
// mode are the usual LVDS values, not figures from it. The model has no
// delay: the output follows the input at once.
module lvds_tx #(
  parameter real VCM_MV   = 1200.0,
  parameter real SWING_MV = 350.0
) (
  input  logic d,
  output real  out_p,
  output real  out_n
);

  always_comb begin
    out_p = d ? VCM_MV + SWING_MV / 2.0 : VCM_MV - SWING_MV / 2.0;
    out_n = d ? VCM_MV - SWING_MV / 2.0 : VCM_MV + SWING_MV / 2.0;
  end

endmodule
