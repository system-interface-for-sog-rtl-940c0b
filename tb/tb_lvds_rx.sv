// tb_lvds_rx: checks the receiver model. With an offset of -437 mV and the
// trim at mid-code (64), a 350 mV LVDS input cannot be read correctly. The test
// sweeps every trim code with the inputs shorted and checks the output
// against the sign of offset + (code - 64) * 10 mV. With a good code it
// checks that both LVDS levels are received.
module tb_lvds_rx;
  localparam real OFF = -437.0;
  real  p = 1200.0, n = 1200.0;
  logic cal_en = 1'b1;
  logic [6:0] trim = 7'd64;
  logic out;
  int checks = 0, failures = 0;

  lvds_rx #(.OFFSET_MV(OFF)) dut (.in_p(p), .in_n(n), .cal_en, .trim, .out);

  initial begin
    for (int c = 0; c < 128; c++) begin
      trim = 7'(c);
      p = 1375.0; n = 1025.0;   // ignored while shorted
      #1;
      checks++;
      if (out !== ((OFF + real'(c - 64) * 10.0) > 0.0)) failures++;
    end
    // uncompensated: a logic 1 is read as 0 as well
    cal_en = 1'b0; trim = 7'd64;
    p = 1375.0; n = 1025.0; #1;
    checks++;
    if (out !== 1'b0) failures++;      // +350 - 437 < 0
    // compensated with code 107 (residual -7 mV): both levels read
    trim = 7'd107;
    for (int i = 0; i < 50; i++) begin
      logic b;
      b = 1'($urandom);
      p = b ? 1375.0 : 1025.0;
      n = b ? 1025.0 : 1375.0;
      #1;
      checks++;
      if (out !== b) failures++;
    end
    // a 100 mV input with the compensated code
    p = 1250.0; n = 1150.0; #1;
    checks++;
    if (out !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
