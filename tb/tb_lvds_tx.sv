// tb_lvds_tx: checks the driver model's differential level and common mode
// for both logic values, over many random input changes.
module tb_lvds_tx;
  logic d = 1'b0;
  real  p, n;
  int checks = 0, failures = 0;

  lvds_tx dut (.d, .out_p(p), .out_n(n));

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #1;
      checks++;
      if ((d && (p - n) != 350.0) || (!d && (n - p) != 350.0)) failures++;
      checks++;
      if ((p + n) / 2.0 != 1200.0) failures++;
    end
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
