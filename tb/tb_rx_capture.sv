// tb_rx_capture: drives random data and DE that change on the falling MCLK
// edge, like the transmitter. Checks that the outputs show the values
// sampled at the previous rising edge. Also checks that reset clears them.
module tb_rx_capture;
  import sog_pkg::*;
  logic mclk = 1'b0, rst_n = 1'b1;
  gray_t d = '1, d_q;
  logic de = 1'b1, de_q;
  int checks = 0, failures = 0;

  rx_capture dut (.*);
  always #5 mclk = ~mclk;

  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    gray_t ed;
    logic ede;
    #2;
    checks++;
    if (d_q !== '0 || de_q !== 1'b0) failures++;
    @(negedge mclk) rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge mclk);
      d  = gray_t'($urandom);
      de = 1'($urandom);
      ed = d; ede = de;
      @(posedge mclk); #1;
      checks++;
      if (d_q !== ed || de_q !== ede) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge mclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
