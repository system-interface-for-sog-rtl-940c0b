// tb_scan_driver: an 8-line scan driver gets a VST pulse and then VClk
// periods of random length, with VST low for two frames.
// Checks after every VClk rise: exactly one gate line is on, and it
// advances by one line per VClk. Between VClk rises the gate lines must not
// change. After the last line the token leaves and all lines are off.
module tb_scan_driver;
  import sog_pkg::*;
  localparam int unsigned L = 8;
  logic mclk = 1'b0, rst_n = 1'b1, vst = 1'b0, vclk = 1'b0;
  logic [L-1:0] gate;
  int checks = 0, failures = 0;

  scan_driver #(.LINES(L)) dut (.*);
  always #5 mclk = ~mclk;

  task automatic vclk_period(logic with_vst);
    int hi, lo;
    hi = 2 + int'($urandom % 5);
    lo = 2 + int'($urandom % 5);
    @(negedge mclk); vclk = 1'b1; vst = with_vst;
    repeat (hi) @(negedge mclk);
    vclk = 1'b0; vst = 1'b0;
    repeat (lo) begin
      logic [L-1:0] g;
      g = gate;
      @(negedge mclk);
      checks++;
      if (gate !== g) failures++;
    end
  endtask

  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    #12 rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int line = 0; line < L; line++) begin
        vclk_period(line == 0);
        checks++;
        if (gate !== (L'(1) << line)) begin
          failures++;
          $display("frame %0d line %0d gate %b", f, line, gate);
        end
      end
      vclk_period(1'b0);
      checks++;
      if (gate !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge mclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
