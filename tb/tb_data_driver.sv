// tb_data_driver: loads colours into a 16-channel driver the way the timing
// generator does: HST with the first sub-pixel, one sub-pixel per clock,
// SLE after the last and HLE one clock later. Between colours it sends
// random junk with no HST, and after SLE it checks that the junk changes
// nothing.
// Checks: the holding latch is unchanged until HLE, then equals the colour
// just sent, channel by channel. The next colour's sampling does not
// disturb the holding latch.
module tb_data_driver;
  import sog_pkg::*;
  localparam int unsigned CH = 16;

  logic hclk = 1'b0, rst_n = 1'b1;
  logic hst = 1'b0, sle = 1'b0, hle = 1'b0;
  gray_t d = '0;
  gray_t hold [CH];
  int checks = 0, failures = 0;

  data_driver #(.CH(CH)) dut (.*);
  always #5 hclk = ~hclk;

  gray_t cur [CH], prev [CH];

  task automatic check_hold(gray_t want [CH]);
    for (int i = 0; i < CH; i++) begin
      checks++;
      if (hold[i] !== want[i]) begin
        failures++;
        if (failures < 10) $display("ch%0d hold %0d expected %0d", i, hold[i], want[i]);
      end
    end
  endtask

  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    for (int i = 0; i < CH; i++) prev[i] = '0;
    #12 rst_n = 1'b1;
    for (int col = 0; col < 6; col++) begin
      for (int i = 0; i < CH; i++) cur[i] = gray_t'($urandom);
      for (int i = 0; i < CH; i++) begin
        @(negedge hclk);
        hst = (i == 0);
        d   = cur[i];
        check_hold(prev);        // previous colour still held while sampling
      end
      @(negedge hclk); hst = 1'b0; sle = 1'b1; d = gray_t'($urandom);
      @(negedge hclk); sle = 1'b0; hle = 1'b1; d = gray_t'($urandom);
      check_hold(prev);          // SLE alone must not load the holding latch
      @(negedge hclk); hle = 1'b0;
      check_hold(cur);
      for (int g = 0; g < 5; g++) begin
        @(negedge hclk); d = gray_t'($urandom);
      end
      // a junk HLE with no new colour must reload the same data
      hle = 1'b1;
      @(negedge hclk); hle = 1'b0;
      check_hold(cur);
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge hclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
