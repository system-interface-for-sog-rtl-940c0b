// tb_lvds_offset_cal: power-up calibration of eight receiver models with
// offsets from -613 mV to +628 mV, most of them larger than the 350 mV LVDS
// swing.
// Checks: cal_en is high and cal_done low during calibration. Calibration
// ends after TRIM_BITS * (SETTLE + 1) clocks. Each code equals
// 64 + floor(-offset / 10 mV), worked out here, so the residual offset is
// in (-10, 0] mV, under 15 mV. cal_en then drops. Afterwards all eight
// receivers read random LVDS data correctly, and the codes stay fixed.
module tb_lvds_offset_cal;
  import sog_pkg::*;

  localparam int unsigned N = 8, SETTLE = 4;
  localparam real OFFS [N] = '{-613.0, 402.0, 3.5, -9.9, 255.0, -355.0, 47.0, 628.0};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] comp;
  logic cal_en, cal_done;
  logic [TRIM_BITS-1:0] trim [N];
  real p [N], n [N];
  logic [N-1:0] tx_bits = '0;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_rx
    lvds_tx u_tx (.d(tx_bits[i]), .out_p(p[i]), .out_n(n[i]));
    lvds_rx #(.OFFSET_MV(OFFS[i])) u_rx (.in_p(p[i]), .in_n(n[i]), .cal_en, .trim(trim[i]), .out(comp[i]));
  end

  lvds_offset_cal #(.N_CH(N), .SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    int cyc;
    logic [TRIM_BITS-1:0] saved [N];
    #12 rst_n = 1'b1;
    cyc = 0;
    while (!cal_done) begin
      checks++;
      if (!cal_en) failures++;
      tx_bits = N'($urandom);   // line activity must not matter while shorted
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != TRIM_BITS * (SETTLE + 1)) begin
      failures++;
      $display("calibration took %0d clocks, expected %0d", cyc, TRIM_BITS * (SETTLE + 1));
    end
    checks++;
    if (cal_en) failures++;
    for (int i = 0; i < N; i++) begin
      int exp_code;
      real resid;
      exp_code = 64 + int'($floor(-OFFS[i] / 10.0));
      resid = OFFS[i] + real'(int'(trim[i]) - 64) * 10.0;
      checks++;
      if (int'(trim[i]) != exp_code || resid > 0.0 || resid <= -10.0) begin
        failures++;
        $display("ch%0d code %0d expected %0d residual %f mV", i, trim[i], exp_code, resid);
      end
      saved[i] = trim[i];
    end
    for (int k = 0; k < 100; k++) begin
      tx_bits = N'($urandom);
      @(posedge clk); #1;
      checks++;
      if (comp !== tx_bits) failures++;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (trim[i] !== saved[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
