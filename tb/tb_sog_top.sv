// tb_sog_top: end-to-end test of the whole interface at its default size
// (240 channels, 320 lines, 6-bit, 15 MHz MCLK), over two frames.
//
// The frame buffer holds a different pattern for each frame. A model of
// the analog panel sits on the outputs. Whenever HLE has loaded the holding
// latch, it writes channel i's value into column 3*i + PSC of the row whose
// gate line is on. After each frame the whole 320 x 720 sub-pixel array is
// compared with the frame buffer. The test also checks:
//  - the receivers calibrate (each trim code cancels its lane's offset to
//    within one 10 mV step) before any data are taken;
//  - exactly one gate line is on at every HLE;
//  - HST-to-SLE is 240 MCLKs, a line (VClk period) is 780 MCLKs and a frame
//    (VST period) is 250,000 MCLKs, which is 60 frames/s at 15 MHz;
//  - every mechanism happened: calibration, vertical-blank detection (VST),
//    HST, SLE, HLE, each of the three PSC colours, VClk, and every gate line.
module tb_sog_top;
  import sog_pkg::*;

  localparam int unsigned CH = H_ACTIVE, L = V_LINES;
  localparam int unsigned LINE_CLK  = 3 * (H_ACTIVE + H_GAP);
  localparam int unsigned FRAME_CLK = V_LINES * LINE_CLK + V_BLANK;
  localparam real OFFS [N_LANES] = '{-420.0, 385.0, 95.0, -130.0, 510.0, -55.0, 210.0, -275.0};

  logic clk = 1'b0, cal_clk = 1'b0, rst_n = 1'b1;
  logic [$clog2(CH)-1:0] fb_x;
  logic [$clog2(L)-1:0]  fb_y;
  logic [3*GRAY_BITS-1:0] fb_rgb;
  logic frame_start, cal_done, mclk_rx, hst, sle, hle, vst, vclk;
  logic [TRIM_BITS-1:0] rx_trim [N_LANES];
  color_e psc;
  gray_t  hold [CH];
  logic [L-1:0] gate;

  int checks = 0, failures = 0;
  int fnum = -1;

  sog_top dut (.*);

  always #33 clk = ~clk;        // 66 ns period, about 15 MHz
  always #50 cal_clk = ~cal_clk;

  function automatic logic [17:0] pix(int x, int y, int f);
    return {6'(x + 3 * y + 11 * f), 6'(x * y + 5 * f + 1), 6'(7 * x + y * (f + 2))};
  endfunction
  assign fb_rgb = pix(int'(fb_x), int'(fb_y), fnum);

  always @(posedge clk) if (rst_n && frame_start) fnum <= fnum + 1;

  gray_t panel [L][3*CH];

  int n_vst = 0, n_hst = 0, n_sle = 0, n_hle = 0, n_vclk = 0;
  int n_psc [3] = '{0, 0, 0};
  logic [L-1:0] lines_seen = '0;
  logic hle_prev = 1'b0, vclk_prev = 1'b0, vst_prev = 1'b0;
  int cyc = 0, t_hst = -1, t_vclk = -1, t_vst = -1;

  always @(negedge clk) begin
    cyc++;
    if (hst) begin n_hst++; t_hst = cyc; n_psc[int'(psc)]++; end
    if (sle) begin
      n_sle++;
      checks++;
      if (cyc - t_hst != CH) begin failures++; $display("HST->SLE %0d", cyc - t_hst); end
    end
    if (hle) n_hle++;
    if (vclk && !vclk_prev) begin
      n_vclk++;
      if (t_vclk >= 0 && !vst) begin
        checks++;
        if (cyc - t_vclk != LINE_CLK) begin failures++; $display("line time %0d", cyc - t_vclk); end
      end
      t_vclk = cyc;
    end
    if (vst && !vst_prev) begin
      n_vst++;
      if (t_vst >= 0) begin
        checks++;
        if (cyc - t_vst != FRAME_CLK) begin failures++; $display("frame time %0d", cyc - t_vst); end
      end
      t_vst = cyc;
    end
    if (hle_prev) begin
      checks++;
      if (!$onehot(gate)) begin
        failures++;
        $display("gate lines not one-hot at HLE: %0d on", $countones(gate));
      end else begin
        for (int r = 0; r < L; r++)
          if (gate[r]) begin
            lines_seen[r] = 1'b1;
            for (int i = 0; i < CH; i++) panel[r][3*i + int'(psc)] = hold[i];
          end
      end
    end
    hle_prev  = hle;
    vclk_prev = vclk;
    vst_prev  = vst;
  end

  task automatic compare_frame(int f);
    int bad;
    bad = 0;
    for (int y = 0; y < L; y++)
      for (int x = 0; x < CH; x++) begin
        logic [17:0] p;
        p = pix(x, y, f);
        checks += 3;
        if (panel[y][3*x]   !== p[17:12]) bad++;
        if (panel[y][3*x+1] !== p[11:6])  bad++;
        if (panel[y][3*x+2] !== p[5:0])   bad++;
      end
    if (bad != 0) $display("frame %0d: %0d sub-pixels wrong", f, bad);
    failures += bad;
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-24s %0d", what, n);
  endtask

  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    for (int y = 0; y < L; y++) for (int c = 0; c < 3 * CH; c++) panel[y][c] = '0;
    #120 rst_n = 1'b1;
    wait (cal_done);
    for (int i = 0; i < N_LANES; i++) begin
      real resid;
      resid = OFFS[i] + real'(int'(rx_trim[i]) - (1 << (TRIM_BITS - 1))) * 10.0;
      checks++;
      if (resid > 0.0 || resid <= -10.0) begin
        failures++;
        $display("lane %0d residual offset %f mV", i, resid);
      end
    end
    for (int f = 0; f < 2; f++) begin
      // frame f's last colour is held during the next blanking
      @(posedge clk iff (frame_start && fnum == f));
      repeat (V_BLANK / 2) @(posedge clk);
      compare_frame(f);
    end
    count("calibration", int'(cal_done));
    count("VST / vertical blanking", n_vst);
    count("HST", n_hst);
    count("SLE", n_sle);
    count("HLE", n_hle);
    count("PSC red", n_psc[0]);
    count("PSC green", n_psc[1]);
    count("PSC blue", n_psc[2]);
    count("VClk", n_vclk);
    count("gate lines driven", $countones(lines_seen));
    checks++;
    if (lines_seen !== '1) failures++;
    checks++;
    if (n_hst != 2 * 3 * L || n_sle != n_hst || n_hle != n_hst || n_vst != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * FRAME_CLK) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
