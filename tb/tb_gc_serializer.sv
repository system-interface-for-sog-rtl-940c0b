// tb_gc_serializer: checks the colour-sequential transmit order.
// A small panel (8 x 3 pixels, 2-clock gaps, 5-clock vertical blanking) is
// used. The expected lane stream is built here from the frame-buffer formula
// and compared with tx_d/tx_de at every rising clock edge for two frames.
// It also checks the number of DE-high clocks per frame and that every
// frame_start pulse comes exactly one frame apart.
module tb_gc_serializer;
  import sog_pkg::*;

  localparam int unsigned H = 8, V = 3, HG = 2, VB = 5;
  localparam int unsigned FRAME = VB + V * 3 * (H + HG);

  logic clk = 1'b0, rst_n = 1'b1;
  logic [$clog2(H)-1:0] fb_x;
  logic [$clog2(V)-1:0] fb_y;
  logic [17:0] fb_rgb;
  gray_t tx_d;
  logic tx_de, tx_mclk, frame_start;
  int checks = 0, failures = 0;

  function automatic logic [17:0] pix(int x, int y);
    return {6'(x * 5 + y), 6'(x + 7 * y + 20), 6'(63 - x - 3 * y)};
  endfunction
  assign fb_rgb = pix(int'(fb_x), int'(fb_y));

  gc_serializer #(.H(H), .V(V), .HGAP(HG), .VBLANK(VB)) dut (.*);

  always #5 clk = ~clk;

  logic  exp_de [FRAME];
  gray_t exp_d  [FRAME];
  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    int k;
    k = 0;
    for (int i = 0; i < VB; i++) begin exp_de[k] = 0; exp_d[k] = 0; k++; end
    for (int y = 0; y < V; y++)
      for (int c = 0; c < 3; c++) begin
        for (int x = 0; x < H; x++) begin
          logic [17:0] p;
          p = pix(x, y);
          exp_de[k] = 1;
          exp_d[k]  = (c == 0) ? p[17:12] : (c == 1) ? p[11:6] : p[5:0];
          k++;
        end
        for (int g = 0; g < HG; g++) begin exp_de[k] = 0; exp_d[k] = 0; k++; end
      end
  end

  initial begin
    int de_cnt, last_fs;
    de_cnt = 0;
    last_fs = -1;
    #12 rst_n = 1'b1;
    for (int m = 1; m <= 2 * FRAME; m++) begin
      @(posedge clk);
      checks++;
      if (tx_de !== exp_de[(m - 1) % FRAME] || tx_d !== exp_d[(m - 1) % FRAME]) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0d: de=%0b d=%0d exp de=%0b d=%0d", m, tx_de, tx_d,
                   exp_de[(m - 1) % FRAME], exp_d[(m - 1) % FRAME]);
      end
      if (tx_de) de_cnt++;
      checks++;
      if (tx_mclk !== 1'b1) failures++;
      if (frame_start) begin
        if (last_fs >= 0) begin
          checks++;
          if (m - last_fs != FRAME) failures++;
        end
        last_fs = m;
      end
    end
    checks++;
    if (de_cnt != 2 * 3 * H * V) begin
      failures++;
      $display("DE-high clocks %0d, expected %0d", de_cnt, 2 * 3 * H * V);
    end
    checks++;
    if (last_fs < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * FRAME) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
