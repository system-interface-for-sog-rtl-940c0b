// tb_timing_generator: feeds a DE/data stream shaped like the transmitter's.
// First two colour periods arrive with no vertical blanking before them,
// then blanking, then three frames of 4 lines x 3 colours (8 sub-pixels, 3
// gap clocks, 15 blanking clocks, 10-clock blanking threshold).
// Expected outputs are worked out for every clock from the stream's own
// structure (the first frame ends with one stray red period, so the next
// frame's restart at red is tested):
//  - nothing before the first blanking;
//  - HST with the first sub-pixel of each colour, and d_out = d_in one
//    clock late;
//  - SLE right after the last sub-pixel, HLE one clock later;
//  - PSC = colour (00/01/10) from its DE rise on;
//  - VST high from the first DE rise of a frame to the second;
//  - VClk high from each red DE rise to the green DE rise.
// It also counts HST-to-SLE distance (must be H clocks), HST per frame
// (3 x lines) and VST pulses (one per frame).
module tb_timing_generator;
  import sog_pkg::*;

  localparam int unsigned H = 8, HG = 3, VB = 15, V = 4, NF = 3, VMIN = 10;
  localparam int unsigned NCYC = 3 * (H + HG) + VB + NF * (V * 3 * (H + HG) + VB) + 10;

  logic mclk = 1'b0, rst_n = 1'b1;
  gray_t d_in = '0, d_out;
  logic de_in = 1'b0;
  logic hst, sle, hle, vst, vclk;
  color_e psc;
  int checks = 0, failures = 0;

  timing_generator #(.VBLANK_MIN(VMIN)) dut (.*);
  always #5 mclk = ~mclk;

  logic   s_de [NCYC];
  gray_t  s_d  [NCYC];
  logic   e_hst [NCYC], e_sle [NCYC], e_hle [NCYC], e_vst [NCYC], e_vclk [NCYC];
  color_e e_psc [NCYC];

  int k;
  logic   cur_vst, cur_vclk, synced;
  color_e cur_psc;

  task automatic emit(logic de, logic hst_e, logic sle_e);
    s_de[k]   = de;
    s_d[k]    = de ? gray_t'($urandom) : '0;
    e_hst[k]  = hst_e;
    e_sle[k]  = sle_e;
    e_hle[k]  = (k > 0) ? e_sle[k-1] : 1'b0;
    e_psc[k]  = cur_psc;
    e_vst[k]  = cur_vst;
    e_vclk[k] = cur_vclk;
    k++;
  endtask

  task automatic period(color_e c, logic first_of_frame, logic sync_now);
    if (sync_now) begin
      synced  = 1'b1;
      cur_psc = c;
      cur_vst = first_of_frame;
      if (c == COL_R) cur_vclk = 1'b1;
      if (c == COL_G) cur_vclk = 1'b0;
    end
    emit(1'b1, synced, 1'b0);
    for (int x = 1; x < H; x++) emit(1'b1, 1'b0, 1'b0);
    emit(1'b0, 1'b0, synced);
    for (int g = 1; g < HG; g++) emit(1'b0, 1'b0, 1'b0);
  endtask

  initial #1 rst_n = 1'b0;   // reset edge at time 1

  initial begin
    k = 0; synced = 0; cur_vst = 0; cur_vclk = 0; cur_psc = COL_R;
    period(COL_G, 1'b0, 1'b0);
    period(COL_B, 1'b0, 1'b0);
    for (int b = 0; b < VB; b++) emit(1'b0, 1'b0, 1'b0);
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < V; y++)
        for (int c = 0; c < 3; c++) period(color_e'(c), (y == 0 && c == 0), 1'b1);
      // the first frame ends on a stray red period: the next frame must
      // still restart at red
      if (f == 0) period(COL_R, 1'b0, 1'b1);
      for (int b = 0; b < VB; b++) emit(1'b0, 1'b0, 1'b0);
    end
    while (k < NCYC) emit(1'b0, 1'b0, 1'b0);
  end

  initial begin
    int hst_n, vst_n, last_hst, vst_prev;
    hst_n = 0; vst_n = 0; last_hst = -1; vst_prev = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge mclk);
      d_in  = s_d[i];
      de_in = s_de[i];
      @(posedge mclk); #1;
      checks++;
      if (hst !== e_hst[i] || sle !== e_sle[i] || hle !== e_hle[i] || psc !== e_psc[i] ||
          vst !== e_vst[i] || vclk !== e_vclk[i] || d_out !== s_d[i]) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: hst %0b/%0b sle %0b/%0b hle %0b/%0b psc %0d/%0d vst %0b/%0b vclk %0b/%0b",
                   i, hst, e_hst[i], sle, e_sle[i], hle, e_hle[i], psc, e_psc[i], vst, e_vst[i],
                   vclk, e_vclk[i]);
      end
      if (hst) begin hst_n++; last_hst = i; end
      if (sle) begin
        checks++;
        if (i - last_hst != H) failures++;
      end
      if (vst && !vst_prev) vst_n++;
      vst_prev = vst;
    end
    checks++;
    if (hst_n != NF * V * 3 + 1) begin failures++; $display("HST count %0d", hst_n); end
    checks++;
    if (vst_n != NF) begin failures++; $display("VST count %0d", vst_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge mclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
