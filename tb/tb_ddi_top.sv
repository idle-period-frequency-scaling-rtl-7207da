// tb_ddi_top: end-to-end test of the display driver core with idle-period
// frequency scaling, at a reduced size.
//
// Size: 16 x 6 pixels, 8-bit pixels, two pixels per word (8 words per line,
// 4 per shift register half), HBP = HFP = 4 clocks, so a line is 16 clocks.
// The bench plays the AP: it streams images into the core and changes the
// frame timing. Against its own reference (line counter, frame flag, image
// copy) it checks for every line:
//  * the line lasts 16 clocks and v_cnt / VSYNC / active_line are right;
//  * the ratio is 2 exactly for porch lines of frames without image writes
//    (scale_en high), 1 otherwise, switching only at HSYNC;
//  * the divided enable fires 16/ratio times in the line;
//  * line_load comes once per line at the expected clock, and the latched
//    halves hold the image line of an active line or, in a porch line, the
//    last image line again.
// The scenario: an image write frame (random image), self-refresh frames at
// one frame rate, a lower frame rate (longer VFP), an image write starting in
// the VFP (all white), one running across a VSYNC (4x1 checkerboard), and a
// frame with scaling disabled. Each mechanism (divided porch line, parallel
// refresh, serial refresh, scaling held off by an update, frame-rate change,
// scale_en off) is counted and must occur.
module tb_ddi_top;
  import ddi_pkg::*;

  localparam int HSIZE = 16, VSIZE = 6, PIX_W = 8, PPW = 2, HBP = 4, HFP = 4;
  localparam int WORD_W = PIX_W * PPW, WPL = HSIZE / PPW, HW = WPL / 2;
  localparam int HTOT = HBP + WPL + HFP;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  vtiming_t cfg_in;
  logic scale_en;
  logic img_sof, img_valid;
  logic [WORD_W-1:0] img_data;
  logic hsync, vsync, de, ce, div_clk, active_line, update_frame, line_load;
  div_ratio_t ratio;
  logic [V_W_DEF-1:0] v_cnt;
  logic [WORD_W-1:0] left_line [HW];
  logic [WORD_W-1:0] right_line [HW];

  ddi_top #(.HSIZE(HSIZE), .VSIZE(VSIZE), .PIX_W(PIX_W), .PPW(PPW), .HBP(HBP), .HFP(HFP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [WORD_W-1:0] ref_gram [VSIZE*WPL];
  logic [WORD_W-1:0] exp_line [WPL];
  bit   written [VSIZE*WPL];   // memory word written since reset
  bit   exp_known [WPL];
  logic [WORD_W-1:0] last_line [WPL];
  bit   last_valid = 0, uncertain = 0;
  int   wr_cnt = 0;
  bit   writing = 0, prev_writing = 0, dirty = 0, prev_dirty = 0;
  bit   prev_scale_en = 0;
  int   quiet = 0;               // clocks since writing / scale_en last changed
  vtiming_t fcfg;                // timing of the running frame
  vtiming_t prev_cfg_in;         // cfg_in as it was before this edge
  int   L = -1, vtot = 0, h = 0, line_ratio = 1, ce_in_line = 0, loads_in_line = 0;
  int   frames = 0, prev_vtot = 0;
  int   cyc = 0, ce_total = 0, gclk_edges = 0;
  // mechanism counters
  int   n_div2 = 0, n_par_refresh = 0, n_ser_refresh = 0, n_held = 0, n_rate_change = 0,
        n_off = 0, n_update_frames = 0, n_active_loads = 0, n_words_checked = 0;

  function automatic bit is_active(int l);
    return l >= int'(fcfg.vbp) && l < int'(fcfg.vbp) + int'(fcfg.vact);
  endfunction

  always @(posedge div_clk) if (rst_n) gclk_edges++;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ce) ce_total++;
    // --- line boundary ---
    if (hsync) begin
      if (L >= 0) begin
        check(h == HTOT, $sformatf("line %0d lasted %0d clocks", L, h));
        check(ce_in_line == HTOT / line_ratio, $sformatf("line %0d: %0d enables at ratio %0d", L, ce_in_line, line_ratio));
        check(loads_in_line == 1, $sformatf("line %0d: %0d line loads", L, loads_in_line));
      end
      if (L < 0 || L + 1 >= vtot) begin
        L = 0;
        fcfg = prev_cfg_in;
        prev_vtot = vtot;
        vtot = int'(fcfg.vbp) + int'(fcfg.vact) + int'(fcfg.vfp);
        if (frames > 1 && vtot != prev_vtot) n_rate_change++;
        frames++;
      end else L++;
      check(vsync == (L == 0), "VSYNC position");
      check(int'(v_cnt) == L, $sformatf("v_cnt %0d expected %0d", v_cnt, L));
      check(active_line == is_active(L), $sformatf("active_line on line %0d", L));
      // expected ratio, decided from the state at the end of the previous line
      line_ratio = int'(ratio);
      if (frames > 1 && quiet > 3) begin
        bit exp2;
        exp2 = !is_active(L) && prev_scale_en && !prev_writing && (L == 0 || !prev_dirty);
        check(int'(ratio) == (exp2 ? 2 : 1), $sformatf("frame %0d line %0d ratio %0d expected %0d", frames, L, ratio, exp2 ? 2 : 1));
        if (!is_active(L) && prev_scale_en && !exp2) n_held++;
        if (!is_active(L) && !prev_scale_en) n_off++;
      end
      if (ratio == DIV2) n_div2++;
      h = 0; ce_in_line = 0; loads_in_line = 0;
      if (is_active(L)) begin
        for (int i = 0; i < WPL; i++) begin
          exp_line[i]  = ref_gram[(L - int'(fcfg.vbp)) * WPL + i];
          exp_known[i] = written[(L - int'(fcfg.vbp)) * WPL + i];
        end
        uncertain = 0;
      end
      // frame flag of the reference
      if (L == 0) begin
        dirty = writing;
        if (writing) n_update_frames++;
      end
    end
    if (writing) begin
      if (!dirty && L != 0) n_update_frames++;
      dirty = 1;
    end
    // --- AP write stream into the reference memory ---
    if (img_valid && (img_sof || writing)) begin
      int a;
      a = img_sof ? 0 : wr_cnt;
      ref_gram[a] = img_data;
      written[a] = 1;
      if (is_active(L) && (a / WPL) == L - int'(fcfg.vbp)) uncertain = 1;
      wr_cnt = a + 1;
      writing = (wr_cnt < VSIZE * WPL);
    end else if (img_sof) begin
      wr_cnt = 0; writing = 1;
    end
    if (writing != prev_writing || scale_en != prev_scale_en) quiet = 0; else quiet++;
    // --- shift register output ---
    if (line_load) begin
      loads_in_line++;
      check(h == HBP + WPL - line_ratio + 1, $sformatf("line_load at clock %0d, ratio %0d", h, line_ratio));
      if (is_active(L)) begin
        n_active_loads++;
        for (int i = 0; i < WPL; i++) begin
          if (!uncertain && exp_known[i]) n_words_checked++;
          if (!uncertain && exp_known[i])
            check((i < HW ? left_line[i] : right_line[i - HW]) == exp_line[i],
                  $sformatf("line %0d word %0d", L, i));
          last_line[i] = i < HW ? left_line[i] : right_line[i - HW];
        end
        last_valid = 1;
      end else begin
        if (line_ratio == 2) n_par_refresh++; else n_ser_refresh++;
        if (last_valid)
          for (int i = 0; i < WPL; i++)
            check((i < HW ? left_line[i] : right_line[i - HW]) == last_line[i],
                  $sformatf("porch line %0d word %0d not refreshed", L, i));
      end
    end
    if (ce) ce_in_line++;
    h++;
    prev_writing = writing;
    prev_dirty = dirty;
    prev_scale_en = scale_en;
    prev_cfg_in = cfg_in;
  end

  // ---------------- stimulus (the AP) ----------------
  // Image kinds: 0 random, 1 white, 2 4x1 checkerboard (pixels alternate
  // black/white along a line, and the phase flips every line).
  task automatic send_image(int kind);
    int n;
    n = 0;
    while (n < VSIZE * WPL) begin
      @(negedge clk);
      img_sof = (n == 0);
      img_valid = (n == 0) || ($urandom % 4 != 0);
      case (kind)
        1: img_data = '1;
        2: for (int p = 0; p < PPW; p++)
             img_data[p*PIX_W +: PIX_W] = ((((n % WPL) * PPW + p) + (n / WPL)) % 2 == 1) ? '1 : '0;
        default: img_data = WORD_W'($urandom);
      endcase
      if (img_valid) n++;
    end
    @(negedge clk);
    img_sof = 0; img_valid = 0;
  endtask

  task automatic wait_line(int l, int clocks);
    do @(posedge clk); while (!(hsync && int'(v_cnt) == l));
    repeat (clocks) @(posedge clk);
  endtask

  task automatic wait_frames(int n);
    repeat (n) begin
      do @(posedge clk); while (!vsync);
    end
  endtask

  initial begin
    foreach (written[i]) written[i] = 0;
    cfg_in = '{vbp: 2, vact: V_W_DEF'(VSIZE), vfp: 3};
    scale_en = 1; img_sof = 0; img_valid = 0; img_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // image write frame
    wait_frames(1);
    wait_line(0, 5);
    send_image(0);
    // two self-refresh frames
    wait_frames(3);
    // lower frame rate: VFP 3 -> 14 lines
    @(negedge clk) cfg_in = '{vbp: 2, vact: V_W_DEF'(VSIZE), vfp: 14};
    wait_frames(3);
    // an image write that starts inside the VFP
    wait_line(12, 7);
    send_image(1);
    wait_frames(2);
    // an image write that runs across VSYNC
    wait_line(20, 3);
    send_image(2);
    wait_frames(2);
    // scaling switched off for one frame
    wait_line(3, 2);
    scale_en = 0;
    wait_frames(2);
    scale_en = 1;
    wait_frames(2);

    $display("frames %0d: divided lines %0d, parallel refreshes %0d, serial refreshes %0d, active loads %0d",
             frames, n_div2, n_par_refresh, n_ser_refresh, n_active_loads);
    $display("porch lines held at ratio 1 by an update %0d, update frames %0d, frame-rate changes %0d, lines with scaling off %0d",
             n_held, n_update_frames, n_rate_change, n_off);
    $display("divided clock edges %0d of %0d source clocks", gclk_edges, cyc);
    check(n_words_checked >= 10 * VSIZE * WPL, $sformatf("only %0d image words checked", n_words_checked));
    check(n_div2 > 0, "no divided porch line");
    check(n_par_refresh > 0, "no parallel refresh");
    check(n_ser_refresh > 0, "no serial refresh");
    check(n_held > 0, "scaling never held off by an image update");
    check(n_update_frames >= 3, "image update frames");
    check(n_rate_change > 0, "no frame-rate change");
    check(n_off > 0, "scale_en off never seen");
    check(gclk_edges == ce_total, "gated clock edges differ from enables");
    check(gclk_edges < cyc, "clock never divided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
