// tb_ddi_full: one image write frame and one self-refresh frame through the
// core at its full default size (1440 x 3200 pixels, 880 clocks per line,
// VBP = VFP = 8 lines, i.e. 60 Hz at 169.9 MHz).
//
// The bench streams a whole image (2,304,000 words, one per clock, generated
// from its address by a hash) during the first frame, which must therefore
// run at ratio 1 throughout. In the following self-refresh frame it checks
// every one of the 3200 latched image lines against the hash, that the 16
// porch lines run at ratio 2 and refresh the last line in parallel, that
// every line lasts 880 clocks, and it reports how many internal clock edges
// the frame used compared with an undivided frame.
module tb_ddi_full;
  import ddi_pkg::*;

  localparam int WORD_W = PIX_W_DEF * PPW_DEF, WPL = HSIZE_DEF / PPW_DEF, HW = WPL / 2;
  localparam int HTOT = HBP_DEF + WPL + HFP_DEF;
  localparam int VBP = 8, VFP = 8, VTOT = VBP + VSIZE_DEF + VFP;

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

  ddi_top dut (.*);

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
    repeat (3 * VTOT * HTOT + 10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WORD_W-1:0] pattern(int unsigned a);
    logic [63:0] x;
    x = {a * 32'h9E37_79B1, a ^ 32'h5A5A_5A5A};
    return x[WORD_W-1:0];
  endfunction

  int frame = 0, L = 0, h = 0, ce_line = 0, line_ratio = 1;
  int ce_frame = 0, div2_lines = 0, par_refresh = 0, lines_ok = 0, ratio1_porch_f1 = 0;
  bit done = 0;

  always @(posedge clk) if (rst_n && !done) begin
    if (hsync) begin
      if (frame > 0) check(h == HTOT, $sformatf("line %0d lasted %0d clocks", L, h));
      if (vsync) begin
        if (frame == 2) begin
          $display("self-refresh frame: %0d internal clock edges, %0d without scaling (%0.3f %% fewer)",
                   ce_frame, VTOT * HTOT, 100.0 * (VTOT * HTOT - ce_frame) / (VTOT * HTOT));
          check(ce_frame == VSIZE_DEF * HTOT + (VBP + VFP) * HTOT / 2, "clock edges in self-refresh frame");
          done = 1;
        end
        frame++; L = 0; ce_frame = 0;
      end else L++;
      h = 0;
      line_ratio = int'(ratio);
      if (frame == 1 && !(L >= VBP && L < VBP + VSIZE_DEF)) begin
        // image write frame: VBP line 0 was decided before the write began
        if (L > 0) check(ratio == DIV1, $sformatf("update frame porch line %0d at ratio %0d", L, ratio));
        if (ratio == DIV1) ratio1_porch_f1++;
      end
      if (frame == 2) begin
        check(int'(v_cnt) == L, "line counter");
        check(ratio == ((L >= VBP && L < VBP + VSIZE_DEF) ? DIV1 : DIV2), $sformatf("self-refresh line %0d ratio %0d", L, ratio));
        if (ratio == DIV2) div2_lines++;
      end
    end
    if (line_load && frame == 2) begin
      if (L >= VBP && L < VBP + VSIZE_DEF) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < WPL; i++)
          if ((i < HW ? left_line[i] : right_line[i - HW]) != pattern((L - VBP) * WPL + i)) ok = 0;
        check(ok, $sformatf("image line %0d", L - VBP));
        if (ok) lines_ok++;
      end else if (L >= VBP + VSIZE_DEF) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < WPL; i++)
          if ((i < HW ? left_line[i] : right_line[i - HW]) != pattern((VSIZE_DEF - 1) * WPL + i)) ok = 0;
        check(ok, $sformatf("porch line %0d does not hold the last line", L));
        if (ok && line_ratio == 2) par_refresh++;
      end
    end
    if (ce) ce_frame++;
    h++;
  end

  initial begin
    cfg_in = '{vbp: VBP, vact: VSIZE_DEF, vfp: VFP};
    scale_en = 1; img_sof = 0; img_valid = 0; img_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // wait for the first VSYNC, then stream the image, one word per clock
    do @(posedge clk); while (!vsync);
    repeat (20) @(posedge clk);
    for (int a = 0; a < VSIZE_DEF * WPL; a++) begin
      @(negedge clk);
      img_sof = (a == 0); img_valid = 1; img_data = pattern(a);
    end
    @(negedge clk);
    img_sof = 0; img_valid = 0;
    wait (done);
    $display("lines checked %0d, divided porch lines %0d, parallel refreshes %0d", lines_ok, div2_lines, par_refresh);
    check(lines_ok == VSIZE_DEF, "not all image lines seen");
    check(div2_lines == VBP + VFP, "divided porch lines");
    check(par_refresh == VFP, "parallel refreshes in the VFP");
    check(ratio1_porch_f1 >= VBP + VFP - 1, "update frame porch lines at ratio 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
