// tb_ddi_framerates: the frame-rate sweep (60, 30, 15, 10, 5 and 1 Hz).
//
// Frame rate is lowered by lengthening the vertical front porch: with
// 880-clock lines at 169.9 MHz, a frame of 3216 lines (VBP 8, 3200 image
// lines, VFP 8) is 60 Hz, and a frame of 3216 * 60 / f lines is f Hz. The
// bench keeps the full vertical size (3200 image lines and the real line
// counts) but shortens the lines to 16 clocks (16 pixels wide), which leaves
// the share of divided lines in a frame unchanged. After one image write
// frame it runs one self-refresh frame per rate and checks the number of
// internal clock edges in the frame: every porch line uses half of its
// clocks, so the edges saved are (VBP + VFP) * 8 per frame. It prints the
// share of clock edges saved per rate, and checks that the share grows as
// the frame rate drops.
module tb_ddi_framerates;
  import ddi_pkg::*;

  localparam int HSIZE = 16, PPW = 2, PIX_W = 8, HBP = 4, HFP = 4;
  localparam int WORD_W = PIX_W * PPW, WPL = HSIZE / PPW, HW = WPL / 2;
  localparam int HTOT = HBP + WPL + HFP;
  localparam int VSIZE = VSIZE_DEF, VBP = 8, VTOT60 = VBP + VSIZE + 8;
  localparam int NRATES = 6;
  localparam int RATES [NRATES] = '{60, 30, 15, 10, 5, 1};

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
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count enabled (internal clock) cycles and lines between VSYNCs
  int ce_cnt = 0, line_cnt = 0, div2_cnt = 0, last_ce = 0, last_lines = 0, last_div2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (hsync && vsync) begin
      last_ce = ce_cnt; last_lines = line_cnt; last_div2 = div2_cnt;
      ce_cnt = 0; line_cnt = 0; div2_cnt = 0;
    end
    if (hsync) begin
      line_cnt++;
      if (ratio == DIV2) div2_cnt++;
    end
    if (ce) ce_cnt++;
  end

  task automatic next_vsync();
    do @(posedge clk); while (!(hsync && vsync));
  endtask

  real saved [NRATES];
  initial begin
    int vfp;
    cfg_in = '{vbp: VBP, vact: VSIZE, vfp: 8};
    scale_en = 1; img_sof = 0; img_valid = 0; img_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    next_vsync();
    repeat (5) @(posedge clk);
    for (int a = 0; a < VSIZE * WPL; a++) begin
      @(negedge clk);
      img_sof = (a == 0); img_valid = 1; img_data = WORD_W'(a * 7 + 1);
    end
    @(negedge clk);
    img_sof = 0; img_valid = 0;
    for (int r = 0; r < NRATES; r++) begin
      vfp = VTOT60 * 60 / RATES[r] - VBP - VSIZE;
      @(negedge clk) cfg_in.vfp = V_W_DEF'(vfp);
      next_vsync();   // a timing set before this VSYNC applies to the frame it starts
      next_vsync();   // that frame has ended
      @(negedge clk); // let the frame counters settle
      check(last_lines == VBP + VSIZE + vfp, $sformatf("%0d Hz: %0d lines", RATES[r], last_lines));
      check(last_div2 == VBP + vfp, $sformatf("%0d Hz: %0d divided lines", RATES[r], last_div2));
      check(last_ce == VSIZE * HTOT + (VBP + vfp) * HTOT / 2,
            $sformatf("%0d Hz: %0d internal clock edges", RATES[r], last_ce));
      saved[r] = 100.0 * real'(last_lines * HTOT - last_ce) / real'(last_lines * HTOT);
      $display("%2d Hz: %6d lines/frame (VFP %6d), %5.2f %% of internal clock edges removed",
               RATES[r], last_lines, vfp, saved[r]);
      if (r > 0) check(saved[r] > saved[r-1], "saving must grow as the frame rate drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
