// tb_clk_sync_gen: self-checking test of the clock & sync generator.
//
// A small timing (HBP 4, HACT 8, HFP 4 clocks; frames of 2+5+3 lines, later
// 1+4+6 lines) is run for several frames. The bench plays the frequency
// scaling block: before each porch line it asks at random for ratio 1 or 2,
// before each active line for ratio 1. It checks, against its own counters:
// every line lasts 16 source clocks whatever the ratio; the divided enable
// fires 16/ratio times per line, at the ratio requested before the line;
// VSYNC comes every frame length and picks up a new timing only at the frame
// boundary; data enable covers 8 clocks of each active line and none of a
// porch line; the gated clock has one rising edge per enabled cycle.
module tb_clk_sync_gen;
  import ddi_pkg::*;

  localparam int HBP = 4, HACT = 8, HFP = 4, HTOT = HBP + HACT + HFP;
  localparam int H_W = $clog2(HTOT + 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  vtiming_t cfg_in, cfg_cur;
  div_ratio_t ratio_req, ratio;
  logic ce, div_clk, line_start, frame_start, active_line, shift_win, de;
  logic [H_W-1:0] h_cnt;
  logic [V_W_DEF-1:0] v_cnt;

  int checks = 0, failures = 0;

  clk_sync_gen #(.HBP(HBP), .HACT(HACT), .HFP(HFP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  // reference state
  int cyc = 0, last_ls = -1;
  int exp_v = -1, vtot_ref = 0, vbp_ref = 0, vact_ref = 0;
  vtiming_t pend_cfg;
  int ce_in_line = 0, de_in_line = 0, line_ratio = 1, req_ratio = 1;
  int gclk_edges = 0, ce_total = 0;
  int n_div2_lines = 0, n_frames = 0;

  always @(posedge div_clk) if (rst_n) gclk_edges++;

  // ratio request for the next line, chosen in the middle of each line
  function automatic bit ref_active(int v);
    return v >= vbp_ref && v < vbp_ref + vact_ref;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (ce) ce_total++;
      if (ce && line_start) begin
        // close the previous line
        if (last_ls >= 0) begin
          check(cyc - last_ls == HTOT, $sformatf("line length %0d", cyc - last_ls));
          check(ce_in_line == HTOT / line_ratio, $sformatf("enables per line %0d at ratio %0d", ce_in_line, line_ratio));
          check(de_in_line == (ref_active(exp_v) ? HACT : 0), $sformatf("de per line %0d", de_in_line));
          if (line_ratio == 2) n_div2_lines++;
        end
        last_ls = cyc;
        ce_in_line = 0; de_in_line = 0;
        // advance the reference line counter
        if (exp_v < 0 || exp_v + 1 >= vtot_ref) begin
          exp_v = 0;
          vbp_ref = int'(pend_cfg.vbp); vact_ref = int'(pend_cfg.vact);
          vtot_ref = int'(pend_cfg.vbp) + int'(pend_cfg.vact) + int'(pend_cfg.vfp);
          n_frames++;
        end else exp_v++;
        check(frame_start == (exp_v == 0), "vsync position");
        check(int'(v_cnt) == exp_v, $sformatf("v_cnt %0d exp %0d", v_cnt, exp_v));
        check(active_line == ref_active(exp_v), "active_line");
        line_ratio = req_ratio;
        check(int'(ratio) == line_ratio, $sformatf("ratio %0d exp %0d", ratio, line_ratio));
      end
      if (ce) ce_in_line++;
      if (ce && de) de_in_line++;
      // in the middle of the line, choose the ratio for the next one
      if (ce && h_cnt == H_W'(HBP)) begin
        int nv;
        bit nact;
        nv = (exp_v + 1 >= vtot_ref) ? 0 : exp_v + 1;
        nact = (exp_v + 1 >= vtot_ref) ? (nv >= int'(cfg_in.vbp) && nv < int'(cfg_in.vbp) + int'(cfg_in.vact))
                                       : ref_active(nv);
        req_ratio = nact ? 1 : (($urandom % 4) != 0 ? 2 : 1);
        ratio_req <= div_ratio_t'(req_ratio);
      end
    end
  end

  initial begin
    cfg_in = '{vbp: 2, vact: 5, vfp: 3};
    pend_cfg = cfg_in;
    ratio_req = DIV1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // three frames with the first timing
    repeat (3 * 10 * HTOT - HTOT / 2) @(posedge clk);
    // change the timing in the middle of a line: it must apply at the next VSYNC
    cfg_in = '{vbp: 1, vact: 4, vfp: 6};
    pend_cfg = cfg_in;
    repeat (3 * 11 * HTOT + 5) @(posedge clk);
    check(n_frames >= 6, $sformatf("frames seen %0d", n_frames));
    check(n_div2_lines > 0, "no divided line seen");
    check(gclk_edges == ce_total, $sformatf("gated clock edges %0d enables %0d", gclk_edges, ce_total));
    $display("frames %0d, lines at ratio 2: %0d, gated edges %0d of %0d clocks", n_frames, n_div2_lines, gclk_edges, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
