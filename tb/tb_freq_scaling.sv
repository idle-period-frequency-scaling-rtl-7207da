// tb_freq_scaling: self-checking test of the frequency scaling controller.
//
// The bench walks v_cnt through frames of a small vertical timing (3 VBP,
// 5 active, 4 VFP lines, then a frame with other numbers) and checks, one
// cycle after each step, the requested ratio against a reference computed
// here: 2 when the next line is a porch line and the frame is a
// self-refresh frame with scaling enabled, 1 otherwise. It covers the frame
// wrap with a new timing, an image write that starts in the middle of a
// frame, a write that lasts into the next frame, and scale_en low.
module tb_freq_scaling;
  import ddi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic scale_en;
  vtiming_t cfg_cur, cfg_next;
  logic [V_W_DEF-1:0] v_cnt;
  logic frame_start, ce, img_update;
  div_ratio_t ratio_req;
  logic porch_next, update_frame;

  int checks = 0, failures = 0;
  int n_div2 = 0, n_blocked = 0;

  freq_scaling dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state
  logic dirty_ref;

  function automatic int total(vtiming_t c);
    return int'(c.vbp) + int'(c.vact) + int'(c.vfp);
  endfunction

  // Apply one line: set v_cnt (frame_start on line 0), wait, check.
  task automatic step_line(int v, bit upd, string tag);
    bit last, porch, allow;
    int nxt;
    vtiming_t cn;
    v_cnt = V_W_DEF'(v);
    frame_start = (v == 0);
    img_update = upd;
    ce = 1'b1;
    // reference: classification of the next line
    last  = (v + 1 >= total(cfg_cur));
    nxt   = last ? 0 : v + 1;
    cn    = last ? cfg_next : cfg_cur;
    porch = (nxt < int'(cn.vbp)) || (nxt >= int'(cn.vbp) + int'(cn.vact));
    allow = scale_en && !upd && (last || !dirty_ref);
    @(posedge clk);
    // reference dirty update (same edge)
    if (v == 0) dirty_ref = upd; else if (upd) dirty_ref = 1'b1;
    #1;
    checks++;
    if (ratio_req !== ((porch && allow) ? DIV2 : DIV1) || porch_next !== porch) begin
      failures++;
      $display("FAIL %s v=%0d ratio=%0d porch_next=%0b exp porch=%0b allow=%0b", tag, v, ratio_req, porch_next, porch, allow);
    end
    if (ratio_req == DIV2) n_div2++;
    if (porch && !allow && scale_en) n_blocked++;
    checks++;
    if (update_frame !== (dirty_ref || upd)) begin
      failures++;
      $display("FAIL %s update_frame v=%0d", tag, v);
    end
    frame_start = 1'b0;
    // hold the line a few cycles: the output must not change within a line
    // (the frame flag has now taken this line's value, as the clock
    // generator will see it at the end of the line)
    allow = scale_en && !upd && (last || !dirty_ref);
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (ratio_req !== ((porch && allow) ? DIV2 : DIV1)) begin
      failures++;
      $display("FAIL %s hold v=%0d", tag, v);
    end
  endtask

  initial begin
    scale_en = 1'b1; img_update = 1'b0; ce = 1'b1; frame_start = 1'b0;
    cfg_cur  = '{vbp: 3, vact: 5, vfp: 4};
    cfg_next = cfg_cur;
    v_cnt = '0; dirty_ref = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Frame A: self-refresh
    for (int v = 0; v < 12; v++) step_line(v, 1'b0, "A");
    // Frame B: image write starts in line 6 (active) and ends in line 9
    for (int v = 0; v < 12; v++) step_line(v, (v >= 6 && v <= 9), "B");
    // Frame C: write from line 10 lasting into frame D line 1
    cfg_next = '{vbp: 2, vact: 4, vfp: 7};
    for (int v = 0; v < 12; v++) step_line(v, (v >= 10), "C");
    cfg_cur = cfg_next;
    for (int v = 0; v < 13; v++) step_line(v, (v <= 1), "D");
    // Frame E: self-refresh again with the new timing
    for (int v = 0; v < 13; v++) step_line(v, 1'b0, "E");
    // Frame F: feature off
    scale_en = 1'b0;
    for (int v = 0; v < 13; v++) step_line(v, 1'b0, "F");
    checks++;
    if (n_div2 == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL coverage div2=%0d blocked=%0d", n_div2, n_blocked);
    end
    $display("lines at ratio 2: %0d, porch lines kept at ratio 1 by an update: %0d", n_div2, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
