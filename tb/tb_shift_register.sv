// tb_shift_register: self-checking test of the left/right shift registers.
//
// Small size: 4 words per half, 8-bit words, lines of 4+8+4 source clocks.
// The bench generates the line timing itself and runs, in order: an active
// line with new words (checks that word i of each half lands at index i and
// that line_load comes on the last shift, 8 clocks into the window); a porch
// line at ratio 1 (serial refresh, contents unchanged after the line, left
// half rotated while the right one waits); a porch line at ratio 2 (parallel
// refresh: both halves rotate together on every other clock, line_load after
// the same 8 source clocks, contents unchanged); then another active line.
module tb_shift_register;
  localparam int W = 8, HW = 4, HBP = 4, HACT = 2 * HW, HFP = 4, HTOT = HBP + HACT + HFP;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce, line_start, shift_win, active_line, par;
  logic [W-1:0] din;
  logic [W-1:0] left_q [HW];
  logic [W-1:0] right_q [HW];
  logic line_load;

  int checks = 0, failures = 0;
  logic [W-1:0] line_ref [2*HW];

  shift_register #(.WORD_W(W), .HW(HW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  task automatic check_contents(string tag, int rot_l, int rot_r);
    for (int i = 0; i < HW; i++) begin
      check(left_q[i]  == line_ref[(i + rot_l) % HW], $sformatf("%s left[%0d]", tag, i));
      check(right_q[i] == line_ref[HW + (i + rot_r) % HW], $sformatf("%s right[%0d]", tag, i));
    end
  endtask

  // Run one line of HTOT source clocks. ratio 1 or 2; act = active line.
  // Returns the source clock (from line start) at which line_load was seen.
  task automatic run_line(bit act, int ratio, bit new_data, output int load_at);
    load_at = -1;
    for (int h = 0; h < HTOT; h++) begin
      ce = ((h % ratio) == 0);
      line_start = (h == 0);
      shift_win = (h >= HBP) && (h < HBP + HACT);
      active_line = act;
      par = (ratio == 2);
      din = (act && shift_win) ? line_ref[h - HBP] : $urandom;
      @(posedge clk);
      #1;
      if (line_load) begin
        check(load_at < 0, "second line_load in a line");
        load_at = h;
      end
      // mid-line checks of the refresh order
      if (!act && ratio == 1 && h == HBP + 1) check_contents("serial, 2 left shifts", 2, 0);
      if (!act && ratio == 1 && h == HBP + HW + 2) check_contents("serial, 3 right shifts", 0, 3);
      if (!act && ratio == 2 && h == HBP + 2) check_contents("parallel, 2 shifts", 2, 2);
    end
  endtask

  int ld;
  initial begin
    ce = 0; line_start = 0; shift_win = 0; active_line = 0; par = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 2 * HW; i++) line_ref[i] = W'($urandom);
      run_line(1'b1, 1, 1'b1, ld);
      check(ld == HBP + HACT - 1, $sformatf("active load at %0d", ld));
      check_contents("after active line", 0, 0);
      run_line(1'b0, 1, 1'b0, ld);
      check(ld == HBP + HACT - 1, $sformatf("serial refresh load at %0d", ld));
      check_contents("after serial refresh", 0, 0);
      run_line(1'b0, 2, 1'b0, ld);
      check(ld == HBP + HACT - 2, $sformatf("parallel refresh load at %0d", ld));
      check_contents("after parallel refresh", 0, 0);
      run_line(1'b0, 2, 1'b0, ld);
      check_contents("after second parallel refresh", 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
