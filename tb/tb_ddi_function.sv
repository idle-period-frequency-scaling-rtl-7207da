// tb_ddi_function: self-checking test of the AP-to-shift-register image path.
//
// Small size: 8 words per line, 4 lines, HBP 3. The bench streams an image in
// (with gaps in img_valid), checks that img_update is high from the start of
// the image until its last word, then generates the line timing and checks
// that during each active line the k-th cycle of the shift window
// (h = HBP + k) carries word k of the right image line, and that porch lines
// read nothing. A second image overwrites the first and is checked the same
// way.
module tb_ddi_function;
  import ddi_pkg::*;
  localparam int W = 12, WPL = 8, VS = 4, HBP = 3, HFP = 3, HTOT = HBP + WPL + HFP;
  localparam int H_W = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic img_sof, img_valid;
  logic [W-1:0] img_data;
  logic img_update;
  vtiming_t cfg_cur;
  logic ce;
  logic [H_W-1:0] h_cnt;
  logic [V_W_DEF-1:0] v_cnt;
  logic active_line;
  logic [W-1:0] dout;

  int checks = 0, failures = 0;
  logic [W-1:0] img [VS*WPL];

  ddi_function #(.WORD_W(W), .WPL(WPL), .VSIZE(VS), .HBP(HBP), .H_W(H_W)) dut (.*);

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

  task automatic send_image();
    int n;
    n = 0;
    for (int i = 0; i < VS * WPL; i++) img[i] = W'($urandom);
    while (n < VS * WPL) begin
      img_valid = (n == 0) || ($urandom % 3 != 0);
      img_sof = (n == 0);
      img_data = img_valid ? img[n] : W'($urandom);
      @(posedge clk); #1;
      if (img_valid) n++;
      check(img_update == (n < VS * WPL), $sformatf("img_update after %0d words", n));
    end
    img_valid = 0; img_sof = 0;
    repeat (3) @(posedge clk); #1;
    check(!img_update, "img_update low after image");
  endtask

  task automatic show_frame();
    int vtot;
    vtot = int'(cfg_cur.vbp) + int'(cfg_cur.vact) + int'(cfg_cur.vfp);
    for (int v = 0; v < vtot; v++) begin
      for (int h = 0; h < HTOT; h++) begin
        ce = 1; h_cnt = H_W'(h); v_cnt = V_W_DEF'(v);
        active_line = (v >= int'(cfg_cur.vbp)) && (v < int'(cfg_cur.vbp + cfg_cur.vact));
        if (active_line && h >= HBP && h < HBP + WPL)
          check(dout == img[(v - int'(cfg_cur.vbp)) * WPL + (h - HBP)],
                $sformatf("line %0d word %0d: %h", v, h - HBP, dout));
        if (!active_line && h == HBP + 2)
          check(dut.re == 1'b0, "no read in porch");
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    img_sof = 0; img_valid = 0; img_data = '0;
    cfg_cur = '{vbp: 2, vact: VS, vfp: 2};
    ce = 1; h_cnt = '0; v_cnt = '0; active_line = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(!img_update, "idle after reset");
    send_image();
    show_frame();
    show_frame();
    send_image();
    show_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
