// clk_sync_gen: system clock & sync generator with internal clock dividing.
//
// The generator produces the display timing of Fig. "basic control scheme":
// each line is HBP + HACT + HFP source-clock periods long, each frame is
// VBP + VACT + VFP lines long. It also divides the internal clock: `ce` is a
// clock enable that is high on every source cycle at ratio 1 and on every
// second cycle at ratio 2; `div_clk` is the same enable turned into a gated
// clock through clk_gate. All registers of the core are clocked by `clk` and
// update only when `ce` is high, which is what they would do on `div_clk`.
//
// The horizontal counter advances by the current ratio on each divided cycle,
// so a line keeps the same length in time (HTOTAL source periods) whatever
// the ratio. The ratio requested by the frequency scaling block is taken at
// the end of each line and applies from the next HSYNC on, so dividing starts
// at the first HSYNC of the porch and stops at the first HSYNC of the active
// period. The divider phase restarts at every line, so HSYNC always falls on
// a divided edge. HBP, HACT and HFP must be even for ratio 2.
//
// The vertical timing (cfg_in) is taken at the start of every frame; a new
// frame rate therefore applies from the next VSYNC. Strobes (line_start =
// HSYNC, frame_start = VSYNC) are high for the one divided cycle that starts
// the line or frame and must be qualified with ce. h_cnt counts source-clock
// periods from the start of the line.
//
// Published: clock dividing inside the DDI, a ratio received from the
// frequency scaling block, dividing from the first HSYNC of the porch,
// constant line time. Own choices: the enable/ICG realisation, the counter
// layout, frame-boundary update of the vertical timing, reset state.
module clk_sync_gen
  import ddi_pkg::*;
#(
  parameter int unsigned HBP   = HBP_DEF,
  parameter int unsigned HACT  = HSIZE_DEF / PPW_DEF,  // shift window, source clocks
  parameter int unsigned HFP   = HFP_DEF,
  localparam int unsigned HTOTAL = HBP + HACT + HFP,
  localparam int unsigned H_W    = $clog2(HTOTAL + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  vtiming_t         cfg_in,       // vertical timing for the next frame
  input  div_ratio_t       ratio_req,    // ratio for the next line
  output logic             ce,           // divided clock enable
  output logic             div_clk,      // divided (gated) internal clock
  output div_ratio_t       ratio,        // ratio of the current line
  output vtiming_t         cfg_cur,      // vertical timing of the current frame
  output logic [H_W-1:0]   h_cnt,        // position in line, source periods
  output logic [V_W_DEF-1:0] v_cnt,      // line number in frame (0 = first VBP line)
  output logic             line_start,   // HSYNC
  output logic             frame_start,  // VSYNC
  output logic             active_line,  // current line carries image data
  output logic             shift_win,    // h_cnt inside the HACT window
  output logic             de            // data enable: shift window of an active line
);

  if ((HBP % 2) != 0 || (HACT % 2) != 0 || (HFP % 2) != 0) begin : g_chk_even
    $error("clk_sync_gen: HBP, HACT and HFP must be even for divide-by-2");
  end

  logic [1:0]  div_cnt;
  logic        line_end;
  logic        frame_end;
  div_ratio_t  ratio_nxt_line;
  logic [V_W_DEF+1:0] vtotal;

  assign ce        = (div_cnt == 2'd0);
  assign line_end  = ce && ({1'b0, h_cnt} + (H_W+1)'(ratio) >= (H_W+1)'(HTOTAL));
  assign vtotal    = (V_W_DEF+2)'(cfg_cur.vbp) + (V_W_DEF+2)'(cfg_cur.vact) + (V_W_DEF+2)'(cfg_cur.vfp);
  assign frame_end = ({2'b0, v_cnt} + 1'b1 >= vtotal);
  assign ratio_nxt_line = (ratio_req == DIV2) ? DIV2 : DIV1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      ratio   <= DIV1;
      h_cnt   <= H_W'(HTOTAL - 1);   // first cycle ends a dummy line
      v_cnt   <= '1;                 // ... which is the last line of a frame
      cfg_cur <= '0;
    end else begin
      if (ce) div_cnt <= ratio - 2'd1;   // length of the period that starts now
      else    div_cnt <= div_cnt - 2'd1;

      if (line_end) begin
        h_cnt <= '0;
        ratio <= ratio_nxt_line;
        if (frame_end) begin
          v_cnt   <= '0;
          cfg_cur <= cfg_in;
        end else begin
          v_cnt <= v_cnt + 1'b1;
        end
      end else if (ce) begin
        h_cnt <= h_cnt + H_W'(ratio);
      end
    end
  end

  assign line_start  = ce && (h_cnt == '0);
  assign frame_start = line_start && (v_cnt == '0);
  assign active_line = ({2'b0, v_cnt} >= (V_W_DEF+2)'(cfg_cur.vbp)) &&
                       ({2'b0, v_cnt} <  (V_W_DEF+2)'(cfg_cur.vbp) + (V_W_DEF+2)'(cfg_cur.vact));
  assign shift_win   = (h_cnt >= H_W'(HBP)) && (h_cnt < H_W'(HBP + HACT));
  assign de          = active_line && shift_win;

  clk_gate u_icg (.clk(clk), .en(ce), .gclk(div_clk));

  // Image lines must run at the full clock: the shift register needs every
  // cycle of the window to load a new line.
  a_active_full_rate: assert property (@(posedge clk) disable iff (!rst_n)
      ce && active_line |-> ratio == DIV1);
  a_ratio_legal: assert property (@(posedge clk) disable iff (!rst_n)
      ratio == DIV1 || ratio == DIV2);

endmodule
