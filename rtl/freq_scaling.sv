// freq_scaling: idle-period frequency scaling controller.
//
// For the line that will start at the next HSYNC, the block decides whether
// it is a porch (idle) line or an active line, from the resolution (VACT) and
// the VBP / VFP line counts set for the current frame rate, and hands the
// clock & sync generator a dividing ratio: PORCH_DIV (2) for porch lines,
// 1 for active lines. The generator samples the ratio at the end of each
// line, so the choice here is registered one cycle after v_cnt changes and
// is stable for the whole line before it is used.
//
// Scaling is not allowed in an image update frame, i.e. a frame during
// which the AP writes graphic memory (img_update high). Once a write has been
// seen in a frame, every later line of that frame runs at ratio 1 (Fig.
// "scaling sequence": no scaling in the image write frame, scaling in the
// following self-refresh frame). The frame flag is cleared at VSYNC, or kept
// set when the write is still going on. The decision for the first line of
// the next frame uses the next frame's timing (cfg_next) and the write status
// alone. scale_en turns the feature off (ratio 1 everywhere).
//
// Published: porch/active classification from resolution and VBP/VFP, the
// dividing ratio of 2 in the porch, no scaling in image update frames. Own
// choices: the look-ahead by one line, the write-activity based frame flag,
// the scale_en switch.
module freq_scaling
  import ddi_pkg::*;
#(
  parameter int unsigned DIV_PORCH = PORCH_DIV
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               scale_en,     // feature enable
  input  vtiming_t           cfg_cur,      // timing of the running frame
  input  vtiming_t           cfg_next,     // timing the next frame will take
  input  logic [V_W_DEF-1:0] v_cnt,        // current line number
  input  logic               frame_start,  // VSYNC strobe (qualified by ce)
  input  logic               ce,
  input  logic               img_update,   // AP image write in progress
  output div_ratio_t         ratio_req,    // ratio for the next line
  output logic               porch_next,   // next line is a porch line
  output logic               update_frame  // running frame is an image update frame
);

  if (DIV_PORCH != 1 && DIV_PORCH != 2) begin : g_chk_div
    $error("freq_scaling: the shift register supports dividing ratios 1 and 2 only");
  end

  logic               last_line;
  logic [V_W_DEF+1:0] next_line;
  logic [V_W_DEF-1:0] n_vbp, n_vact;   // timing that applies to the next line
  logic               frame_dirty;
  logic               allow;
  logic               porch_n;

  assign last_line = ({2'b0, v_cnt} + 1'b1 >=
                      (V_W_DEF+2)'(cfg_cur.vbp) + (V_W_DEF+2)'(cfg_cur.vact) + (V_W_DEF+2)'(cfg_cur.vfp));
  assign next_line = last_line ? '0 : {2'b0, v_cnt} + 1'b1;
  assign n_vbp     = last_line ? cfg_next.vbp  : cfg_cur.vbp;
  assign n_vact    = last_line ? cfg_next.vact : cfg_cur.vact;
  assign porch_n   = (next_line <  (V_W_DEF+2)'(n_vbp)) ||
                     (next_line >= (V_W_DEF+2)'(n_vbp) + (V_W_DEF+2)'(n_vact));
  assign allow     = scale_en && !img_update && (last_line || !frame_dirty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_dirty <= 1'b0;
      ratio_req   <= DIV1;
      porch_next  <= 1'b0;
    end else begin
      if (ce && frame_start) frame_dirty <= img_update;
      else if (img_update)   frame_dirty <= 1'b1;
      ratio_req  <= (porch_n && allow) ? div_ratio_t'(DIV_PORCH) : DIV1;
      porch_next <= porch_n;
    end
  end

  assign update_frame = frame_dirty || img_update;

endmodule
