// ddi_top: digital core of a display driver IC with idle-period frequency
// scaling.
//
// The AP writes images into graphic memory (ddi_function). The clock & sync
// generator (clk_sync_gen) produces HSYNC/VSYNC and the line and frame
// structure; every active line is read from graphic memory into the left and
// right shift registers and latched by the column driver (line_load). In the
// porch (idle) lines no image data is processed, but the last line keeps
// being refreshed through the shift registers. The frequency scaling block
// (freq_scaling) requests a dividing ratio of 2 for porch lines of frames in
// which the AP writes nothing (self-refresh frames); the generator then
// halves the internal clock from the next HSYNC on and the shift registers
// work their two halves in parallel so that the line time is unchanged.
//
// Interface: cfg_in sets the vertical timing (VBP, active lines, VFP) for the
// next frame, which sets the frame rate; scale_en enables scaling. The AP
// stream is img_sof / img_valid / img_data. The column and row driver are
// analog and lie outside: they receive left_line / right_line with the
// line_load strobe, and the line number v_cnt. ce is the divided-clock enable
// and div_clk the gated divided clock; ratio tells the current ratio.
//
// Defaults: 1440 x 3200 pixels (published), 24-bit pixels, two pixels per
// word, HBP = HFP = 80 clocks, 880 clocks per line (own choices). At the
// published 169.9 MHz and VBP = VFP = 8 lines that is 60.03 Hz; larger VFP
// values give the lower frame rates.
module ddi_top
  import ddi_pkg::*;
#(
  parameter int unsigned HSIZE = HSIZE_DEF,
  parameter int unsigned VSIZE = VSIZE_DEF,
  parameter int unsigned PIX_W = PIX_W_DEF,
  parameter int unsigned PPW   = PPW_DEF,
  parameter int unsigned HBP   = HBP_DEF,
  parameter int unsigned HFP   = HFP_DEF,
  localparam int unsigned WORD_W = PIX_W * PPW,
  localparam int unsigned WPL    = HSIZE / PPW,
  localparam int unsigned HW     = WPL / 2,
  localparam int unsigned H_W    = $clog2(HBP + WPL + HFP + 2)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  vtiming_t           cfg_in,
  input  logic               scale_en,
  // AP image stream
  input  logic               img_sof,
  input  logic               img_valid,
  input  logic [WORD_W-1:0]  img_data,
  // timing outputs
  output logic               hsync,
  output logic               vsync,
  output logic               de,
  output logic               ce,
  output logic               div_clk,
  output div_ratio_t         ratio,
  output logic               active_line,
  output logic [V_W_DEF-1:0] v_cnt,
  output logic               update_frame,
  // to the column driver
  output logic [WORD_W-1:0]  left_line  [HW],
  output logic [WORD_W-1:0]  right_line [HW],
  output logic               line_load
);

  if ((WPL % 2) != 0) begin : g_chk_wpl
    $error("ddi_top: words per line must be even");
  end

  vtiming_t        cfg_cur;
  div_ratio_t      ratio_req;
  logic [H_W-1:0]  h_cnt;
  logic            shift_win;
  logic            img_update;
  logic            porch_next;
  logic [WORD_W-1:0] pix_word;

  clk_sync_gen #(.HBP(HBP), .HACT(WPL), .HFP(HFP)) u_sync (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_in      (cfg_in),
    .ratio_req   (ratio_req),
    .ce          (ce),
    .div_clk     (div_clk),
    .ratio       (ratio),
    .cfg_cur     (cfg_cur),
    .h_cnt       (h_cnt),
    .v_cnt       (v_cnt),
    .line_start  (hsync),
    .frame_start (vsync),
    .active_line (active_line),
    .shift_win   (shift_win),
    .de          (de)
  );

  freq_scaling u_fs (
    .clk          (clk),
    .rst_n        (rst_n),
    .scale_en     (scale_en),
    .cfg_cur      (cfg_cur),
    .cfg_next     (cfg_in),
    .v_cnt        (v_cnt),
    .frame_start  (vsync),
    .ce           (ce),
    .img_update   (img_update),
    .ratio_req    (ratio_req),
    .porch_next   (porch_next),
    .update_frame (update_frame)
  );

  ddi_function #(.WORD_W(WORD_W), .WPL(WPL), .VSIZE(VSIZE), .HBP(HBP), .H_W(H_W)) u_func (
    .clk         (clk),
    .rst_n       (rst_n),
    .img_sof     (img_sof),
    .img_valid   (img_valid),
    .img_data    (img_data),
    .img_update  (img_update),
    .cfg_cur     (cfg_cur),
    .ce          (ce),
    .h_cnt       (h_cnt),
    .v_cnt       (v_cnt),
    .active_line (active_line),
    .dout        (pix_word)
  );

  shift_register #(.WORD_W(WORD_W), .HW(HW)) u_sr (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (ce),
    .line_start  (hsync),
    .shift_win   (shift_win),
    .active_line (active_line),
    .par         (ratio == DIV2),
    .din         (pix_word),
    .left_q      (left_line),
    .right_q     (right_line),
    .line_load   (line_load)
  );

  // porch_next is a status output of freq_scaling kept for observation.
  logic unused_ok;
  assign unused_ok = porch_next;

endmodule
