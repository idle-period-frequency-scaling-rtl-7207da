// ddi_function: image path of the DDI between the AP and the shift register.
//
// Write side: the AP streams one image as words (PPW pixels each, line after
// line, left to right). img_sof marks the first word of an image and restarts
// the write address; img_valid qualifies each word. img_update is high from
// img_sof until the last word of the image (vact lines) has been written; the
// frequency scaling block uses it to recognise an image update frame.
//
// Read side: during every active line, the block reads that line from graphic
// memory one word per clock, one clock ahead of the shift window, so that the
// word read at h_cnt = HBP-1+k reaches dout during h_cnt = HBP+k, the k-th
// cycle of the window. Active lines always run at ratio 1.
//
// The image processing of a real DDI is not described in the published design;
// this block passes pixel words through unchanged. Published: image data from
// the AP is stored in graphic memory and read back for every frame. Own
// choices: the write stream interface, the one-image write-activity flag,
// addressing.
module ddi_function
  import ddi_pkg::*;
#(
  parameter int unsigned WORD_W = PIX_W_DEF * PPW_DEF,
  parameter int unsigned WPL    = HSIZE_DEF / PPW_DEF,   // words per line
  parameter int unsigned VSIZE  = VSIZE_DEF,
  parameter int unsigned HBP    = HBP_DEF,
  parameter int unsigned H_W    = 10,
  localparam int unsigned DEPTH = VSIZE * WPL,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // AP image stream
  input  logic               img_sof,
  input  logic               img_valid,
  input  logic [WORD_W-1:0]  img_data,
  output logic               img_update,
  // timing
  input  vtiming_t           cfg_cur,
  input  logic               ce,
  input  logic [H_W-1:0]     h_cnt,
  input  logic [V_W_DEF-1:0] v_cnt,
  input  logic               active_line,
  // to the shift register
  output logic [WORD_W-1:0]  dout
);

  if (HBP < 1) begin : g_chk_hbp
    $error("ddi_function: HBP must leave one cycle for the memory read");
  end

  logic [AW-1:0]   wptr;
  logic [AW:0]     img_words;
  logic [AW:0]     wcount;
  logic            we;
  logic            re;
  logic [AW-1:0]   raddr;
  logic [V_W_DEF-1:0] img_line;
  logic [H_W-1:0]  word_idx;

  // ---------------- write side ----------------
  assign img_words = (AW+1)'(cfg_cur.vact) * (AW+1)'(WPL);
  assign we        = img_valid && (img_sof || img_update) && (wcount < img_words || img_sof);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      wcount     <= '0;
      img_update <= 1'b0;
    end else begin
      if (img_sof) begin
        wptr       <= img_valid ? AW'(1) : '0;
        wcount     <= img_valid ? (AW+1)'(1) : '0;
        img_update <= !(img_valid && img_words == (AW+1)'(1));
      end else if (we) begin
        wptr   <= wptr + 1'b1;
        wcount <= wcount + 1'b1;
        if (wcount + 1'b1 >= img_words) img_update <= 1'b0;
      end
    end
  end

  // ---------------- read side ----------------
  assign img_line = v_cnt - cfg_cur.vbp;
  assign word_idx = h_cnt - H_W'(HBP - 1);
  assign re       = ce && active_line &&
                    (h_cnt >= H_W'(HBP - 1)) && (h_cnt < H_W'(HBP - 1 + WPL));
  assign raddr    = AW'(img_line) * AW'(WPL) + AW'(word_idx);

  gram #(.WORD_W(WORD_W), .DEPTH(DEPTH)) u_gram (
    .clk   (clk),
    .we    (we),
    .waddr (img_sof ? '0 : wptr),
    .wdata (img_data),
    .re    (re),
    .raddr (raddr),
    .rdata (dout)
  );

endmodule
