// shift_register: left and right line shift registers of the source driver.
//
// One panel line is held as two halves, left and right, of HW words each
// (a word is PPW pixels). Words enter at the top end (index HW-1) and move
// one place towards index 0 per shift, so after HW shifts the first word of a
// half sits at index 0 and word i of the half at index i. When the line has
// been shifted completely, line_load pulses for one clock so that the column
// driver can latch left_q / right_q.
//
// Three kinds of line, all inside the shift window (shift_win) of a line:
//  * active line (ratio 1): new image words from din, left half first, then
//    right half (2*HW cycles);
//  * porch line at ratio 1: the last image line is refreshed by recirculating
//    each half on itself (the word leaving index 0 re-enters at HW-1), left
//    then right, 2*HW cycles;
//  * porch line at ratio 2 (par high): both halves recirculate together, HW
//    divided cycles, which take the same 2*HW source periods.
// A recirculation of HW shifts puts every word back in place, so the panel
// keeps receiving the last line while the clock toggles.
//
// Timing: all state changes on clk edges with ce high. The word counter
// restarts on line_start. din must be valid in the cycle it is shifted in.
//
// Published: left/right halves, serial left-then-right operation in the
// active period, parallel operation in the divided porch, refresh of the last
// line in the porch. Own choices: word width, recirculation as the refresh
// mechanism, the line_load strobe.
module shift_register
  import ddi_pkg::*;
#(
  parameter int unsigned WORD_W = PIX_W_DEF * PPW_DEF,
  parameter int unsigned HW     = HSIZE_DEF / PPW_DEF / 2,
  localparam int unsigned C_W   = $clog2(2 * HW + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              line_start,
  input  logic              shift_win,
  input  logic              active_line,
  input  logic              par,          // clock divided by 2: shift halves in parallel
  input  logic [WORD_W-1:0] din,
  output logic [WORD_W-1:0] left_q  [HW],
  output logic [WORD_W-1:0] right_q [HW],
  output logic              line_load
);

  logic [C_W-1:0] cnt;     // source-rate shift slots used in this line
  logic           go;      // a shift happens on this edge
  logic           sh_l, sh_r;
  logic           rot;
  logic [C_W-1:0] cnt_nxt;

  assign go      = ce && shift_win && (cnt < C_W'(2 * HW));
  assign rot     = !active_line;
  assign sh_l    = go && (par ? 1'b1 : (cnt < C_W'(HW)));
  assign sh_r    = go && (par ? 1'b1 : (cnt >= C_W'(HW)));
  assign cnt_nxt = cnt + ((par && !active_line) ? C_W'(2) : C_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      line_load <= 1'b0;
    end else begin
      line_load <= 1'b0;
      if (ce && line_start) begin
        cnt <= '0;
      end else if (go) begin
        cnt <= cnt_nxt;
        if (cnt_nxt >= C_W'(2 * HW)) line_load <= 1'b1;
      end
    end
  end

  // Data registers: no reset, they only carry pixel data.
  always_ff @(posedge clk) begin
    if (sh_l) begin
      for (int i = 0; i < int'(HW) - 1; i++) left_q[i] <= left_q[i+1];
      left_q[HW-1] <= rot ? left_q[0] : din;
    end
    if (sh_r) begin
      for (int i = 0; i < int'(HW) - 1; i++) right_q[i] <= right_q[i+1];
      right_q[HW-1] <= rot ? right_q[0] : din;
    end
  end

  a_no_par_active: assert property (@(posedge clk) disable iff (!rst_n)
      ce && shift_win && active_line |-> !par);

endmodule
