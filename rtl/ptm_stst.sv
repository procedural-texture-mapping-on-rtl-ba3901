// ptm_stst: screen to texture space transformation unit.
//
// The three units of the document in a chain: instruction fetching and
// decoding (ptm_ifd) fills the quad parameter registers from the host's
// instruction stream; quad to scan-line conversion (ptm_q2s) turns a started
// quad into scan-line descriptions; scan-line to pixel conversion (ptm_s2p)
// turns each line into pixel descriptions (x, y, u, v, w), delivered with
// valid/ready. The clear-screen and switch-buffer commands leave on cls/sfb.
// `downstream_idle` (nothing pending after this unit) and `fb_busy` let the
// instruction unit hold cls/sfb until every earlier pixel has been written,
// and hold a start while the frame buffer is still clearing (the frame
// buffer takes no pixels then). These holds are this design's own choice.
// `idle` is high when this unit holds no work.
module ptm_stst
  import ptm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  logic [INSTR_W-1:0] instr,
  output logic               ack,
  output logic               pix_valid,
  input  logic               pix_ready,
  output pixel_t             pix,
  output logic               cls,
  output logic               sfb,
  input  logic               downstream_idle,
  input  logic               fb_busy,
  output logic               idle
);

  qparams_t qparam;
  logic     start, q_idle, s_idle;
  logic     line_valid, line_ready;
  line_t    line;

  assign idle = q_idle && s_idle && !start;

  ptm_ifd u_ifd (
    .clk, .rst_n, .req, .instr, .ack, .qparam,
    .start, .start_ready(q_idle && !start && !fb_busy && !cls),
    .cls, .sfb,
    .drain_done(idle && downstream_idle && !fb_busy && !cls && !sfb)
  );

  ptm_q2s u_q2s (
    .clk, .rst_n, .start, .qparam, .idle(q_idle),
    .line_valid, .line_ready, .line
  );

  ptm_s2p u_s2p (
    .clk, .rst_n, .line_valid, .line_ready, .line,
    .pix_valid, .pix_ready, .pix, .idle(s_idle)
  );

endmodule
