// ptm_top: rendering hardware with an FPGA procedural texture generator.
//
// The host computes the world-to-screen transformation in software and
// sends quads as 32-bit instructions over the req/instr/ack two-phase
// handshake. The STST unit (ptm_stst) rasterises each quad into pixels
// carrying screen position (x, y) and solid texture coordinates (u, v, w);
// the procedural texture generator (ptm_texgen) computes each pixel's color
// from (u, v, w) with the texture chosen by tex_sel; the frame buffer
// (ptm_frame_buffer) writes it into the back buffer and shows the front
// buffer on the VGA outputs. Color tables are loaded through tbl_*.
//
// Timing: one clock for everything; the texture generator accepts one pixel
// per four cycles, which sets the pixel rate as in the document. Pixel
// position travels through the generator as its tag.
module ptm_top
  import ptm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host instruction channel
  input  logic               req,
  input  logic [INSTR_W-1:0] instr,
  output logic               ack,
  // texture selection and color table loading
  input  texture_e           tex_sel,
  input  logic               tbl_we,
  input  texture_e           tbl_sel,
  input  logic [7:0]         tbl_addr,
  input  color_t             tbl_data,
  // to the VGA card
  output color_t             rgb,
  output logic               hsync,
  output logic               vsync,
  output logic               de,
  output logic               frame_start,
  output logic               front,
  output logic               idle
);

  logic   pix_valid, pix_ready, cls, sfb, fb_busy, st_idle;
  pixel_t pix;
  logic   tg_out_valid;
  color_t tg_color;
  logic [2*XY_W-1:0] tg_tag;
  logic [3:0] inflight;

  ptm_stst u_stst (
    .clk, .rst_n, .req, .instr, .ack,
    .pix_valid, .pix_ready, .pix, .cls, .sfb,
    .downstream_idle(inflight == '0),
    .fb_busy,
    .idle(st_idle)
  );

  ptm_texgen #(.TAG_W(2*XY_W)) u_texgen (
    .clk, .rst_n, .tex_sel,
    .in_valid (pix_valid),
    .in_ready (pix_ready),
    .u(pix.u), .v(pix.v), .w(pix.w),
    .in_tag   ({pix.y, pix.x}),
    .out_valid(tg_out_valid),
    .color    (tg_color),
    .out_tag  (tg_tag),
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_data
  );

  // pixels inside the texture generator
  always_ff @(posedge clk) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 4'(pix_valid && pix_ready) - 4'(tg_out_valid);
  end

  ptm_frame_buffer u_fb (
    .clk, .rst_n,
    .pix_valid(tg_out_valid),
    .x(tg_tag[XY_W-1:0]),
    .y(tg_tag[2*XY_W-1:XY_W]),
    .color(tg_color),
    .cls, .sfb,
    .busy(fb_busy), .front,
    .rgb, .hsync, .vsync, .de, .frame_start
  );

  assign idle = st_idle && (inflight == '0) && !fb_busy && !cls && !sfb;

endmodule
