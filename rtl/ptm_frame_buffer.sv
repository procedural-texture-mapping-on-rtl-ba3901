// ptm_frame_buffer: frame buffer subsystem.
//
// Control unit (ptm_fb_ctrl), two frame buffers (ptm_fb_mem) and VGA
// driver (ptm_vga) wired as in the document: rendered pixels and the cls /
// sfb commands enter the control unit, which updates the back buffer; the
// VGA driver shows the front buffer. One clock drives all of it (the
// document clocks this part at 25 MHz and the rest of the system at
// 12.5 MHz; here the whole design shares one clock).
module ptm_frame_buffer
  import ptm_pkg::*;
#(
  parameter int W = SCR_W,
  parameter int H = SCR_H,
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H),
  localparam int AW = 1 + YW + XW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  input  color_t        color,
  input  logic          cls,
  input  logic          sfb,
  output logic          busy,
  output logic          front,
  output color_t        rgb,
  output logic          hsync,
  output logic          vsync,
  output logic          de,
  output logic          frame_start
);

  logic          we;
  logic [AW-1:0] waddr, raddr;
  color_t        wdata, rdata;

  ptm_fb_ctrl #(.W(W), .H(H)) u_ctrl (
    .clk, .rst_n, .pix_valid, .x, .y, .color, .cls, .sfb,
    .we, .waddr, .wdata, .front, .busy
  );

  ptm_fb_mem #(.W(W), .H(H)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  ptm_vga #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
            .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
            .W(W), .H(H)) u_vga (
    .clk, .rst_n, .front, .raddr, .rdata, .rgb, .hsync, .vsync, .de, .frame_start
  );

endmodule
