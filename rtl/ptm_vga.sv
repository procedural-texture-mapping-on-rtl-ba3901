// ptm_vga: VGA driver of the frame buffer.
//
// Scans the front buffer in raster order and produces the pixel stream and
// sync signals for the VGA card. The document runs it at 25 MHz, "mandated
// by the VGA monitor", but gives no timing; the defaults are the standard
// 640 x 480 mode (800 x 525 total, negative syncs), this design's choice.
// Columns beyond the SCR_W-wide image show black; image rows beyond
// V_ACTIVE are not shown. The read address is issued one cycle ahead of the
// pixel: the counters, syncs and data enable are delayed one cycle to line
// up with the memory's registered output.
// The top bit of raddr is the `front` input itself (it selects the buffer
// being shown), so it is reported as an output driven from an input.
module ptm_vga
  import ptm_pkg::*;
#(
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33,
  parameter int W        = SCR_W,
  parameter int H        = SCR_H,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H),
  localparam int AW = 1 + YW + XW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          front,
  output logic [AW-1:0] raddr,
  input  color_t        rdata,
  output color_t        rgb,
  output logic          hsync,
  output logic          vsync,
  output logic          de,
  output logic          frame_start
);

  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [15:0] hc, vc;
  logic        act, inimg, hs, vs;
  logic        act_d, inimg_d;

  assign act   = (hc < 16'(H_ACTIVE)) && (vc < 16'(V_ACTIVE));
  assign inimg = act && (hc < 16'(W)) && (vc < 16'(H));
  assign hs    = !((hc >= 16'(H_ACTIVE + H_FP)) && (hc < 16'(H_ACTIVE + H_FP + H_SYNC)));
  assign vs    = !((vc >= 16'(V_ACTIVE + V_FP)) && (vc < 16'(V_ACTIVE + V_FP + V_SYNC)));
  assign raddr = {front, YW'(vc), XW'(hc)};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
      act_d <= 1'b0;
      inimg_d <= 1'b0;
      hsync <= 1'b1;
      vsync <= 1'b1;
      frame_start <= 1'b0;
    end else begin
      if (hc == 16'(H_TOTAL - 1)) begin
        hc <= '0;
        vc <= (vc == 16'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
      end else begin
        hc <= hc + 1'b1;
      end
      act_d       <= act;
      inimg_d     <= inimg;
      hsync       <= hs;
      vsync       <= vs;
      frame_start <= (hc == '0) && (vc == '0);
    end
  end

  assign de  = act_d;
  assign rgb = inimg_d ? rdata : '0;

endmodule
