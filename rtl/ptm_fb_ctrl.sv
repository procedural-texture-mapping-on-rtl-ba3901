// ptm_fb_ctrl: control unit of the frame buffer.
//
// Writes each incoming pixel (x, y, color) into the back buffer, the one
// being updated, while the VGA driver reads the front buffer (`front`).
// A `cls` pulse clears the whole back buffer to BG_COLOR, one word per
// cycle (W x H cycles, `busy` high meanwhile); an `sfb` pulse swaps front
// and back. As the document requires, cls and sfb take precedence over a
// pixel arriving in the same cycle, which is dropped; pixels arriving during
// a clear are dropped too (the instruction unit never sends any then).
// These precedence details and the background color are this design's
// choices. Writes take effect one cycle after the input.
module ptm_fb_ctrl
  import ptm_pkg::*;
#(
  parameter int     W        = SCR_W,
  parameter int     H        = SCR_H,
  parameter color_t BG_COLOR = '0,
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
  output logic          we,
  output logic [AW-1:0] waddr,
  output color_t        wdata,
  output logic          front,
  output logic          busy
);

  logic [YW+XW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      front <= 1'b0;
      busy  <= 1'b0;
      we    <= 1'b0;
      cnt   <= '0;
    end else begin
      we <= 1'b0;
      if (busy) begin
        we    <= 1'b1;
        waddr <= {~front, cnt};
        wdata <= BG_COLOR;
        cnt   <= cnt + 1'b1;
        if (cnt == '1) busy <= 1'b0;
      end else if (cls) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (sfb) begin
        front <= ~front;
      end else if (pix_valid) begin
        we    <= 1'b1;
        waddr <= {~front, y, x};
        wdata <= color;
      end
    end
  end

endmodule
