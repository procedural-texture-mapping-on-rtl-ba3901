// ptm_fb_mem: the two frame buffers of the double-buffered display.
//
// One memory of 2 x SCR_H x SCR_W 24-bit words, addressed {buffer, y, x}.
// The document keeps both buffers in one bank of external SRAM; here it is
// an array with one write port (the control unit) and one synchronous read
// port (the VGA driver): rdata is valid one cycle after raddr.
module ptm_fb_mem
  import ptm_pkg::*;
#(
  parameter int W = SCR_W,
  parameter int H = SCR_H,
  localparam int AW = 1 + $clog2(H) + $clog2(W)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  color_t        wdata,
  input  logic [AW-1:0] raddr,
  output color_t        rdata
);

  color_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
