// ptm_s2p: scan-line to pixel conversion unit.
//
// For each scan-line description it walks x = xl .. xr (at least one pixel)
// and keeps the four running sums Y0p..Y3p, adding the per-pixel increments
// carried in the description after every pixel. Each pixel needs three
// divisions, Y0p/Y3p, Y1p/Y3p and Y2p/Y3p; as in the document's prototype
// they share one pipelined divider (ptm_div), issued on three consecutive
// cycles. x, y and the Uinit/Vinit/Winit value ride along with each division
// as its tag, standing in for the delay registers of the document's
// datapath; u = Uinit + Y0p/Y3p (quotient with TEX_FRAC fraction bits) and
// likewise v, w, truncated to TEX_W bits.
//
// Finished pixels enter a FIFO_DEPTH-entry FIFO with a valid/ready output.
// A pixel is started only when the FIFO has room for it and for every pixel
// already in the divider, so the divider never has to stall. Peak rate is
// one pixel per three cycles. `idle` is high when no line or pixel is held.
module ptm_s2p
  import ptm_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   line_valid,
  output logic   line_ready,
  input  line_t  line,
  output logic   pix_valid,
  input  logic   pix_ready,
  output pixel_t pix,
  output logic   idle
);

  localparam int Q_W   = 20;
  localparam int TAG_W = 2 + 2*XY_W + VAL_W;
  localparam int CW    = $clog2(FIFO_DEPTH+1);

  typedef struct packed {
    logic [1:0]       slot;
    logic [XY_W-1:0]  x;
    logic [XY_W-1:0]  y;
    logic [VAL_W-1:0] init;
  } dtag_t;

  logic    busy;
  line_t   ln;
  logic signed [13:0] x;
  acc_t    p0, p1, p2, p3;
  logic [1:0] slot;
  logic [2:0] inflight;     // pixels started whose result is not yet queued
  logic [CW-1:0] fcount;
  logic    fifo_in_valid, fifo_in_ready;
  pixel_t  fifo_in;

  logic    d_in_valid, d_out_valid;
  acc_t    d_num;
  dtag_t   d_tag, d_otag;
  logic signed [Q_W-1:0] d_quot;
  logic    can_issue, last_px;

  assign line_ready = !busy;
  assign can_issue  = (32'(fcount) + 32'(inflight)) < FIFO_DEPTH;
  assign last_px    = (x >= signed'(ln.xr));

  always_comb begin
    d_in_valid = busy && (slot != 2'd0 || can_issue);
    unique case (slot)
      2'd0:    d_num = p0;
      2'd1:    d_num = p1;
      default: d_num = p2;
    endcase
    d_tag.slot = slot;
    d_tag.x    = XY_W'(x);
    d_tag.y    = ln.y;
    unique case (slot)
      2'd0:    d_tag.init = ln.uinit;
      2'd1:    d_tag.init = ln.vinit;
      default: d_tag.init = ln.winit;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      slot     <= '0;
      inflight <= '0;
    end else begin
      inflight <= inflight + ((busy && slot == 2'd0 && can_issue) ? 3'd1 : 3'd0)
                           - ((d_out_valid && d_otag.slot == 2'd2) ? 3'd1 : 3'd0);
      if (!busy) begin
        if (line_valid) begin
          busy <= 1'b1;
          ln   <= line;
          x    <= signed'(line.xl);
          p0   <= signed'(line.y0);
          p1   <= signed'(line.y1);
          p2   <= signed'(line.y2);
          p3   <= signed'(line.y3);
          slot <= '0;
        end
      end else if (d_in_valid) begin
        if (slot == 2'd2) begin
          slot <= '0;
          x    <= x + 1'b1;
          p0   <= p0 + signed'(ln.d0);
          p1   <= p1 + signed'(ln.d1);
          p2   <= p2 + signed'(ln.d2);
          p3   <= p3 + signed'(ln.d3);
          if (last_px) busy <= 1'b0;
        end else begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

  ptm_div #(.N_W(ACC_W), .Q_W(Q_W), .QF(TEX_FRAC), .STAGES(4), .TAG_W(TAG_W)) u_div (
    .clk, .rst_n,
    .in_valid (d_in_valid),
    .num      (d_num),
    .den      (p3),
    .in_tag   (d_tag),
    .out_valid(d_out_valid),
    .quot     (d_quot),
    .out_tag  (d_otag)
  );

  // collect u and v, complete the pixel with w
  logic [TEX_W-1:0] res, u_hold, v_hold;
  assign res = TEX_W'(d_otag.init) + TEX_W'(d_quot);

  always_ff @(posedge clk) begin
    if (d_out_valid && d_otag.slot == 2'd0) u_hold <= res;
    if (d_out_valid && d_otag.slot == 2'd1) v_hold <= res;
  end

  assign fifo_in_valid = d_out_valid && (d_otag.slot == 2'd2);
  assign fifo_in       = '{x: d_otag.x, y: d_otag.y, u: u_hold, v: v_hold, w: res};

  ptm_fifo #(.W($bits(pixel_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (fifo_in_valid),
    .in_data  (fifo_in),
    .in_ready (fifo_in_ready),
    .out_valid(pix_valid),
    .out_data (pix),
    .out_ready(pix_ready),
    .count    (fcount)
  );

  assign idle = !busy && (inflight == '0) && !pix_valid;

  // the credit scheme guarantees the FIFO never overflows
  assert property (@(posedge clk) disable iff (!rst_n) fifo_in_valid |-> fifo_in_ready);

endmodule
