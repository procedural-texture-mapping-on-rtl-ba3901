// ptm_div: pipelined signed divider, quot = trunc(num * 2^QF / den).
//
// The pixel unit of the document uses one 4-stage pipelined divider shared
// by its three divisions; its insides are not given. Here the magnitudes
// are divided by restoring long division, Q_W quotient bits in all, Q_W /
// STAGES bits per pipeline stage, and the sign is applied at the end. The
// quotient saturates to the largest magnitude when it does not fit in Q_W
// bits or den is zero. A new division may enter every cycle; the result
// (with the sideband `in_tag`) appears STAGES + 1 cycles later: one cycle to
// register the operands, then one per stage.
module ptm_div #(
  parameter int N_W    = 40,
  parameter int Q_W    = 20,
  parameter int QF     = 6,
  parameter int STAGES = 4,
  parameter int TAG_W  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [N_W-1:0]   num,
  input  logic signed [N_W-1:0]   den,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [Q_W-1:0]   quot,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int X_W  = N_W + QF;        // dividend width
  localparam int BPS  = Q_W / STAGES;    // quotient bits per stage
  localparam int R_W  = N_W + 1;         // partial remainder width

  typedef struct packed {
    logic             valid;
    logic             neg;
    logic             ovf;
    logic [R_W-1:0]   rem;
    logic [Q_W-1:0]   dvd_lo;   // dividend bits not yet brought down
    logic [Q_W-1:0]   q;
    logic [N_W-1:0]   d;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t st [STAGES+1];

  // operand stage: magnitudes, overflow test on the dividend's top part
  logic [N_W-1:0] an, ad;
  logic [X_W-1:0] x;
  assign an = num[N_W-1] ? N_W'(-num) : N_W'(num);
  assign ad = den[N_W-1] ? N_W'(-den) : N_W'(den);
  assign x  = {an, QF'(0)};

  always_ff @(posedge clk) begin
    if (!rst_n) st[0].valid <= 1'b0;
    else        st[0].valid <= in_valid;
    st[0].neg    <= num[N_W-1] ^ den[N_W-1];
    st[0].rem    <= R_W'(x >> Q_W);
    st[0].ovf    <= (ad == '0) || (R_W'(x >> Q_W) >= R_W'(ad));
    st[0].dvd_lo <= x[Q_W-1:0];
    st[0].q      <= '0;
    st[0].d      <= ad;
    st[0].tag    <= in_tag;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    stage_t nx;
    always_comb begin
      logic [R_W-1:0] r;
      nx = st[s];
      r  = st[s].rem;
      for (int b = 0; b < BPS; b++) begin
        r = {r[R_W-2:0], nx.dvd_lo[Q_W-1]};
        nx.dvd_lo = nx.dvd_lo << 1;
        if (r >= R_W'(st[s].d)) begin
          r    = r - R_W'(st[s].d);
          nx.q = {nx.q[Q_W-2:0], 1'b1};
        end else begin
          nx.q = {nx.q[Q_W-2:0], 1'b0};
        end
      end
      nx.rem = r;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) st[s+1].valid <= 1'b0;
      else        st[s+1].valid <= nx.valid;
      st[s+1].neg    <= nx.neg;
      st[s+1].ovf    <= nx.ovf;
      st[s+1].rem    <= nx.rem;
      st[s+1].dvd_lo <= nx.dvd_lo;
      st[s+1].q      <= nx.q;
      st[s+1].d      <= nx.d;
      st[s+1].tag    <= nx.tag;
    end
  end

  logic [Q_W-1:0] mag;
  always_comb begin
    mag = st[STAGES].q;
    if (st[STAGES].ovf || mag[Q_W-1]) mag = {1'b0, {(Q_W-1){1'b1}}};
  end
  assign out_valid = st[STAGES].valid;
  assign quot      = st[STAGES].neg ? -signed'(mag) : signed'(mag);
  assign out_tag   = st[STAGES].tag;

endmodule
