// ptm_q2s: quad to scan-line conversion unit.
//
// On `start` it copies the 21 quad parameters and emits one scan-line
// description per screen row ys = yinit .. yfinal. The first description is
// the parameters themselves (codes 6..9 already hold Y0s..Y3s of the top
// line). Each following line is produced with the incremental algorithm of
// the document: ys += 1, xsleft += xleftinc, xsright += xrightinc,
// xsdiff = floor(xsleft) - floor(old xsleft), Yks += ak0 * xsdiff + ak1.
//
// As in the document, three adders do the work and each multiplication by
// xsdiff is a sequence of additions over 10 cycles, using shift registers
// for the ak0 coefficients; one line takes LINE_CYCLES = 23 cycles:
//   cycle 0      adder1 ys      adder2 Y0 += a01   adder3 Y2 += a21
//   cycle 1      adder1 xsleft  adder2 Y1 += a11   adder3 Y3 += a31
//   cycle 2      adder1 xsdiff (loads the multiplier shift registers)
//   cycles 3-12  adder1 xsright (cycle 3); adder2 Y0 += a00<<k, adder3 Y2 += a20<<k
//   cycles 13-22 adder2 Y1 += a10<<k, adder3 Y3 += a30<<k
// for bit k of |xsdiff| (subtracting when xsdiff < 0). The exact schedule
// is this design's choice. The next line is computed while the pixel unit
// works on the current one; a finished line waits in the output register
// until `line_ready`. The per-pixel increments placed in each line are
// a00, a10, a20, a30 (the x coefficients, see README).
module ptm_q2s
  import ptm_pkg::*;
#(
  parameter int MUL_CYCLES = 10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  qparams_t qparam,
  output logic     idle,
  output logic     line_valid,
  input  logic     line_ready,
  output line_t    line
);

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_WAIT} state_e;
  state_e state;

  logic [4:0] cyc;
  qparams_t   qp;
  logic [XY_W-1:0] ys, yfinal;
  logic signed [VAL_W+1:0] xsl, xsr, xsl_old;
  logic signed [13:0]      xsdiff_c;
  logic [MUL_CYCLES-1:0]   mag, mag_save, mag_c;
  logic                    neg;
  acc_t y0, y1, y2, y3;
  acc_t sh_a, sh_b;        // shift registers holding a00/a10 and a20/a30
  logic last_line;

  function automatic logic signed [13:0] xfloor(logic signed [VAL_W+1:0] x);
    return 14'(x >>> X_FRAC);
  endfunction

  function automatic acc_t sx(int code);
    return sext_val(qp[code]);
  endfunction

  assign xsdiff_c  = xfloor(xsl) - xfloor(xsl_old);
  assign mag_c     = MUL_CYCLES'(xsdiff_c < 0 ? -xsdiff_c : xsdiff_c);
  assign idle      = (state == S_IDLE) && !line_valid;
  assign last_line = (ys >= yfinal);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      line_valid <= 1'b0;
      cyc        <= '0;
    end else begin
      if (line_valid && line_ready) line_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          qp      <= qparam;
          ys      <= qparam[QP_YINIT][XY_W-1:0];
          yfinal  <= qparam[QP_YFINAL][XY_W-1:0];
          xsl     <= (VAL_W+2)'(signed'(qparam[QP_XLINIT]));
          xsr     <= (VAL_W+2)'(signed'(qparam[QP_XRINIT]));
          y0      <= sext_val(qparam[QP_Y0S]);
          y1      <= sext_val(qparam[QP_Y1S]);
          y2      <= sext_val(qparam[QP_Y2S]);
          y3      <= sext_val(qparam[QP_Y3S]);
          state   <= S_WAIT;
        end
        S_WAIT: if (!line_valid || line_ready) begin
          // hand the current line over, then compute the next one
          line_valid <= 1'b1;
          line.y     <= ys;
          line.xl    <= xfloor(xsl);
          line.xr    <= xfloor(xsr);
          line.y0    <= y0;
          line.y1    <= y1;
          line.y2    <= y2;
          line.y3    <= y3;
          line.d0    <= sx(QP_A00);
          line.d1    <= sx(QP_A10);
          line.d2    <= sx(QP_A20);
          line.d3    <= sx(QP_A30);
          line.uinit <= qp[QP_UINIT];
          line.vinit <= qp[QP_VINIT];
          line.winit <= qp[QP_WINIT];
          cyc        <= '0;
          state      <= last_line ? S_IDLE : S_CALC;
        end
        S_CALC: begin
          cyc <= cyc + 1'b1;
          unique case (cyc)
            5'd0: begin
              ys <= ys + 1'b1;
              y0 <= y0 + sx(QP_A01);
              y2 <= y2 + sx(QP_A21);
            end
            5'd1: begin
              xsl_old <= xsl;
              xsl     <= xsl + (VAL_W+2)'(signed'(qp[QP_XLINC]));
              y1      <= y1 + sx(QP_A11);
              y3      <= y3 + sx(QP_A31);
            end
            5'd2: begin
              neg      <= xsdiff_c < 0;
              mag      <= mag_c;
              mag_save <= mag_c;
              sh_a     <= sx(QP_A00);
              sh_b     <= sx(QP_A20);
            end
            default: begin
              // cycles 3..22: one shift-and-add step of a multiplication
              if (cyc == 5'd3) xsr <= xsr + (VAL_W+2)'(signed'(qp[QP_XRINC]));
              if (mag[0]) begin
                if (cyc < 5'd3 + 5'(MUL_CYCLES)) begin
                  y0 <= neg ? y0 - sh_a : y0 + sh_a;
                  y2 <= neg ? y2 - sh_b : y2 + sh_b;
                end else begin
                  y1 <= neg ? y1 - sh_a : y1 + sh_a;
                  y3 <= neg ? y3 - sh_b : y3 + sh_b;
                end
              end
              if (cyc == 5'd2 + 5'(MUL_CYCLES)) begin
                mag  <= mag_save;
                sh_a <= sx(QP_A10);
                sh_b <= sx(QP_A30);
              end else begin
                mag  <= mag >> 1;
                sh_a <= sh_a <<< 1;
                sh_b <= sh_b <<< 1;
              end
              if (cyc == 5'd2 + 5'(2*MUL_CYCLES)) state <= S_WAIT;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
