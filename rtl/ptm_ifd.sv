// ptm_ifd: instruction fetching and decoding unit of the STST unit.
//
// The host (running the world-to-screen software) sends one 32-bit
// instruction per transfer over a two-phase handshake: it places `instr`,
// then toggles `req`; this unit toggles `ack` once the instruction has been
// executed. `req` is synchronised with two flip-flops, so the host may run on
// any clock; `instr` must stay stable while req != ack.
//
// Decoding follows the instruction set of the document: opcode 0 writes the
// 25-bit value into quad parameter register `pcode` (0..20, others ignored),
// opcode 1 starts a quad, 2 switches frame buffers, 3 clears the screen.
// This design's own choices: `start` is issued (one-cycle pulse) only when
// the quad-to-scan-line unit reports `start_ready`, and `cls`/`sfb` only when
// `drain_done` says the pixel pipeline is empty and the frame buffer idle;
// the acknowledge is held back until then, which keeps pixels of earlier
// quads from landing in the wrong buffer. Reset is synchronous, active low.
module ptm_ifd
  import ptm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req,
  input  logic [INSTR_W-1:0] instr,
  output logic     ack,
  output qparams_t qparam,
  output logic     start,
  input  logic     start_ready,
  output logic     cls,
  output logic     sfb,
  input  logic     drain_done
);

  logic   req_s1, req_s2;
  instr_t ins;
  logic   pending, exec;

  assign ins     = instr_t'(instr);
  assign pending = (req_s2 != ack);

  // The controller: decides when the pending instruction may execute.
  always_comb begin
    exec = 1'b0;
    if (pending) begin
      unique case (ins.op)
        OP_PARAM: exec = 1'b1;
        OP_START: exec = start_ready;
        default:  exec = drain_done;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_s1 <= 1'b0;
      req_s2 <= 1'b0;
      ack    <= 1'b0;
      start  <= 1'b0;
      cls    <= 1'b0;
      sfb    <= 1'b0;
      qparam <= '0;
    end else begin
      req_s1 <= req;
      req_s2 <= req_s1;
      start  <= 1'b0;
      cls    <= 1'b0;
      sfb    <= 1'b0;
      if (exec) begin
        ack <= ~ack;
        // The decoder: register enables and command pulses.
        unique case (ins.op)
          OP_PARAM: if (int'(ins.pcode) < NUM_QPARAM) qparam[ins.pcode] <= ins.value;
          OP_START: start <= 1'b1;
          OP_SFB:   sfb   <= 1'b1;
          OP_CLS:   cls   <= 1'b1;
        endcase
      end
    end
  end

endmodule
