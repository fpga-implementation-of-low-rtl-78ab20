// Controller of the partly parallel LDPC decoder.
//
// A frame is decoded as a sequence of phases, each L issue cycles long
// followed by PIPE_LAT (2) drain cycles so that every write of a phase lands
// before the next phase reads:
//   INIT  : the intrinsic messages of word t arrive on cycle t (in_ready,
//           in_addr), are stored in the INIT RAMs and pass through the VNUs
//           with zero check messages, giving the first variable-to-check
//           messages and hard decisions.
//   CHECK : check node processing; the parity-check results of all CNUs are
//           collected. If every check is satisfied the frame ends here with
//           converged = 1 (early termination).
//   VAR   : variable node processing; one iteration is complete. After
//           MAX_ITER iterations the frame ends with converged = 0.
// So a frame takes (L+2)*(2r+1) cycles after r full iterations, or
// (L+2)*(2r+2) when it stops in the check phase that follows iteration r.
//
// The controller issues one stage_t per pipeline stage: rd (RAM read, in
// the issue cycle), s1 (RAM data at the node units' first stage) and wr
// (node unit results written back). load/load_chk preset the address
// generators one cycle before a phase. done pulses for one cycle at the end
// of a frame; converged and iterations then hold until the next start.
// start is taken only while idle (busy = 0). Reset is synchronous, active low.
//
// The phase order, the L cycles per phase, the early termination on a
// satisfied parity check and the 10-iteration limit follow the source design;
// the drain cycles and the handshake are this design's choice.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned L        = 256,
  parameter int unsigned MAX_ITER = 10,
  localparam int unsigned AW      = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          parity_fail,   // OR of all CNU results, wr stage
  output stage_t        rd,
  output stage_t        s1,
  output stage_t        wr,
  output logic          load,
  output logic          load_chk,
  output logic          in_ready,
  output logic [AW-1:0] in_addr,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iterations
);

  localparam int unsigned PH_LEN = L + PIPE_LAT;
  localparam int unsigned CW     = $clog2(PH_LEN);

  phase_e        phase;
  logic [CW-1:0] cyc;
  logic          fail_seen;
  logic          last;
  logic          fail_now;

  assign last     = (32'(cyc) == PH_LEN - 1);
  assign fail_now = fail_seen | (wr.valid && wr.phase == PH_CHECK && parity_fail);

  always_comb begin
    rd.valid = (phase != PH_IDLE) && (32'(cyc) < L);
    rd.phase = phase;
  end

  assign in_ready = rd.valid && (phase == PH_INIT);
  assign in_addr  = AW'(cyc);
  assign busy     = (phase != PH_IDLE);

  // Preset the address generators: on start (for INIT) and in the first
  // drain cycle of each phase (for the phase that may follow).
  always_comb begin
    load     = 1'b0;
    load_chk = 1'b0;
    if (phase == PH_IDLE) begin
      load = start;
    end else if (32'(cyc) == L) begin
      load     = 1'b1;
      load_chk = (phase == PH_INIT) || (phase == PH_VAR);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      cyc        <= '0;
      fail_seen  <= 1'b0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
      s1         <= '{valid: 1'b0, phase: PH_IDLE};
      wr         <= '{valid: 1'b0, phase: PH_IDLE};
    end else begin
      s1   <= rd;
      wr   <= s1;
      done <= 1'b0;
      if (wr.valid && wr.phase == PH_CHECK && parity_fail) fail_seen <= 1'b1;

      if (phase == PH_IDLE) begin
        if (start) begin
          phase      <= PH_INIT;
          cyc        <= '0;
          converged  <= 1'b0;
          iterations <= '0;
        end
      end else if (!last) begin
        cyc <= cyc + 1'b1;
      end else begin
        cyc       <= '0;
        fail_seen <= 1'b0;
        unique case (phase)
          PH_INIT: phase <= PH_CHECK;
          PH_CHECK: begin
            if (!fail_now) begin
              phase     <= PH_IDLE;
              done      <= 1'b1;
              converged <= 1'b1;
            end else begin
              phase <= PH_VAR;
            end
          end
          PH_VAR: begin
            iterations <= iterations + 1'b1;
            if (32'(iterations) + 1 >= MAX_ITER) begin
              phase <= PH_IDLE;
              done  <= 1'b1;
            end else begin
              phase <= PH_CHECK;
            end
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // A new frame may only be started while idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
