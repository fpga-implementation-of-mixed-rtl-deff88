// seq_ctrl: sequence control module, hands child sub-problems to idle QP cores.
//
// Child sub-problems wait as records in a queue in SRAM1 (written at its tail
// by the branch-and-bound module). Whenever the queue is not empty and a QP
// solver core is idle, the record at the head is read over local bus 1 and
// given to the lowest-numbered idle core, and the record is entered in the
// branch-and-bound module's problem-index table under that core's number.
// Cores finish in any order; a finished core's solution is passed to the
// branch-and-bound module and the core becomes idle again, so no core waits
// for another (first-in first-out queue, assignment on idleness, as in the
// published sequence chart). The search is over when the queue is empty, all
// cores are idle and the branch-and-bound module is idle; done then stays
// high until the next start.
//
// Timing: one dispatch takes a bus grant, one read cycle and one issue cycle
// (3 cycles when the bus is free). Solutions are forwarded in the cycle the
// branch-and-bound module is ready; the lowest-numbered finished core first.
module seq_ctrl
  import miqp_pkg::*;
#(
  parameter int unsigned NC   = NCORE,
  parameter int unsigned QD   = Q_DEPTH,
  parameter int unsigned QB   = Q_BASE,
  parameter int unsigned S1AW = $clog2(SRAM1_DEPTH),
  localparam int unsigned CW  = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned QPW = $clog2(QD) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,          // search begins (root being queued)
  output logic               done,
  // queue pointers
  input  logic [QPW-1:0]     q_tail,
  output logic [QPW-1:0]     q_head,
  // local bus 1 (SRAM1) master, reads only
  output logic               s1_req,
  output logic [S1AW-1:0]    s1_addr,
  input  logic               s1_gnt,
  input  logic               s1_rvalid,
  input  logic [WORD_W-1:0]  s1_rdata,
  // QP solver cores
  output logic [NC-1:0]      prob_valid,     // one-cycle pulse per dispatched problem
  output prob_rec_t          prob_rec,
  input  logic [NC-1:0]      core_sol_valid, // held until acknowledged
  input  qp_sol_t            core_sol [NC],
  output logic [NC-1:0]      core_sol_ack,
  // branch-and-bound module
  output logic               pi_we,
  output logic [CW-1:0]      pi_core,
  output prob_rec_t          pi_rec,
  output logic               bb_sol_valid,
  input  logic               bb_sol_ready,
  output logic [CW-1:0]      bb_sol_core,
  output qp_sol_t            bb_sol,
  input  logic               bb_busy,
  // statistics
  output logic [NC-1:0]      core_busy,
  output logic [15:0]        n_dispatched
);

  typedef enum logic [1:0] {D_IDLE, D_REQ, D_WAIT, D_ISSUE} dstate_t;
  dstate_t dstate;

  logic started;
  logic [CW-1:0] tgt;
  logic any_idle;
  logic [CW-1:0] first_idle;
  prob_rec_t rec_q;

  always_comb begin
    any_idle   = 1'b0;
    first_idle = '0;
    for (int k = NC - 1; k >= 0; k--) begin
      if (!core_busy[k]) begin
        any_idle   = 1'b1;
        first_idle = CW'(k);
      end
    end
  end

  // solution forwarding
  logic [CW-1:0] sel;
  always_comb begin
    sel          = '0;
    bb_sol_valid = |core_sol_valid;
    for (int k = NC - 1; k >= 0; k--) if (core_sol_valid[k]) sel = CW'(k);
    bb_sol_core  = sel;
    bb_sol       = core_sol[sel];
    core_sol_ack = '0;
    if (bb_sol_valid && bb_sol_ready) core_sol_ack[sel] = 1'b1;
  end

  assign s1_req  = (dstate == D_REQ);
  assign s1_addr = S1AW'(QB) + S1AW'(q_head[QPW-2:0]);

  assign pi_we    = (dstate == D_ISSUE);
  assign pi_core  = tgt;
  assign pi_rec   = rec_q;
  assign prob_rec = rec_q;
  always_comb begin
    prob_valid = '0;
    if (dstate == D_ISSUE) prob_valid[tgt] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate       <= D_IDLE;
      started      <= 1'b0;
      done         <= 1'b0;
      q_head       <= '0;
      tgt          <= '0;
      rec_q        <= '0;
      core_busy    <= '0;
      n_dispatched <= '0;
    end else begin
      if (start) begin
        started      <= 1'b1;
        done         <= 1'b0;
        n_dispatched <= '0;
      end else if (started && dstate == D_IDLE && q_head == q_tail && core_busy == '0 &&
                   !bb_busy && !bb_sol_valid) begin
        started <= 1'b0;
        done    <= 1'b1;
      end
      unique case (dstate)
        D_IDLE: if (started && !start && q_head != q_tail && any_idle) begin
          tgt    <= first_idle;
          dstate <= D_REQ;
        end
        D_REQ:  if (s1_gnt) dstate <= D_WAIT;
        D_WAIT: if (s1_rvalid) begin
          rec_q  <= prob_rec_t'(s1_rdata);
          dstate <= D_ISSUE;
        end
        D_ISSUE: begin
          q_head       <= q_head + 1'b1;
          n_dispatched <= n_dispatched + 1'b1;
          dstate       <= D_IDLE;
        end
        default: dstate <= D_IDLE;
      endcase
      for (int k = 0; k < NC; k++) begin
        if (core_sol_ack[k]) core_busy[k] <= 1'b0;
        if (dstate == D_ISSUE && tgt == CW'(k)) core_busy[k] <= 1'b1;
      end
    end
  end

  // a core only reports a result for a problem it was given
  a_sol_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               (core_sol_valid & ~core_busy) == '0);

endmodule
