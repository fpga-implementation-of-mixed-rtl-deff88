// bb_unit: branch-and-bound module (main controller plus problem-index table).
//
// Receives the relaxed solution of each QP child sub-problem and applies the
// two branch-and-bound operations. Bounding: an infeasible sub-problem, or
// one whose objective is not below the best integer solution found so far
// (the incumbent), is dropped. Branching: otherwise the first binary
// variable whose value is not integral (further than TOL from an integer)
// is chosen, and two child records fixing it to 0 and to 1 are appended to
// the child queue in SRAM1. If every binary variable is integral the
// solution becomes the new incumbent and is written to SRAM2 (x, integer
// entries rounded, then the objective value). The problem-index table holds,
// per core, the record of the sub-problem that core is solving; it is
// written by the sequence controller when it dispatches.
// The published design states these operations only by name; the binary
// (0/1) child records, the lowest-index branching rule, the tolerance and
// the fix-to-0-first order are this design's choices.
//
// Timing: sol_ready is high only in the idle state; a solution is taken in
// one cycle, the record lookup takes one, the decision one, and each SRAM
// write one granted bus cycle (2 for branching, NVAR+1 for an update).
module bb_unit
  import miqp_pkg::*;
#(
  parameter int unsigned NC    = NCORE,
  parameter int unsigned QD    = Q_DEPTH,
  parameter int unsigned QB    = Q_BASE,
  parameter int unsigned S1AW  = $clog2(SRAM1_DEPTH),
  parameter int unsigned S2AW  = $clog2(SRAM2_DEPTH),
  parameter word_t       TOL   = FX_ONE >>> 8,
  localparam int unsigned CW   = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned QPW  = $clog2(QD) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NVAR-1:0] int_mask,      // 1 = binary (integer) variable
  input  logic            start,         // new MIQP: clear incumbent, queue the root
  // problem-index table write from the sequence controller
  input  logic            pi_we,
  input  logic [CW-1:0]   pi_core,
  input  prob_rec_t       pi_rec,
  // solutions from the sequence controller
  input  logic            sol_valid,
  output logic            sol_ready,
  input  logic [CW-1:0]   sol_core,
  input  qp_sol_t         sol,
  // child queue
  input  logic [QPW-1:0]  q_head,
  output logic [QPW-1:0]  q_tail,
  // local bus 1 (SRAM1) master, writes only
  output logic            s1_req,
  output logic [S1AW-1:0] s1_addr,
  output logic [WORD_W-1:0] s1_wdata,
  input  logic            s1_gnt,
  // local bus 2 (SRAM2) master, writes only
  output logic            s2_req,
  output logic [S2AW-1:0] s2_addr,
  output logic [WORD_W-1:0] s2_wdata,
  input  logic            s2_gnt,
  // status
  output logic            busy,
  output logic            found,         // an integer solution exists
  output word_t           best_f,
  output logic            q_overflow,
  output logic [15:0]     n_pruned,
  output logic [15:0]     n_branched,
  output logic [15:0]     n_updates
);

  typedef enum logic [2:0] {B_IDLE, B_ROOT, B_CLR, B_LOOK, B_EVAL, B_PUSH0, B_PUSH1, B_UPD} bstate_t;
  bstate_t state;

  qp_sol_t   s;
  prob_rec_t rec;
  logic [$clog2(NVAR)-1:0] bvar;
  logic [S2AW-1:0] widx;

  // problem-index table
  logic [WORD_W-1:0] pi_rdata;
  logic pi_en, pi_wr;
  logic [CW-1:0] pi_addr;
  always_comb begin
    pi_en   = pi_we || (state == B_IDLE && sol_valid && sol_ready);
    pi_wr   = pi_we;
    pi_addr = pi_we ? pi_core : sol_core;
  end
  spram #(.WIDTH(WORD_W), .DEPTH(NC)) u_pidx (
    .clk, .en(pi_en), .we(pi_wr), .addr(pi_addr), .wdata(pi_rec), .rdata(pi_rdata));

  assign sol_ready = (state == B_IDLE) && !pi_we && !start;
  assign busy      = (state != B_IDLE);

  // integrality of the latched solution
  function automatic logic is_frac(input logic [WORD_W-1:0] v);
    logic [FRAC-1:0] f;
    f = v[FRAC-1:0];
    return (FRAC'(f) > FRAC'(TOL)) && (FRAC'(f) < FRAC'(FX_ONE - TOL));
  endfunction

  function automatic logic [WORD_W-1:0] round_fx(input logic [WORD_W-1:0] v);
    logic [WORD_W-1:0] r;
    r = v + (WORD_W'(1) << (FRAC - 1));
    r[FRAC-1:0] = '0;
    return r;
  endfunction

  logic branch_found;
  logic [$clog2(NVAR)-1:0] branch_var;
  always_comb begin
    branch_found = 1'b0;
    branch_var   = '0;
    for (int i = NVAR - 1; i >= 0; i--) begin
      if (int_mask[i] && is_frac(s.x[i])) begin
        branch_found = 1'b1;
        branch_var   = $clog2(NVAR)'(i);
      end
    end
  end

  logic q_full;
  assign q_full = (q_tail - q_head) == QPW'(QD);

  function automatic logic [S1AW-1:0] qaddr(input logic [QPW-1:0] p);
    return S1AW'(QB) + S1AW'(p[QPW-2:0]);
  endfunction

  // bus drivers
  always_comb begin
    s1_req   = 1'b0;
    s1_addr  = qaddr(q_tail);
    s1_wdata = '0;
    s2_req   = 1'b0;
    s2_addr  = widx;
    s2_wdata = '0;
    unique case (state)
      B_ROOT:  begin s1_req = !q_full; s1_wdata = '0; end
      B_PUSH0: begin
        s1_req = !q_full;
        s1_wdata = {rec.rsvd, rec.fix_val & ~(NVAR'(1) << bvar), rec.fix_mask | (NVAR'(1) << bvar)};
      end
      B_PUSH1: begin
        s1_req = !q_full;
        s1_wdata = {rec.rsvd, rec.fix_val | (NVAR'(1) << bvar), rec.fix_mask | (NVAR'(1) << bvar)};
      end
      B_CLR:   begin s2_req = 1'b1; s2_wdata = FX_MAX; end
      B_UPD:   begin
        s2_req = 1'b1;
        if (widx == S2AW'(NVAR)) s2_wdata = s.fval;
        else if (int_mask[widx[$clog2(NVAR)-1:0]]) s2_wdata = round_fx(s.x[widx[$clog2(NVAR)-1:0]]);
        else s2_wdata = s.x[widx[$clog2(NVAR)-1:0]];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= B_IDLE;
      s          <= '0;
      rec        <= '0;
      bvar       <= '0;
      widx       <= '0;
      q_tail     <= '0;
      found      <= 1'b0;
      best_f     <= FX_MAX;
      q_overflow <= 1'b0;
      n_pruned   <= '0;
      n_branched <= '0;
      n_updates  <= '0;
    end else begin
      unique case (state)
        B_IDLE: begin
          if (start) begin
            found      <= 1'b0;
            best_f     <= FX_MAX;
            q_overflow <= 1'b0;
            n_pruned   <= '0;
            n_branched <= '0;
            n_updates  <= '0;
            widx       <= S2AW'(NVAR);
            state      <= B_ROOT;
          end else if (sol_valid && sol_ready) begin
            s      <= sol;
            state  <= B_LOOK;
          end
        end
        B_ROOT: begin
          if (q_full) q_overflow <= 1'b1;
          if (s1_gnt) q_tail <= q_tail + 1'b1;
          if (s1_gnt || q_full) state <= B_CLR;
        end
        B_CLR: if (s2_gnt) state <= B_IDLE;
        B_LOOK: begin
          rec   <= prob_rec_t'(pi_rdata);
          state <= B_EVAL;
        end
        B_EVAL: begin
          if (!s.feasible || s.fval >= best_f) begin
            n_pruned <= n_pruned + 1'b1;
            state    <= B_IDLE;
          end else if (branch_found) begin
            n_branched <= n_branched + 1'b1;
            bvar       <= branch_var;
            state      <= B_PUSH0;
          end else begin
            n_updates <= n_updates + 1'b1;
            best_f    <= s.fval;
            found     <= 1'b1;
            widx      <= '0;
            state     <= B_UPD;
          end
        end
        B_PUSH0, B_PUSH1: begin
          if (q_full) q_overflow <= 1'b1;
          if (s1_gnt) q_tail <= q_tail + 1'b1;
          if (s1_gnt || q_full) state <= (state == B_PUSH0) ? B_PUSH1 : B_IDLE;
        end
        B_UPD: if (s2_gnt) begin
          widx <= widx + 1'b1;
          if (widx == S2AW'(NVAR)) state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
