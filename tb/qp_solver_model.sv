// qp_solver_model: behavioural stand-in for the dual active set sequencer of
// one QP solver core, for simulation only (not synthesizable).
//
// It solves the child sub-problems of a small test MIQP: a separable
// objective sum_i (h_i/2 x_i^2 + g_i x_i), binary variables relaxed to
// [0,1] unless fixed by the record, continuous variables free, and the
// constraint x_0 + x_1 <= 1 enforced only as "infeasible when both are fixed
// to 1" (the test data keep both fractional in the relaxation so they are
// always branched first). The relaxed optimum is the first point clamped to
// the bounds. The linear part g.x of the objective is computed on the real
// core engine (work-space row g, vector registers x, one QC_MATVEC), so the
// engine is exercised inside the full design. A random extra delay makes
// cores finish out of order.
module qp_solver_model
  import miqp_pkg::*;
#(
  parameter int unsigned MAXDELAY = 60
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NVAR-1:0] int_mask,
  input  word_t           x0 [NVAR],
  input  word_t           hh [NVAR],
  input  word_t           gg [NVAR],
  input  logic            prob_valid,
  input  prob_rec_t       prob_rec,
  output logic            sol_valid,
  output qp_sol_t         sol,
  input  logic            sol_ack,
  output logic            cmd_valid,
  input  logic            cmd_ready,
  output qc_cmd_t         cmd,
  input  logic            rsp_valid,
  input  qc_rsp_t         rsp,
  output int              n_solved,
  output int              n_infeasible
);

  function automatic word_t fmul(input word_t p, input word_t q);
    logic signed [2*WORD_W-1:0] f;
    f = p * q;
    return WORD_W'(f >>> FRAC);
  endfunction

  task automatic issue(input qc_op_t op, input int addr, input word_t data,
                       input int len = 0, input int rows = 0, input int ob = 0);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd.op = op; cmd.addr = WS_AW'(addr); cmd.data = data;
    cmd.len = 5'(len); cmd.rows = 6'(rows); cmd.out_base = WS_AW'(ob);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  initial begin
    prob_rec_t r;
    word_t x [NVAR];
    word_t f;
    sol_valid = 1'b0; sol = '0; cmd_valid = 1'b0; cmd = '0;
    n_solved = 0; n_infeasible = 0;
    forever begin
      @(posedge clk);
      if (rst_n && prob_valid) begin
        r = prob_rec;
        for (int i = 0; i < NVAR; i++) begin
          if (int_mask[i] && r.fix_mask[i]) x[i] = r.fix_val[i] ? FX_ONE : '0;
          else if (int_mask[i])             x[i] = (x0[i] < 0) ? '0 : ((x0[i] > FX_ONE) ? FX_ONE : x0[i]);
          else                              x[i] = x0[i];
        end
        for (int i = 0; i < NVAR; i++) issue(QC_WR_MEM, i, gg[i]);
        for (int i = 0; i < NVAR; i++) issue(QC_WR_VEC, i, x[i]);
        issue(QC_MATVEC, 0, '0, NVAR, 1, 200);
        while (!rsp_valid) @(negedge clk);
        f = rsp.data;
        for (int i = 0; i < NVAR; i++) f = f + (fmul(fmul(hh[i], x[i]), x[i]) >>> 1);
        repeat ($urandom_range(0, MAXDELAY)) @(negedge clk);
        sol.feasible = !(r.fix_mask[0] && r.fix_mask[1] && r.fix_val[0] && r.fix_val[1]);
        if (!sol.feasible) n_infeasible++;
        sol.fval = f;
        for (int i = 0; i < NVAR; i++) sol.x[i] = x[i];
        sol_valid = 1'b1;
        @(posedge clk);
        while (!sol_ack) @(posedge clk);
        @(negedge clk);
        sol_valid = 1'b0;
        n_solved++;
      end
    end
  end

endmodule
