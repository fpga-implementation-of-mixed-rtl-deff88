// tb_bb_unit: self-checking test of the branch-and-bound module.
//
// Models SRAM1 and SRAM2 as arrays behind always-granting buses, then plays a
// short search by hand: root queued at start, a fractional solution that
// must branch into two children, an integral one that must become the
// incumbent (rounded, with its objective), a worse and an infeasible one that
// must be pruned, a better integral one, and finally a queue too full to take
// children, which must raise the overflow flag.
module tb_bb_unit;
  import miqp_pkg::*;

  localparam int QD = 4, QPW = 3, CW = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NVAR-1:0] int_mask;
  logic start, pi_we, sol_valid, sol_ready;
  logic [CW-1:0] pi_core, sol_core;
  prob_rec_t pi_rec;
  qp_sol_t sol;
  logic [QPW-1:0] q_head, q_tail;
  logic s1_req, s1_gnt, s2_req, s2_gnt, busy, found, q_overflow;
  logic [11:0] s1_addr;
  logic [4:0] s2_addr;
  logic [WORD_W-1:0] s1_wdata, s2_wdata;
  word_t best_f;
  logic [15:0] n_pruned, n_branched, n_updates;

  bb_unit #(.NC(2), .QD(QD)) dut (.*);

  assign s1_gnt = s1_req;
  assign s2_gnt = s2_req;
  logic [WORD_W-1:0] m1 [4096];
  logic [WORD_W-1:0] m2 [17];
  always_ff @(posedge clk) begin
    if (s1_req) m1[s1_addr] <= s1_wdata;
    if (s2_req) m2[s2_addr] <= s2_wdata;
  end

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t fx(input real r);
    return word_t'($rtoi(r * 65536.0));
  endfunction

  task automatic give(input int core, input prob_rec_t r, input logic feas, input real f,
                      input real xs [NVAR]);
    @(negedge clk);
    pi_we = 1; pi_core = CW'(core); pi_rec = r;
    @(negedge clk);
    pi_we = 0;
    sol_valid = 1; sol_core = CW'(core);
    sol.feasible = feas; sol.fval = fx(f);
    for (int i = 0; i < NVAR; i++) sol.x[i] = fx(xs[i]);
    @(posedge clk);
    while (!sol_ready) @(posedge clk);
    @(negedge clk);
    sol_valid = 0;
    while (busy) @(negedge clk);
  endtask

  initial begin
    real xs [NVAR];
    prob_rec_t r;
    int_mask = 16'h00FF; start = 0; pi_we = 0; sol_valid = 0; pi_core = '0; sol_core = '0;
    pi_rec = '0; sol = '0; q_head = '0;
    for (int i = 0; i < 4096; i++) m1[i] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    chk(q_tail == 3'd1 && m1[Q_BASE] == '0, "root queued");
    chk(m2[NVAR] == FX_MAX, "SRAM2 objective cleared");
    q_head = 3'd1;   // root taken by a core
    // fractional x[2] -> branch
    for (int i = 0; i < NVAR; i++) xs[i] = 0.0;
    xs[0] = 1.0; xs[2] = 0.5; xs[9] = 0.37;   // x[9] is continuous
    give(0, '0, 1, 5.0, xs);
    chk(n_branched == 1 && q_tail == 3'd3, "branched into two children");
    chk(m1[Q_BASE+1] == {4'h0, 16'h0000, 16'h0004}, "child fix x2=0");
    chk(m1[Q_BASE+2] == {4'h0, 16'h0004, 16'h0004}, "child fix x2=1");
    q_head = 3'd3;
    // integral -> incumbent
    xs[2] = 0.999; xs[5] = 0.001;
    r = '0; r.fix_mask = 16'h0004; r.fix_val = 16'h0004;
    give(1, r, 1, 7.0, xs);
    chk(found && best_f == fx(7.0) && n_updates == 1, "incumbent set");
    chk(m2[2] == fx(1.0) && m2[5] == '0 && m2[0] == fx(1.0), "integers rounded in SRAM2");
    chk(m2[9] == fx(0.37) && m2[NVAR] == fx(7.0), "continuous value and objective in SRAM2");
    // worse -> pruned, infeasible -> pruned
    give(0, '0, 1, 8.0, xs);
    give(1, '0, 0, 1.0, xs);
    chk(n_pruned == 2 && best_f == fx(7.0) && q_tail == 3'd3, "bounding prunes");
    // better integral -> new incumbent
    xs[2] = 0.0;
    give(0, '0, 1, 6.5, xs);
    chk(best_f == fx(6.5) && m2[2] == '0 && m2[NVAR] == fx(6.5) && n_updates == 2, "better incumbent");
    // full queue: head three behind, two children would not fit
    q_head = 3'd0;   // occupancy 3 of 4
    xs[3] = 0.25;
    give(1, '0, 1, 2.0, xs);
    chk(q_overflow && q_tail == 3'd4, "overflow flagged, one child stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
