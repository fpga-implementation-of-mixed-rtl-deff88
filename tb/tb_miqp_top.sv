// tb_miqp_top: end-to-end test of the MIQP solver at its default size
// (16 variables, 2 QP solver cores).
//
// 1. Computes x0_i = -g_i / h_i on core 0's pipelined divider as the
//    reference first point for the behavioural sequencers.
// 2. Sends the test problem over the byte link: header (binary mask 0x003F,
//    272 words), then H (diagonal, row-major) and g. The first point
//    calculator inside the design must produce the same x0 and start the
//    search by itself; x0 and some problem words are read back from SRAM1.
// 3. Two behavioural sequencers (qp_solver_model) solve the sub-problems
//    using the real core engines.
// 4. Collects the result bytes and compares the optimal value and solution
//    with a brute-force search over all 64 binary assignments done here.
// Mechanisms counted (each must occur): branching, pruning by bound, pruning
// by infeasibility, incumbent update, both cores busy at once, a core taking
// a new problem while the other is still busy with an older one, and a
// queue holding more than one waiting problem.
module tb_miqp_top;
  import miqp_pkg::*;

  localparam int K = NCORE;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, problem_loaded, search_start, fp_busy, fp_ovf;
  logic [7:0] in_data, out_data;
  logic [11:0] problem_words;
  logic ext1_req, ext1_we, ext1_gnt, ext1_rvalid;
  logic [11:0] ext1_addr;
  logic [WORD_W-1:0] ext1_wdata, ext1_rdata;
  logic [K-1:0] core_prob_valid, core_sol_valid, core_sol_ack;
  prob_rec_t core_prob_rec;
  qp_sol_t core_sol [K];
  logic [K-1:0] core_cmd_valid, core_cmd_ready, core_rsp_valid;
  qc_cmd_t core_cmd [K];
  qc_rsp_t core_rsp [K];
  logic [K-1:0] core_div_in_valid, core_div_out_valid, core_div_ovf;
  word_t core_div_a [K], core_div_b [K], core_div_q [K];
  logic done, out_busy, found, q_overflow;
  word_t best_f;
  logic [K-1:0] core_busy;
  logic [15:0] n_dispatched, n_pruned, n_branched, n_updates;

  miqp_top dut (.*);

  logic [NVAR-1:0] int_mask = 16'h003F;
  word_t x0 [NVAR], hh [NVAR], gg [NVAR];
  int n_solved [K], n_infeasible [K];

  for (genvar k = 0; k < K; k++) begin : g_model
    qp_solver_model #(.MAXDELAY(80)) u_model (
      .clk, .rst_n, .int_mask, .x0, .hh, .gg,
      .prob_valid(core_prob_valid[k]), .prob_rec(core_prob_rec),
      .sol_valid(core_sol_valid[k]), .sol(core_sol[k]), .sol_ack(core_sol_ack[k]),
      .cmd_valid(core_cmd_valid[k]), .cmd_ready(core_cmd_ready[k]), .cmd(core_cmd[k]),
      .rsp_valid(core_rsp_valid[k]), .rsp(core_rsp[k]),
      .n_solved(n_solved[k]), .n_infeasible(n_infeasible[k]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t fx(input real r);
    return word_t'($rtoi(r * 65536.0));
  endfunction
  function automatic word_t fmul(input word_t p, input word_t q);
    logic signed [2*WORD_W-1:0] f;
    f = p * q;
    return WORD_W'(f >>> FRAC);
  endfunction

  task automatic send_word(input logic [39:0] w);
    for (int b = 0; b < 5; b++) begin
      @(negedge clk); in_valid = 1; in_data = w[8*b +: 8];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic ext_access(input logic we, input int addr, input word_t wd, output word_t rd);
    @(negedge clk); ext1_req = 1; ext1_we = we; ext1_addr = 12'(addr); ext1_wdata = wd;
    @(posedge clk);
    while (!ext1_gnt) @(posedge clk);
    @(negedge clk); ext1_req = 0;
    if (!we) begin
      while (!ext1_rvalid) @(negedge clk);
      rd = $signed(ext1_rdata);
    end
  endtask

  // mechanism monitors
  int both_busy = 0, overtake = 0, deep_queue = 0;
  always @(posedge clk) if (rst_n) begin
    if (core_busy == '1) both_busy++;
    // core 1 gets a new problem while core 0 still holds an older one, or vice versa
    for (int k = 0; k < K; k++)
      if (core_prob_valid[k] && core_busy != '0 && n_dispatched > 16'd2) overtake++;
    if (dut.q_tail - dut.q_head > 2) deep_queue++;
  end

  // result collection
  logic [39:0] acc;
  int nb = 0, nw = 0;
  word_t res [SRAM2_DEPTH];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    acc[8*nb +: 8] = out_data;
    nb++;
    if (nb == 5) begin res[nw] = $signed(acc[35:0]); nb = 0; nw++; end
  end

  initial begin
    word_t rd, bestf, f, gx;
    word_t bx [NVAR], x [NVAR];
    int ties, infeas_total, solved_total, cycles;
    time t_start;
    in_valid = 0; in_data = '0; out_ready = 1;
    ext1_req = 0; ext1_we = 0; ext1_addr = '0; ext1_wdata = '0;
    for (int k = 0; k < K; k++) begin core_div_in_valid[k] = 0; core_div_a[k] = '0; core_div_b[k] = '0; end
    // test problem
    for (int i = 0; i < NVAR; i++) begin
      hh[i] = fx(1.0 + $urandom_range(0, 300) / 100.0);
      if (i == 0)      gg[i] = -fmul(hh[i], fx(0.6));
      else if (i == 1) gg[i] = -fmul(hh[i], fx(0.7));
      else if (i < 6)  gg[i] = -fmul(hh[i], fx((i == 4) ? 1.4 : 0.15 + 0.17 * i));
      else             gg[i] = fx($urandom_range(0, 400) / 100.0 - 2.0);
      x0[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. reference first point on core 0's divider
    fork
      for (int i = 0; i < NVAR; i++) begin
        @(negedge clk); core_div_in_valid[0] = 1; core_div_a[0] = -gg[i]; core_div_b[0] = hh[i];
        if (i == NVAR - 1) begin @(negedge clk); core_div_in_valid[0] = 0; end
      end
      for (int i = 0; i < NVAR; i++) begin
        @(posedge clk); while (!core_div_out_valid[0]) @(posedge clk);
        x0[i] = core_div_q[0];
        chk(x0[i] == word_t'(((-gg[i]) <<< FRAC) / hh[i]), "first point quotient");
      end
    join
    // 2. problem over the byte link; the design computes the first point itself
    send_word({4'h0, 8'h0, 12'(NVAR * NVAR + NVAR), int_mask});
    for (int i = 0; i < NVAR; i++)
      for (int j = 0; j < NVAR; j++) send_word({4'h0, (i == j) ? hh[i] : word_t'(0)});
    for (int i = 0; i < NVAR; i++) send_word({4'h0, gg[i]});
    while (!problem_loaded) @(negedge clk);
    chk(problem_words == 12'(NVAR * NVAR + NVAR), "header word count");
    while (!search_start) @(negedge clk);
    chk(!fp_ovf, "first point without overflow");
    t_start = $time;
    for (int i = 0; i < NVAR; i++) begin
      ext_access(1'b0, FP_BASE + i, '0, rd);
      chk(rd == x0[i], "first point computed in the design");
      ext_access(1'b0, PROB_BASE + NVAR * NVAR + i, '0, rd);
      chk(rd == gg[i], "g read back from SRAM1");
    end
    while (!done) @(negedge clk);
    cycles = int'(($time - t_start) / 10);
    while (out_busy || nw < SRAM2_DEPTH) @(negedge clk);
    // 4. brute force reference
    bestf = FX_MAX; ties = 0;
    for (int a = 0; a < 64; a++) begin
      if ((a & 3) == 3) continue;
      for (int i = 0; i < NVAR; i++) x[i] = (i < 6) ? (((a >> i) & 1) ? FX_ONE : '0) : x0[i];
      gx = '0;
      for (int i = 0; i < NVAR; i++) gx = gx + fmul(gg[i], x[i]);
      f = gx;
      for (int i = 0; i < NVAR; i++) f = f + (fmul(fmul(hh[i], x[i]), x[i]) >>> 1);
      if (f == bestf) ties++;
      if (f < bestf) begin bestf = f; bx = x; ties = 0; end
    end
    chk(found && best_f == bestf, "optimal value");
    chk(res[NVAR] == bestf, "optimal value sent to host");
    if (ties == 0)
      for (int i = 0; i < NVAR; i++) chk(res[i] == bx[i], "optimal solution entry sent to host");
    chk(!q_overflow, "no queue overflow");
    infeas_total = 0; solved_total = 0;
    for (int k = 0; k < K; k++) begin infeas_total += n_infeasible[k]; solved_total += n_solved[k]; end
    chk(solved_total == int'(n_dispatched), "every dispatched problem solved");
    chk(int'(n_pruned) + int'(n_branched) + int'(n_updates) == solved_total, "every solution handled once");
    $display("mechanisms: solved=%0d branched=%0d pruned_bound=%0d pruned_infeasible=%0d updates=%0d both_busy=%0d overtake=%0d deep_queue=%0d per_core=%0d/%0d cycles=%0d",
             solved_total, n_branched, int'(n_pruned) - infeas_total, infeas_total, n_updates,
             both_busy, overtake, deep_queue, n_solved[0], n_solved[1], cycles);
    chk(n_branched > 0, "branching happened");
    chk(int'(n_pruned) - infeas_total > 0, "pruning by bound happened");
    chk(infeas_total > 0, "pruning by infeasibility happened");
    chk(n_updates > 0, "incumbent update happened");
    chk(both_busy > 0, "both cores busy at once");
    chk(overtake > 0, "assignment while another core busy");
    chk(deep_queue > 0, "several problems queued");
    chk(n_solved[0] > 0 && n_solved[1] > 0, "both cores used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
