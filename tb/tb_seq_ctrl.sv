// tb_seq_ctrl: self-checking test of the sequence controller.
//
// SRAM1's queue is a model array behind an always-granting bus; a stand-in
// for the branch-and-bound module appends two children for every problem
// numbered below NPROB/2 (a 15-node binary tree); three stand-in cores
// take random times. Checked: problems leave the queue in FIFO order, each
// goes to the lowest-numbered idle core, the problem-index write names that
// core and record, every solution reaches the branch-and-bound side with its
// own core number, all cores are busy at once at some point, and done rises
// only after all 15 problems are solved.
module tb_seq_ctrl;
  import miqp_pkg::*;

  localparam int NC = 3, QD = 16, QPW = 5, CW = 2, NPROB = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, done, s1_req, s1_gnt, s1_rvalid, pi_we, bb_sol_valid, bb_sol_ready, bb_busy;
  logic [QPW-1:0] q_tail, q_head;
  logic [11:0] s1_addr;
  logic [WORD_W-1:0] s1_rdata;
  logic [NC-1:0] prob_valid, core_sol_valid, core_sol_ack, core_busy;
  prob_rec_t prob_rec, pi_rec;
  qp_sol_t core_sol [NC];
  qp_sol_t bb_sol;
  logic [CW-1:0] pi_core, bb_sol_core;
  logic [15:0] n_dispatched;

  seq_ctrl #(.NC(NC), .QD(QD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // queue memory
  logic [WORD_W-1:0] qmem [4096];
  assign s1_gnt = s1_req;
  always_ff @(posedge clk) begin
    s1_rvalid <= s1_req;
    if (s1_req) s1_rdata <= qmem[s1_addr];
  end

  // stand-in cores
  int remaining [NC];
  int holding [NC];
  int next_expected = 0;
  int solved = 0;
  int all_busy_seen = 0;
  always_ff @(posedge clk) begin
    for (int k = 0; k < NC; k++) begin
      if (prob_valid[k]) begin
        remaining[k] <= 3 + $urandom_range(0, 25);
        holding[k] <= int'(prob_rec.fix_mask);
        core_sol_valid[k] <= 1'b0;
      end else if (remaining[k] > 0) begin
        remaining[k] <= remaining[k] - 1;
        if (remaining[k] == 1) begin
          core_sol_valid[k] <= 1'b1;
          core_sol[k].x[0] <= WORD_W'(holding[k]);
          core_sol[k].x[1] <= WORD_W'(k);
        end
      end else if (core_sol_ack[k]) core_sol_valid[k] <= 1'b0;
    end
  end

  // dispatch checks
  always @(negedge clk) if (rst_n) begin
    if (prob_valid != '0) begin
      int exp_core;
      exp_core = -1;
      for (int k = NC - 1; k >= 0; k--) if (!core_busy[k]) exp_core = k;
      chk($onehot(prob_valid), "one core per dispatch");
      chk(exp_core >= 0 && prob_valid[exp_core], "lowest idle core chosen");
      chk(int'(prob_rec.fix_mask) == next_expected, "FIFO order");
      chk(pi_we && pi_rec == prob_rec && prob_valid[pi_core], "problem-index write");
      next_expected++;
    end
    if (core_busy == '1) all_busy_seen++;
  end

  // stand-in branch-and-bound module
  int tail = 0;
  int bb_cnt = 0;
  int bb_prob = 0;
  assign q_tail = QPW'(tail);
  assign bb_busy = (bb_cnt != 0);
  assign bb_sol_ready = !bb_busy && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (bb_sol_valid && bb_sol_ready) begin
      chk(int'(bb_sol.x[1]) == int'(bb_sol_core), "solution carries its core number");
      bb_prob = int'(bb_sol.x[0]);
      bb_cnt = 4;
      solved++;
    end else if (bb_cnt > 0) begin
      bb_cnt--;
      if (bb_cnt == 0 && bb_prob < NPROB / 2) begin
        qmem[Q_BASE + (tail % QD)] = WORD_W'(2 * bb_prob + 1);
        qmem[Q_BASE + ((tail + 1) % QD)] = WORD_W'(2 * bb_prob + 2);
        tail += 2;
      end
    end
    if (done) chk(solved == NPROB, "done only after every problem");
  end

  initial begin
    start = 0;
    for (int k = 0; k < NC; k++) begin
      remaining[k] = 0; core_sol_valid[k] = 0; core_sol[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    qmem[Q_BASE] = '0; tail = 1;   // root
    start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    chk(n_dispatched == 16'(NPROB) && solved == NPROB && next_expected == NPROB, "all problems dispatched and solved");
    chk(all_busy_seen > 0, "all cores busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
