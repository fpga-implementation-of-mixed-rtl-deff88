// miqp_top: multi-core MIQP solver (branch and bound over K QP solver cores).
//
// The host sends the original problem byte by byte; the input module writes
// it into SRAM1 (H row-major, then g, then any further problem words). The
// first point calculator then reads H and g, computes the first point of the
// dual active set method once (H x0 = -g) and stores it in SRAM1 next to the
// problem, after which the branch-and-bound search begins by itself: the root
// sub-problem is queued in SRAM1, the sequence controller hands queued
// sub-problems to whichever QP solver core is idle, each core's result goes
// to the branch-and-bound module, which prunes, branches (new children at the
// queue tail) or records a new best integer solution in SRAM2. When the
// queue is empty and every core and the branch-and-bound module are idle,
// the output module sends SRAM2 (solution, then optimal value) to the host.
// SRAM1 sits on local bus 1 and SRAM2 on local bus 2, both 36 bits wide.
//
// Each QP solver core here is the arithmetic engine (work space, vector
// registers, pipelined dot product, pipelined divider). The sequencing of
// the Goldfarb-Idnani dual active set iterations is outside this RTL: per
// core, the problem record leaves on
// prob_valid/prob_rec, the engine is driven through core_cmd_*/core_div_*,
// and the solution returns on core_sol_valid/core_sol (held until
// core_sol_ack). ext1_* gives those sequencers access to SRAM1. The block
// structure, bus widths, memory sizes (SRAM1 about 148 Kbit, SRAM2 612 bit)
// and K = 2 follow the published design; the port protocol is this
// design's own.
module miqp_top
  import miqp_pkg::*;
#(
  parameter int unsigned K = NCORE,
  localparam int unsigned CW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned S1AW = $clog2(SRAM1_DEPTH),
  localparam int unsigned S2AW = $clog2(SRAM2_DEPTH),
  localparam int unsigned QPW  = $clog2(Q_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host link (8-bit)
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data,
  // problem loaded / first point ready
  output logic              problem_loaded,
  output logic [11:0]       problem_words,   // problem words received (header field)
  output logic              fp_busy,         // first point being computed
  output logic              fp_ovf,          // first point division saturated
  output logic              search_start,    // first point stored, search begins
  // SRAM1 access for the dual active set sequencers
  input  logic              ext1_req,
  input  logic              ext1_we,
  input  logic [S1AW-1:0]   ext1_addr,
  input  logic [WORD_W-1:0] ext1_wdata,
  output logic              ext1_gnt,
  output logic              ext1_rvalid,
  output logic [WORD_W-1:0] ext1_rdata,
  // per QP solver core: problem out, solution in
  output logic [K-1:0]      core_prob_valid,
  output prob_rec_t         core_prob_rec,
  input  logic [K-1:0]      core_sol_valid,
  input  qp_sol_t           core_sol [K],
  output logic [K-1:0]      core_sol_ack,
  // per QP solver core: engine command and divider ports
  input  logic [K-1:0]      core_cmd_valid,
  output logic [K-1:0]      core_cmd_ready,
  input  qc_cmd_t           core_cmd [K],
  output logic [K-1:0]      core_rsp_valid,
  output qc_rsp_t           core_rsp [K],
  input  logic [K-1:0]      core_div_in_valid,
  input  word_t             core_div_a [K],
  input  word_t             core_div_b [K],
  output logic [K-1:0]      core_div_out_valid,
  output word_t             core_div_q [K],
  output logic [K-1:0]      core_div_ovf,
  // status
  output logic              done,
  output logic              out_busy,        // result being sent to the host
  output logic              found,
  output word_t             best_f,
  output logic              q_overflow,
  output logic [K-1:0]      core_busy,
  output logic [15:0]       n_dispatched,
  output logic [15:0]       n_pruned,
  output logic [15:0]       n_branched,
  output logic [15:0]       n_updates
);

  // ---------------- local bus 1: SRAM1 ----------------
  // master 0: branch-and-bound (queue tail), 1: sequence control (queue head),
  // 2: input module, 3: first point calculator, 4: external sequencers
  localparam int unsigned M1 = 5;
  logic [M1-1:0]             b1_req, b1_we, b1_gnt, b1_rvalid;
  logic [M1-1:0][S1AW-1:0]   b1_addr;
  logic [M1-1:0][WORD_W-1:0] b1_wdata;
  logic [WORD_W-1:0]         b1_rdata;

  sram_arb #(.NREQ(M1), .WIDTH(WORD_W), .DEPTH(SRAM1_DEPTH)) u_bus1 (
    .clk, .rst_n, .req(b1_req), .we(b1_we), .addr(b1_addr), .wdata(b1_wdata),
    .gnt(b1_gnt), .rvalid(b1_rvalid), .rdata(b1_rdata));

  // ---------------- local bus 2: SRAM2 ----------------
  // master 0: branch-and-bound (incumbent), 1: output module
  localparam int unsigned M2 = 2;
  logic [M2-1:0]             b2_req, b2_we, b2_gnt, b2_rvalid;
  logic [M2-1:0][S2AW-1:0]   b2_addr;
  logic [M2-1:0][WORD_W-1:0] b2_wdata;
  logic [WORD_W-1:0]         b2_rdata;

  sram_arb #(.NREQ(M2), .WIDTH(WORD_W), .DEPTH(SRAM2_DEPTH)) u_bus2 (
    .clk, .rst_n, .req(b2_req), .we(b2_we), .addr(b2_addr), .wdata(b2_wdata),
    .gnt(b2_gnt), .rvalid(b2_rvalid), .rdata(b2_rdata));

  // ---------------- input module ----------------
  logic [NVAR-1:0] int_mask;

  input_module u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .s1_req(b1_req[2]), .s1_addr(b1_addr[2]), .s1_wdata(b1_wdata[2]), .s1_gnt(b1_gnt[2]),
    .int_mask, .n_words(problem_words), .loaded(problem_loaded));
  assign b1_we[2] = 1'b1;

  // ---------------- first point calculator ----------------
  fp_calc u_fp (
    .clk, .rst_n, .start(problem_loaded), .busy(fp_busy), .done(search_start), .ovf(fp_ovf),
    .s1_req(b1_req[3]), .s1_we(b1_we[3]), .s1_addr(b1_addr[3]), .s1_wdata(b1_wdata[3]),
    .s1_gnt(b1_gnt[3]), .s1_rvalid(b1_rvalid[3]), .s1_rdata(b1_rdata));

  // external sequencers
  assign b1_req[4]   = ext1_req;
  assign b1_we[4]    = ext1_we;
  assign b1_addr[4]  = ext1_addr;
  assign b1_wdata[4] = ext1_wdata;
  assign ext1_gnt    = b1_gnt[4];
  assign ext1_rvalid = b1_rvalid[4];
  assign ext1_rdata  = b1_rdata;

  // ---------------- sequence control and branch-and-bound ----------------
  logic [QPW-1:0]  q_head, q_tail;
  logic            pi_we, bb_sol_valid, bb_sol_ready, bb_busy;
  logic [CW-1:0]   pi_core, bb_sol_core;
  prob_rec_t       pi_rec;
  qp_sol_t         bb_sol;

  seq_ctrl #(.NC(K)) u_seq (
    .clk, .rst_n, .start(search_start), .done,
    .q_tail, .q_head,
    .s1_req(b1_req[1]), .s1_addr(b1_addr[1]), .s1_gnt(b1_gnt[1]),
    .s1_rvalid(b1_rvalid[1]), .s1_rdata(b1_rdata),
    .prob_valid(core_prob_valid), .prob_rec(core_prob_rec),
    .core_sol_valid, .core_sol, .core_sol_ack,
    .pi_we, .pi_core, .pi_rec,
    .bb_sol_valid, .bb_sol_ready, .bb_sol_core, .bb_sol, .bb_busy,
    .core_busy, .n_dispatched);
  assign b1_we[1]    = 1'b0;
  assign b1_wdata[1] = '0;

  bb_unit #(.NC(K)) u_bb (
    .clk, .rst_n, .int_mask, .start(search_start),
    .pi_we, .pi_core, .pi_rec,
    .sol_valid(bb_sol_valid), .sol_ready(bb_sol_ready), .sol_core(bb_sol_core), .sol(bb_sol),
    .q_head, .q_tail,
    .s1_req(b1_req[0]), .s1_addr(b1_addr[0]), .s1_wdata(b1_wdata[0]), .s1_gnt(b1_gnt[0]),
    .s2_req(b2_req[0]), .s2_addr(b2_addr[0]), .s2_wdata(b2_wdata[0]), .s2_gnt(b2_gnt[0]),
    .busy(bb_busy), .found, .best_f, .q_overflow, .n_pruned, .n_branched, .n_updates);
  assign b1_we[0] = 1'b1;
  assign b2_we[0] = 1'b1;

  // ---------------- output module ----------------
  logic done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= done;
  end

  output_module u_out (
    .clk, .rst_n, .start(done && !done_q), .busy(out_busy),
    .s2_req(b2_req[1]), .s2_addr(b2_addr[1]), .s2_gnt(b2_gnt[1]),
    .s2_rvalid(b2_rvalid[1]), .s2_rdata(b2_rdata),
    .out_valid, .out_ready, .out_data);
  assign b2_we[1]    = 1'b0;
  assign b2_wdata[1] = '0;

  // ---------------- QP solver cores ----------------
  for (genvar k = 0; k < K; k++) begin : g_core
    qp_core u_core (
      .clk, .rst_n,
      .cmd_valid(core_cmd_valid[k]), .cmd_ready(core_cmd_ready[k]), .cmd(core_cmd[k]),
      .rsp_valid(core_rsp_valid[k]), .rsp(core_rsp[k]),
      .div_in_valid(core_div_in_valid[k]), .div_a(core_div_a[k]), .div_b(core_div_b[k]),
      .div_out_valid(core_div_out_valid[k]), .div_q(core_div_q[k]), .div_ovf(core_div_ovf[k]));
  end

endmodule
