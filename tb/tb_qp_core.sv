// tb_qp_core: self-checking test of the QP solver core engine.
//
// Loads constraint rows [a_j, -b_j] into the work space and [x, 1] into the
// vector registers, runs the inequality-value sweep (QC_MATVEC), reads every
// stored s_j back and compares it, the reported minimum and its row index
// with values computed here, checks the sweep's cycle count
// (rows * (len+5) + 2 from command to response), and streams divisions
// through the core's divider.
module tb_qp_core;
  import miqp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    cmd_valid, cmd_ready, rsp_valid;
  qc_cmd_t cmd;
  qc_rsp_t rsp;
  logic    div_in_valid, div_out_valid, div_ovf;
  word_t   div_a, div_b, div_q;

  qp_core dut (.*);

  int checks = 0, failures = 0;
  word_t amat [64][VLEN];
  word_t xv [VLEN];

  task automatic send(input qc_op_t op, input int addr, input word_t data,
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

  function automatic word_t fmul(input word_t p, input word_t q);
    logic signed [2*WORD_W-1:0] f;
    f = p * q;
    return WORD_W'(f >>> FRAC);
  endfunction

  initial begin
    int m, len, c0, cyc;
    word_t s, smin;
    int imin;
    cmd_valid = 0; cmd = '0; div_in_valid = 0; div_a = '0; div_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      m = (rep == 0) ? 8 : 20;
      len = (rep == 2) ? 9 : VLEN;
      for (int i = 0; i < len - 1; i++) xv[i] = word_t'($signed($urandom_range(0, 1 << 19)) - (1 << 18));
      xv[len-1] = FX_ONE;
      for (int i = 0; i < len; i++) send(QC_WR_VEC, i, xv[i]);
      for (int j = 0; j < m; j++)
        for (int i = 0; i < len; i++) begin
          amat[j][i] = word_t'($signed($urandom_range(0, 1 << 19)) - (1 << 18));
          send(QC_WR_MEM, 100 + j * len + i, amat[j][i]);
        end
      // command and timing of the sweep
      @(negedge clk);
      cmd_valid = 1'b1; cmd.op = QC_MATVEC; cmd.addr = WS_AW'(100); cmd.len = 5'(len);
      cmd.rows = 6'(m); cmd.out_base = WS_AW'(20);
      @(posedge clk); @(negedge clk); cmd_valid = 1'b0;
      cyc = 1;
      while (!rsp_valid) begin @(negedge clk); cyc++; end
      smin = FX_MAX; imin = 0;
      for (int j = 0; j < m; j++) begin
        s = '0;
        for (int i = 0; i < len; i++) s = s + fmul(amat[j][i], xv[i]);
        if (s < smin) begin smin = s; imin = j; end
      end
      checks += 3;
      if (rsp.data !== smin || rsp.idx !== 6'(imin)) begin
        failures++; $display("FAIL min %0d@%0d want %0d@%0d", rsp.data, rsp.idx, smin, imin);
      end
      if (cyc != m * (len + 5) + 2) begin
        failures++; $display("FAIL sweep cycles %0d want %0d", cyc, m * (len + 5) + 2);
      end
      if (cmd_ready !== 1'b0 && cyc == 0) failures++;
      for (int j = 0; j < m; j++) begin
        s = '0;
        for (int i = 0; i < len; i++) s = s + fmul(amat[j][i], xv[i]);
        send(QC_RD_MEM, 20 + j, '0);
        while (!rsp_valid) @(negedge clk);
        checks++;
        if (rsp.data !== s) begin
          failures++; $display("FAIL s[%0d] %0d want %0d", j, rsp.data, s);
        end
      end
    end
    // divider access: 10 back-to-back divisions
    fork
      for (int k = 0; k < 10; k++) begin
        @(negedge clk); div_in_valid = 1; div_a = word_t'((k + 1) * 3) <<< FRAC; div_b = word_t'(2) <<< FRAC;
      end
      begin
        for (int k = 0; k < 10; k++) begin
          @(posedge clk); while (!div_out_valid) @(posedge clk);
          checks++;
          if (div_q !== (word_t'((k + 1) * 3) <<< FRAC) / 2) begin
            failures++; $display("FAIL div %0d got %0d", k, div_q);
          end
        end
      end
    join
    div_in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
