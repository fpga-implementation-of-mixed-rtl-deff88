// tb_fp_calc: self-checking test of the first point calculator.
//
// Writes a random diagonally dominant symmetric positive definite H and a
// random g (16 variables) into an SRAM1 model behind the local-bus arbiter,
// starts the calculator, reads x0 back from FP_BASE and compares it with a
// double-precision Gaussian-elimination solution of H x = -g computed here
// (tolerance 2^-9). Two problems are solved; the second also checks that a
// diagonal H gives exactly -g_i / h_ii. The run time is checked against the
// stated bound.
module tb_fp_calc;
  import miqp_pkg::*;

  localparam int NV = NVAR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, ovf;
  logic [1:0] req, we, gnt, rvalid;
  logic [1:0][11:0] addr;
  logic [1:0][WORD_W-1:0] wdata;
  logic [WORD_W-1:0] rdata;

  sram_arb #(.NREQ(2), .WIDTH(WORD_W), .DEPTH(SRAM1_DEPTH)) u_bus (.*);
  fp_calc dut (
    .clk, .rst_n, .start, .busy, .done, .ovf,
    .s1_req(req[0]), .s1_we(we[0]), .s1_addr(addr[0]), .s1_wdata(wdata[0]),
    .s1_gnt(gnt[0]), .s1_rvalid(rvalid[0]), .s1_rdata(rdata));

  int checks = 0, failures = 0;

  function automatic word_t fx(input real v);
    return word_t'($rtoi(v * 65536.0));
  endfunction
  // uniform integer in [-span, span] as a real
  function automatic real srand(input int span);
    int u;
    u = int'($urandom_range(0, 2 * span));
    return $itor(u - span);
  endfunction
  function automatic real rl(input word_t w);
    return $itor(w) / 65536.0;
  endfunction

  task automatic bus(input logic w, input int a, input word_t d, output word_t q);
    @(negedge clk); req[1] = 1; we[1] = w; addr[1] = 12'(a); wdata[1] = d;
    @(posedge clk); while (!gnt[1]) @(posedge clk);
    @(negedge clk); req[1] = 0;
    if (!w) begin while (!rvalid[1]) @(negedge clk); q = $signed(rdata); end
  endtask

  initial begin
    word_t hq [NV][NV];
    word_t gq [NV];
    real   m [NV][NV+1];
    real   xr [NV];
    word_t q;
    int cyc;
    req[1] = 0; we[1] = 0; addr[1] = '0; wdata[1] = '0; start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < NV; i++)
        for (int j = i; j < NV; j++) begin
          if (i == j) hq[i][j] = fx(2.0 + $urandom_range(0, 200) / 100.0);
          else        hq[i][j] = (pass == 1) ? '0 : fx(srand(100) / 1000.0);
          hq[j][i] = hq[i][j];
        end
      for (int i = 0; i < NV; i++) gq[i] = fx(srand(200) / 100.0);
      for (int i = 0; i < NV; i++) begin
        for (int j = 0; j < NV; j++) bus(1, PROB_BASE + i * NV + j, hq[i][j], q);
        bus(1, PROB_BASE + NV * NV + i, gq[i], q);
      end
      // reference
      for (int i = 0; i < NV; i++) begin
        for (int j = 0; j < NV; j++) m[i][j] = rl(hq[i][j]);
        m[i][NV] = -rl(gq[i]);
      end
      for (int kk = 0; kk < NV; kk++)
        for (int i = kk + 1; i < NV; i++) begin
          real fr;
          fr = m[i][kk] / m[kk][kk];
          for (int j = kk; j <= NV; j++) m[i][j] -= fr * m[kk][j];
        end
      for (int i = NV - 1; i >= 0; i--) begin
        real s;
        s = m[i][NV];
        for (int j = i + 1; j < NV; j++) s -= m[i][j] * xr[j];
        xr[i] = s / m[i][i];
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (ovf) begin failures++; $display("FAIL ovf set"); end
      if (cyc > NV * NV * NV + 40 * NV * NV) begin failures++; $display("FAIL %0d cycles", cyc); end
      $display("first point computed in %0d cycles", cyc);
      for (int i = 0; i < NV; i++) begin
        real d;
        bus(0, FP_BASE + i, '0, q);
        d = rl(q) - xr[i];
        checks++;
        if (d > 1.0 / 512 || d < -1.0 / 512) begin
          failures++; $display("FAIL x0[%0d] = %f want %f", i, rl(q), xr[i]);
        end
        if (pass == 1) begin
          checks++;
          if (q !== word_t'(((-gq[i]) <<< FRAC) / hq[i][i])) begin
            failures++; $display("FAIL diagonal x0[%0d] = %0d", i, q);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
