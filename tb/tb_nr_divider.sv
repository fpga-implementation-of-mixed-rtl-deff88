// tb_nr_divider: self-checking test of the pipelined non-restoring divider.
//
// Streams one division per cycle (random operands plus corner cases: exact
// quotients, negative operands, overflow, division by zero) and compares each
// result with a 128-bit reference computed here. Also checks that the first
// result arrives exactly N+1 cycles after its operands and that a full
// stream keeps one result per cycle.
module tb_nr_divider;
  import miqp_pkg::*;

  localparam int unsigned N  = 36;
  localparam int unsigned FR = 16;
  localparam int NOPS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic signed [N-1:0] a, b, q;
  logic                out_valid, ovf;

  nr_divider #(.N(N), .FRAC(FR)) dut (.*);

  int checks = 0, failures = 0;
  logic signed [N-1:0] qa [NOPS], qb [NOPS];
  int sent = 0, got = 0;
  longint cyc = 0, first_in = -1, first_out = -1;

  function automatic void expect_q(input logic signed [N-1:0] x, input logic signed [N-1:0] y,
                                   output logic signed [N-1:0] eq, output logic eo);
    logic [127:0] ma, mb, mq;
    ma = x[N-1] ? 128'(-x) : 128'(x);
    mb = y[N-1] ? 128'(-y) : 128'(y);
    ma = ma[N-1:0];
    mb = mb[N-1:0];
    if (mb == 0) begin
      eo = 1'b1; mq = (128'(1) << (N-1)) - 1;
    end else begin
      mq = (ma << FR) / mb;
      eo = (mq >= (128'(1) << (N-1)));
      if (eo) mq = (128'(1) << (N-1)) - 1;
    end
    eq = (x[N-1] ^ y[N-1]) ? -$signed(N'(mq)) : $signed(N'(mq));
  endfunction

  initial begin
    for (int i = 0; i < NOPS; i++) begin
      qa[i] = $signed({$urandom, $urandom}) >>> ($urandom_range(0, 30));
      qb[i] = $signed({$urandom, $urandom}) >>> ($urandom_range(4, 34));
    end
    qa[0] = 36'sd6 <<< FR;  qb[0] = 36'sd3 <<< FR;      //  6 / 3 = 2
    qa[1] = -(36'sd7 <<< FR); qb[1] = 36'sd2 <<< FR;    // -7 / 2 = -3.5
    qa[2] = 36'sd1 <<< FR;  qb[2] = -(36'sd4 <<< FR);   //  1 / -4
    qa[3] = 36'sd5;         qb[3] = 36'sd0;             // divide by zero
    qa[4] = 36'sh3_0000_0000; qb[4] = 36'sd1;           // overflow
    qa[5] = 36'sd0;         qb[5] = 36'sd9 <<< FR;
  end

  // driver: one operation per cycle after reset
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sent < NOPS) begin
      in_valid <= 1'b1;
      a <= qa[sent];
      b <= qb[sent];
      if (sent == 0) first_in <= cyc + 1;
      sent <= sent + 1;
    end else begin
      in_valid <= 1'b0;
    end
  end

  // monitor
  always_ff @(posedge clk) begin
    if (out_valid) begin
      logic signed [N-1:0] eq; logic eo;
      expect_q(qa[got], qb[got], eq, eo);
      checks = checks + 1;
      if (q !== eq || ovf !== eo) begin
        failures = failures + 1;
        if (failures < 10) $display("FAIL op %0d: %0d / %0d got %0d (ovf %0b) want %0d (ovf %0b)",
                                    got, qa[got], qb[got], q, ovf, eq, eo);
      end
      if (got == 0) first_out = cyc;
      got = got + 1;
    end
  end

  initial begin
    in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (got == NOPS);
    @(posedge clk);
    // latency: operands present in cycle first_in, result sampled in cycle first_out
    checks = checks + 1;
    if (first_out - first_in != N + 1) begin
      failures = failures + 1;
      $display("FAIL latency %0d, want %0d", first_out - first_in, N + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 200) @(posedge clk);
    failures = failures + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
