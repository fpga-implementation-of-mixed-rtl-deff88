// tb_output_module: self-checking test of the host output module.
//
// Fills a model SRAM2 with random words, starts the module, accepts bytes
// with random back-pressure, reassembles five bytes per word and checks that
// all 17 words arrive in order with zero upper bits, then that busy drops.
module tb_output_module;
  import miqp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, busy, s2_req, s2_gnt, s2_rvalid, out_valid, out_ready;
  logic [4:0] s2_addr;
  logic [WORD_W-1:0] s2_rdata;
  logic [7:0] out_data;
  output_module dut (.*);

  int checks = 0, failures = 0;
  logic [WORD_W-1:0] m2 [SRAM2_DEPTH];
  always_ff @(posedge clk) begin
    s2_gnt    <= 1'b0;
    s2_rvalid <= s2_req && s2_gnt;
    if (s2_req && s2_gnt) s2_rdata <= m2[s2_addr];
    if (s2_req && !s2_gnt) s2_gnt <= ($urandom_range(0, 1) == 0);
  end
  // gnt is registered here, so it must be dropped in the cycle the access completes
  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  logic [39:0] acc;
  int nb = 0, nw = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    acc[8*nb +: 8] = out_data;
    nb++;
    if (nb == 5) begin
      checks++;
      if (acc != {4'h0, m2[nw]}) begin failures++; $display("FAIL word %0d = %h", nw, acc); end
      nb = 0; nw++;
    end
  end

  initial begin
    start = 0;
    for (int i = 0; i < SRAM2_DEPTH; i++) m2[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    checks++;
    if (nw != SRAM2_DEPTH) begin failures++; $display("FAIL %0d words sent", nw); end
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
