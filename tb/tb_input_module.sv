// tb_input_module: self-checking test of the host input module.
//
// Sends a header and random 36-bit words as five bytes each with random
// gaps, grants the SRAM1 bus only now and then, and checks every word
// written (address and data), the decoded header fields and the loaded pulse.
module tb_input_module;
  import miqp_pkg::*;
  localparam int NWORDS = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, s1_req, s1_gnt, loaded;
  logic [7:0] in_data;
  logic [11:0] s1_addr, n_words;
  logic [WORD_W-1:0] s1_wdata;
  logic [NVAR-1:0] int_mask;
  input_module #(.PB(100)) dut (.*);

  int checks = 0, failures = 0, nwr = 0, nloaded = 0;
  logic [WORD_W-1:0] words [NWORDS];
  always_ff @(posedge clk) s1_gnt <= ($urandom_range(0, 2) == 0);

  always @(posedge clk) if (rst_n) begin
    if (s1_req && s1_gnt) begin
      checks++;
      if (s1_addr != 12'(100 + nwr) || s1_wdata != words[nwr]) begin
        failures++; $display("FAIL word %0d at %0d = %h", nwr, s1_addr, s1_wdata);
      end
      nwr++;
    end
    if (loaded) begin
      nloaded++;
      checks++;
      if (nwr != NWORDS) begin failures++; $display("FAIL loaded after %0d words", nwr); end
    end
  end

  task automatic send_word(input logic [39:0] w);
    for (int b = 0; b < 5; b++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = w[8*b +: 8];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    for (int i = 0; i < NWORDS; i++) words[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_word({4'hF, 8'h0, 12'(NWORDS), 16'hA5C3});
    for (int i = 0; i < NWORDS; i++) send_word({4'hF, words[i]});
    repeat (20) @(posedge clk);
    checks += 3;
    if (int_mask != 16'hA5C3) begin failures++; $display("FAIL int_mask %h", int_mask); end
    if (n_words != 12'(NWORDS)) begin failures++; $display("FAIL n_words %0d", n_words); end
    if (nloaded != 1 || nwr != NWORDS) begin failures++; $display("FAIL loaded %0d words %0d", nloaded, nwr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
