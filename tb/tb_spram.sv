// tb_spram: self-checking test of the single-port SRAM.
//
// Writes random words to random addresses, reads random addresses back and
// compares with a model; also checks the one-cycle read latency and that a
// cycle without enable leaves rdata unchanged.
module tb_spram;
  localparam int W = 36, D = 128, AW = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [AW-1:0] addr;
  logic [W-1:0] wdata, rdata;
  spram #(.WIDTH(W), .DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  logic [W-1:0] model [D];

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); en = 1; we = 1; addr = AW'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      en = 1; we = $urandom_range(0, 1); addr = AW'($urandom_range(0, D - 1)); wdata = {$urandom, $urandom};
      if (we) model[addr] = wdata;
      else begin
        logic [W-1:0] e;
        e = model[addr];
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL rd %0d got %h want %h", addr, rdata, e); end
        @(negedge clk);
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL rdata not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
