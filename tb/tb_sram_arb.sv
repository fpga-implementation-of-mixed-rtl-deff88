// tb_sram_arb: self-checking test of the local-bus arbiter and its SRAM.
//
// Three masters issue random reads and writes at random times. Each cycle the
// grant is compared with the fixed-priority rule, and every read returned to
// a master is compared with a model of the memory kept here.
module tb_sram_arb;
  localparam int NREQ = 3, W = 36, D = 64, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NREQ-1:0] req, we, gnt, rvalid;
  logic [NREQ-1:0][AW-1:0] addr;
  logic [NREQ-1:0][W-1:0] wdata;
  logic [W-1:0] rdata;

  sram_arb #(.NREQ(NREQ), .WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  logic [W-1:0] expect_rd;
  int exp_m = -1;

  initial begin
    req = '0; we = '0; addr = '0; wdata = '0;
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise the memory through master 2
    for (int i = 0; i < D; i++) begin
      @(negedge clk); req = 3'b100; we = 3'b100; addr[2] = AW'(i); wdata[2] = '0;
    end
    @(negedge clk); req = '0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // check read data of last cycle's grant
      if (exp_m >= 0) begin
        checks++;
        if (!rvalid[exp_m] || rdata !== expect_rd) begin
          failures++; $display("FAIL read m%0d got %h want %h", exp_m, rdata, expect_rd);
        end
      end
      for (int m = 0; m < NREQ; m++) begin
        if (!req[m] || gnt[m]) begin
          req[m] = ($urandom_range(0, 2) != 0);
          we[m] = $urandom_range(0, 1);
          addr[m] = AW'($urandom_range(0, D - 1));
          wdata[m] = {$urandom, $urandom};
        end
      end
      #1;
      exp_m = -1;
      for (int m = NREQ - 1; m >= 0; m--) if (req[m]) exp_m = m;
      checks++;
      if (exp_m >= 0 ? (gnt !== NREQ'(1 << exp_m)) : (gnt !== '0)) begin
        failures++; $display("FAIL grant %b for req %b", gnt, req);
      end
      if (exp_m >= 0) begin
        if (we[exp_m]) begin
          model[addr[exp_m]] = wdata[exp_m];
          exp_m = -1;
        end else begin
          expect_rd = model[addr[exp_m]];
        end
      end
    end
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
