// tb_dot_pipe: self-checking test of the pipelined dot product.
//
// Fills a single-port SRAM with random fixed-point rows, starts dot products
// of several lengths against a random register vector, compares each result
// with a reference computed here, and checks that done comes exactly len+3
// cycles after start.
module tb_dot_pipe;
  import miqp_pkg::*;

  localparam int unsigned N = 36, VLEN = 17, AW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, mem_rd;
  logic [AW-1:0] base, mem_addr, ram_addr;
  logic [4:0] len;
  logic [VLEN-1:0][N-1:0] v;
  logic [N-1:0] mem_rdata;
  logic signed [N-1:0] result;
  logic tb_we;
  logic [AW-1:0] tb_addr;
  logic [N-1:0] tb_wdata;

  logic signed [N-1:0] shadow [256];

  spram #(.WIDTH(N), .DEPTH(256)) ram (
    .clk, .en(tb_we | mem_rd), .we(tb_we), .addr(ram_addr), .wdata(tb_wdata), .rdata(mem_rdata));
  assign ram_addr = tb_we ? tb_addr : mem_addr;

  dot_pipe #(.N(N), .FR(FRAC), .VECLEN(VLEN), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;

  function automatic logic signed [N-1:0] ref_dot(input int b, input int l);
    logic signed [N-1:0] acc;
    logic signed [2*N-1:0] p;
    acc = '0;
    for (int i = 0; i < l; i++) begin
      p = shadow[b+i] * $signed(v[i]);
      acc = acc + N'(p >>> FRAC);
    end
    return acc;
  endfunction

  initial begin
    int t0, lat;
    start = 0; base = '0; len = '0; tb_we = 0; tb_addr = '0; tb_wdata = '0;
    for (int i = 0; i < VLEN; i++) v[i] = N'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      shadow[i] = N'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      @(negedge clk); tb_we = 1; tb_addr = AW'(i); tb_wdata = shadow[i];
    end
    @(negedge clk); tb_we = 0;
    for (int k = 0; k < 20; k++) begin
      int b, l;
      l = (k < 3) ? (k == 0 ? 1 : (k == 1 ? 16 : 17)) : $urandom_range(1, VLEN);
      b = $urandom_range(0, 256 - l);
      @(negedge clk); start = 1; base = AW'(b); len = 5'(l);
      @(posedge clk); t0 = 0;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 2;
      if (result !== ref_dot(b, l)) begin
        failures++; $display("FAIL dot base %0d len %0d got %0d want %0d", b, l, result, ref_dot(b, l));
      end
      if (lat != l + 3) begin
        failures++; $display("FAIL latency %0d want %0d", lat, l + 3);
      end
    end
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
