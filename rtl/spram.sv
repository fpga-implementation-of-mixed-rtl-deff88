// spram: single-port synchronous SRAM.
//
// One access per cycle: a write stores wdata at addr; a read returns the word
// at addr in the following cycle (rdata is registered). The published solver
// is built around single-port RAM blocks only (SRAM1, SRAM2, the core work
// spaces and the problem-index table), which is why every datapath in this
// design reads at most one memory word per cycle. Contents are not reset;
// the write-first/read behaviour is this design's choice.
module spram #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,     // access enable
  input  logic             we,     // 1 = write, 0 = read
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
