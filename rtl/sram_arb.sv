// sram_arb: local bus, a fixed-priority shared port onto one single-port SRAM.
//
// Several modules share each SRAM over a 36-bit local bus. Every requester
// raises req with we/addr/wdata and holds them until it sees gnt; the
// lowest-numbered requesting master is granted in the same cycle and its
// access reaches the SRAM at the next clock edge. Read data appear on the
// shared rdata one cycle after the grant, flagged for the granted master by
// its rvalid bit. The 36-bit bus follows the published block diagram; the
// arbitration scheme is this design's own choice. The SRAM itself is
// instantiated inside so that only bus accesses can reach it.
module sram_arb #(
  parameter int unsigned NREQ  = 2,
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NREQ-1:0]            req,
  input  logic [NREQ-1:0]            we,
  input  logic [NREQ-1:0][AW-1:0]    addr,
  input  logic [NREQ-1:0][WIDTH-1:0] wdata,
  output logic [NREQ-1:0]            gnt,
  output logic [NREQ-1:0]            rvalid,
  output logic [WIDTH-1:0]           rdata
);

  logic          en, wr;
  logic [AW-1:0] a;
  logic [WIDTH-1:0] d;

  always_comb begin
    gnt = '0;
    en  = 1'b0;
    wr  = 1'b0;
    a   = '0;
    d   = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt    = '0;
        gnt[i] = 1'b1;
        en     = 1'b1;
        wr     = we[i];
        a      = addr[i];
        d      = wdata[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= '0;
    else        rvalid <= gnt & ~we;
  end

  spram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_ram (
    .clk, .en, .we(wr), .addr(a), .wdata(d), .rdata);

  // at most one master owns the bus in a cycle
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
