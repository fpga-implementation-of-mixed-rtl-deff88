// dot_pipe: pipelined fixed-point dot product of a memory row and a register vector.
//
// Computes result = sum_{i<len} M[base+i] * v[i], each product scaled back by
// 2^-FRAC, where M is a single-port SRAM read through mem_addr/mem_rdata
// (one-cycle read latency) and v is a register array. Because only one
// SRAM word per cycle is available, the second operand sits in registers;
// one element enters the pipeline each cycle through four stages (address,
// SRAM read, multiply, accumulate), so the product of two length-n vectors
// takes n+3 cycles instead of the 4n of a step-by-step loop, as in the
// published solver. The stage split and the 36-bit wrap-around accumulator
// are this design's choices.
//
// Timing: start high in cycle t (with base, len) -> done high for one cycle
// in cycle t+len+3 with result valid from then until the next start.
// start is ignored while busy.
module dot_pipe
  import miqp_pkg::*;
#(
  parameter int unsigned N    = WORD_W,
  parameter int unsigned FR   = FRAC,
  parameter int unsigned VECLEN = VLEN,       // register-vector length
  parameter int unsigned AW   = 12,         // memory address width
  localparam int unsigned IW  = $clog2(VECLEN + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [AW-1:0]       base,
  input  logic [IW-1:0]       len,          // 1..VECLEN
  input  logic [VECLEN-1:0][N-1:0] v,
  output logic                mem_rd,
  output logic [AW-1:0]       mem_addr,
  input  logic [N-1:0]        mem_rdata,
  output logic                busy,
  output logic                done,
  output logic signed [N-1:0] result
);

  logic [IW-1:0] idx;          // element being addressed
  logic          issuing;
  logic          s1_vld, s2_vld, s3_last, s2_last, s1_last;
  logic [IW-1:0] s1_idx;
  logic signed [N-1:0] prod;
  logic [AW-1:0] abase;
  logic [IW-1:0] alen;

  // stage 0: address generation
  assign mem_rd   = issuing;
  assign mem_addr = abase + AW'(idx);
  assign busy     = issuing | s1_vld | s2_vld;

  function automatic logic signed [N-1:0] fx_mul(input logic signed [N-1:0] x,
                                                 input logic signed [N-1:0] y);
    logic signed [2*N-1:0] full;
    full = x * y;
    return N'(full >>> FR);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      idx     <= '0;
      abase   <= '0;
      alen    <= '0;
      s1_vld  <= 1'b0;
      s1_last <= 1'b0;
      s1_idx  <= '0;
      s2_vld  <= 1'b0;
      s2_last <= 1'b0;
      s3_last <= 1'b0;
      prod    <= '0;
      result  <= '0;
    end else begin
      // stage 0
      if (start && !busy) begin
        issuing <= 1'b1;
        idx     <= '0;
        abase   <= base;
        alen    <= len;
      end else if (issuing) begin
        if (idx == alen - 1'b1) issuing <= 1'b0;
        idx <= idx + 1'b1;
      end
      // stage 1: SRAM read in flight
      s1_vld  <= issuing;
      s1_last <= issuing && (idx == alen - 1'b1);
      s1_idx  <= idx;
      // stage 2: multiply
      s2_vld  <= s1_vld;
      s2_last <= s1_last;
      if (s1_vld) prod <= fx_mul($signed(mem_rdata), $signed(v[s1_idx]));
      // stage 3: accumulate
      s3_last <= s2_last;
      if (start && !busy) result <= '0;
      else if (s2_vld)    result <= result + prod;
    end
  end

  assign done = s3_last;

endmodule
