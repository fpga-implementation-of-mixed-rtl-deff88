// qp_core: arithmetic engine of one QP solver core.
//
// Holds what a core of the multi-core solver owns: a single-port work-space
// SRAM, a register array for the current vector, the pipelined dot-product
// unit and the pipelined non-restoring divider. The two loops that dominate
// the dual active set method run here: the inequality values
// s_j = a_j . x - b_j of all constraints (with the row stored as
// [a_j, -b_j] and the vector as [x, 1], so one dot product per row), with
// the most violated constraint found on the fly, and the step vectors,
// which are matrix-vector products over the work space. Each row costs
// len+3 cycles of dot product plus one write-back cycle. The sequencing of
// the Goldfarb-Idnani iterations that would issue these commands is not part
// of this module; the command set, work-space size and response format are
// this design's own choices.
//
// Interface: cmd_valid/cmd_ready handshake (one command at a time);
// QC_RD_MEM and QC_MATVEC answer with a one-cycle rsp_valid pulse, the write
// commands finish without a response. The divider is reachable directly
// through div_* (one division per cycle, result N+1 = 37 cycles later).
module qp_core
  import miqp_pkg::*;
#(
  parameter int unsigned DEPTH = WS_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cmd_valid,
  output logic    cmd_ready,
  input  qc_cmd_t cmd,
  output logic    rsp_valid,
  output qc_rsp_t rsp,
  input  logic    div_in_valid,
  input  word_t   div_a,
  input  word_t   div_b,
  output logic    div_out_valid,
  output word_t   div_q,
  output logic    div_ovf
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_ROW, S_WAIT, S_WB, S_RESP} state_t;
  state_t state;

  logic [VLEN-1:0][WORD_W-1:0] vreg;     // vector register array
  qc_cmd_t cur;
  logic [5:0] row;
  logic [WS_AW-1:0] row_base;
  word_t ymin;
  logic [5:0] ymin_idx;

  // work space and its single port
  logic ws_en, ws_we;
  logic [WS_AW-1:0] ws_addr;
  logic [WORD_W-1:0] ws_wdata, ws_rdata;

  spram #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_ws (
    .clk, .en(ws_en), .we(ws_we), .addr(ws_addr), .wdata(ws_wdata), .rdata(ws_rdata));

  logic dot_start, dot_busy, dot_done, dot_rd;
  logic [WS_AW-1:0] dot_addr;
  word_t dot_res;

  dot_pipe #(.N(WORD_W), .FR(FRAC), .VECLEN(VLEN), .AW(WS_AW)) u_dot (
    .clk, .rst_n, .start(dot_start), .base(row_base), .len(cur.len), .v(vreg),
    .mem_rd(dot_rd), .mem_addr(dot_addr), .mem_rdata(ws_rdata),
    .busy(dot_busy), .done(dot_done), .result(dot_res));

  nr_divider #(.N(WORD_W), .FRAC(FRAC)) u_div (
    .clk, .rst_n, .in_valid(div_in_valid), .a(div_a), .b(div_b),
    .out_valid(div_out_valid), .q(div_q), .ovf(div_ovf));

  assign cmd_ready = (state == S_IDLE);
  assign dot_start = (state == S_ROW);

  always_comb begin
    ws_en    = 1'b0;
    ws_we    = 1'b0;
    ws_addr  = dot_addr;
    ws_wdata = cmd.data;
    if (state == S_IDLE && cmd_valid && (cmd.op == QC_WR_MEM || cmd.op == QC_RD_MEM)) begin
      ws_en   = 1'b1;
      ws_we   = (cmd.op == QC_WR_MEM);
      ws_addr = cmd.addr;
    end else if (state == S_WB) begin
      ws_en    = 1'b1;
      ws_we    = 1'b1;
      ws_addr  = cur.out_base + WS_AW'(row);
      ws_wdata = dot_res;
    end else if (dot_rd) begin
      ws_en = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      row       <= '0;
      row_base  <= '0;
      ymin      <= '0;
      ymin_idx  <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      vreg      <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur <= cmd;
          unique case (cmd.op)
            QC_WR_MEM: ;
            QC_RD_MEM: state <= S_RD;
            QC_WR_VEC: vreg[cmd.addr[4:0]] <= cmd.data;
            QC_MATVEC: begin
              row      <= '0;
              row_base <= cmd.addr;
              ymin     <= FX_MAX;
              ymin_idx <= '0;
              state    <= (cmd.rows == 0) ? S_RESP : S_ROW;
            end
          endcase
        end
        S_RD: begin
          rsp_valid <= 1'b1;
          rsp.data  <= $signed(ws_rdata);
          rsp.idx   <= '0;
          state     <= S_IDLE;
        end
        S_ROW:  state <= S_WAIT;
        S_WAIT: if (dot_done) state <= S_WB;
        S_WB: begin
          if (dot_res < ymin) begin
            ymin     <= dot_res;
            ymin_idx <= row;
          end
          row      <= row + 1'b1;
          row_base <= row_base + WS_AW'(cur.len);
          state    <= (row + 1'b1 == cur.rows) ? S_RESP : S_ROW;
        end
        S_RESP: begin
          rsp_valid <= 1'b1;
          rsp.data  <= ymin;
          rsp.idx   <= ymin_idx;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
