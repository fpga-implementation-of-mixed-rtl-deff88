// fp_calc: first point calculator.
//
// Computes, once per MIQP, the first point of the dual active set method:
// the unconstrained minimum x0 of 1/2 x'Hx + g'x, i.e. the solution of
// H x0 = -g, and writes it into SRAM1 at FP_BASE so that every child
// sub-problem can reuse it. H (NV x NV, row-major) and g (NV words) are read
// from the original problem in SRAM1 (PROB_BASE) over local bus 1 into the
// calculator's own work-space SRAM as the augmented matrix [H | -g].
// Gaussian elimination without pivoting follows (H is symmetric positive
// definite, so every pivot is positive): the pivot row is held in a
// register array, each row below gets its multiplier from the pipelined
// divider and is updated one element per read/write pair of the
// single-port work space; back substitution then produces x0, one division
// per entry. That a first point is computed once and stored with the
// problem in SRAM1, and the work-space SRAM, follow the published design;
// the elimination method, problem layout and timing are this design's own.
//
// Interface: start pulse (problem present in SRAM1) -> done pulse after
// at most NV^3 + 40 NV^2 cycles (9,538 for NV = 16 when the bus is free).
// busy is high in between.
module fp_calc
  import miqp_pkg::*;
#(
  parameter int unsigned NV   = NVAR,
  parameter int unsigned PB   = PROB_BASE,
  parameter int unsigned FB   = FP_BASE,
  parameter int unsigned S1AW = $clog2(SRAM1_DEPTH),
  localparam int unsigned WD  = NV * (NV + 1),
  localparam int unsigned WAW = $clog2(WD),
  localparam int unsigned IW  = $clog2(NV + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              ovf,        // a division saturated (H singular or badly scaled)
  // local bus 1 master
  output logic              s1_req,
  output logic              s1_we,
  output logic [S1AW-1:0]   s1_addr,
  output logic [WORD_W-1:0] s1_wdata,
  input  logic              s1_gnt,
  input  logic              s1_rvalid,
  input  logic [WORD_W-1:0] s1_rdata
);

  typedef enum logic [4:0] {
    F_IDLE, F_LREQ, F_LWAIT,
    F_PRD, F_PCAP,
    F_MRD, F_MCAP, F_MDIV,
    F_URD, F_UWR,
    F_BRD, F_BACC, F_BDRD, F_BDCAP, F_BDIV,
    F_WREQ, F_DONE
  } fstate_t;
  fstate_t state;

  logic [IW-1:0] r, c, k;                 // row, column, pivot index
  word_t prow [NV+1];                     // pivot-row register array
  word_t x    [NV];                       // solution registers
  word_t f, acc;

  // work space
  logic ws_en, ws_we;
  logic [WAW-1:0] ws_addr;
  word_t ws_wdata;
  logic [WORD_W-1:0] ws_rdata;
  spram #(.WIDTH(WORD_W), .DEPTH(WD)) u_ws (
    .clk, .en(ws_en), .we(ws_we), .addr(ws_addr), .wdata(ws_wdata), .rdata(ws_rdata));

  function automatic logic [WAW-1:0] wa(input logic [IW-1:0] row, input logic [IW-1:0] col);
    return WAW'(row) * WAW'(NV + 1) + WAW'(col);
  endfunction

  function automatic word_t fmul(input word_t p, input word_t q);
    logic signed [2*WORD_W-1:0] t;
    t = p * q;
    return WORD_W'(t >>> FRAC);
  endfunction

  // divider
  logic  div_in, div_out, div_ovf;
  word_t div_a, div_b, div_q;
  nr_divider #(.N(WORD_W), .FRAC(FRAC)) u_div (
    .clk, .rst_n, .in_valid(div_in), .a(div_a), .b(div_b),
    .out_valid(div_out), .q(div_q), .ovf(div_ovf));


  always_comb begin
    ws_en    = 1'b0;
    ws_we    = 1'b0;
    ws_addr  = wa(r, c);
    ws_wdata = '0;
    unique case (state)
      F_LWAIT: if (s1_rvalid) begin
        ws_en    = 1'b1;
        ws_we    = 1'b1;
        ws_wdata = (c == IW'(NV)) ? -$signed(s1_rdata) : $signed(s1_rdata);
      end
      F_PRD:  begin ws_en = 1'b1; ws_addr = wa(k, c); end
      F_MRD:  begin ws_en = 1'b1; ws_addr = wa(r, k); end
      F_URD, F_BRD: ws_en = 1'b1;
      F_UWR:  begin ws_en = 1'b1; ws_we = 1'b1; ws_wdata = $signed(ws_rdata) - fmul(f, prow[c]); end
      F_BDRD: begin ws_en = 1'b1; ws_addr = wa(r, r); end
      default: ;
    endcase
  end

  assign s1_req   = (state == F_LREQ) || (state == F_WREQ);
  assign s1_we    = (state == F_WREQ);
  assign s1_addr  = (state == F_WREQ) ? S1AW'(FB) + S1AW'(r) :
                    (c == IW'(NV))    ? S1AW'(PB) + S1AW'(NV * NV) + S1AW'(r) :
                                        S1AW'(PB) + S1AW'(r) * S1AW'(NV) + S1AW'(c);
  assign s1_wdata = x[r[$clog2(NV)-1:0]];
  assign busy     = (state != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= F_IDLE;
      r           <= '0;
      c           <= '0;
      k           <= '0;
      f           <= '0;
      acc         <= '0;
      done        <= 1'b0;
      div_in      <= 1'b0;
      div_a       <= '0;
      div_b       <= '0;
      ovf         <= 1'b0;
      for (int j = 0; j <= NV; j++) prow[j] <= '0;
      for (int j = 0; j < NV; j++)  x[j]    <= '0;
    end else begin
      done   <= 1'b0;
      div_in <= 1'b0;
      if (div_out && div_ovf) ovf <= 1'b1;
      unique case (state)
        F_IDLE: if (start) begin
          r <= '0; c <= '0;
          ovf <= 1'b0;
          state <= F_LREQ;
        end
        // ---- load [H | -g] ----
        F_LREQ: if (s1_gnt) state <= F_LWAIT;
        F_LWAIT: if (s1_rvalid) begin
          state <= F_LREQ;
          if (c == IW'(NV)) begin                 // g entries: column NV
            if (r == IW'(NV - 1)) begin
              k <= '0; c <= '0;
              state <= F_PRD;
            end else r <= r + 1'b1;
          end else if (c == IW'(NV - 1)) begin
            c <= '0;
            if (r == IW'(NV - 1)) begin r <= '0; c <= IW'(NV); end
            else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        // ---- elimination: fetch pivot row k, columns k..NV ----
        F_PRD: state <= F_PCAP;
        F_PCAP: begin
          prow[c] <= $signed(ws_rdata);
          if (c == IW'(NV)) begin
            if (k == IW'(NV - 1)) begin
              r <= IW'(NV - 1);
              state <= F_BDRD;
            end else begin
              r <= k + 1'b1;
              state <= F_MRD;
            end
          end else begin
            c <= c + 1'b1;
            state <= F_PRD;
          end
        end
        // multiplier f = M[r][k] / M[k][k]
        F_MRD:  state <= F_MCAP;
        F_MCAP: begin
          div_in <= 1'b1; div_a <= $signed(ws_rdata); div_b <= prow[k];
          state  <= F_MDIV;
        end
        F_MDIV: if (div_out) begin
          f <= div_q;
          c <= k;
          state <= F_URD;
        end
        // row update M[r][c] -= f * M[k][c], c = k..NV
        F_URD: state <= F_UWR;
        F_UWR: begin
          if (c == IW'(NV)) begin
            if (r == IW'(NV - 1)) begin
              k <= k + 1'b1;
              c <= k + 1'b1;
              state <= F_PRD;
            end else begin
              r <= r + 1'b1;
              state <= F_MRD;
            end
          end else begin
            c <= c + 1'b1;
            state <= F_URD;
          end
        end
        // ---- back substitution, row r: acc = sum_{j>r} M[r][j] x[j] ----
        F_BDRD: state <= F_BDCAP;                 // read M[r][r]
        F_BDCAP: begin
          div_b <= $signed(ws_rdata);
          acc   <= '0;
          c     <= r + 1'b1;
          state <= F_BRD;
        end
        F_BRD: state <= F_BACC;
        F_BACC: begin
          if (c == IW'(NV)) begin                 // right-hand side reached
            div_in <= 1'b1;
            div_a  <= $signed(ws_rdata) - acc;
            state  <= F_BDIV;
          end else begin
            acc   <= acc + fmul($signed(ws_rdata), x[c[$clog2(NV)-1:0]]);
            c     <= c + 1'b1;
            state <= F_BRD;
          end
        end
        F_BDIV: if (div_out) begin
          x[r[$clog2(NV)-1:0]] <= div_q;
          if (r == '0) begin
            state <= F_WREQ;
          end else begin
            r <= r - 1'b1;
            state <= F_BDRD;
          end
        end
        // ---- store x0 in SRAM1 ----
        F_WREQ: if (s1_gnt) begin
          if (r == IW'(NV - 1)) state <= F_DONE;
          else r <= r + 1'b1;
        end
        F_DONE: begin
          done  <= 1'b1;
          state <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end

endmodule
