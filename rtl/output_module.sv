// output_module: sends the optimal solution and value to the host as bytes.
//
// When the search has finished (start pulse), the module reads the NVAR
// solution words and then the optimal-value word from SRAM2 over local bus 2
// and sends each 36-bit word as five bytes, least significant first, the
// upper four bits of the fifth byte zero. An optimal value equal to the
// largest positive word means no integer-feasible point was found. The
// 8-bit output port follows the published block diagram; byte order and
// word order are this design's own.
//
// Handshake: out_valid/out_ready per byte; busy is high from start until
// the last byte has been taken.
module output_module
  import miqp_pkg::*;
#(
  parameter int unsigned NW   = SRAM2_DEPTH,
  parameter int unsigned S2AW = $clog2(SRAM2_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              s2_req,
  output logic [S2AW-1:0]   s2_addr,
  input  logic              s2_gnt,
  input  logic              s2_rvalid,
  input  logic [WORD_W-1:0] s2_rdata,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data
);

  typedef enum logic [1:0] {O_IDLE, O_REQ, O_WAIT, O_SEND} ostate_t;
  ostate_t state;
  logic [S2AW-1:0] widx;
  logic [39:0] sh;
  logic [2:0] nbyte;

  assign busy      = (state != O_IDLE);
  assign s2_req    = (state == O_REQ);
  assign s2_addr   = widx;
  assign out_valid = (state == O_SEND);
  assign out_data  = sh[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= O_IDLE;
      widx  <= '0;
      sh    <= '0;
      nbyte <= '0;
    end else begin
      unique case (state)
        O_IDLE: if (start) begin
          widx  <= '0;
          state <= O_REQ;
        end
        O_REQ:  if (s2_gnt) state <= O_WAIT;
        O_WAIT: if (s2_rvalid) begin
          sh    <= {4'b0, s2_rdata};
          nbyte <= '0;
          state <= O_SEND;
        end
        O_SEND: if (out_ready) begin
          sh    <= sh >> 8;
          nbyte <= nbyte + 1'b1;
          if (nbyte == 3'd4) begin
            widx  <= widx + 1'b1;
            state <= (widx == S2AW'(NW - 1)) ? O_IDLE : O_REQ;
          end
        end
        default: state <= O_IDLE;
      endcase
    end
  end

endmodule
