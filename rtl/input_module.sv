// input_module: receives the original problem from the host as a byte stream.
//
// The host link delivers 8 bits at a time; the solver's words are 36 bits,
// so every word arrives as five bytes, least significant first (the upper
// four bits of the fifth byte are ignored). The first word is a header:
// bits [15:0] mark which of the 16 variables are binary, bits [27:16] give
// the number of problem words that follow. Those words (H, g, constraint
// rows, in whatever layout the solver cores use) are written to SRAM1 from
// address PROB_BASE upwards over local bus 1; loaded pulses once the last
// word has been written. The 8-bit input and the write into SRAM1 follow
// the published block diagram; byte order and header are this design's own.
//
// Handshake: a byte is taken when in_valid && in_ready; in_ready is low while
// a finished word waits for its bus grant.
module input_module
  import miqp_pkg::*;
#(
  parameter int unsigned PB   = PROB_BASE,
  parameter int unsigned S1AW = $clog2(SRAM1_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  output logic              s1_req,
  output logic [S1AW-1:0]   s1_addr,
  output logic [WORD_W-1:0] s1_wdata,
  input  logic              s1_gnt,
  output logic [NVAR-1:0]   int_mask,
  output logic [11:0]       n_words,
  output logic              loaded
);

  logic [2:0]  nbyte;
  logic [39:0] sh;
  logic        have_hdr;
  logic        pending;
  logic [11:0] widx;

  assign in_ready = !pending;
  assign s1_req   = pending;
  assign s1_addr  = S1AW'(PB) + S1AW'(widx);
  assign s1_wdata = sh[WORD_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbyte    <= '0;
      sh       <= '0;
      have_hdr <= 1'b0;
      pending  <= 1'b0;
      widx     <= '0;
      int_mask <= '0;
      n_words  <= '0;
      loaded   <= 1'b0;
    end else begin
      loaded <= 1'b0;
      if (in_valid && in_ready) begin
        sh <= {in_data, sh[39:8]};
        if (nbyte == 3'd4) begin
          nbyte <= '0;
          if (!have_hdr) begin
            int_mask <= sh[23:8];              // header bytes 0 and 1
            n_words  <= {sh[35:32], sh[31:24]}; // header bits [27:16]
            have_hdr <= 1'b1;
            widx     <= '0;
            if ({sh[35:32], sh[31:24]} == '0) begin
              loaded   <= 1'b1;
              have_hdr <= 1'b0;
            end
          end else begin
            pending <= 1'b1;
          end
        end else begin
          nbyte <= nbyte + 1'b1;
        end
      end
      if (pending && s1_gnt) begin
        pending <= 1'b0;
        widx    <= widx + 1'b1;
        if (widx + 1'b1 == n_words) begin
          loaded   <= 1'b1;
          have_hdr <= 1'b0;
        end
      end
    end
  end

endmodule
