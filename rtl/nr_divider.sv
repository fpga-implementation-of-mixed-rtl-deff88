// nr_divider: pipelined non-restoring fixed-point divider.
//
// Computes q = a / b for signed fixed-point words with FRAC fractional bits,
// i.e. q = (|a| * 2^FRAC) / |b| with the sign a^b applied afterwards. The
// quotient is built by the non-restoring recurrence: the partial remainder P
// starts as the (scaled) dividend; in step i (i = N-1 .. 0) the divisor
// weighted by 2^i is subtracted when P >= 0 and added otherwise ("Op.A"),
// and quotient bit W_i is then set to 1 when the new P is non-negative
// ("Op.B"). Op.B of step i is done in the same cycle as Op.A of step i+1, so
// a division takes N+1 cycles and a new one may enter every cycle; this
// overlapped schedule and N = 36 follow the published divider. Signed
// operands by sign and magnitude, saturation on overflow and the division by
// zero result (saturated value, ovf=1) are this design's own choices.
//
// Interface: in_valid/a/b enter in cycle t; out_valid/q/ovf appear in cycle
// t+N+1. No back-pressure. Reset clears only the valid pipeline.
module nr_divider #(
  parameter int unsigned N    = 36,   // word width and number of quotient bits
  parameter int unsigned FRAC = 16    // fractional bits of the fixed-point format
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [N-1:0] a,       // dividend
  input  logic signed [N-1:0] b,       // divisor
  output logic                out_valid,
  output logic signed [N-1:0] q,       // quotient
  output logic                ovf      // quotient saturated (too large or b == 0)
);

  localparam int unsigned PW = 2*N + 2;   // remainder width, covers |a|*2^FRAC and |b|*2^(N-1)

  typedef logic signed [PW-1:0] rem_t;

  // pipeline registers; index s holds the state after Op.A of step s (s = 1..N)
  logic             vld  [1:N];
  rem_t             p    [1:N];
  logic [N-1:0]     dmag [1:N];
  logic [N-1:0]     w    [1:N];
  logic             neg  [1:N];
  logic             dz   [1:N];

  localparam logic [N-1:0] FX_SAT = {1'b0, {(N-1){1'b1}}};

  function automatic logic [N-1:0] mag(input logic signed [N-1:0] v);
    return v[N-1] ? N'(-v) : N'(v);
  endfunction

  // Op.A of step s on remainder r with divisor magnitude d (weight 2^(N-s))
  function automatic rem_t op_a(input rem_t r, input logic [N-1:0] d, input int unsigned s);
    rem_t qs;
    qs = rem_t'(d) <<< (N - s);
    return (r >= 0) ? r - qs : r + qs;
  endfunction

  // stage 1: operand conditioning and the first Op.A
  always_ff @(posedge clk) begin
    p[1]    <= op_a(rem_t'(mag(a)) <<< FRAC, mag(b), 1);
    dmag[1] <= mag(b);
    w[1]    <= '0;
    neg[1]  <= a[N-1] ^ b[N-1];
    dz[1]   <= (b == '0);
  end

  // stages 2..N: Op.B of step s-1 overlapped with Op.A of step s
  for (genvar s = 2; s <= N; s++) begin : g_stage
    always_ff @(posedge clk) begin
      p[s]    <= op_a(p[s-1], dmag[s-1], s);
      dmag[s] <= dmag[s-1];
      w[s]    <= w[s-1] | ((p[s-1] >= 0) ? (N'(1) << (N - s + 1)) : '0);
      neg[s]  <= neg[s-1];
      dz[s]   <= dz[s-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= N; s++) vld[s] <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld[1] <= in_valid;
      for (int s = 2; s <= N; s++) vld[s] <= vld[s-1];
      out_valid <= vld[N];
    end
  end

  // final stage: Op.B of the last step, sign and saturation
  logic [N-1:0] wfin;
  logic         too_big;
  always_comb begin
    wfin    = w[N] | ((p[N] >= 0) ? N'(1) : '0);
    too_big = dz[N] || wfin[N-1];
  end

  always_ff @(posedge clk) begin
    ovf <= too_big;
    if (too_big) q <= neg[N] ? -$signed(FX_SAT) : $signed(FX_SAT);
    else         q <= neg[N] ? -$signed(wfin)   : $signed(wfin);
  end

endmodule
