// Base processing element (PE): score only, no origin tracking.
//
// Computes one cell of the local-alignment matrix per clock,
//   G(i,j) = max{ G(i-1,j-1)+Sbc(S1(i),S2(j)), G(i-1,j)-gap, G(i,j-1)-gap, 0 },
// and keeps the largest score seen by this PE and by every PE upstream.
// Structure as in the design's base PE: a two-stage datapath in which the
// incoming score is registered and the diagonal sum G(i-1,j-1)+Sbc is formed
// and registered one step ahead; the up and left scores are compared first,
// the gap is subtracted, and the result is compared with the diagonal sum; a
// negative result clears to zero. The reference symbol is passed on through
// one register, so each signal advances one PE per clock. Bubbles (v_in low)
// change no state.
//
// Ports mirror sw_pe without the coordinate signals: s2_out/v_out are
// registered, g_out is combinational from the PE registers and belongs to the
// symbol on s2_out, max_out is a register. Tie handling, the constant gap
// parameter and unchecked overflow are this design's choices.
module sw_pe_base
  import sw_pkg::*;
#(
  parameter int unsigned SCORE_W = 12,
  parameter int unsigned GAP     = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               col_ld,
  input  logic [COL_W-1:0]   col_in,
  input  logic               v_in,
  input  logic [SYM_W-1:0]   s2_in,
  input  logic [SCORE_W-1:0] g_in,
  input  logic [SCORE_W-1:0] max_in,
  output logic               v_out,
  output logic [SYM_W-1:0]   s2_out,
  output logic [SCORE_W-1:0] g_out,
  output logic [SCORE_W-1:0] max_out
);

  localparam int unsigned WK = SCORE_W + 1;
  typedef logic signed [WK-1:0] wk_t;

  logic [COL_W-1:0]   col_q;
  logic [SCORE_W-1:0] g_up_q, g_left_q, max_q;
  wk_t                diag_q;

  logic signed [SBC_W-1:0] sbc;
  assign sbc = col_q[s2_in*SBC_W +: SBC_W];

  logic [SCORE_W-1:0] ul, m1;
  wk_t                ul_gap, g_pick;
  always_comb begin
    ul     = (g_up_q >= g_left_q) ? g_up_q : g_left_q;
    ul_gap = wk_t'({1'b0, ul}) - wk_t'(GAP);
    g_pick = (diag_q >= ul_gap) ? diag_q : ul_gap;
    g_out  = (g_pick[WK-1] || g_pick == '0) ? '0 : g_pick[SCORE_W-1:0];
    m1     = (g_left_q > max_in) ? g_left_q : max_in;
  end
  assign max_out = max_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q    <= '0;
      g_up_q   <= '0;
      diag_q   <= '0;
      g_left_q <= '0;
      max_q    <= '0;
      v_out    <= 1'b0;
      s2_out   <= '0;
    end else begin
      if (col_ld) col_q <= col_in;
      if (clr) begin
        g_up_q   <= '0;
        diag_q   <= '0;
        g_left_q <= '0;
        max_q    <= '0;
        v_out    <= 1'b0;
        s2_out   <= '0;
      end else begin
        v_out  <= v_in;
        s2_out <= s2_in;
        if (v_in) begin
          g_up_q <= g_in;
          diag_q <= wk_t'({1'b0, g_up_q}) + wk_t'(sbc);
        end
        if (v_out) g_left_q <= g_out;
        if (m1 > max_q) max_q <= m1;
      end
    end
  end

endmodule
