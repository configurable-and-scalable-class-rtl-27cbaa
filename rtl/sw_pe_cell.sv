// Score-and-origin datapath of one enhanced processing element (PE).
//
// Computes, one matrix cell per clock, the local-alignment score
//   G(i,j) = max{ G(i-1,j-1)+Sbc(S1(i),S2(j)), G(i-1,j)-gap, G(i,j-1)-gap, 0 }
// together with Cb(i,j), the coordinates of the cell where the alignment that
// reaches (i,j) began, and keeps a running record of the best score seen by
// this PE and every PE upstream of it (score, origin and end coordinates).
//
// The structure follows the enhanced PE of the design: the incoming score
// G(i-1,j) and its origin are registered; the diagonal term
// G(i-1,j-1)+Sbc is formed one step earlier and registered (the two-stage
// datapath); the up/left scores are compared first, then against the
// diagonal; the zero case of the recurrence clears a negative result. The
// same magnitude comparisons steer the origin multiplexers. When the diagonal
// term wins and the diagonal origin is (0,0), the alignment starts here and
// the origin becomes (i,j).
//
// The cell does not hold the reference symbol or coordinate: the wrapper
// (sw_pe, or sw_pe_srmq where several cells share them) registers those and
// passes the registered values back as v_cur/j_cur.
//
// Timing: g_in/cb_in arrive with the symbol on s2_in (flag v_in). One clock
// later the cell's own result appears on g_out/cb_out, combinationally from
// the cell registers, with v_cur/j_cur describing it. Cells with v_in low
// (bubbles) change no state. max_out is a register updated every clock.
//
// Design choices not fixed by the source: ties prefer the diagonal term, then
// the upper neighbour; the best record is replaced only on a strictly larger
// score, and the upstream record wins a tie against this PE's own cell; the
// gap penalty is a constant parameter; score overflow is not detected.
module sw_pe_cell
  import sw_pkg::*;
#(
  parameter int unsigned SCORE_W = 12,
  parameter int unsigned I_W     = 10,
  parameter int unsigned J_W     = 28,
  parameter int unsigned GAP     = 4,
  localparam int unsigned CB_W   = I_W + J_W,
  localparam int unsigned MAX_W  = SCORE_W + 2 * CB_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,        // synchronous clear of all score state
  input  logic [I_W-1:0]     pe_idx,     // query position i of this PE (1-based)
  input  logic               col_ld,     // load a new substitution column
  input  logic [COL_W-1:0]   col_in,
  input  logic               v_in,       // s2_in / g_in / cb_in are valid
  input  logic [SYM_W-1:0]   s2_in,
  input  logic               v_cur,      // cell on g_out is valid
  input  logic [J_W-1:0]     j_cur,      // reference coordinate of that cell
  input  logic [SCORE_W-1:0] g_in,       // G(i-1,j)
  input  logic [CB_W-1:0]    cb_in,      // Cb(i-1,j) as {i, j}
  input  logic [MAX_W-1:0]   max_in,     // best record of PEs upstream
  output logic [SCORE_W-1:0] g_out,      // G(i,j)
  output logic [CB_W-1:0]    cb_out,     // Cb(i,j)
  output logic [MAX_W-1:0]   max_out     // best record including this PE
);

  typedef struct packed {
    logic [I_W-1:0] i;
    logic [J_W-1:0] j;
  } coord_t;

  typedef struct packed {
    logic [SCORE_W-1:0] score;
    coord_t             origin;
    coord_t             fin;
  } best_t;

  // signed working width: one guard bit above the score register
  localparam int unsigned WK = SCORE_W + 1;
  typedef logic signed [WK-1:0] wk_t;

  logic [COL_W-1:0]   col_q;       // Sbc(S1(i), *)
  logic [SCORE_W-1:0] g_up_q;      // G(i-1,j)
  coord_t             cb_up_q;
  wk_t                diag_q;      // G(i-1,j-1) + Sbc(S1(i),S2(j))
  coord_t             cb_diag_q;   // Cb(i-1,j-1)
  logic [SCORE_W-1:0] g_left_q;    // G(i,j-1)
  coord_t             cb_left_q;
  logic [J_W-1:0]     j_left_q;    // j of the cell held in g_left_q
  best_t              best_q;

  logic signed [SBC_W-1:0] sbc;
  assign sbc = col_q[s2_in*SBC_W +: SBC_W];

  // ---- cell recurrence -------------------------------------------------
  logic [SCORE_W-1:0] ul;
  coord_t             cb_ul;
  wk_t                ul_gap;
  wk_t                g_pick;
  coord_t             cb_pick;
  coord_t             cb_new;

  always_comb begin
    if (g_up_q >= g_left_q) begin
      ul    = g_up_q;
      cb_ul = cb_up_q;
    end else begin
      ul    = g_left_q;
      cb_ul = cb_left_q;
    end
    ul_gap = wk_t'({1'b0, ul}) - wk_t'(GAP);

    cb_new = (cb_diag_q == '0) ? coord_t'{i: pe_idx, j: j_cur} : cb_diag_q;
    if (diag_q >= ul_gap) begin
      g_pick  = diag_q;
      cb_pick = cb_new;
    end else begin
      g_pick  = ul_gap;
      cb_pick = cb_ul;
    end

    // zero case: the sign bit clears the score and its origin
    if (g_pick[WK-1] || g_pick == '0) begin
      g_out  = '0;
      cb_out = '0;
    end else begin
      g_out  = g_pick[SCORE_W-1:0];
      cb_out = cb_pick;
    end
  end

  // ---- best-score record -------------------------------------------------
  best_t max_up, cand, pick1, best_d;
  always_comb begin
    max_up = best_t'(max_in);
    cand   = best_t'{score: g_left_q, origin: cb_left_q,
                     fin: coord_t'{i: pe_idx, j: j_left_q}};
    pick1  = (cand.score > max_up.score) ? cand : max_up;
    best_d = (pick1.score > best_q.score) ? pick1 : best_q;
  end
  assign max_out = best_q;

  // ---- registers -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      g_up_q    <= '0;
      cb_up_q   <= '0;
      diag_q    <= '0;
      cb_diag_q <= '0;
      g_left_q  <= '0;
      cb_left_q <= '0;
      j_left_q  <= '0;
      best_q    <= '0;
    end else begin
      if (col_ld) col_q <= col_in;
      if (clr) begin
        g_up_q    <= '0;
        cb_up_q   <= '0;
        diag_q    <= '0;
        cb_diag_q <= '0;
        g_left_q  <= '0;
        cb_left_q <= '0;
        j_left_q  <= '0;
        best_q    <= '0;
      end else begin
        if (v_in) begin
          g_up_q    <= g_in;
          cb_up_q   <= coord_t'(cb_in);
          diag_q    <= wk_t'({1'b0, g_up_q}) + wk_t'(sbc);
          cb_diag_q <= cb_up_q;
        end
        if (v_cur) begin
          g_left_q  <= g_out;
          cb_left_q <= cb_out;
          j_left_q  <= j_cur;
        end
        best_q <= best_d;
      end
    end
  end

endmodule
