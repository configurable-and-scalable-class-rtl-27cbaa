// Reconfigurable systolic PE array.
//
// N_PE processing elements form one linear array through which reference
// symbols stream one PE per clock. Switching elements (sw_switch) sit at the
// MAX_STREAMS-1 places that cut the array into MAX_STREAMS equal groups, so
// the same PEs can run as 1, 2, 4, ... MAX_STREAMS independent arrays of
// equal length (2**seg_log arrays). In the single-reference multiple-query
// mode every array receives the same reference stream; in the multiple-
// reference mode each one receives its own. Which stream enters where is
// decided by the caller: head input c (c = 0 .. MAX_STREAMS-1) is used when
// group c begins an array.
//
// Each PE is told its query position inside its own array (1-based), so the
// coordinates it reports are relative to the array it belongs to. The best
// record (score, origin, end) leaving the last PE of each group is brought
// out on tap_max; for an array ending at group c that is its result. busy is
// high while any valid symbol is still inside the array.
//
// ENHANCED selects the PE type: 1 builds origin-tracking PEs (sw_pe), 0 the
// score-only base PEs (sw_pe_base), whose coordinate fields read as zero.
// SHARED_REF builds instead a fixed single-reference array for devices
// where reconfiguration is done by re-synthesis: MAX_STREAMS rows of
// N_PE/MAX_STREAMS origin-tracking PEs, with the PEs of one position in all
// rows sharing their reference registers (sw_pe_srmq). Head input 0 feeds
// every row, seg_log is ignored (the layout is that of MAX_STREAMS arrays)
// and tap_max[a] is row a's result. No switching elements are built.
// The switch placement at equal groups follows the design; the head-input
// convention and the relative PE index are this implementation's choices.
module sw_pe_array
  import sw_pkg::*;
#(
  parameter int unsigned N_PE        = 512,
  parameter int unsigned MAX_STREAMS = 8,
  parameter bit          ENHANCED    = 1'b1,
  parameter bit          SHARED_REF  = 1'b0,
  parameter int unsigned SCORE_W     = 12,
  parameter int unsigned I_W         = 10,
  parameter int unsigned J_W         = 28,
  parameter int unsigned GAP         = 4,
  localparam int unsigned CB_W       = I_W + J_W,
  localparam int unsigned MAX_W      = SCORE_W + 2 * CB_W,
  localparam int unsigned LOG_S      = (MAX_STREAMS > 1) ? $clog2(MAX_STREAMS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,       // rstproc: clear all score state
  input  logic [LOG_S-1:0]             seg_log,   // log2 of number of arrays
  input  logic                         col_ld,    // ldcost: take cols
  input  logic [N_PE*COL_W-1:0]        cols,
  input  logic [MAX_STREAMS-1:0]       head_v,
  input  logic [MAX_STREAMS*SYM_W-1:0] head_s2,
  input  logic [MAX_STREAMS*J_W-1:0]   head_j,
  output logic [MAX_STREAMS*MAX_W-1:0] tap_max,
  output logic                         busy
);

  localparam int unsigned SUB = N_PE / MAX_STREAMS;

  if (!SHARED_REF) begin : g_cfg
    // signals entering PE p (index p) and leaving it (index p+1)
    logic               v   [N_PE+1];
    logic [SYM_W-1:0]   s2  [N_PE+1];
    logic [J_W-1:0]     jj  [N_PE+1];
    logic [SCORE_W-1:0] g   [N_PE+1];
    logic [CB_W-1:0]    cb  [N_PE+1];
    logic [MAX_W-1:0]   mx  [N_PE+1];
    // signals on the far side of the switch in front of group c
    logic               sv  [MAX_STREAMS];
    logic [SYM_W-1:0]   ss2 [MAX_STREAMS];
    logic [J_W-1:0]     sj  [MAX_STREAMS];
    logic [SCORE_W-1:0] sg  [MAX_STREAMS];
    logic [CB_W-1:0]    scb [MAX_STREAMS];
    logic [MAX_W-1:0]   smx [MAX_STREAMS];

    logic [N_PE-1:0]        pe_busy;
    logic [MAX_STREAMS-1:0] sw_busy;

    for (genvar c = 0; c < MAX_STREAMS; c++) begin : g_group
      if (c == 0) begin : g_head
        assign sv[0]  = head_v[0];
        assign ss2[0] = head_s2[0 +: SYM_W];
        assign sj[0]  = head_j[0 +: J_W];
        assign sg[0]  = '0;
        assign scb[0] = '0;
        assign smx[0] = '0;
        assign sw_busy[0] = 1'b0;
      end else begin : g_sw
        logic split;
        assign split = ((c % (MAX_STREAMS >> seg_log)) == 0);
        sw_switch #(.SCORE_W(SCORE_W), .I_W(I_W), .J_W(J_W)) u_sw (
          .clk, .rst_n, .clr, .split,
          .v_in (v[c*SUB]), .s2_in (s2[c*SUB]), .j_in (jj[c*SUB]),
          .g_in (g[c*SUB]), .cb_in (cb[c*SUB]), .max_in (mx[c*SUB]),
          .v_b  (head_v[c]), .s2_b (head_s2[c*SYM_W +: SYM_W]),
          .j_b  (head_j[c*J_W +: J_W]),
          .g_b  ('0), .cb_b ('0), .max_b ('0),
          .v_out (sv[c]), .s2_out (ss2[c]), .j_out (sj[c]),
          .g_out (sg[c]), .cb_out (scb[c]), .max_out (smx[c])
        );
        assign sw_busy[c] = sv[c];
      end

      assign tap_max[c*MAX_W +: MAX_W] = mx[(c+1)*SUB];

      for (genvar k = 0; k < SUB; k++) begin : g_pe
        localparam int unsigned P = c*SUB + k;
        // inputs of this PE: the switch output for the first PE of a group
        logic               vi;
        logic [SYM_W-1:0]   s2i;
        logic [J_W-1:0]     ji;
        logic [SCORE_W-1:0] gi;
        logic [CB_W-1:0]    cbi;
        logic [MAX_W-1:0]   mxi;
        if (k == 0) begin : g_first
          assign vi = sv[c];  assign s2i = ss2[c]; assign ji = sj[c];
          assign gi = sg[c];  assign cbi = scb[c]; assign mxi = smx[c];
        end else begin : g_chain
          assign vi = v[P];   assign s2i = s2[P];  assign ji = jj[P];
          assign gi = g[P];   assign cbi = cb[P];  assign mxi = mx[P];
        end

        // query position of this PE inside its own array, per configuration
        logic [I_W-1:0] idx;
        always_comb begin
          idx = '0;
          for (int l = 0; l <= LOG_S; l++)
            if (l == int'(seg_log)) idx = I_W'((P % (N_PE >> l)) + 1);
        end

        if (ENHANCED) begin : g_enh
          sw_pe #(.SCORE_W(SCORE_W), .I_W(I_W), .J_W(J_W), .GAP(GAP)) u_pe (
            .clk, .rst_n, .clr, .pe_idx (idx),
            .col_ld, .col_in (cols[P*COL_W +: COL_W]),
            .v_in (vi), .s2_in (s2i), .j_in (ji), .g_in (gi), .cb_in (cbi),
            .max_in (mxi),
            .v_out (v[P+1]), .s2_out (s2[P+1]), .j_out (jj[P+1]),
            .g_out (g[P+1]), .cb_out (cb[P+1]), .max_out (mx[P+1])
          );
        end else begin : g_base
          logic [SCORE_W-1:0] m_o;
          logic [J_W-1:0]     j_q;
          sw_pe_base #(.SCORE_W(SCORE_W), .GAP(GAP)) u_pe (
            .clk, .rst_n, .clr,
            .col_ld, .col_in (cols[P*COL_W +: COL_W]),
            .v_in (vi), .s2_in (s2i), .g_in (gi),
            .max_in (mxi[MAX_W-1 -: SCORE_W]),
            .v_out (v[P+1]), .s2_out (s2[P+1]), .g_out (g[P+1]), .max_out (m_o)
          );
          // the reference coordinate still travels with the symbol
          always_ff @(posedge clk or negedge rst_n)
            if (!rst_n)   j_q <= '0;
            else if (clr) j_q <= '0;
            else          j_q <= ji;
          assign jj[P+1] = j_q;
          assign cb[P+1] = '0;
          assign mx[P+1] = {m_o, {(2*CB_W){1'b0}}};
        end
        assign pe_busy[P] = v[P+1];
      end
    end

    // unused entry of the chain arrays
    assign v[0]  = 1'b0;
    assign s2[0] = '0;
    assign jj[0] = '0;
    assign g[0]  = '0;
    assign cb[0] = '0;
    assign mx[0] = '0;

    assign busy = (|pe_busy) || (|sw_busy) || (|head_v);
  end else begin : g_shared
    // fixed single-reference layout: MAX_STREAMS rows of SUB PEs; PE column
    // k of every row shares one set of reference registers (sw_pe_srmq)
    localparam int unsigned NQ = MAX_STREAMS;
    logic                  rv  [SUB+1];
    logic [SYM_W-1:0]      rs2 [SUB+1];
    logic [J_W-1:0]        rj  [SUB+1];
    logic [NQ*SCORE_W-1:0] rg  [SUB+1];
    logic [NQ*CB_W-1:0]    rcb [SUB+1];
    logic [NQ*MAX_W-1:0]   rmx [SUB+1];
    logic [SUB-1:0]        col_busy;

    assign rv[0]  = head_v[0];
    assign rs2[0] = head_s2[0 +: SYM_W];
    assign rj[0]  = head_j[0 +: J_W];
    assign rg[0]  = '0;
    assign rcb[0] = '0;
    assign rmx[0] = '0;

    for (genvar k = 0; k < SUB; k++) begin : g_col
      logic [NQ*COL_W-1:0] ccol;
      for (genvar q = 0; q < NQ; q++) begin : g_c
        assign ccol[q*COL_W +: COL_W] = cols[(q*SUB + k)*COL_W +: COL_W];
      end
      sw_pe_srmq #(.NQ(NQ), .SCORE_W(SCORE_W), .I_W(I_W), .J_W(J_W), .GAP(GAP)) u_pe (
        .clk, .rst_n, .clr, .pe_idx (I_W'(k + 1)), .col_ld, .col_in (ccol),
        .v_in (rv[k]), .s2_in (rs2[k]), .j_in (rj[k]),
        .g_in (rg[k]), .cb_in (rcb[k]), .max_in (rmx[k]),
        .v_out (rv[k+1]), .s2_out (rs2[k+1]), .j_out (rj[k+1]),
        .g_out (rg[k+1]), .cb_out (rcb[k+1]), .max_out (rmx[k+1])
      );
      assign col_busy[k] = rv[k+1];
    end
    assign tap_max = rmx[SUB];
    assign busy    = (|col_busy) || head_v[0];
  end

endmodule
