// Multi-stream PE for a fixed single-reference multiple-query array.
//
// When several queries are always aligned against the same reference, the
// PEs at the same position of the parallel arrays see the same reference
// symbol and coordinate at the same clock. This PE therefore holds NQ
// score/origin datapaths (sw_pe_cell), one per query stream, around a single
// set of reference registers (symbol, coordinate j, valid flag) that all of
// them share, saving those registers in every stream but one.
//
// Interface: the reference signals (v/s2/j) enter and leave once; score,
// origin, best record and substitution column exist per stream, packed with
// stream 0 in the low bits. All streams of one PE share the query position
// pe_idx. Timing is that of sw_pe: one clock per PE for every signal.
// The sharing follows the design's dual-stream example; NQ streams in
// general is this implementation's generalisation.
module sw_pe_srmq
  import sw_pkg::*;
#(
  parameter int unsigned NQ      = 2,
  parameter int unsigned SCORE_W = 12,
  parameter int unsigned I_W     = 10,
  parameter int unsigned J_W     = 28,
  parameter int unsigned GAP     = 4,
  localparam int unsigned CB_W   = I_W + J_W,
  localparam int unsigned MAX_W  = SCORE_W + 2 * CB_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic [I_W-1:0]        pe_idx,
  input  logic                  col_ld,
  input  logic [NQ*COL_W-1:0]   col_in,
  input  logic                  v_in,
  input  logic [SYM_W-1:0]      s2_in,
  input  logic [J_W-1:0]        j_in,
  input  logic [NQ*SCORE_W-1:0] g_in,
  input  logic [NQ*CB_W-1:0]    cb_in,
  input  logic [NQ*MAX_W-1:0]   max_in,
  output logic                  v_out,
  output logic [SYM_W-1:0]      s2_out,
  output logic [J_W-1:0]        j_out,
  output logic [NQ*SCORE_W-1:0] g_out,
  output logic [NQ*CB_W-1:0]    cb_out,
  output logic [NQ*MAX_W-1:0]   max_out
);

  // shared reference registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out  <= 1'b0;
      s2_out <= '0;
      j_out  <= '0;
    end else if (clr) begin
      v_out  <= 1'b0;
      s2_out <= '0;
      j_out  <= '0;
    end else begin
      v_out  <= v_in;
      s2_out <= s2_in;
      j_out  <= j_in;
    end
  end

  for (genvar q = 0; q < NQ; q++) begin : g_stream
    sw_pe_cell #(
      .SCORE_W(SCORE_W), .I_W(I_W), .J_W(J_W), .GAP(GAP)
    ) u_cell (
      .clk, .rst_n, .clr, .pe_idx, .col_ld,
      .col_in  (col_in[q*COL_W +: COL_W]),
      .v_in, .s2_in,
      .v_cur   (v_out),
      .j_cur   (j_out),
      .g_in    (g_in[q*SCORE_W +: SCORE_W]),
      .cb_in   (cb_in[q*CB_W +: CB_W]),
      .max_in  (max_in[q*MAX_W +: MAX_W]),
      .g_out   (g_out[q*SCORE_W +: SCORE_W]),
      .cb_out  (cb_out[q*CB_W +: CB_W]),
      .max_out (max_out[q*MAX_W +: MAX_W])
    );
  end

endmodule
