// Enhanced processing element (PE) of the systolic alignment array.
//
// One PE holds one query character, in the form of its column of the
// substitution matrix, and scores it against the reference sequence that
// streams through the array one symbol per clock. It wraps the score/origin
// datapath (sw_pe_cell) with the registers that pass the reference symbol,
// its coordinate j and a valid flag on to the next PE, so every signal of the
// array advances one PE per clock.
//
// Interface: the *_in ports come from the previous PE (or the array head),
// the *_out ports go to the next one. s2_out/j_out/v_out are registered;
// g_out/cb_out describe the cell of the symbol now on s2_out; max_out is the
// running best record (score, origin, end).
module sw_pe
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
  input  logic               clr,
  input  logic [I_W-1:0]     pe_idx,
  input  logic               col_ld,
  input  logic [COL_W-1:0]   col_in,
  input  logic               v_in,
  input  logic [SYM_W-1:0]   s2_in,
  input  logic [J_W-1:0]     j_in,
  input  logic [SCORE_W-1:0] g_in,
  input  logic [CB_W-1:0]    cb_in,
  input  logic [MAX_W-1:0]   max_in,
  output logic               v_out,
  output logic [SYM_W-1:0]   s2_out,
  output logic [J_W-1:0]     j_out,
  output logic [SCORE_W-1:0] g_out,
  output logic [CB_W-1:0]    cb_out,
  output logic [MAX_W-1:0]   max_out
);

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

  sw_pe_cell #(
    .SCORE_W(SCORE_W), .I_W(I_W), .J_W(J_W), .GAP(GAP)
  ) u_cell (
    .clk, .rst_n, .clr, .pe_idx, .col_ld, .col_in,
    .v_in, .s2_in,
    .v_cur (v_out),
    .j_cur (j_out),
    .g_in, .cb_in, .max_in, .g_out, .cb_out, .max_out
  );

endmodule
