// Switching element placed between two groups of PEs of the systolic array.
//
// With split=0 the element joins the two groups into one longer array: every
// array signal (reference symbol, coordinate, valid flag, score, origin and
// best record) passes through one register, so the clock period is not
// lengthened and the array latency grows by one clock. With split=1 the
// downstream group starts a new, independent array: it receives the head
// signals of its own reference stream (the *_b ports) and the row-zero
// values G=0, Cb=(0,0) and an empty best record.
//
// As in the design's switching element, the symbol, coordinate and best
// record are selected before their register, while the score and origin are
// registered first and selected after. split is a static configuration and
// must only change while the array is idle.
module sw_switch
  import sw_pkg::*;
#(
  parameter int unsigned SCORE_W = 12,
  parameter int unsigned I_W     = 10,
  parameter int unsigned J_W     = 28,
  localparam int unsigned CB_W   = I_W + J_W,
  localparam int unsigned MAX_W  = SCORE_W + 2 * CB_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               split,
  // upstream PE
  input  logic               v_in,
  input  logic [SYM_W-1:0]   s2_in,
  input  logic [J_W-1:0]     j_in,
  input  logic [SCORE_W-1:0] g_in,
  input  logic [CB_W-1:0]    cb_in,
  input  logic [MAX_W-1:0]   max_in,
  // head of a new array
  input  logic               v_b,
  input  logic [SYM_W-1:0]   s2_b,
  input  logic [J_W-1:0]     j_b,
  input  logic [SCORE_W-1:0] g_b,
  input  logic [CB_W-1:0]    cb_b,
  input  logic [MAX_W-1:0]   max_b,
  // downstream PE
  output logic               v_out,
  output logic [SYM_W-1:0]   s2_out,
  output logic [J_W-1:0]     j_out,
  output logic [SCORE_W-1:0] g_out,
  output logic [CB_W-1:0]    cb_out,
  output logic [MAX_W-1:0]   max_out
);

  logic [SCORE_W-1:0] g_q;
  logic [CB_W-1:0]    cb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out   <= 1'b0;
      s2_out  <= '0;
      j_out   <= '0;
      max_out <= '0;
      g_q     <= '0;
      cb_q    <= '0;
    end else if (clr) begin
      v_out   <= 1'b0;
      s2_out  <= '0;
      j_out   <= '0;
      max_out <= '0;
      g_q     <= '0;
      cb_q    <= '0;
    end else begin
      v_out   <= split ? v_b   : v_in;
      s2_out  <= split ? s2_b  : s2_in;
      j_out   <= split ? j_b   : j_in;
      max_out <= split ? max_b : max_in;
      g_q     <= g_in;
      cb_q    <= cb_in;
    end
  end

  assign g_out  = split ? g_b  : g_q;
  assign cb_out = split ? cb_b : cb_q;

endmodule
