// Reference-stream feeder: turns packed reference words from a reference FIFO
// into one nucleotide per clock at the head of a PE array.
//
// Each 32-bit word carries 16 two-bit symbols, the first in bits [1:0]. A
// load strobe (from an ldref instruction) sets how many symbols to send; the
// feeder pops words as needed and emits symbol, coordinate j and a valid
// flag, at one symbol per clock while the FIFO keeps up (a bubble otherwise).
// j counts 1, 2, 3 ... across successive loads, so a long reference can be
// sent with several ldref instructions; clr (rstproc) restarts it at 1. When
// a load ends inside a word, the rest of that word is discarded and the next
// load starts on a fresh word.
//
// Timing: v/s2/j are registered. busy is high while symbols of the current
// load remain; a new load is only accepted when busy is low. The packing and
// the restart-at-word rule are this implementation's choices.
module sw_ref_feeder
  import sw_pkg::*;
#(
  parameter int unsigned J_W   = 28,
  parameter int unsigned CNT_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              load,
  input  logic [CNT_W-1:0]  load_cnt,
  input  logic [WORD_W-1:0] fifo_rdata,
  input  logic              fifo_empty,
  output logic              fifo_pop,
  output logic              v,
  output logic [SYM_W-1:0]  s2,
  output logic [J_W-1:0]    j,
  output logic              busy
);

  localparam int unsigned IW = $clog2(SYMS_PER_WORD);

  logic [WORD_W-1:0] word_q;
  logic              have_q;
  logic [IW-1:0]     idx_q;
  logic [CNT_W-1:0]  remain_q;
  logic [J_W-1:0]    jcnt_q;

  logic emit, last_in_word, need_word;
  always_comb begin
    emit         = have_q && (remain_q != '0);
    last_in_word = (idx_q == IW'(SYMS_PER_WORD-1)) || (remain_q == CNT_W'(1));
    // fetch a word when none is held, or the held one is used up this clock,
    // and symbols are still owed after this clock
    need_word    = (!have_q && remain_q != '0) ||
                   (emit && last_in_word && remain_q > CNT_W'(1));
    fifo_pop     = need_word && !fifo_empty;
  end
  assign busy = (remain_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q   <= '0;
      have_q   <= 1'b0;
      idx_q    <= '0;
      remain_q <= '0;
      jcnt_q   <= '0;
      v        <= 1'b0;
      s2       <= '0;
      j        <= '0;
    end else if (clr) begin
      have_q   <= 1'b0;
      idx_q    <= '0;
      remain_q <= '0;
      jcnt_q   <= '0;
      v        <= 1'b0;
      s2       <= '0;
      j        <= '0;
    end else begin
      v <= emit;
      if (emit) begin
        s2       <= word_q[idx_q*SYM_W +: SYM_W];
        j        <= jcnt_q + 1'b1;
        jcnt_q   <= jcnt_q + 1'b1;
        remain_q <= remain_q - 1'b1;
        idx_q    <= idx_q + 1'b1;
        if (last_in_word) have_q <= 1'b0;
      end
      if (fifo_pop) begin
        word_q <= fifo_rdata;
        have_q <= 1'b1;
        idx_q  <= '0;
      end
      if (load && !busy) begin
        remain_q <= load_cnt;
        have_q   <= 1'b0;
      end
    end
  end

  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);

endmodule
