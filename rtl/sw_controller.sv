// Embedded controller of the alignment accelerator.
//
// Decodes the 32-bit instructions arriving in the command/query FIFO (opcode
// in bits 31:28) and drives the PE array, the query load structure, the
// reference feeders and the output FIFO:
//   config       (0) bits 27:24 number of arrays, bit 23 MS (1 = multiple
//                    references, 0 = single reference); only when
//                    MAX_STREAMS > 1
//   rstproc      (1) clear the PEs and reference feeders, not the controller
//   rstquery     (2) clear the auxiliary query load structure
//   shiftnxtcost (3) bits 27:24 array, 15:0 query size: the next `size'
//                    FIFO words are substitution columns shifted into that
//                    array's load structure; decoding resumes afterwards
//   ldcost       (4) copy the load structure into the PEs (one clock)
//   ldref        (5) bits 27:24 array, 23:0 reference size: let that array's
//                    feeder send `size' symbols from its reference FIFO
//   endref       (6) wait until all references have passed the array, then
//                    write each array's result to the output FIFO
//   getid        (7) write the capability word to the output FIFO
// With FIXED_SRMQ (an array built with shared reference registers) the
// layout is fixed at MAX_STREAMS single-reference arrays from reset (any
// MAX_STREAMS, not only a power of two) and config is an invalid instruction.
// Opcodes 8..15 set the invalid-instruction flag; a config with an array
// count that is not a power of two up to MAX_STREAMS, or an array field
// beyond the configured arrays, sets the invalid-configuration flag. Each
// flag shows the outcome of the last instruction that could raise it.
//
// Result format per array (RESULT_WORDS words, zero-extended): array number
// in 31:28 and best score in 15:0; origin i; origin j; end i; end j.
// Capability word: 31:24 MAX_STREAMS, 23:12 N_PE, 11 ENHANCED, 10:5 SCORE_W,
// 4:0 J_W.
//
// ldref waits while the addressed feeder still owes symbols, so loads queue
// naturally; all arrays run in lockstep and endref waits for the longest.
// The instruction set and field positions follow the design; the result and
// capability word layouts, the flag lifetime and the drain rule are this
// implementation's choices.
module sw_controller
  import sw_pkg::*;
#(
  parameter int unsigned N_PE        = 512,
  parameter int unsigned MAX_STREAMS = 8,
  parameter bit          ENHANCED    = 1'b1,
  parameter bit          FIXED_SRMQ  = 1'b0,
  parameter int unsigned SCORE_W     = 12,
  parameter int unsigned I_W         = 10,
  parameter int unsigned J_W         = 28,
  parameter int unsigned DRAIN       = 4,
  localparam int unsigned CB_W       = I_W + J_W,
  localparam int unsigned MAX_W      = SCORE_W + 2 * CB_W,
  localparam int unsigned LOG_S      = (MAX_STREAMS > 1) ? $clog2(MAX_STREAMS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // command / query FIFO
  input  logic [WORD_W-1:0]            cmd_rdata,
  input  logic                         cmd_empty,
  output logic                         cmd_pop,
  // array configuration
  output logic [LOG_S-1:0]             seg_log,
  output logic                         mrmq,
  output logic                         pe_clr,
  // query load structure
  output logic                         q_clr,
  output logic                         q_shift,
  output logic [LOG_S-1:0]             q_arr,
  output logic                         col_ld,
  // reference feeders
  output logic [MAX_STREAMS-1:0]       ref_load,
  output logic [23:0]                  ref_cnt,
  input  logic [MAX_STREAMS-1:0]       ref_busy,
  input  logic                         array_busy,
  input  logic [MAX_STREAMS*MAX_W-1:0] tap_max,
  // output FIFO
  output logic                         out_push,
  output logic [WORD_W-1:0]            out_wdata,
  input  logic                         out_full,
  // flags
  output logic                         flag_ii,
  output logic                         flag_ic
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

  typedef enum logic [2:0] {S_DECODE, S_SHIFT, S_DRAIN, S_RESULT, S_ID} state_e;

  state_e          state_q;
  logic [15:0]     shift_left_q;
  logic [LOG_S-1:0] arr_q;
  logic [$clog2(DRAIN+1)-1:0] drain_q;
  logic [LOG_S:0]  res_arr_q;   // array being reported
  logic [2:0]      res_word_q;  // word of that array

  opcode_e     op;
  logic [3:0]  f_arr;
  logic        f_ms;
  assign op    = opcode_e'(cmd_rdata[31:28]);
  assign f_arr = cmd_rdata[27:24];
  assign f_ms  = cmd_rdata[23];

  logic [LOG_S:0] n_arr;              // configured number of arrays
  assign n_arr = FIXED_SRMQ ? (LOG_S+1)'(MAX_STREAMS) : (LOG_S+1)'(1) << seg_log;
  logic arr_ok;
  assign arr_ok = ({1'b0, f_arr} < 5'(n_arr));

  // config field check: power of two, 1 .. MAX_STREAMS
  logic              cfg_ok;
  logic [LOG_S-1:0]  cfg_log;
  always_comb begin
    cfg_ok  = 1'b0;
    cfg_log = '0;
    for (int l = 0; l <= LOG_S; l++)
      if ((1 << l) <= MAX_STREAMS && int'(f_arr) == (1 << l)) begin
        cfg_ok  = 1'b1;
        cfg_log = LOG_S'(l);
      end
  end

  // result word selection
  best_t        res;
  logic [LOG_S-1:0] tap_idx;
  always_comb begin
    // last group of array res_arr_q: (a+1) * groups_per_array - 1
    tap_idx = LOG_S'(((int'(res_arr_q) + 1) << (LOG_S - int'(seg_log))) - 1);
    if (MAX_STREAMS == 1) tap_idx = '0;
    res = best_t'(tap_max[tap_idx*MAX_W +: MAX_W]);
    unique case (res_word_q)
      3'd0:    out_wdata = {4'(res_arr_q), 12'h0, 16'(res.score)};
      3'd1:    out_wdata = 32'(res.origin.i);
      3'd2:    out_wdata = 32'(res.origin.j);
      3'd3:    out_wdata = 32'(res.fin.i);
      default: out_wdata = 32'(res.fin.j);
    endcase
    if (state_q == S_ID)
      out_wdata = {8'(MAX_STREAMS), 12'(N_PE), 1'(ENHANCED), 6'(SCORE_W), 5'(J_W)};
  end

  always_comb begin
    cmd_pop  = 1'b0;
    pe_clr   = 1'b0;
    q_clr    = 1'b0;
    q_shift  = 1'b0;
    col_ld   = 1'b0;
    ref_load = '0;
    ref_cnt  = cmd_rdata[23:0];
    out_push = 1'b0;
    q_arr    = arr_q;
    unique case (state_q)
      S_DECODE: if (!cmd_empty) begin
        unique case (op)
          OP_RSTPROC:  begin cmd_pop = 1'b1; pe_clr = 1'b1; end
          OP_RSTQUERY: begin cmd_pop = 1'b1; q_clr  = 1'b1; end
          OP_LDCOST:   begin cmd_pop = 1'b1; col_ld = 1'b1; end
          OP_LDREF: begin
            if (!mrmq) begin
              if (!ref_busy[0]) begin cmd_pop = 1'b1; ref_load[0] = 1'b1; end
            end else if (!arr_ok) begin
              cmd_pop = 1'b1;
            end else if (!ref_busy[f_arr[LOG_S-1:0]]) begin
              cmd_pop = 1'b1;
              ref_load[f_arr[LOG_S-1:0]] = 1'b1;
            end
          end
          default: cmd_pop = 1'b1;
        endcase
      end
      S_SHIFT: if (!cmd_empty) begin
        cmd_pop = 1'b1;
        q_shift = 1'b1;
      end
      S_RESULT, S_ID: out_push = !out_full;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_DECODE;
      shift_left_q <= '0;
      arr_q        <= '0;
      drain_q      <= '0;
      res_arr_q    <= '0;
      res_word_q   <= '0;
      seg_log      <= FIXED_SRMQ ? LOG_S'(LOG_S) : '0;
      mrmq         <= 1'b0;
      flag_ii      <= 1'b0;
      flag_ic      <= 1'b0;
    end else begin
      unique case (state_q)
        S_DECODE: if (!cmd_empty) begin
          if (cmd_rdata[31]) flag_ii <= 1'b1;
          else begin
            flag_ii <= 1'b0;
            unique case (op)
              OP_CONFIG: begin
                if (MAX_STREAMS == 1 || FIXED_SRMQ) flag_ii <= 1'b1;
                else if (cfg_ok) begin
                  flag_ic <= 1'b0;
                  seg_log <= cfg_log;
                  mrmq    <= f_ms;
                end else flag_ic <= 1'b1;
              end
              OP_SHIFTNXTCOST: begin
                flag_ic      <= !arr_ok;
                arr_q        <= f_arr[LOG_S-1:0];
                shift_left_q <= cmd_rdata[15:0];
                if (!arr_ok) arr_q <= '0;
                // words of a rejected query are still consumed, not shifted
                if (cmd_rdata[15:0] != '0) state_q <= S_SHIFT;
              end
              OP_LDREF: if (mrmq) flag_ic <= !arr_ok;
              OP_ENDREF: begin
                drain_q <= '0;
                state_q <= S_DRAIN;
              end
              OP_GETID: state_q <= S_ID;
              default: ;
            endcase
          end
        end
        S_SHIFT: if (!cmd_empty) begin
          shift_left_q <= shift_left_q - 1'b1;
          if (shift_left_q == 16'd1) state_q <= S_DECODE;
        end
        S_DRAIN: begin
          if (ref_busy != '0 || array_busy) drain_q <= '0;
          else if (drain_q == ($clog2(DRAIN+1))'(DRAIN)) begin
            res_arr_q  <= '0;
            res_word_q <= '0;
            state_q    <= S_RESULT;
          end else drain_q <= drain_q + 1'b1;
        end
        S_RESULT: if (!out_full) begin
          if (res_word_q == 3'(RESULT_WORDS-1)) begin
            res_word_q <= '0;
            if (res_arr_q == n_arr - 1'b1) state_q <= S_DECODE;
            else res_arr_q <= res_arr_q + 1'b1;
          end else res_word_q <= res_word_q + 1'b1;
        end
        S_ID: if (!out_full) state_q <= S_DECODE;
        default: state_q <= S_DECODE;
      endcase
    end
  end

endmodule
