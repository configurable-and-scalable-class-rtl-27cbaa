// Smith-Waterman local-alignment accelerator with origin tracking and
// multiple-stream operation.
//
// A host feeds instructions and query data through one command/query FIFO
// and reference sequences through one FIFO per array; the embedded
// controller (sw_controller) decodes the instructions, loads the query
// substitution columns into the auxiliary load structure (sw_query_sr),
// copies them into the PEs, and lets the reference feeders (sw_ref_feeder)
// stream the references through the systolic PE array (sw_pe_array). After
// endref the best score of every array, with the coordinates where that
// alignment starts and ends, is written to the output FIFO.
//
// The PE array can run as 1 .. MAX_STREAMS equal arrays (config
// instruction). In single-reference mode (MS=0) reference FIFO 0 feeds every
// array, which each hold a different query; in multiple-reference mode (MS=1)
// array a takes its reference from FIFO a.
//
// SHARED_REF=1 builds the fixed single-reference variant instead: the array
// is always MAX_STREAMS arrays fed from reference FIFO 0 (the only reference
// FIFO and feeder built), made of PEs that share their reference registers,
// and config is rejected.
//
// Status word (33 bits): bit 32 OA (output FIFO holds data), bit 31 II
// (invalid instruction), bit 30 IC (invalid configuration), and for FIFO k
// (k=0 command/query, k=1.. reference FIFO k-1) bit 2k = full, bit 2k+1 =
// almost full. The FIFO set, their 64x32 size, the status fields and the
// instruction set follow the design; the bit order inside the full/almost
// full field is this implementation's choice.
module sw_accel
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
  parameter int unsigned FIFO_DEPTH  = 64,
  localparam int unsigned LOG_S      = (MAX_STREAMS > 1) ? $clog2(MAX_STREAMS) : 1,
  localparam int unsigned CB_W       = I_W + J_W,
  localparam int unsigned MAX_W      = SCORE_W + 2 * CB_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // command & query input FIFO
  input  logic                          cmd_push,
  input  logic [WORD_W-1:0]             cmd_wdata,
  // reference input FIFOs, one per array
  input  logic [MAX_STREAMS-1:0]        ref_push,
  input  logic [MAX_STREAMS*WORD_W-1:0] ref_wdata,
  // output FIFO
  input  logic                          out_pop,
  output logic [WORD_W-1:0]             out_rdata,
  output logic                          out_empty,
  // status
  output logic [32:0]                   status
);

  // ---- input FIFOs ----------------------------------------------------------
  logic [WORD_W-1:0] cmd_rdata;
  logic              cmd_empty, cmd_pop, cmd_full, cmd_af;

  sw_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .push (cmd_push), .wdata (cmd_wdata), .pop (cmd_pop),
    .rdata (cmd_rdata), .empty (cmd_empty), .full (cmd_full),
    .almost_full (cmd_af), .count ()
  );

  logic [MAX_STREAMS-1:0] ref_empty, ref_pop, ref_full, ref_af, ref_load, ref_busy;
  logic [WORD_W-1:0]      ref_rdata [MAX_STREAMS];
  logic [23:0]            ref_cnt;
  logic [MAX_STREAMS-1:0] f_v;
  logic [SYM_W-1:0]       f_s2 [MAX_STREAMS];
  logic [J_W-1:0]         f_j  [MAX_STREAMS];
  logic                   pe_clr;

  // the SHARED_REF build has no multiple-reference mode: only FIFO 0 exists
  for (genvar k = 0; k < MAX_STREAMS; k++) begin : g_ref
    if (k == 0 || !SHARED_REF) begin : g_on
      sw_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_ref_fifo (
        .clk, .rst_n, .push (ref_push[k]), .wdata (ref_wdata[k*WORD_W +: WORD_W]),
        .pop (ref_pop[k]), .rdata (ref_rdata[k]), .empty (ref_empty[k]),
        .full (ref_full[k]), .almost_full (ref_af[k]), .count ()
      );
      sw_ref_feeder #(.J_W(J_W)) u_feeder (
        .clk, .rst_n, .clr (pe_clr), .load (ref_load[k]), .load_cnt (ref_cnt),
        .fifo_rdata (ref_rdata[k]), .fifo_empty (ref_empty[k]), .fifo_pop (ref_pop[k]),
        .v (f_v[k]), .s2 (f_s2[k]), .j (f_j[k]), .busy (ref_busy[k])
      );
    end else begin : g_off
      assign ref_rdata[k] = '0;
      assign ref_empty[k] = 1'b1;
      assign ref_pop[k]   = 1'b0;
      assign ref_full[k]  = 1'b0;
      assign ref_af[k]    = 1'b0;
      assign f_v[k]       = 1'b0;
      assign f_s2[k]      = '0;
      assign f_j[k]       = '0;
      assign ref_busy[k]  = 1'b0;
    end
  end

  // ---- controller -------------------------------------------------------------
  logic [LOG_S-1:0]             seg_log, q_arr;
  logic                         mrmq, q_clr, q_shift, col_ld;
  logic                         array_busy;
  logic [MAX_STREAMS*MAX_W-1:0] tap_max;
  logic                         out_push, out_full;
  logic [WORD_W-1:0]            out_wdata;
  logic                         flag_ii, flag_ic;

  sw_controller #(
    .N_PE (N_PE), .MAX_STREAMS (MAX_STREAMS), .ENHANCED (ENHANCED), .FIXED_SRMQ (SHARED_REF),
    .SCORE_W (SCORE_W), .I_W (I_W), .J_W (J_W)
  ) u_ctrl (
    .clk, .rst_n,
    .cmd_rdata, .cmd_empty, .cmd_pop,
    .seg_log, .mrmq, .pe_clr,
    .q_clr, .q_shift, .q_arr, .col_ld,
    .ref_load, .ref_cnt, .ref_busy, .array_busy, .tap_max,
    .out_push, .out_wdata, .out_full,
    .flag_ii, .flag_ic
  );

  // ---- query load structure and PE array ----------------------------------
  logic [N_PE*COL_W-1:0] cols;

  sw_query_sr #(.N_PE (N_PE), .MAX_STREAMS (MAX_STREAMS)) u_qsr (
    .clk, .rst_n, .clr (q_clr), .seg_log, .arr (q_arr), .shift (q_shift),
    .col_in (cmd_rdata), .cols
  );

  // head input c of the array: the feeder of the array starting at group c
  logic [MAX_STREAMS-1:0]       head_v;
  logic [MAX_STREAMS*SYM_W-1:0] head_s2;
  logic [MAX_STREAMS*J_W-1:0]   head_j;
  for (genvar c = 0; c < MAX_STREAMS; c++) begin : g_head
    logic [LOG_S-1:0] src;
    always_comb begin
      src = mrmq ? LOG_S'(c >> (LOG_S - int'(seg_log))) : '0;
      if (MAX_STREAMS == 1) src = '0;
    end
    assign head_v[c]                  = f_v[src];
    assign head_s2[c*SYM_W +: SYM_W]  = f_s2[src];
    assign head_j[c*J_W +: J_W]       = f_j[src];
  end

  sw_pe_array #(
    .N_PE (N_PE), .MAX_STREAMS (MAX_STREAMS), .ENHANCED (ENHANCED), .SHARED_REF (SHARED_REF),
    .SCORE_W (SCORE_W), .I_W (I_W), .J_W (J_W), .GAP (GAP)
  ) u_array (
    .clk, .rst_n, .clr (pe_clr), .seg_log, .col_ld, .cols,
    .head_v, .head_s2, .head_j, .tap_max, .busy (array_busy)
  );

  // ---- output FIFO and status ----------------------------------------------
  logic out_af;
  sw_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push (out_push), .wdata (out_wdata), .pop (out_pop),
    .rdata (out_rdata), .empty (out_empty), .full (out_full),
    .almost_full (out_af), .count ()
  );

  always_comb begin
    status = '0;
    status[32] = !out_empty;
    status[31] = flag_ii;
    status[30] = flag_ic;
    status[0]  = cmd_full;
    status[1]  = cmd_af;
    for (int k = 0; k < MAX_STREAMS && k < 14; k++) begin
      status[2*(k+1)]   = ref_full[k];
      status[2*(k+1)+1] = ref_af[k];
    end
  end

endmodule
