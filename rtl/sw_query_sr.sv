// Auxiliary query-sequence load structure: a shift register that holds the
// substitution-matrix column of the next query character of every PE.
//
// The host streams the columns of the next query in serially while the array
// still works on the current one; ldcost then copies all of them into the
// PEs in one clock (the PEs read cols directly). The register has one stage
// per PE and is cut into MAX_STREAMS equal sub-chains at the places where the
// array can be split. With the array configured as 2**seg_log equal arrays,
// a shift moves one word into the head of array `arr' only: the sub-chains of
// that array are chained and the others hold. Data move from the PE-1 end
// towards the far end, so the host sends a query's columns last character
// first; stages not reached by the query keep the all-zero column left by
// clr, which is the column of an unused PE.
//
// Timing: shift is a one-clock strobe that takes col_in; clr clears every
// stage. Sub-chain boundaries, the shift direction and the order of the
// host's columns are this design's choices.
module sw_query_sr
  import sw_pkg::*;
#(
  parameter int unsigned N_PE        = 512,
  parameter int unsigned MAX_STREAMS = 8,
  localparam int unsigned LOG_S      = (MAX_STREAMS > 1) ? $clog2(MAX_STREAMS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic [LOG_S-1:0]       seg_log,   // log2 of the number of arrays
  input  logic [LOG_S-1:0]       arr,       // array addressed by shift
  input  logic                   shift,
  input  logic [COL_W-1:0]       col_in,
  output logic [N_PE*COL_W-1:0]  cols
);

  localparam int unsigned SUB = N_PE / MAX_STREAMS;   // stages per sub-chain

  logic [COL_W-1:0] sr_q [N_PE];

  for (genvar c = 0; c < MAX_STREAMS; c++) begin : g_chain
    logic en;
    logic head;
    logic [COL_W-1:0] din;
    always_comb begin
      // sub-chains per array = MAX_STREAMS >> seg_log
      en   = shift && ((c >> (LOG_S'(LOG_S) - seg_log)) == int'(arr));
      // at seg_log = LOG_S every sub-chain is an array of its own, which also
      // covers a MAX_STREAMS that is not a power of two
      head = (seg_log == LOG_S'(LOG_S)) || ((c % (MAX_STREAMS >> seg_log)) == 0);
      if (MAX_STREAMS == 1) begin
        en   = shift;
        head = 1'b1;
      end
    end
    if (c == 0) begin : g_first
      assign din = col_in;
    end else begin : g_next
      assign din = head ? col_in : sr_q[c*SUB-1];
    end

    for (genvar k = 0; k < SUB; k++) begin : g_stage
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     sr_q[c*SUB+k] <= '0;
        else if (clr)   sr_q[c*SUB+k] <= '0;
        else if (en)    sr_q[c*SUB+k] <= (k == 0) ? din : sr_q[c*SUB+k-1];
      end
    end
  end

  for (genvar p = 0; p < N_PE; p++) begin : g_out
    assign cols[p*COL_W +: COL_W] = sr_q[p];
  end

endmodule
