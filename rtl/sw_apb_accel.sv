// AMBA 2.0 APB slave wrapper around the alignment accelerator: the top of
// the design.
//
// The host processor reaches the accelerator's FIFOs and status through
// plain loads and stores on a memory-mapped window (word offsets):
//   0x00       write: push a word into the command/query FIFO
//   0x04       read : head of the output FIFO, popped by the read
//   0x08       read : status bits 31:0 (II, IC, FIFO full/almost-full)
//   0x0C       read : status bit 32 (OA, output available) in bit 0
//   0x40+4*k   write: push a word into reference FIFO k
// Other addresses read as zero and ignore writes. A transfer takes effect in
// its access phase (PSEL and PENABLE high); AMBA 2.0 APB has no wait states,
// so the host must watch the full / almost-full status bits before writing
// and OA before reading results.
// That the accelerator sits on the APB as a slave follows the design; the
// address map is this implementation's choice.
module sw_apb_accel
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
  parameter int unsigned FIFO_DEPTH  = 64
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata
);

  localparam logic [7:0] A_CMD = 8'h00, A_OUT = 8'h04, A_ST0 = 8'h08,
                         A_ST1 = 8'h0C, A_REF = 8'h40;

  logic access_w, access_r;
  assign access_w = psel && penable && pwrite;
  assign access_r = psel && penable && !pwrite;

  logic                          cmd_push;
  logic [MAX_STREAMS-1:0]        ref_push;
  logic [MAX_STREAMS*WORD_W-1:0] ref_wdata;
  logic                          out_pop, out_empty;
  logic [WORD_W-1:0]             out_rdata;
  logic [32:0]                   status;

  assign cmd_push = access_w && (paddr == A_CMD);
  for (genvar k = 0; k < MAX_STREAMS; k++) begin : g_ref
    assign ref_push[k] = access_w && (paddr == A_REF + 8'(4*k));
    assign ref_wdata[k*WORD_W +: WORD_W] = pwdata;
  end
  assign out_pop = access_r && (paddr == A_OUT) && !out_empty;

  always_comb begin
    unique case (paddr)
      A_OUT:   prdata = out_rdata;
      A_ST0:   prdata = status[31:0];
      A_ST1:   prdata = {31'b0, status[32]};
      default: prdata = '0;
    endcase
  end

  sw_accel #(
    .N_PE (N_PE), .MAX_STREAMS (MAX_STREAMS), .ENHANCED (ENHANCED), .SHARED_REF (SHARED_REF),
    .SCORE_W (SCORE_W), .I_W (I_W), .J_W (J_W), .GAP (GAP),
    .FIFO_DEPTH (FIFO_DEPTH)
  ) u_accel (
    .clk (pclk), .rst_n (presetn),
    .cmd_push, .cmd_wdata (pwdata),
    .ref_push, .ref_wdata,
    .out_pop, .out_rdata, .out_empty,
    .status
  );

endmodule
