// Synchronous first-in first-out queue used for every host-side port of the
// accelerator (command/query input, reference inputs, result output).
//
// DEPTH words of W bits held in a register array. The head word is always
// visible on rdata (show-ahead); pop removes it, push appends wdata. A push
// while full and a pop while empty are ignored (and flagged by assertions).
// almost_full rises when AF_SLACK or fewer places are left, which lets the
// host throttle its writes without reading the exact level.
// Depth and width follow the design (64 words of 32 bits); the almost-full
// slack is this implementation's choice.
module sw_fifo #(
  parameter int unsigned W        = 32,
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned AF_SLACK = 4,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic         almost_full,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign empty       = (count == 0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(DEPTH - AF_SLACK));
  assign rdata       = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
