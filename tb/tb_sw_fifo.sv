// Testbench of the 64x32 FIFO (sw_fifo).
//
// Random pushes and pops (never a push while full nor a pop while empty)
// are compared with a queue model: head word, level, empty, full and
// almost-full flags, including runs that fill the FIFO completely.
`timescale 1ns/1ps
module tb_sw_fifo;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  always #5 clk = ~clk;
  logic [31:0] wdata = 0, rdata;
  logic empty, full, almost_full;
  logic [6:0] count;

  sw_fifo #(.W(32), .DEPTH(D), .AF_SLACK(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [31:0] q [$];
  int fulls = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int bias;
      bias = ((t / 500) % 2 == 0) ? 70 : 30;   // phases of filling and draining
      push = (q.size() < D) && ($urandom_range(99) < bias);
      pop  = (q.size() > 0) && ($urandom_range(99) >= bias);
      wdata = $urandom;
      #1;
      check(empty == (q.size() == 0) && full == (q.size() == D) &&
            almost_full == (q.size() >= D - 4) && int'(count) == q.size(), "flags");
      if (q.size() > 0) check(rdata == q[0], "head word");
      if (full) fulls++;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    check(fulls > 0, "FIFO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
