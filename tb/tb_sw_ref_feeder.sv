// Testbench of the reference-stream feeder (sw_ref_feeder).
//
// Random reference sequences are packed 16 symbols to a word and written
// into a FIFO (sw_fifo) at a random pace; several loads of random length are
// issued back to back. The feeder must emit exactly the loaded symbols, in
// order, with coordinates counting on across loads, restart j after clr, and
// send one symbol per clock, after one clock to fetch the first word,
// whenever the FIFO already holds the words.
`timescale 1ns/1ps
module tb_sw_ref_feeder;
  import sw_pkg::*;

  localparam int JW = 28;

  logic clk = 0, rst_n = 0, clr = 0, load = 0;
  always #5 clk = ~clk;
  logic [23:0] load_cnt = 0;
  logic push = 0;
  logic [31:0] wdata = 0, rdata;
  logic empty, full, af, pop, v, busy;
  logic [1:0] s2;
  logic [JW-1:0] j;
  logic [6:0] count;

  sw_fifo #(.W(32), .DEPTH(64)) u_fifo (
    .clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .almost_full (af), .count
  );
  sw_ref_feeder #(.J_W(JW)) dut (
    .clk, .rst_n, .clr, .load, .load_cnt, .fifo_rdata (rdata), .fifo_empty (empty),
    .fifo_pop (pop), .v, .s2, .j, .busy
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int exp_s [$];
  int exp_j [$];
  int jbase = 0;

  always @(posedge clk) if (rst_n && v) begin
    int es, ej;
    if (exp_s.size() == 0) check(0, "unexpected symbol");
    else begin
      es = exp_s.pop_front(); ej = exp_j.pop_front();
      check(int'(s2) == es && int'(j) == ej,
            $sformatf("symbol %0d j %0d want %0d j %0d", s2, j, es, ej));
    end
  end

  // one load of n symbols; fast: all words in the FIFO before the load
  task automatic do_load(int n, bit fast);
    int words, cyc;
    logic [31:0] w;
    words = (n + 15) / 16;
    if (fast) begin
      for (int k = 0; k < words; k++) begin
        for (int s = 0; s < 16; s++) begin
          w[s*2 +: 2] = 2'($urandom);
          if (k*16 + s < n) begin exp_s.push_back(int'(w[s*2 +: 2])); exp_j.push_back(++jbase); end
        end
        push = 1; wdata = w; @(negedge clk); push = 0;
      end
      load = 1; load_cnt = 24'(n); @(negedge clk); load = 0;
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc == n + 1, $sformatf("load of %0d symbols took %0d clocks", n, cyc));
    end else begin
      load = 1; load_cnt = 24'(n); @(negedge clk); load = 0;
      for (int k = 0; k < words; k++) begin
        repeat ($urandom_range(20)) @(negedge clk);
        for (int s = 0; s < 16; s++) begin
          w[s*2 +: 2] = 2'($urandom);
          if (k*16 + s < n) begin exp_s.push_back(int'(w[s*2 +: 2])); exp_j.push_back(++jbase); end
        end
        push = 1; wdata = w; @(negedge clk); push = 0;
      end
      while (busy) @(negedge clk);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) do_load(1 + $urandom_range(200), t % 2 == 0);
    // restart of the coordinate
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    jbase = 0;
    do_load(40, 1'b1);
    check(exp_s.size() == 0, "symbols missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
