// Testbench of the auxiliary query load structure (sw_query_sr).
//
// A 16-stage structure with 4 sub-chains is cleared, configured as 1, 2 and
// 4 arrays, and loaded with random words for some of the arrays. After the
// shifts, stage k of array a must hold the word sent (n - k)-th for a query
// of n words (the last word sent sits at the array's first PE), stages
// beyond the query must be zero, and arrays not addressed must be unchanged.
`timescale 1ns/1ps
module tb_sw_query_sr;
  import sw_pkg::*;

  localparam int NP = 16, NS = 4;

  logic clk = 0, rst_n = 0, clr = 0, shift = 0;
  always #5 clk = ~clk;
  logic [1:0] seg_log = 0, arr = 0;
  logic [31:0] col_in = 0;
  logic [NP*32-1:0] cols;

  sw_query_sr #(.N_PE(NP), .MAX_STREAMS(NS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [31:0] expv [NP];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int l, na, L;
      l = t % 3; na = 1 << l; L = NP / na;
      seg_log = 2'(l);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      foreach (expv[k]) expv[k] = '0;
      for (int a = 0; a < na; a++) begin
        int n;
        if ($urandom_range(3) == 0) continue;
        n = 1 + $urandom_range(L - 1);
        arr = 2'(a);
        for (int w = 0; w < n; w++) begin
          col_in = $urandom;
          // the word sent w-th ends at local stage n-1-w
          expv[a*L + n - 1 - w] = col_in;
          shift = 1; @(negedge clk); shift = 0;
          if ($urandom_range(1) == 0) @(negedge clk);
        end
      end
      for (int k = 0; k < NP; k++)
        check(cols[k*32 +: 32] == expv[k],
              $sformatf("cfg %0d stage %0d = %h want %h", na, k, cols[k*32 +: 32], expv[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
