// Testbench of the base PE (sw_pe_base).
//
// Ten base PEs are chained. The example query CAGCCTCGCT against reference
// AATGCCATTGAC (+3/-1, gap 4) must give best score 10; random columns,
// references and bubbles must give the best score of the reference model,
// and every cell score must match the model.
`timescale 1ns/1ps
module tb_sw_pe_base;
  import sw_pkg::*;
  import tb_sw_model_pkg::*;

  localparam int NP = 10, SW = 12, GAPV = 4;

  logic clk = 0, rst_n = 0, clr = 0, col_ld = 0;
  always #5 clk = ~clk;

  logic          v  [NP+1];
  logic [1:0]    s2 [NP+1];
  logic [SW-1:0] g  [NP+1];
  logic [SW-1:0] mx [NP+1];
  logic [31:0]   cols [NP];
  int            jcur [NP+1];

  for (genvar p = 0; p < NP; p++) begin : g_pe
    sw_pe_base #(.SCORE_W(SW), .GAP(GAPV)) dut (
      .clk, .rst_n, .clr, .col_ld, .col_in (cols[p]),
      .v_in (v[p]), .s2_in (s2[p]), .g_in (g[p]), .max_in (mx[p]),
      .v_out (v[p+1]), .s2_out (s2[p+1]), .g_out (g[p+1]), .max_out (mx[p+1])
    );
    always @(posedge clk) jcur[p+1] <= jcur[p];
  end
  assign g[0] = '0;
  assign mx[0] = '0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int r [1:MAXM];
  int q [1:MAXN];
  int m;

  always @(posedge clk) if (rst_n && !clr)
    for (int p = 0; p < NP; p++)
      if (v[p+1]) check(int'(g[p+1]) == G[p+1][jcur[p+1]],
                        $sformatf("cell (%0d,%0d)", p+1, jcur[p+1]));

  task automatic run(int bubble_pct);
    for (int p = 0; p < NP; p++) cols[p] = col_word(p+1);
    fill(NP, m, r, GAPV);
    @(negedge clk); col_ld = 1; clr = 1;
    @(negedge clk); col_ld = 0; clr = 0;
    for (int j = 1; j <= m; j++) begin
      while ($urandom_range(99) < bubble_pct) begin v[0] = 0; @(negedge clk); end
      v[0] = 1; s2[0] = 2'(r[j]); jcur[0] = j;
      @(negedge clk);
    end
    v[0] = 0;
    repeat (NP + 3) @(negedge clk);
    check(int'(mx[NP]) == best, $sformatf("best %0d want %0d", mx[NP], best));
  endtask

  initial begin
    string qs, rs;
    v[0] = 0; s2[0] = 0; jcur[0] = 0;
    foreach (cols[p]) cols[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    qs = "CAGCCTCGCT"; rs = "AATGCCATTGAC";
    for (int i = 1; i <= NP; i++) q[i] = sym(qs[i-1]);
    m = rs.len();
    for (int j = 1; j <= m; j++) r[j] = sym(rs[j-1]);
    set_match_scores(NP, q);
    run(0);
    check(mx[NP] == 10, "example best score 10");
    for (int t = 0; t < 6; t++) begin
      m = 20 + $urandom_range(40);
      for (int j = 1; j <= m; j++) r[j] = $urandom_range(3);
      for (int i = 1; i <= NP; i++)
        for (int s = 0; s < 4; s++) sbc_tab[i][s] = $urandom_range(8) - 3;
      run(t * 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
