// Testbench of the reconfigurable PE array (sw_pe_array).
//
// A 16-PE array with switching elements every 4 PEs is run as 1, 2 and 4
// independent arrays. Every array gets its own query (some shorter than the
// array, leaving PEs with all-zero columns) and its own random reference;
// the best record tapped at the end of each array must match the reference
// model: best score, an end cell holding that score, and the origin the
// model computes for that end cell. The number of clocks the last symbol
// needs to leave the array must equal the PEs plus switching elements on
// its path. A last run repeats one configuration with score-only base PEs.
`timescale 1ns/1ps
module tb_sw_pe_array;
  import sw_pkg::*;
  import tb_sw_model_pkg::*;

  localparam int NP = 16, NS = 4, SW = 12, IW = 10, JW = 28, GAPV = 4;
  localparam int CBW = IW + JW, MW = SW + 2*CBW;

  logic clk = 0, rst_n = 0, clr = 0, col_ld = 0;
  always #5 clk = ~clk;

  logic [1:0]          seg_log = 0;
  logic [NP*32-1:0]    cols = '0;
  logic [NS-1:0]       head_v = '0;
  logic [NS*2-1:0]     head_s2 = '0;
  logic [NS*JW-1:0]    head_j = '0;
  logic [NS*MW-1:0]    tap_max, tap_base;
  logic                busy, busy_base;

  sw_pe_array #(.N_PE(NP), .MAX_STREAMS(NS), .ENHANCED(1'b1), .SCORE_W(SW),
                .I_W(IW), .J_W(JW), .GAP(GAPV)) dut (
    .clk, .rst_n, .clr, .seg_log, .col_ld, .cols, .head_v, .head_s2, .head_j,
    .tap_max, .busy
  );
  sw_pe_array #(.N_PE(NP), .MAX_STREAMS(NS), .ENHANCED(1'b0), .SCORE_W(SW),
                .I_W(IW), .J_W(JW), .GAP(GAPV)) dut_base (
    .clk, .rst_n, .clr, .seg_log, .col_ld, .cols, .head_v, .head_s2, .head_j,
    .tap_max (tap_base), .busy (busy_base)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int refs  [NS][1:MAXM];
  int qlen  [NS];
  int scol  [NS][1:MAXN][0:3];
  int mlen;

  task automatic run(int l);
    int na, L, gpa, edges;
    int r [1:MAXM];
    na  = 1 << l;
    L   = NP / na;
    gpa = NS / na;
    seg_log = 2'(l);
    mlen = 30 + $urandom_range(30);
    for (int a = 0; a < na; a++) begin
      qlen[a] = (a % 2 == 0) ? L : 1 + $urandom_range(L - 1);
      for (int i = 1; i <= L; i++)
        for (int s = 0; s < 4; s++)
          scol[a][i][s] = (i <= qlen[a]) ? int'($urandom_range(8)) - 3 : 0;
      for (int j = 1; j <= mlen; j++) refs[a][j] = $urandom_range(3);
      for (int i = 1; i <= L; i++)
        for (int s = 0; s < 4; s++)
          cols[(a*L + i - 1)*32 + s*8 +: 8] = 8'(scol[a][i][s]);
    end
    @(negedge clk); clr = 1; col_ld = 1;
    @(negedge clk); clr = 0; col_ld = 0;
    for (int j = 1; j <= mlen; j++) begin
      for (int a = 0; a < na; a++) begin
        head_v[a*gpa] = 1'b1;
        head_s2[a*gpa*2 +: 2] = 2'(refs[a][j]);
        head_j[a*gpa*JW +: JW] = JW'(j);
      end
      @(negedge clk);
    end
    head_v = '0;
    edges = 0;
    while (busy && edges < 200) begin @(posedge clk); edges++; @(negedge clk); end
    check(edges == L + gpa - ((l == 0) ? 1 : 0),
          $sformatf("config %0d arrays: drain took %0d clocks", na, edges));
    repeat (2) @(negedge clk);
    for (int a = 0; a < na; a++) begin
      logic [SW-1:0] sc; logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
      for (int i = 1; i <= L; i++) for (int s = 0; s < 4; s++) sbc_tab[i][s] = scol[a][i][s];
      for (int j = 1; j <= mlen; j++) r[j] = refs[a][j];
      fill(L, mlen, r, GAPV);
      {sc, oi, oj, ei, ej} = tap_max[((a+1)*gpa - 1)*MW +: MW];
      check(int'(sc) == best, $sformatf("cfg %0d arr %0d score %0d want %0d", na, a, sc, best));
      check(int'(tap_base[((a+1)*gpa - 1)*MW + 2*CBW +: SW]) == best,
            $sformatf("cfg %0d arr %0d base score wrong", na, a));
      if (best > 0) begin
        check(ei >= 1 && int'(ei) <= qlen[a] && G[ei][ej] == best,
              $sformatf("cfg %0d arr %0d end (%0d,%0d) not a best cell", na, a, ei, ej));
        check(CI[ei][ej] == int'(oi) && CJ[ei][ej] == int'(oj),
              $sformatf("cfg %0d arr %0d origin (%0d,%0d) want (%0d,%0d)", na, a, oi, oj,
                        CI[ei][ej], CJ[ei][ej]));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int l = 0; l <= 2; l++) run(l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
