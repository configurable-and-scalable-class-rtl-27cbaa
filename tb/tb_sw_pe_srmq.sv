// Testbench of the shared-reference multi-stream PE (sw_pe_srmq).
//
// Eight PEs, each holding NQ=3 query streams, are chained into a small
// array. Every stream gets its own random substitution columns (a different
// query) while all streams see the same reference, fed once at the head.
// The first run uses the match/mismatch example query in stream 0, whose
// best alignment must score 10, end at (8,10) and start at (3,4). For every
// valid symbol leaving a PE, each stream's G(i,j) and origin Cb(i,j) are
// compared with the reference model of that stream, and every stream's best
// record at the last PE is checked. Random bubbles are inserted in the
// reference stream; a symbol must leave each PE one clock after entering.
`timescale 1ns/1ps
module tb_sw_pe_srmq;
  import sw_pkg::*;
  import tb_sw_model_pkg::*;

  localparam int NP = 8, NQ = 3, SW = 12, IW = 10, JW = 28, GAPV = 4;
  localparam int CBW = IW + JW, MW = SW + 2*CBW;
  localparam int MM = 80;

  logic clk = 0, rst_n = 0, clr = 0, col_ld = 0;
  always #5 clk = ~clk;

  logic               v  [NP+1];
  logic [1:0]         s2 [NP+1];
  logic [JW-1:0]      jj [NP+1];
  logic [NQ*SW-1:0]   g  [NP+1];
  logic [NQ*CBW-1:0]  cb [NP+1];
  logic [NQ*MW-1:0]   mx [NP+1];
  logic [NQ*32-1:0]   cols [NP];

  for (genvar p = 0; p < NP; p++) begin : g_pe
    sw_pe_srmq #(.NQ(NQ), .SCORE_W(SW), .I_W(IW), .J_W(JW), .GAP(GAPV)) dut (
      .clk, .rst_n, .clr, .pe_idx (IW'(p+1)), .col_ld, .col_in (cols[p]),
      .v_in (v[p]), .s2_in (s2[p]), .j_in (jj[p]), .g_in (g[p]), .cb_in (cb[p]),
      .max_in (mx[p]),
      .v_out (v[p+1]), .s2_out (s2[p+1]), .j_out (jj[p+1]), .g_out (g[p+1]),
      .cb_out (cb[p+1]), .max_out (mx[p+1])
    );
  end
  assign g[0]  = '0;
  assign cb[0] = '0;
  assign mx[0] = '0;

  int checks = 0, failures = 0, cells = 0;
  int r [1:MAXM];
  int m;
  int lat_bad = 0;
  // per-stream copies of the model
  int EG [NQ][0:NP][0:MM], ECI [NQ][0:NP][0:MM], ECJ [NQ][0:NP][0:MM];
  int ebest [NQ];
  int sb [NQ][1:NP][0:3];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // cell monitor, every stream
  always @(posedge clk) if (rst_n && !clr) begin
    for (int p = 0; p < NP; p++) begin
      if (v[p+1]) begin
        int jv;
        jv = int'(jj[p+1]);
        for (int q = 0; q < NQ; q++) begin
          cells++;
          check(g[p+1][q*SW +: SW] == SW'(EG[q][p+1][jv]) &&
                cb[p+1][q*CBW +: CBW] == {IW'(ECI[q][p+1][jv]), JW'(ECJ[q][p+1][jv])},
                $sformatf("stream %0d cell (%0d,%0d) got G=%0d want %0d", q, p+1, jv,
                          g[p+1][q*SW +: SW], EG[q][p+1][jv]));
        end
      end
    end
  end
  logic v_prev [NP];
  logic [JW-1:0] j_prev [NP];
  always @(posedge clk) if (rst_n && !clr) begin
    for (int p = 0; p < NP; p++) begin
      if (v_prev[p] && !(v[p+1] && jj[p+1] == j_prev[p])) lat_bad++;
      v_prev[p] <= v[p];
      j_prev[p] <= jj[p];
    end
  end

  task automatic run(int bubble_pct);
    for (int q = 0; q < NQ; q++) begin
      for (int i = 1; i <= NP; i++)
        for (int s = 0; s < 4; s++) sbc_tab[i][s] = sb[q][i][s];
      fill(NP, m, r, GAPV);
      ebest[q] = best;
      for (int i = 0; i <= NP; i++)
        for (int j = 0; j <= m; j++) begin
          EG[q][i][j] = G[i][j]; ECI[q][i][j] = CI[i][j]; ECJ[q][i][j] = CJ[i][j];
        end
      for (int p = 0; p < NP; p++) cols[p][q*32 +: 32] = col_word(p+1);
    end
    @(negedge clk); col_ld = 1; clr = 1;
    @(negedge clk); col_ld = 0; clr = 0;
    for (int j = 1; j <= m; j++) begin
      while ($urandom_range(99) < bubble_pct) begin
        v[0] = 0; @(negedge clk);
      end
      v[0] = 1; s2[0] = 2'(r[j]); jj[0] = JW'(j);
      @(negedge clk);
    end
    v[0] = 0;
    repeat (NP + 3) @(negedge clk);
    for (int q = 0; q < NQ; q++) begin
      logic [SW-1:0] sc; logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
      {sc, oi, oj, ei, ej} = mx[NP][q*MW +: MW];
      check(int'(sc) == ebest[q], $sformatf("stream %0d best %0d want %0d", q, sc, ebest[q]));
      if (ebest[q] > 0) begin
        int eii, ejj;
        eii = (int'(ei) <= NP) ? int'(ei) : 0;
        ejj = (int'(ej) <= MM) ? int'(ej) : 0;
        check(EG[q][eii][ejj] == ebest[q],
              $sformatf("stream %0d end (%0d,%0d) not a best cell", q, ei, ej));
        check(ECI[q][eii][ejj] == int'(oi) && ECJ[q][eii][ejj] == int'(oj),
              $sformatf("stream %0d origin (%0d,%0d) differs from Cb at end", q, oi, oj));
      end
    end
  endtask

  task automatic random_cols(int q);
    for (int i = 1; i <= NP; i++)
      for (int s = 0; s < 4; s++) sb[q][i][s] = $urandom_range(8) - 3;
  endtask

  initial begin
    string qs, rs;
    v[0] = 0; s2[0] = 0; jj[0] = 0;
    foreach (cols[p]) cols[p] = 0;
    foreach (v_prev[p]) begin v_prev[p] = 0; j_prev[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // stream 0: first eight symbols of the example query, match/mismatch scoring
    qs = "CAGCCTCG"; rs = "AATGCCATTGAC";
    for (int i = 1; i <= NP; i++)
      for (int s = 0; s < 4; s++) sb[0][i][s] = (sym(qs[i-1]) == s) ? 3 : -1;
    for (int q = 1; q < NQ; q++) random_cols(q);
    m = rs.len();
    for (int j = 1; j <= m; j++) r[j] = sym(rs[j-1]);
    run(0);
    begin
      logic [SW-1:0] sc; logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
      {sc, oi, oj, ei, ej} = mx[NP][0 +: MW];
      check(sc == 10 && ei == 8 && ej == 10 && oi == 3 && oj == 4,
            $sformatf("example: score %0d end (%0d,%0d) origin (%0d,%0d)", sc, ei, ej, oi, oj));
    end
    for (int t = 0; t < 6; t++) begin
      m = 20 + $urandom_range(MM - 20);
      for (int j = 1; j <= m; j++) r[j] = $urandom_range(3);
      for (int q = 0; q < NQ; q++) random_cols(q);
      run(t * 10);
    end
    check(cells > 900, $sformatf("only %0d cells seen", cells));
    check(lat_bad == 0, $sformatf("%0d symbols not passed on in one clock", lat_bad));
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
