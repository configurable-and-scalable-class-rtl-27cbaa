// Testbench of the enhanced PE (sw_pe).
//
// Ten PEs are chained into a small array. The first run aligns query
// CAGCCTCGCT with reference AATGCCATTGAC under +3/-1 scoring and gap 4:
// every cell G(i,j) and origin Cb(i,j) is compared with the reference model,
// and the last PE must report best score 10 ending at (8,10) with origin
// (3,4). Further runs use random substitution columns, random references and
// random bubbles in the reference stream. Each PE's cell must appear one clock
// after its symbol entered the PE.
`timescale 1ns/1ps
module tb_sw_pe;
  import sw_pkg::*;
  import tb_sw_model_pkg::*;

  localparam int NP = 10, SW = 12, IW = 10, JW = 28, GAPV = 4;
  localparam int CBW = IW + JW, MW = SW + 2*CBW;

  logic clk = 0, rst_n = 0, clr = 0, col_ld = 0;
  always #5 clk = ~clk;

  logic            v  [NP+1];
  logic [1:0]      s2 [NP+1];
  logic [JW-1:0]   jj [NP+1];
  logic [SW-1:0]   g  [NP+1];
  logic [CBW-1:0]  cb [NP+1];
  logic [MW-1:0]   mx [NP+1];
  logic [31:0]     cols [NP];

  for (genvar p = 0; p < NP; p++) begin : g_pe
    sw_pe #(.SCORE_W(SW), .I_W(IW), .J_W(JW), .GAP(GAPV)) dut (
      .clk, .rst_n, .clr, .pe_idx (IW'(p+1)), .col_ld, .col_in (cols[p]),
      .v_in (v[p]), .s2_in (s2[p]), .j_in (jj[p]), .g_in (g[p]), .cb_in (cb[p]),
      .max_in (mx[p]),
      .v_out (v[p+1]), .s2_out (s2[p+1]), .j_out (jj[p+1]), .g_out (g[p+1]),
      .cb_out (cb[p+1]), .max_out (mx[p+1])
    );
  end
  assign g[0] = '0;
  assign cb[0] = '0;
  assign mx[0] = '0;

  int checks = 0, failures = 0, cells = 0;
  int r [1:MAXM];
  int q [1:MAXN];
  int m;
  int lat_bad = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // cell monitor
  logic [JW-1:0] last_j_in [NP];
  always @(posedge clk) if (rst_n && !clr) begin
    for (int p = 0; p < NP; p++) begin
      if (v[p+1]) begin
        int jv;
        jv = int'(jj[p+1]);
        cells++;
        check(g[p+1] == SW'(G[p+1][jv]) && cb[p+1] == {IW'(CI[p+1][jv]), JW'(CJ[p+1][jv])},
              $sformatf("cell (%0d,%0d) got G=%0d Cb=(%0d,%0d) want G=%0d Cb=(%0d,%0d)",
                        p+1, jv, g[p+1], cb[p+1][CBW-1:JW], cb[p+1][JW-1:0],
                        G[p+1][jv], CI[p+1][jv], CJ[p+1][jv]));
      end
    end
  end
  // one-clock latency per PE: the symbol that enters PE p now leaves it next clock
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
    // program columns
    for (int p = 0; p < NP; p++) cols[p] = col_word(p+1);
    fill(NP, m, r, GAPV);
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
    // best record at the last PE
    begin
      logic [SW-1:0] sc; logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
      {sc, oi, oj, ei, ej} = mx[NP];
      check(int'(sc) == best, $sformatf("best score %0d want %0d", sc, best));
      if (best > 0) begin
        check(G[ei][ej] == best, $sformatf("end (%0d,%0d) not a best cell", ei, ej));
        check(CI[ei][ej] == int'(oi) && CJ[ei][ej] == int'(oj),
              $sformatf("origin (%0d,%0d) differs from Cb at end", oi, oj));
      end
    end
  endtask

  initial begin
    string qs, rs;
    v[0] = 0; s2[0] = 0; jj[0] = 0;
    foreach (cols[p]) cols[p] = 0;
    foreach (v_prev[p]) begin v_prev[p] = 0; j_prev[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // example of Tables II and III
    qs = "CAGCCTCGCT"; rs = "AATGCCATTGAC";
    for (int i = 1; i <= NP; i++) q[i] = sym(qs[i-1]);
    m = rs.len();
    for (int j = 1; j <= m; j++) r[j] = sym(rs[j-1]);
    set_match_scores(NP, q);
    run(0);
    begin
      logic [SW-1:0] sc; logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
      {sc, oi, oj, ei, ej} = mx[NP];
      check(sc == 10 && ei == 8 && ej == 10 && oi == 3 && oj == 4,
            $sformatf("example: score %0d end (%0d,%0d) origin (%0d,%0d)", sc, ei, ej, oi, oj));
    end
    // random runs
    for (int t = 0; t < 6; t++) begin
      m = 20 + $urandom_range(40);
      for (int j = 1; j <= m; j++) r[j] = $urandom_range(3);
      for (int i = 1; i <= NP; i++)
        for (int s = 0; s < 4; s++) sbc_tab[i][s] = $urandom_range(8) - 3;
      run(t * 10);
    end
    check(cells > 300, $sformatf("only %0d cells seen", cells));
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
