// Reference model for the alignment testbenches.
//
// Fills the local-alignment score matrix G and the origin matrix Cb of a
// query q[1..n] against a reference r[1..m] straight from the recurrences
//   G(i,j)  = max{G(i-1,j-1)+Sbc(i,r(j)), G(i-1,j)-gap, G(i,j-1)-gap, 0}
//   Cb(i,j) = origin of the term that won; (i,j) when a diagonal term starts
//             from origin (0,0); (0,0) when G(i,j)=0
// with ties resolved diagonal first, then the upper neighbour, as the RTL
// does. Sbc(i,s) is given per query position (its substitution column).
package tb_sw_model_pkg;

  localparam int MAXN = 520;
  localparam int MAXM = 700;

  int G  [0:MAXN][0:MAXM];
  int CI [0:MAXN][0:MAXM];
  int CJ [0:MAXN][0:MAXM];
  int sbc_tab [1:MAXN][0:3];
  int best, best_n;

  // fill G and Cb for query length n and reference r[1..m]
  function automatic void fill(int n, int m, int r[1:MAXM], int gap);
    int d, ul, uci, ucj, g, ci, cj;
    best = 0;
    best_n = 0;
    for (int i = 0; i <= n; i++) begin G[i][0] = 0; CI[i][0] = 0; CJ[i][0] = 0; end
    for (int j = 0; j <= m; j++) begin G[0][j] = 0; CI[0][j] = 0; CJ[0][j] = 0; end
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= m; j++) begin
        d = G[i-1][j-1] + sbc_tab[i][r[j]];
        if (G[i-1][j] >= G[i][j-1]) begin
          ul = G[i-1][j]; uci = CI[i-1][j]; ucj = CJ[i-1][j];
        end else begin
          ul = G[i][j-1]; uci = CI[i][j-1]; ucj = CJ[i][j-1];
        end
        if (d >= ul - gap) begin
          g = d;
          if (CI[i-1][j-1] == 0 && CJ[i-1][j-1] == 0) begin ci = i; cj = j; end
          else begin ci = CI[i-1][j-1]; cj = CJ[i-1][j-1]; end
        end else begin
          g = ul - gap; ci = uci; cj = ucj;
        end
        if (g <= 0) begin g = 0; ci = 0; cj = 0; end
        G[i][j] = g; CI[i][j] = ci; CJ[i][j] = cj;
        if (g > best) begin best = g; best_n = 1; end
        else if (g == best && g > 0) best_n++;
      end
  endfunction

  // Table I scoring: +3 on a match, -1 on a mismatch
  function automatic void set_match_scores(int n, int q[1:MAXN]);
    for (int i = 1; i <= n; i++)
      for (int s = 0; s < 4; s++) sbc_tab[i][s] = (q[i] == s) ? 3 : -1;
  endfunction

  // substitution column word of query position i (4 signed bytes)
  function automatic logic [31:0] col_word(int i);
    logic [31:0] w;
    for (int s = 0; s < 4; s++) w[s*8 +: 8] = 8'(sbc_tab[i][s]);
    return w;
  endfunction

  function automatic int sym(byte c);
    case (c)
      "A": return 0;
      "C": return 1;
      "G": return 2;
      default: return 3;
    endcase
  endfunction

endpackage
