// Host-side program builder for the accelerator testbenches.
//
// Builds what a host would send for a series of alignment batches: the
// instruction/query words for the command FIFO, the packed reference words
// for each reference FIFO, and for every result the accelerator must return
// the query columns and reference needed to check it with the reference
// model (tb_sw_model_pkg). One batch is
//   [config] [rstquery, shiftnxtcost + columns per array] ldcost rstproc
//   ldref... [rstquery, shiftnxtcost + columns of the next batch] endref
// so the next queries can be preloaded while the array is still working.
// Columns of a query are sent last position first, references 16 symbols
// per word with every ldref starting on a new word.
package tb_sw_host_pkg;
  import sw_pkg::*;
  import tb_sw_model_pkg::*;

  class exp_rec;
    int arr;
    int L;            // PEs per array
    int n;            // query length
    int sbf [$];      // substitution scores, index (i-1)*4+s
    int rf  [$];      // reference symbols
  endclass

  class batch_t;
    int l;            // log2 number of arrays
    bit ms;           // multiple references
    int qlen [8];
    int sbf  [8][$];
    int rf   [8][$];
    int chunks;       // ldref instructions per reference
  endclass

  logic [31:0] cmdq [$];
  logic [31:0] refq [8][$];
  exp_rec      expq [$];
  int          np, ns;
  int          fixed_arrays;   // nonzero: array count of a fixed-layout build

  // counters of what the programs exercise
  int n_srmq, n_mrmq, n_single, n_split, n_short_query, n_multi_ldref, n_preload;

  function automatic void init(int n_pe, int max_streams);
    np = n_pe; ns = max_streams;
    cmdq.delete(); expq.delete();
    for (int k = 0; k < 8; k++) refq[k].delete();
    n_srmq = 0; n_mrmq = 0; n_single = 0; n_split = 0; n_short_query = 0;
    n_multi_ldref = 0; n_preload = 0;
    fixed_arrays = 0;
  endfunction

  function automatic int n_arrays(int l);
    return (fixed_arrays > 0) ? fixed_arrays : (1 << l);
  endfunction

  function automatic logic [31:0] ins(opcode_e op, int arr, int low);
    return {op, 4'(arr), 24'(low)};
  endfunction

  // random batch; qlen 0 means "random length up to the array size"
  function automatic batch_t new_batch(int l, bit ms, int reflen, int chunks, int fixed_qlen);
    batch_t b = new();
    int na, L, nrefs;
    b.l = l; b.ms = ms; b.chunks = chunks;
    na = n_arrays(l); L = np / na;
    nrefs = ms ? na : 1;
    for (int a = 0; a < na; a++) begin
      b.qlen[a] = (fixed_qlen > 0) ? fixed_qlen : ((a % 2 == 0) ? L : 1 + $urandom_range(L - 1));
      for (int i = 0; i < b.qlen[a]; i++)
        for (int s = 0; s < 4; s++) b.sbf[a].push_back(int'($urandom_range(8)) - 3);
    end
    for (int a = 0; a < nrefs; a++)
      for (int j = 0; j < reflen + (ms ? $urandom_range(20) : 0); j++)
        b.rf[a].push_back($urandom_range(3));
    return b;
  endfunction

  function automatic void emit_query(batch_t b);
    int na = n_arrays(b.l);
    cmdq.push_back(ins(OP_RSTQUERY, 0, 0));
    for (int a = 0; a < na; a++) begin
      cmdq.push_back(ins(OP_SHIFTNXTCOST, a, b.qlen[a]));
      for (int i = b.qlen[a]; i >= 1; i--) begin
        logic [31:0] w;
        for (int s = 0; s < 4; s++) w[s*8 +: 8] = 8'(b.sbf[a][(i-1)*4 + s]);
        cmdq.push_back(w);
      end
    end
  endfunction

  // cfg: emit config; preloaded: the queries were sent with the previous
  // batch; next: batch whose queries are sent before this endref (or null)
  function automatic void emit_batch(batch_t b, bit cfg, bit preloaded, batch_t next);
    int na, L, nrefs;
    na = n_arrays(b.l); L = np / na;
    nrefs = b.ms ? na : 1;
    if (cfg) cmdq.push_back({OP_CONFIG, 4'(na), b.ms, 23'd0});
    if (!preloaded) emit_query(b);
    cmdq.push_back(ins(OP_LDCOST, 0, 0));
    cmdq.push_back(ins(OP_RSTPROC, 0, 0));
    for (int a = 0; a < nrefs; a++) begin
      int m, pos;
      m = b.rf[a].size();
      pos = 0;
      for (int c = 0; c < b.chunks; c++) begin
        int len;
        len = (c == b.chunks - 1) ? m - pos : m / b.chunks;
        cmdq.push_back(ins(OP_LDREF, a, len));
        for (int k = 0; k < len; k += 16) begin
          logic [31:0] w = '0;
          for (int s = 0; s < 16 && k + s < len; s++) w[s*2 +: 2] = 2'(b.rf[a][pos + k + s]);
          refq[a].push_back(w);
        end
        pos += len;
      end
    end
    if (next != null) begin emit_query(next); n_preload++; end
    cmdq.push_back(ins(OP_ENDREF, 0, 0));
    for (int a = 0; a < na; a++) begin
      exp_rec e = new();
      e.arr = a; e.L = L; e.n = b.qlen[a];
      e.sbf = b.sbf[a];
      e.rf  = b.rf[b.ms ? a : 0];
      expq.push_back(e);
      if (b.qlen[a] < L) n_short_query++;
    end
    if (na == 1) n_single++;
    else begin
      n_split++;
      if (b.ms) n_mrmq++; else n_srmq++;
    end
    if (b.chunks > 1) n_multi_ldref++;
  endfunction

  // check the RESULT_WORDS words w[] against the oldest expected result;
  // returns the number of failed checks, adds to checks
  function automatic int check_result(logic [31:0] w [5], ref int checks);
    exp_rec e;
    int r [1:MAXM];
    int fails = 0;
    int ei, ej, oi, oj;
    if (expq.size() == 0) begin checks++; return 1; end
    e = expq.pop_front();
    for (int i = 1; i <= e.L; i++)
      for (int s = 0; s < 4; s++) sbc_tab[i][s] = (i <= e.n) ? e.sbf[(i-1)*4 + s] : 0;
    for (int j = 1; j <= e.rf.size(); j++) r[j] = e.rf[j-1];
    fill(e.L, e.rf.size(), r, 4);
    oi = int'(w[1]); oj = int'(w[2]); ei = int'(w[3]); ej = int'(w[4]);
    checks += 3;
    if (w[0] != {4'(e.arr), 12'h0, 16'(best)}) begin
      fails++; $display("FAIL result arr %0d: word0 %h want score %0d", e.arr, w[0], best);
    end
    if (best > 0) begin
      if (!(ei >= 1 && ei <= e.n && ej >= 1 && ej <= e.rf.size() && G[ei][ej] == best)) begin
        fails++; $display("FAIL result arr %0d: end (%0d,%0d) not a best cell", e.arr, ei, ej);
      end else if (!(CI[ei][ej] == oi && CJ[ei][ej] == oj)) begin
        fails++; $display("FAIL result arr %0d: origin (%0d,%0d) want (%0d,%0d)", e.arr, oi, oj,
                          CI[ei][ej], CJ[ei][ej]);
      end
    end
    return fails;
  endfunction

endpackage
