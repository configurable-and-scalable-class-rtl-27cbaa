// Testbench of the PE datapath (sw_pe_cell) on its own.
//
// The cell is given a random previous matrix row G(i-1,*) with random origin
// coordinates, a random substitution column and a random reference with
// bubbles, plus a random upstream best record. Every produced cell G(i,j)
// and Cb(i,j) is compared with the recurrences computed here, and the final
// best record must equal the larger of the upstream record and the best
// cell of the row.
`timescale 1ns/1ps
module tb_sw_pe_cell;
  import sw_pkg::*;

  localparam int SW = 12, IW = 10, JW = 28, GAPV = 4;
  localparam int CBW = IW + JW, MW = SW + 2*CBW;
  localparam int M = 60;
  localparam int I = 5;

  logic clk = 0, rst_n = 0, clr = 0, col_ld = 0;
  always #5 clk = ~clk;

  logic [31:0]    col_in = '0;
  logic           v_in = 0, v_cur = 0;
  logic [1:0]     s2_in = '0;
  logic [JW-1:0]  j_in = '0, j_cur = '0;
  logic [SW-1:0]  g_in = '0, g_out;
  logic [CBW-1:0] cb_in = '0, cb_out;
  logic [MW-1:0]  max_in = '0, max_out;

  sw_pe_cell #(.SCORE_W(SW), .I_W(IW), .J_W(JW), .GAP(GAPV)) dut (
    .clk, .rst_n, .clr, .pe_idx (IW'(I)), .col_ld, .col_in, .v_in, .s2_in,
    .v_cur, .j_cur, .g_in, .cb_in, .max_in, .g_out, .cb_out, .max_out
  );

  // the wrapper's reference registers
  always_ff @(posedge clk) begin
    v_cur <= v_in;
    j_cur <= j_in;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int gu [0:M], ui [0:M], uj [0:M];   // previous row and its origins
  int gr [0:M], ci [0:M], cj [0:M];   // expected row
  int sb [0:3];
  int ref_s [1:M];
  int bestv, best_mi;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      for (int s = 0; s < 4; s++) sb[s] = int'($urandom_range(9)) - 4;
      for (int s = 0; s < 4; s++) col_in[s*8 +: 8] = 8'(sb[s]);
      gu[0] = 0; ui[0] = 0; uj[0] = 0; gr[0] = 0; ci[0] = 0; cj[0] = 0;
      for (int j = 1; j <= M; j++) begin
        gu[j] = $urandom_range(12);
        ui[j] = (gu[j] == 0) ? 0 : 1 + $urandom_range(3);
        uj[j] = (gu[j] == 0) ? 0 : 1 + $urandom_range(j - 1);
        ref_s[j] = $urandom_range(3);
      end
      // expected row
      for (int j = 1; j <= M; j++) begin
        int d, ul, uci, ucj, g, c1, c2;
        d = gu[j-1] + sb[ref_s[j]];
        if (gu[j] >= gr[j-1]) begin ul = gu[j]; uci = ui[j]; ucj = uj[j]; end
        else begin ul = gr[j-1]; uci = ci[j-1]; ucj = cj[j-1]; end
        if (d >= ul - GAPV) begin
          g = d;
          if (ui[j-1] == 0 && uj[j-1] == 0) begin c1 = I; c2 = j; end
          else begin c1 = ui[j-1]; c2 = uj[j-1]; end
        end else begin g = ul - GAPV; c1 = uci; c2 = ucj; end
        if (g <= 0) begin g = 0; c1 = 0; c2 = 0; end
        gr[j] = g; ci[j] = c1; cj[j] = c2;
      end
      bestv = 0;
      for (int j = 1; j <= M; j++) if (gr[j] > bestv) bestv = gr[j];
      best_mi = $urandom_range(20);
      max_in = {SW'(best_mi), {(2*CBW){1'b0}}};
      @(negedge clk); clr = 1; col_ld = 1;
      @(negedge clk); clr = 0; col_ld = 0;
      for (int j = 1; j <= M; j++) begin
        while ($urandom_range(3) == 0) begin v_in = 0; @(negedge clk); end
        v_in = 1; s2_in = 2'(ref_s[j]); j_in = JW'(j);
        g_in = SW'(gu[j]); cb_in = {IW'(ui[j]), JW'(uj[j])};
        @(negedge clk);
      end
      v_in = 0;
      repeat (3) @(negedge clk);
      check(int'(max_out[MW-1 -: SW]) == ((best_mi > bestv) ? best_mi : bestv),
            $sformatf("best %0d want max(%0d,%0d)", max_out[MW-1 -: SW], best_mi, bestv));
      if (bestv > best_mi) begin
        logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
        {oi, oj, ei, ej} = max_out[2*CBW-1:0];
        check(ei == IW'(I) && gr[ej] == bestv && ci[ej] == int'(oi) && cj[ej] == int'(oj),
              "best record coordinates");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare each produced cell
  always @(posedge clk) if (rst_n && v_cur && !clr) begin
    check(int'(g_out) == gr[j_cur] && cb_out == {IW'(ci[j_cur]), JW'(cj[j_cur])},
          $sformatf("cell j=%0d G=%0d want %0d", j_cur, g_out, gr[j_cur]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
