// Testbench of the embedded controller (sw_controller).
//
// Instructions are fed from a queue that stands in for the command FIFO;
// reference feeders and the PE array are replaced by simple stand-ins whose
// busy time is known, and the array's best records by random values. Checked:
// config (array count, MS, rejection of counts that are not a power of two,
// the IC flag), invalid opcodes (II flag), rstproc/rstquery/ldcost strobes,
// shiftnxtcost (exactly `size' data words shifted into the named array, and
// decoding resumed afterwards), ldref (load strobe to the named feeder, the
// size field, waiting while that feeder is busy, feeder 0 in single-
// reference mode), endref (waits for the references and the array, then five
// words per array taken from the right group) and getid.
`timescale 1ns/1ps
module tb_sw_controller;
  import sw_pkg::*;

  localparam int NP = 32, NS = 4, SW = 12, IW = 10, JW = 28;
  localparam int CBW = IW + JW, MW = SW + 2*CBW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] cmd_rdata;
  logic cmd_empty, cmd_pop;
  logic [1:0] seg_log, q_arr;
  logic mrmq, pe_clr, q_clr, q_shift, col_ld;
  logic [NS-1:0] ref_load, ref_busy;
  logic [23:0] ref_cnt;
  logic array_busy = 0;
  logic [NS*MW-1:0] tap_max;
  logic out_push, out_full = 0;
  logic [31:0] out_wdata;
  logic flag_ii, flag_ic;

  sw_controller #(.N_PE(NP), .MAX_STREAMS(NS), .ENHANCED(1'b1), .SCORE_W(SW),
                  .I_W(IW), .J_W(JW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // command FIFO stand-in
  logic [31:0] cq [$];
  assign cmd_empty = (cq.size() == 0);
  assign cmd_rdata = cmd_empty ? 32'h0 : cq[0];
  logic popped = 0;
  always @(posedge clk) popped <= cmd_pop && !cmd_empty;
  always @(negedge clk) if (popped) void'(cq.pop_front());

  // feeder stand-ins: busy for load_cnt clocks
  int fb [NS];
  for (genvar k = 0; k < NS; k++) begin : g_f
    assign ref_busy[k] = (fb[k] > 0);
    always @(posedge clk) begin
      if (ref_load[k]) fb[k] <= int'(ref_cnt);
      else if (fb[k] > 0) fb[k] <= fb[k] - 1;
    end
  end

  // event recorders
  int n_shift [NS];
  int n_clr, n_qclr, n_ld, n_loads [NS];
  int last_cnt [NS];
  logic [31:0] outq [$];
  always @(posedge clk) if (rst_n) begin
    if (q_shift) n_shift[q_arr]++;
    if (pe_clr) n_clr++;
    if (q_clr) n_qclr++;
    if (col_ld) n_ld++;
    for (int k = 0; k < NS; k++) if (ref_load[k]) begin n_loads[k]++; last_cnt[k] = int'(ref_cnt); end
    if (out_push && !out_full) outq.push_back(out_wdata);
  end

  function automatic logic [31:0] ins(opcode_e op, int arr, int low);
    return {op, 4'(arr), 24'(low)};
  endfunction

  task automatic idle_wait();
    int t = 0;
    while ((cq.size() > 0 || dut.state_q != 0) && t < 5000) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    foreach (fb[k]) begin fb[k] = 0; n_shift[k] = 0; n_loads[k] = 0; last_cnt[k] = 0; end
    n_clr = 0; n_qclr = 0; n_ld = 0;
    for (int k = 0; k < NS*MW/32 + 1; k++) tap_max[k*32 +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // getid
    cq.push_back(ins(OP_GETID, 0, 0));
    idle_wait();
    check(outq.size() == 1 && outq[0] == {8'(NS), 12'(NP), 1'b1, 6'(SW), 5'(JW)}, "getid word");
    outq.delete();

    // config: 4 arrays, MRMQ
    cq.push_back({OP_CONFIG, 4'd4, 1'b1, 23'd0});
    idle_wait();
    check(seg_log == 2 && mrmq && !flag_ic, "config 4 arrays MRMQ");
    // invalid config: 3 arrays
    cq.push_back({OP_CONFIG, 4'd3, 1'b0, 23'd0});
    idle_wait();
    check(seg_log == 2 && mrmq && flag_ic, "config 3 arrays rejected");
    // invalid opcode
    cq.push_back(32'hA000_0000);
    idle_wait();
    check(flag_ii, "invalid opcode flagged");
    cq.push_back(ins(OP_RSTQUERY, 0, 0));
    idle_wait();
    check(!flag_ii && n_qclr == 1, "rstquery strobe, II cleared");

    // shiftnxtcost into array 2, then ldcost and rstproc decoded after it
    cq.push_back(ins(OP_SHIFTNXTCOST, 2, 5));
    for (int w = 0; w < 5; w++) cq.push_back(ins(OP_GETID, 0, w)); // data that look like opcodes
    cq.push_back(ins(OP_LDCOST, 0, 0));
    cq.push_back(ins(OP_RSTPROC, 0, 0));
    idle_wait();
    check(n_shift[2] == 5 && n_shift[0] == 0 && outq.size() == 0, "five words shifted into array 2");
    check(n_ld == 1 && n_clr == 1, "ldcost and rstproc after the query data");

    // ldref to arrays 1 and 3; a second ldref to array 1 waits for the first
    cq.push_back(ins(OP_LDREF, 1, 40));
    cq.push_back(ins(OP_LDREF, 3, 7));
    cq.push_back(ins(OP_LDREF, 1, 300000));
    repeat (10) @(negedge clk);
    check(n_loads[1] == 1 && n_loads[3] == 1 && last_cnt[1] == 40 && last_cnt[3] == 7,
          "ldref to arrays 1 and 3");
    check(cq.size() == 1, "second ldref to a busy array waits");
    repeat (40) @(negedge clk);
    check(n_loads[1] == 2 && last_cnt[1] == 300000, "second ldref after the first completes");
    // endref must wait for feeder 1 (300000 clocks is too long: shorten it)
    fb[1] = 20;
    array_busy = 1;
    cq.push_back(ins(OP_ENDREF, 0, 0));
    repeat (40) @(negedge clk);
    check(outq.size() == 0, "endref waits while the array is busy");
    array_busy = 0;
    idle_wait();
    check(outq.size() == 4 * RESULT_WORDS, "four results of five words");
    for (int a = 0; a < 4 && outq.size() >= 20; a++) begin
      logic [SW-1:0] sc; logic [IW-1:0] oi, ei; logic [JW-1:0] oj, ej;
      {sc, oi, oj, ei, ej} = tap_max[a*MW +: MW];
      check(outq[a*5] == {4'(a), 12'h0, 16'(sc)} && outq[a*5+1] == 32'(oi) &&
            outq[a*5+2] == 32'(oj) && outq[a*5+3] == 32'(ei) && outq[a*5+4] == 32'(ej),
            $sformatf("result words of array %0d", a));
    end
    outq.delete();

    // single reference, 2 arrays: ldref goes to feeder 0; results from groups 1 and 3
    cq.push_back({OP_CONFIG, 4'd2, 1'b0, 23'd0});
    cq.push_back(ins(OP_LDREF, 1, 9));
    cq.push_back(ins(OP_ENDREF, 0, 0));
    idle_wait();
    check(n_loads[0] == 1 && last_cnt[0] == 9 && n_loads[1] == 2, "SRMQ ldref uses feeder 0");
    check(outq.size() == 10 && outq[0][15:0] == 16'(tap_max[1*MW + 2*CBW +: SW]) &&
          outq[5][15:0] == 16'(tap_max[3*MW + 2*CBW +: SW]) && outq[5][31:28] == 4'd1,
          "2-array results from groups 1 and 3");
    outq.delete();
    // shiftnxtcost to an array that does not exist
    cq.push_back(ins(OP_SHIFTNXTCOST, 3, 2));
    cq.push_back(32'h1); cq.push_back(32'h2);
    idle_wait();
    check(flag_ic && n_shift[3] == 0 && cq.size() == 0, "shift to absent array flagged, data consumed");

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
