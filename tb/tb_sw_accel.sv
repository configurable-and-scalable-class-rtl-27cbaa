// Testbench of the accelerator core (sw_accel) through its FIFO ports.
//
// 24 PEs, splittable into 2 arrays of 12. A host model writes instructions,
// query columns and packed references straight into the input FIFOs (one
// word per FIFO per clock while there is room) and empties the output FIFO.
// Batches cover one array, two arrays on one reference and two arrays on
// separate references, with preloading and multi-part references; every
// result is checked with the reference model. The status word is checked
// against the FIFO levels: bit 32 with the output FIFO, bits 0/1 with the
// command FIFO, bits 2/3 and 4/5 with the reference FIFOs.
`timescale 1ns/1ps
module tb_sw_accel;
  import sw_pkg::*;
  import tb_sw_host_pkg::*;

  localparam int NP = 24, NS = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_push = 0;
  logic [31:0] cmd_wdata = 0;
  logic [NS-1:0] ref_push = 0;
  logic [NS*32-1:0] ref_wdata = 0;
  logic out_pop = 0, out_empty;
  logic [31:0] out_rdata;
  logic [32:0] status;

  sw_accel #(.N_PE(NP), .MAX_STREAMS(NS)) dut (.*);

  int checks = 0, failures = 0;
  int n_full_seen = 0, n_status_ok = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // status bits against the FIFO levels, every clock
  always @(negedge clk) if (rst_n) begin
    bit ok;
    ok = (status[32] == !out_empty) &&
         (status[0] == (dut.u_cmd_fifo.count == 64)) &&
         (status[1] == (dut.u_cmd_fifo.count >= 60)) &&
         (status[2] == (dut.g_ref[0].g_on.u_ref_fifo.count == 64)) &&
         (status[4] == (dut.g_ref[1].g_on.u_ref_fifo.count == 64)) &&
         (status[29:6] == '0);
    if (!ok) begin failures++; checks++; $display("FAIL status %h", status); end
    else n_status_ok++;
    if (status[0]) n_full_seen++;
  end

  task automatic run();
    logic [31:0] res [5];
    int nres = 0, t = 0;
    while ((cmdq.size() > 0 || expq.size() > 0) && t < 100000) begin
      t++;
      cmd_push = (cmdq.size() > 0) && !status[0];
      if (cmd_push) cmd_wdata = cmdq.pop_front();
      for (int k = 0; k < NS; k++) begin
        ref_push[k] = (refq[k].size() > 0) && !status[2*(k+1)] && ($urandom_range(3) == 0);
        if (ref_push[k]) ref_wdata[k*32 +: 32] = refq[k].pop_front();
      end
      out_pop = !out_empty && ($urandom_range(1) == 0);
      if (out_pop) begin
        res[nres] = out_rdata;
        nres++;
        if (nres == 5) begin failures += check_result(res, checks); nres = 0; end
      end
      @(negedge clk);
      cmd_push = 0; ref_push = '0; out_pop = 0;
    end
    check(t < 100000, "program finished");
  endtask

  initial begin
    batch_t b [5];
    repeat (2) @(negedge clk);
    rst_n = 1;
    init(NP, NS);
    b[0] = new_batch(0, 1'b0, 150, 2, 0);
    b[1] = new_batch(1, 1'b0, 120, 1, 0);
    b[2] = new_batch(1, 1'b0, 90, 3, 0);
    b[3] = new_batch(1, 1'b1, 100, 1, 0);
    b[4] = new_batch(1, 1'b1, 110, 2, 0);
    emit_batch(b[0], 1'b1, 1'b0, null);
    emit_batch(b[1], 1'b1, 1'b0, b[2]);
    emit_batch(b[2], 1'b0, 1'b1, null);
    emit_batch(b[3], 1'b1, 1'b0, b[4]);
    emit_batch(b[4], 1'b0, 1'b1, null);
    run();
    check(n_status_ok > 200, "status compared");
    check(n_full_seen > 0, "command FIFO filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
