// Full-size testbench of the accelerator top (sw_apb_accel) with every
// parameter at its default: 512 PEs, up to 8 arrays, 12-bit scores.
//
// Through the APB a host model runs (1) the short-read workload the design
// targets: eight 37-symbol reads aligned at once against one shared
// reference (8 arrays of 64 PEs, single-reference mode), (2) eight different
// query/reference pairs (8 arrays, multiple-reference mode), and (3) one
// 512-symbol query against a reference on the whole 512-PE array. Every
// result is checked with the reference model; the drain time of the
// 512-PE array (512 PEs plus 7 switching elements) is checked too.
`timescale 1ns/1ps
module tb_sw_apb_full;
  import sw_pkg::*;
  import tb_sw_host_pkg::*;

  logic pclk = 0, presetn = 0, psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  always #5 pclk = ~pclk;

  sw_apb_accel dut (.*);

  int checks = 0, failures = 0;
  int ref_every = 1;
  int n_cmd_full = 0, n_cmd_afull = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  `include "tb_sw_apb_host.svh"

  int t_last_in = 0, t_idle = 0, cyc = 0;
  always @(posedge pclk) begin
    cyc++;
    if (dut.u_accel.head_v[0]) t_last_in = cyc;
    if (dut.u_accel.array_busy) t_idle = cyc;
  end

  initial begin
    batch_t b [3];
    repeat (3) @(negedge pclk);
    presetn = 1;
    init(512, 8);
    b[0] = new_batch(3, 1'b0, 300, 1, 37);
    b[1] = new_batch(3, 1'b1, 150, 1, 0);
    emit_batch(b[0], 1'b1, 1'b0, null);
    emit_batch(b[1], 1'b1, 1'b0, null);
    run_program(1'b0);
    b[2] = new_batch(0, 1'b0, 600, 2, 512);
    emit_batch(b[2], 1'b1, 1'b0, null);
    run_program(1'b0);
    check(t_idle - t_last_in == 512 + 7,
          $sformatf("512-PE drain %0d clocks, want 519", t_idle - t_last_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
