// End-to-end testbench of the accelerator built in the shape of the FPGA
// prototype: the fixed single-reference variant (SHARED_REF=1) with 3 query
// streams of 37 PEs (111 PEs), 9-bit scores and 28-bit reference
// coordinates.
//
// A host model drives only the APB. It checks the capability word and that
// config is refused, then aligns batches of three 37-base reads against a
// shared reference (the short-read workload the prototype was measured on,
// with a short reference), plus batches of shorter random queries, with
// references split over several ldref instructions and queries preloaded
// during processing. Every result is checked with the reference model, and
// the drain time must equal the 37-PE row length.
`timescale 1ns/1ps
module tb_sw_apb_fpga;
  import sw_pkg::*;
  import tb_sw_host_pkg::*;

  localparam int NP = 111, NS = 3;

  logic pclk = 0, presetn = 0, psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  always #5 pclk = ~pclk;

  sw_apb_accel #(.N_PE(NP), .MAX_STREAMS(NS), .SHARED_REF(1'b1), .SCORE_W(9)) dut (.*);

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
    logic [31:0] w, st;
    batch_t b [4];
    repeat (3) @(negedge pclk);
    presetn = 1;
    // getid
    apb_write(8'h00, {OP_GETID, 28'd0});
    repeat (4) @(negedge pclk);
    apb_read(8'h04, w);
    check(w == {8'(NS), 12'(NP), 1'b1, 6'd9, 5'd28}, $sformatf("getid %h", w));
    // config is not part of this variant
    apb_write(8'h00, {OP_CONFIG, 4'd2, 1'b1, 23'd0});
    repeat (4) @(negedge pclk);
    apb_read(8'h08, st);
    check(st[31] == 1'b1, "config not flagged invalid");
    apb_write(8'h00, {OP_RSTQUERY, 28'd0});
    repeat (4) @(negedge pclk);
    apb_read(8'h08, st);
    check(st[31] == 1'b0, "II not cleared by a valid instruction");

    init(NP, NS);
    fixed_arrays = NS;
    b[0] = new_batch(2, 1'b0, 40, 1, NP / NS);
    b[1] = new_batch(2, 1'b0, 70, 3, 0);
    b[2] = new_batch(2, 1'b0, 25, 2, 0);
    b[3] = new_batch(2, 1'b0, 50, 1, 0);
    emit_batch(b[0], 1'b0, 1'b0, b[1]);
    emit_batch(b[1], 1'b0, 1'b1, b[2]);
    emit_batch(b[2], 1'b0, 1'b1, null);
    emit_batch(b[3], 1'b0, 1'b0, null);
    run_program(1'b0);
    check(n_srmq == 4 && n_preload == 2 && n_multi_ldref == 2 && n_short_query > 0,
          $sformatf("programs: srmq %0d preload %0d multi-ldref %0d short %0d",
                    n_srmq, n_preload, n_multi_ldref, n_short_query));
    check(t_idle - t_last_in == NP / NS,
          $sformatf("drain %0d clocks, want %0d", t_idle - t_last_in, NP / NS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
