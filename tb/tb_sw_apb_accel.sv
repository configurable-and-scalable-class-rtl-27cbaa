// End-to-end testbench of the accelerator behind its APB interface
// (sw_apb_accel), at a reduced size: 32 PEs with switching elements every
// 8 PEs (up to 4 arrays).
//
// A host model drives only the APB. It checks getid, an invalid opcode (II)
// and an invalid array count (IC), then plays a series of alignment batches:
// single array, 2 and 4 arrays with one shared reference, 2 and 4 arrays with
// separate references, queries shorter than their array, references sent
// with several ldref instructions, and queries preloaded while the array is
// still busy. Every result (best score, end and origin coordinates) is
// checked with the reference model. It counts how often each mechanism
// occurred (split arrays, SRMQ, MRMQ, preload during processing, reference
// stream starved by an empty FIFO, full command FIFO, output FIFO full,
// multiple ldref) and counts a failure for any that never happened. The
// time from the last reference symbol entering the array to the end of a
// single-array run is checked against the array length plus its switching
// elements.
`timescale 1ns/1ps
module tb_sw_apb_accel;
  import sw_pkg::*;
  import tb_sw_host_pkg::*;

  localparam int NP = 32, NS = 4;

  logic pclk = 0, presetn = 0, psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  always #5 pclk = ~pclk;

  sw_apb_accel #(.N_PE(NP), .MAX_STREAMS(NS)) dut (.*);

  int checks = 0, failures = 0;
  int ref_every = 1;
  int n_cmd_full = 0, n_cmd_afull = 0;
  int n_starve = 0, n_out_stall = 0, n_busy_shift = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  `include "tb_sw_apb_host.svh"

  // mechanism probes
  always @(posedge pclk) if (presetn) begin
    for (int k = 0; k < NS; k++)
      if (dut.u_accel.ref_busy[k] && dut.u_accel.ref_empty[k] && !dut.u_accel.f_v[k])
        n_starve++;
    // controller state 3 is S_RESULT: a result word waiting for room
    if (int'(dut.u_accel.u_ctrl.state_q) == 3 && dut.u_accel.out_full)
      n_out_stall++;
    if (dut.u_accel.q_shift && dut.u_accel.array_busy) n_busy_shift++;
  end

  // drain time: last symbol entering the array to the array going idle
  int t_last_in = 0, t_idle = 0, cyc = 0;
  always @(posedge pclk) begin
    cyc++;
    if (dut.u_accel.head_v[0]) t_last_in = cyc;
    if (dut.u_accel.array_busy) t_idle = cyc;
  end

  initial begin
    logic [31:0] w;
    batch_t b [8];
    repeat (3) @(negedge pclk);
    presetn = 1;
    init(NP, NS);

    // capability word
    apb_write(8'h00, ins(OP_GETID, 0, 0));
    repeat (10) @(negedge pclk);
    apb_read(8'h0C, w);
    check(w[0] == 1'b1, "OA after getid");
    apb_read(8'h04, w);
    check(w == {8'(NS), 12'(NP), 1'b1, 6'd12, 5'd28}, $sformatf("getid word %h", w));
    // invalid instruction and invalid configuration
    apb_write(8'h00, 32'hF000_0000);
    repeat (5) @(negedge pclk);
    apb_read(8'h08, w);
    check(w[31] == 1'b1, "II after invalid opcode");
    apb_write(8'h00, {OP_CONFIG, 4'd3, 1'b1, 23'd0});
    repeat (5) @(negedge pclk);
    apb_read(8'h08, w);
    check(w[30] == 1'b1 && w[31] == 1'b0, "IC after 3-array config, II cleared");

    // single array, checked for its drain time
    b[0] = new_batch(0, 1'b0, 600, 1, 0);
    emit_batch(b[0], 1'b1, 1'b0, null);
    ref_every = 8;
    run_program(1'b0);
    ref_every = 1;
    check(t_idle - t_last_in == NP + NS - 1,
          $sformatf("single array drain %0d clocks, want %0d", t_idle - t_last_in, NP + NS - 1));

    // split configurations, preload, several ldrefs, output held back
    b[1] = new_batch(1, 1'b0, 90, 2, 0);
    b[2] = new_batch(1, 1'b0, 70, 1, 0);
    b[3] = new_batch(2, 1'b0, 80, 3, 0);
    b[4] = new_batch(2, 1'b1, 60, 1, 0);
    b[5] = new_batch(2, 1'b1, 75, 2, 0);
    b[6] = new_batch(1, 1'b1, 50, 1, 0);
    b[7] = new_batch(0, 1'b0, 120, 2, 0);
    emit_batch(b[1], 1'b1, 1'b0, b[2]);
    emit_batch(b[2], 1'b0, 1'b1, null);
    emit_batch(b[3], 1'b1, 1'b0, null);
    emit_batch(b[4], 1'b1, 1'b0, b[5]);
    emit_batch(b[5], 1'b0, 1'b1, null);
    emit_batch(b[6], 1'b1, 1'b0, null);
    emit_batch(b[7], 1'b1, 1'b0, null);
    run_program(1'b1);

    $display("mechanisms: single=%0d split=%0d srmq=%0d mrmq=%0d short_query=%0d multi_ldref=%0d",
             n_single, n_split, n_srmq, n_mrmq, n_short_query, n_multi_ldref);
    $display("            preload=%0d shift_while_busy=%0d starve=%0d cmd_full=%0d out_stall=%0d",
             n_preload, n_busy_shift, n_starve, n_cmd_full, n_out_stall);
    check(n_single > 0, "single-array run");
    check(n_split > 0, "split array");
    check(n_srmq > 0, "SRMQ mode");
    check(n_mrmq > 0, "MRMQ mode");
    check(n_short_query > 0, "query shorter than its array");
    check(n_multi_ldref > 0, "several ldref per reference");
    check(n_busy_shift > 0, "query preloaded while the array works");
    check(n_starve > 0, "reference stream starved by an empty FIFO");
    check(n_cmd_full > 0, "command FIFO full");
    check(n_out_stall > 0, "output FIFO full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
