// Testbench of the switching element (sw_switch).
//
// Random values are driven on both the upstream and the new-array inputs.
// Joined (split=0), every output must equal the upstream input of the
// previous clock. Split (split=1), symbol, coordinate, valid flag and best
// record must equal the new-array inputs of the previous clock, while score
// and origin follow the new-array inputs directly.
`timescale 1ns/1ps
module tb_sw_switch;
  import sw_pkg::*;

  localparam int SW = 12, IW = 10, JW = 28;
  localparam int CBW = IW + JW, MW = SW + 2*CBW;

  logic clk = 0, rst_n = 0, clr = 0, split = 0;
  always #5 clk = ~clk;

  logic v_in, v_b, v_out;
  logic [1:0] s2_in, s2_b, s2_out;
  logic [JW-1:0] j_in, j_b, j_out;
  logic [SW-1:0] g_in, g_b, g_out;
  logic [CBW-1:0] cb_in, cb_b, cb_out;
  logic [MW-1:0] max_in, max_b, max_out;

  sw_switch #(.SCORE_W(SW), .I_W(IW), .J_W(JW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // previous-clock copies of the inputs
  logic pv_in, pv_b;
  logic [1:0] ps2_in, ps2_b;
  logic [JW-1:0] pj_in, pj_b;
  logic [SW-1:0] pg_in;
  logic [CBW-1:0] pcb_in;
  logic [MW-1:0] pmax_in, pmax_b;

  task automatic randomize_inputs();
    v_in = 1'($urandom); v_b = 1'($urandom);
    s2_in = 2'($urandom); s2_b = 2'($urandom);
    j_in = JW'($urandom); j_b = JW'($urandom);
    g_in = SW'($urandom); g_b = SW'($urandom);
    cb_in = {$urandom, $urandom}; cb_b = {$urandom, $urandom};
    max_in = {$urandom, $urandom, $urandom}; max_b = {$urandom, $urandom, $urandom};
  endtask

  initial begin
    randomize_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      if (t % 50 == 0) split = ~split;
      randomize_inputs();
      pv_in = v_in; pv_b = v_b; ps2_in = s2_in; ps2_b = s2_b; pj_in = j_in; pj_b = j_b;
      pg_in = g_in; pcb_in = cb_in; pmax_in = max_in; pmax_b = max_b;
      @(negedge clk);
      randomize_inputs();
      #1;
      if (!split) begin
        check(v_out == pv_in && s2_out == ps2_in && j_out == pj_in && max_out == pmax_in,
              "joined: symbol/j/max delayed one clock");
        check(g_out == pg_in && cb_out == pcb_in, "joined: score/origin delayed one clock");
      end else begin
        check(v_out == pv_b && s2_out == ps2_b && j_out == pj_b && max_out == pmax_b,
              "split: new-array symbol/j/max registered");
        check(g_out == g_b && cb_out == cb_b, "split: new-array score/origin passed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
