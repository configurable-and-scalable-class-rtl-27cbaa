// APB host tasks shared by the top-level testbenches. Included inside a
// module that declares pclk, psel, penable, pwrite, paddr, pwdata, prdata,
// checks, failures, ref_every and the counters used below.
//
// run_program() plays the words built by tb_sw_host_pkg: each round it
// reads the status, pushes one word into every FIFO that has data pending
// and is not full, and reads the output FIFO when results are available,
// until every word is sent and every expected result has been read and
// checked. Reference words are pushed only every ref_every-th round, so
// the reference stream can be made to run dry. With hold_output set it leaves the results in the output FIFO
// until the command FIFO is full, so the accelerator has to wait for room.

task automatic apb_write(logic [7:0] addr, logic [31:0] data);
  @(negedge pclk);
  psel = 1; penable = 0; pwrite = 1; paddr = addr; pwdata = data;
  @(negedge pclk);
  penable = 1;
  @(negedge pclk);
  psel = 0; penable = 0;
endtask

task automatic apb_read(logic [7:0] addr, output logic [31:0] data);
  @(negedge pclk);
  psel = 1; penable = 0; pwrite = 0; paddr = addr;
  @(negedge pclk);
  penable = 1;
  #1 data = prdata;
  @(negedge pclk);
  psel = 0; penable = 0;
endtask

task automatic run_program(bit hold_output);
  logic [31:0] st, oa, w;
  logic [31:0] res [5];
  int nres, rounds;
  nres = 0;
  rounds = 0;
  while ((tb_sw_host_pkg::cmdq.size() > 0 || tb_sw_host_pkg::expq.size() > 0) && rounds < 200000) begin
    bit pending_refs;
    rounds++;
    apb_read(8'h08, st);
    apb_read(8'h0C, oa);
    if (st[0]) n_cmd_full++;
    if (st[1]) n_cmd_afull++;
    if (tb_sw_host_pkg::cmdq.size() > 0 && !st[0]) begin
      apb_write(8'h00, tb_sw_host_pkg::cmdq.pop_front());
    end
    pending_refs = 0;
    for (int k = 0; k < 8; k++)
      if (tb_sw_host_pkg::refq[k].size() > 0) begin
        pending_refs = 1;
        if (!st[2*(k+1)] && rounds % ref_every == 0) apb_write(8'h40 + 8'(4*k), tb_sw_host_pkg::refq[k].pop_front());
      end
    if (oa[0] && (!hold_output || st[0] ||
                  (tb_sw_host_pkg::cmdq.size() == 0 && !pending_refs))) begin
      apb_read(8'h04, w);
      res[nres] = w;
      nres++;
      if (nres == RESULT_WORDS) begin
        failures += tb_sw_host_pkg::check_result(res, checks);
        nres = 0;
      end
    end
  end
  checks++;
  if (rounds >= 200000) begin
    failures++;
    $display("FAIL program did not finish");
  end
endtask
