// tb_command_processor -- feeds encoded host requests, with random gaps in
// the request stream, and checks what the command processor does with
// them: packets are written byte by byte into the slot it allocated in the
// right bank and queued with the right parameters (power, rate, backoff
// bound or instant, length); channel change and CCA configuration are
// pulsed with their values; requests that find the memory or the queue
// full, or that are longer than a slot, are dropped and counted while their
// data is still consumed, so the following request is decoded correctly.
module tb_command_processor;
  import lmac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [7:0] in_data = 0;
  logic be_alloc, tt_alloc, be_we, tt_we, be_push, tt_push, cc_request, cca_we, cca_cs_en;
  logic [2:0] be_alloc_id = 0, tt_alloc_id = 0, be_wr_id, tt_wr_id;
  logic be_mem_full = 0, tt_mem_full = 0, be_q_full = 0, tt_q_full = 0;
  logic [11:0] be_wr_off, tt_wr_off;
  logic [7:0] wr_data;
  tx_desc_t desc;
  logic [CHAN_W-1:0] cc_value;
  logic [RSSI_W-1:0] cca_threshold;
  logic [15:0] dropped_count;

  command_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // bank models
  logic [7:0] be_mem[8][2344], tt_mem[8][512];
  int allocs_be = 0, allocs_tt = 0;
  tx_desc_t be_q[$], tt_q[$];
  int chans[$];
  logic [8:0] ccas[$];
  always @(posedge clk) if (rst_n) begin
    if (be_alloc) begin allocs_be++; be_alloc_id <= be_alloc_id + 1'b1; end
    if (tt_alloc) begin allocs_tt++; tt_alloc_id <= tt_alloc_id + 3'd3; end
    if (be_we) be_mem[be_wr_id][be_wr_off] <= wr_data;
    if (tt_we) tt_mem[tt_wr_id][tt_wr_off] <= wr_data;
    if (be_push) be_q.push_back(desc);
    if (tt_push) tt_q.push_back(desc);
    if (cc_request) chans.push_back(cc_value);
    if (cca_we) ccas.push_back({cca_cs_en, cca_threshold});
  end

  task automatic send(input byte unsigned b[$]);
    foreach (b[i]) begin
      @(negedge clk);
      while (($urandom % 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = b[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask
  function automatic byte unsigned pat(input int seed, input int i);
    return 8'(seed * 31 + i * 3);
  endfunction
  task automatic req_tx(input int pwr, input int rate, input int bo, input int len, input int seed);
    byte unsigned b[$];
    b = {8'(OP_TX), 8'(pwr), 8'(rate), 8'(bo >> 8), 8'(bo), 8'(len >> 8), 8'(len)};
    for (int i = 0; i < len; i++) b.push_back(pat(seed, i));
    send(b);
  endtask
  task automatic req_tt(input int pwr, input int rate, input longint t, input int len, input int seed);
    byte unsigned b[$];
    b = {8'(OP_TX_TT), 8'(pwr), 8'(rate)};
    for (int k = 7; k >= 0; k--) b.push_back(8'(t >> (8 * k)));
    b.push_back(8'(len >> 8)); b.push_back(8'(len));
    for (int i = 0; i < len; i++) b.push_back(pat(seed, i));
    send(b);
  endtask

  initial begin
    bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1;
    req_tx(5, 6, 513, 100, 1);
    repeat (5) @(negedge clk);
    check(be_q.size() == 1 && allocs_be == 1, "best-effort request queued once");
    if (be_q.size() == 1)
      check(be_q[0].id == 0 && be_q[0].len == 100 && be_q[0].power == 5 && be_q[0].rate == 6 &&
            be_q[0].backoff == 513, "best-effort descriptor");
    ok = 1; for (int i = 0; i < 100; i++) if (be_mem[0][i] != pat(1, i)) ok = 0;
    check(ok, "best-effort data in slot 0");
    req_tt(1, 2, 64'h0000_0123_4567_89AB, 512, 2);
    repeat (5) @(negedge clk);
    check(tt_q.size() == 1 && tt_q[0].id == 0 && tt_q[0].len == 512 && tt_q[0].ttime == 64'h0000_0123_4567_89AB &&
          tt_q[0].power == 1 && tt_q[0].rate == 2, "time-triggered descriptor");
    ok = 1; for (int i = 0; i < 512; i++) if (tt_mem[0][i] != pat(2, i)) ok = 0;
    check(ok, "time-triggered data in its slot");
    send('{8'(OP_CHAN), 8'd180});
    send('{8'(OP_CCA), 8'h00, 8'd77});
    send('{8'(OP_CCA), 8'h01, 8'd12});
    repeat (3) @(negedge clk);
    check(chans.size() == 1 && chans[0] == 180, "channel change request");
    check(ccas.size() == 2 && ccas[0] == {1'b0, 8'd77} && ccas[1] == {1'b1, 8'd12}, "CCA configuration");
    // drops: memory full, queue full, too long for its slot
    be_mem_full = 1; req_tx(0, 0, 0, 30, 3); be_mem_full = 0;
    tt_q_full = 1;   req_tt(0, 0, 5, 30, 4); tt_q_full = 0;
    req_tt(0, 0, 5, 513, 5);
    req_tx(0, 0, 0, 2345, 6);
    repeat (5) @(negedge clk);
    check(dropped_count == 4, $sformatf("four requests dropped (%0d)", dropped_count));
    check(be_q.size() == 1 && tt_q.size() == 1, "nothing queued for dropped requests");
    // decoding continues correctly afterwards
    req_tx(2, 3, 7, 2344, 7);
    repeat (5) @(negedge clk);
    check(be_q.size() == 2 && be_q[1].id == 1 && be_q[1].len == 2344 && be_q[1].backoff == 7, "next request decoded");
    ok = 1; for (int i = 0; i < 2344; i++) if (be_mem[1][i] != pat(7, i)) ok = 0;
    check(ok, "maximum-size frame stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
