// tb_dispatcher -- checks the transmit scheduler against a small model of
// the PHY shell written in the testbench (real-time requests succeed after
// a few cycles; CSMA/CA requests contend for CONT_CYC cycles, showing CONTE,
// and honour txCancel). Checks: best-effort packets go out in order with a
// success event each and their slot released; a time-triggered packet is
// requested exactly when the RTC reaches its instant; a due time-triggered
// packet preempts a contending best-effort one, which is retried afterwards
// and reported once; a failure is reported and releases the slot; the
// transmit memory read port follows the bank of the packet being sent.
module tb_dispatcher;
  import lmac_pkg::*;
  localparam int CONT_CYC = 200;
  logic clk = 0, rst_n = 0;
  logic [RTC_W-1:0] rtc = 0;
  logic be_push = 0, tt_push = 0, be_full, tt_full;
  tx_desc_t be_desc = '0, tt_desc = '0;
  logic [2:0] be_rd_id, tt_rd_id, be_rel_id, tt_rel_id, tx_id;
  logic [11:0] be_rd_off, tt_rd_off;
  logic [7:0] be_rd_data, tt_rd_data;
  logic be_release, tt_release, tx_request, tx_cancel, tx_type;
  logic [LEN_W-1:0] tx_length; logic [PWR_W-1:0] tx_power; logic [RATE_W-1:0] tx_rate;
  logic [BACKOFF_W-1:0] tx_backoff;
  logic [7:0] tx_status = 0;
  logic [RTC_W-1:0] tx_timestamp = 0;
  logic [2:0] txmem_id = 0; logic [11:0] txmem_off = 0; logic [7:0] txmem_data;
  logic txev_valid, txev_ready = 1;
  tx_event_t txev;
  logic [15:0] preempt_count;

  dispatcher dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) rtc <= rtc + 1;    // one microsecond per cycle here
  assign be_rd_data = 8'hB0 ^ 8'(be_rd_off) ^ 8'(be_rd_id);
  assign tt_rd_data = 8'h3C ^ 8'(tt_rd_off) ^ 8'(tt_rd_id);

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

  // PHY shell model
  int fail_next = 0, mem_errors = 0;
  typedef struct { bit tt; int id; longint rtc_at; } req_t;
  req_t reqs[$];
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && tx_request) begin
        req_t r;
        bit cancelled;
        r.tt = tx_type; r.id = tx_id; r.rtc_at = longint'(rtc);
        reqs.push_back(r);
        cancelled = 0;
        @(negedge clk);
        if (!tx_type) begin
          tx_status = 8'h01;
          for (int i = 0; i < CONT_CYC; i++) begin
            @(posedge clk);
            if (tx_cancel) begin cancelled = 1; break; end
          end
          @(negedge clk);
        end
        if (cancelled) tx_status = 8'h10;
        else begin
          tx_status = 8'h02;
          for (int o = 0; o < 8; o++) begin
            txmem_id = 3'(r.id); txmem_off = 12'(o);
            #1;
            if (txmem_data != ((r.tt ? 8'h3C : 8'hB0) ^ 8'(o) ^ 8'(r.id))) mem_errors++;
            @(negedge clk);
          end
          tx_timestamp = rtc;
          tx_status = fail_next ? 8'h08 : 8'h04;
          if (fail_next) fail_next--;
        end
        @(negedge clk); tx_status = 0;
      end
    end
  end

  tx_event_t evs[$];
  always @(posedge clk) if (rst_n && txev_valid && txev_ready) evs.push_back(txev);
  int be_rel[$], tt_rel[$];
  always @(posedge clk) if (rst_n) begin
    if (be_release) be_rel.push_back(be_rel_id);
    if (tt_release) tt_rel.push_back(tt_rel_id);
  end

  task automatic push(input bit tt, input int id, input longint t);
    @(negedge clk);
    if (tt) begin tt_push = 1; tt_desc = '0; tt_desc.id = 3'(id); tt_desc.len = 12'(10 + id); tt_desc.ttime = t; end
    else    begin be_push = 1; be_desc = '0; be_desc.id = 3'(id); be_desc.len = 12'(10 + id); be_desc.backoff = 10'(15); end
    @(negedge clk); tt_push = 0; be_push = 0;
  endtask

  initial begin
    longint t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // three best-effort packets
    push(0, 1, 0); push(0, 2, 0); push(0, 3, 0);
    repeat (1000) @(negedge clk);
    check(evs.size() == 3, "three transmit events");
    check(reqs.size() == 3 && reqs[0].id == 1 && reqs[1].id == 2 && reqs[2].id == 3, "best-effort order kept");
    check(be_rel.size() == 3 && be_rel[0] == 1 && be_rel[2] == 3, "best-effort slots released");
    foreach (evs[i]) check(evs[i].status == 8'h04 && !evs[i].tt, "success event");
    // a time-triggered packet at a future instant
    t = longint'(rtc) + 150;
    push(1, 5, t);
    repeat (300) @(negedge clk);
    check(reqs.size() == 4 && reqs[3].tt && reqs[3].rtc_at == t + 1,
          $sformatf("time-triggered request at RTC %0d for instant %0d", reqs[3].rtc_at, t));
    check(tt_rel.size() == 1 && tt_rel[0] == 5, "time-triggered slot released");
    check(evs.size() == 4 && evs[3].tt && evs[3].tstamp == tx_timestamp, "time-triggered event with timestamp");
    // preemption
    push(0, 6, 0);
    t = longint'(rtc) + 60;
    push(1, 7, t);
    repeat (800) @(negedge clk);
    check(preempt_count == 1, "one preemption");
    check(reqs.size() == 7 && !reqs[4].tt && reqs[5].tt && reqs[5].id == 7 && !reqs[6].tt && reqs[6].id == 6,
          "best effort, preempting time-triggered, best effort again");
    check(evs.size() == 6 && evs[4].tt && !evs[5].tt, "preempted packet reported once, after the time-triggered one");
    check(be_rel.size() == 4 && be_rel[3] == 6, "preempted slot released only once it is sent");
    // failure
    fail_next = 1;
    push(1, 2, 0);
    repeat (100) @(negedge clk);
    check(evs.size() == 7 && evs[6].status == 8'h08 && tt_rel.size() == 3, "failure reported and slot released");
    // held event handler: the dispatcher waits
    txev_ready = 0;
    push(0, 4, 0);
    repeat (400) @(negedge clk);
    check(txev_valid && evs.size() == 7, "event held until accepted");
    txev_ready = 1;
    repeat (5) @(negedge clk);
    check(evs.size() == 8, "event accepted");
    check(mem_errors == 0, "memory port routed to the right bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
