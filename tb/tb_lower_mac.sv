// tb_lower_mac -- runs one Lower MAC from host requests to PHY primitives
// and back to host events, with the behavioural PHY model. The testbench
// plays the host: it writes requests on the command stream and parses the
// event stream. It checks CCA configuration, a best-effort transmission
// (data and FCS on the PHY, success event), a time-triggered transmission
// started at its RTC instant, the preemption of a contending best-effort
// packet by a due time-triggered one, a real-time failure on a busy medium,
// a channel change, received frames with and without errors (data sent with
// the event only for good frames), the no-memory report when the host does
// not drain events, and the dropping of a request too long for its slot.
module tb_lower_mac;
  import lmac_pkg::*;
  localparam int TPU = 4;

  logic clk = 0, rst_n = 0;
  logic [RTC_W-1:0] rtc = 0;
  logic cmd_valid = 0, cmd_ready, ev_valid, ev_ready = 1, ev_flush;
  logic [7:0] cmd_data = 0, ev_data;
  logic [RSSI_W-1:0] rssi = 0;
  logic [ADC_W-1:0] adc_i_in = 0, adc_q_in = 0, adc_i_out, adc_q_out;
  logic txs_req, txs_cfm, txd_req, txd_cfm, txe_req, txe_cfm;
  logic [PWR_W-1:0] tvp; logic [LEN_W-1:0] tvl; logic [RATE_W-1:0] tvr; logic [7:0] txd;
  logic rxs, rxd_i, rxe, fv, cl, ur, cca, chg_req, chg_cfm, on_air;
  logic [7:0] rxd; logic [LEN_W-1:0] rvl; logic [7:0] rvr; logic [7:0] chg_id;
  logic [7:0] tx_status; logic [3:0] cc_status; logic medium_busy;
  logic [15:0] dropped_count, preempt_count, rx_lost_count;

  lower_mac #(.TICKS_PER_US(TPU)) dut (
    .clk, .rst_n, .rtc, .cmd_valid, .cmd_data, .cmd_ready, .ev_valid, .ev_data, .ev_ready, .ev_flush,
    .rssi, .adc_i_in, .adc_q_in, .adc_i_out, .adc_q_out,
    .phy_txstart_req(txs_req), .phy_txstart_cfm(txs_cfm), .phy_txdata_req(txd_req),
    .phy_txdata_cfm(txd_cfm), .phy_txend_req(txe_req), .phy_txend_cfm(txe_cfm),
    .txvector_power(tvp), .txvector_length(tvl), .txvector_rate(tvr), .phy_txdata(txd),
    .phy_rxstart_ind(rxs), .phy_rxdata_ind(rxd_i), .phy_rxdata(rxd), .phy_rxend_ind(rxe),
    .rxvector_length(rvl), .rxvector_rssi(rvr), .rxvector_formatviolation(fv),
    .rxvector_carrierlost(cl), .rxvector_unsupportedrate(ur), .phy_cca_ind(cca),
    .phy_chg_channel_req(chg_req), .phy_chg_channel_cfm(chg_cfm), .chg_channel_vector_id(chg_id),
    .tx_status, .cc_status, .medium_busy, .dropped_count, .preempt_count, .rx_lost_count);

  phy_model u_phy (
    .clk, .rtc, .txstart_req(txs_req), .txstart_cfm(txs_cfm), .txdata_req(txd_req),
    .txdata_cfm(txd_cfm), .txend_req(txe_req), .txend_cfm(txe_cfm),
    .txv_power(tvp), .txv_length(tvl), .txv_rate(tvr), .txdata(txd),
    .rxstart_ind(rxs), .rxdata_ind(rxd_i), .rxdata(rxd), .rxend_ind(rxe),
    .rxv_length(rvl), .rxv_rssi(rvr), .rxv_formatviolation(fv), .rxv_carrierlost(cl),
    .rxv_unsupportedrate(ur), .cca_ind(cca), .chg_req, .chg_cfm, .chg_id, .on_air);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % TPU == TPU - 1) rtc <= rtc + 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- host side
  byte unsigned ev_bytes[$];
  int flushes = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_valid && ev_ready) ev_bytes.push_back(ev_data);
    if (ev_flush) flushes++;
  end

  task automatic send(input byte unsigned b[$]);
    foreach (b[i]) begin
      @(negedge clk);
      cmd_valid = 1; cmd_data = b[i];
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
    end
    @(negedge clk); cmd_valid = 0;
  endtask

  function automatic byte unsigned pat(input int seed, input int i);
    return 8'(seed * 13 + i * 5 + (i >> 3));
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

  typedef struct { int kind; int status; int q; int rssi; int len; longint t; byte unsigned data[$]; } ev_t;
  ev_t evs[$];
  int parse_errors = 0;
  // parse complete events from ev_bytes
  function automatic void parse();
    forever begin
      ev_t e;
      if (ev_bytes.size() == 0) return;
      if (ev_bytes[0] == EV_TX) begin
        if (ev_bytes.size() < 11) return;
        e.kind = 1; e.status = ev_bytes[1]; e.q = ev_bytes[2]; e.t = 0;
        for (int k = 0; k < 8; k++) e.t = (e.t << 8) | longint'(ev_bytes[3 + k]);
        repeat (11) void'(ev_bytes.pop_front());
      end else if (ev_bytes[0] == EV_RX) begin
        int n;
        if (ev_bytes.size() < 13) return;
        e.kind = 2; e.status = ev_bytes[1]; e.rssi = ev_bytes[2];
        e.len = {ev_bytes[3], ev_bytes[4]}; e.t = 0;
        for (int k = 0; k < 8; k++) e.t = (e.t << 8) | longint'(ev_bytes[5 + k]);
        n = (e.status == 0) ? e.len : 0;
        if (ev_bytes.size() < 13 + n) return;
        repeat (13) void'(ev_bytes.pop_front());
        for (int i = 0; i < n; i++) e.data.push_back(ev_bytes.pop_front());
      end else begin
        parse_errors++; void'(ev_bytes.pop_front()); continue;
      end
      evs.push_back(e);
    end
  endfunction

  task automatic wait_events(input int n, input int max_cycles);
    for (int i = 0; i < max_cycles && evs.size() < n; i++) begin @(negedge clk); parse(); end
  endtask

  function automatic logic [31:0] crc32(input byte unsigned b[$]);
    logic [31:0] c;
    c = '1;
    foreach (b[i]) begin
      c ^= 32'(b[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : (c >> 1);
    end
    return ~c;
  endfunction

  function automatic bit frame_ok(input int fi, input int seed, input int len);
    byte unsigned q[$];
    int base;
    logic [31:0] f;
    base = 0;
    for (int i = 0; i < fi; i++) base += u_phy.tx_lens[i];
    for (int i = 0; i < len; i++) q.push_back(pat(seed, i));
    f = crc32(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    if (u_phy.tx_lens[fi] != len + 4) return 0;
    for (int i = 0; i < len + 4; i++) if (u_phy.tx_bytes[base + i] != q[i]) return 0;
    return 1;
  endfunction

  initial begin
    byte unsigned q[$];
    logic [31:0] f;
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // CCA: carrier sense on, RSSI threshold 100
    send('{8'(OP_CCA), 8'h01, 8'd100});
    rssi = 120; repeat (3) @(negedge clk);
    check(medium_busy, "RSSI above the configured threshold: busy");
    rssi = 20; repeat (3) @(negedge clk);
    check(!medium_busy, "RSSI below the threshold: free");

    // best effort
    req_tx(3, 5, 3, 40, 1);
    wait_events(1, 20000);
    check(evs.size() == 1 && evs[0].kind == 1 && evs[0].status == 8'h04 && evs[0].q == 0,
          "best-effort success event");
    check(u_phy.tx_lens.size() == 1 && frame_ok(0, 1, 40), "best-effort frame on the PHY");
    check(u_phy.tx_power[0] == 3 && u_phy.tx_rate[0] == 5, "power and rate passed to the PHY");
    if (evs.size() >= 1) check(evs[0].t == u_phy.tx_start_rtc[0], "event timestamp = start of transmission");

    // time triggered, 300 us ahead
    t0 = longint'(rtc) + 300;
    req_tt(1, 2, t0, 64, 2);
    wait_events(2, 20000);
    check(evs.size() == 2 && evs[1].status == 8'h04 && evs[1].q == 1, "time-triggered success event");
    check(u_phy.tx_start_rtc.size() == 2 && u_phy.tx_start_rtc[1] >= t0 && u_phy.tx_start_rtc[1] <= t0 + 1,
          $sformatf("time-triggered start at %0d for instant %0d", u_phy.tx_start_rtc[1], t0));
    check(frame_ok(1, 2, 64), "time-triggered frame on the PHY");

    // preemption: best effort with a long backoff, then a time-triggered frame due meanwhile
    send('{8'(OP_CCA), 8'h01, 8'd100});
    req_tx(0, 0, 1023, 30, 3);
    t0 = longint'(rtc) + 200;
    req_tt(0, 0, t0, 20, 4);
    wait_events(4, 200000);
    check(preempt_count == 1, $sformatf("one preemption (%0d)", preempt_count));
    check(evs.size() == 4 && evs[2].q == 1 && evs[3].q == 0 && evs[2].status == 4 && evs[3].status == 4,
          "time-triggered frame first, preempted best-effort frame after");
    check(u_phy.tx_lens.size() == 4 && frame_ok(2, 4, 20) && frame_ok(3, 3, 30), "frames in preemption order");

    // real time on a busy medium fails
    rssi = 150;
    req_tt(0, 0, longint'(rtc) + 20, 10, 5);
    wait_events(5, 20000);
    check(evs.size() == 5 && evs[4].status == 8'h08 && evs[4].q == 1, "real-time on busy medium: failure event");
    rssi = 0;

    // channel change
    send('{8'(OP_CHAN), 8'd176});
    repeat (60) @(negedge clk);
    check(u_phy.chg_log.size() == 1 && u_phy.chg_log[0] == 176, "channel changed to 176");

    // receptions
    q = {};
    for (int i = 0; i < 100; i++) q.push_back(8'($urandom));
    f = crc32(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    u_phy.rx_frame(q, 0, 90);
    wait_events(6, 20000);
    check(evs.size() == 6 && evs[5].kind == 2 && evs[5].status == 0 && evs[5].len == 104 && evs[5].rssi == 90,
          "good reception event");
    if (evs.size() >= 6) check(evs[5].data == q, "received data sent with the event");
    q[3] ^= 8'h01;
    u_phy.rx_frame(q, 0, 90);
    wait_events(7, 20000);
    check(evs.size() == 7 && evs[6].status == 8'h12 && evs[6].len == 104, "CRC error event without data");
    q[3] ^= 8'h01;

    // host stops reading: 8 slots fill, the 9th frame reports NOMEM
    ev_ready = 0;
    for (int i = 0; i < 9; i++) u_phy.rx_frame(q, 0, 50);
    ev_ready = 1;
    wait_events(16, 100000);
    check(evs.size() == 16, $sformatf("%0d events", evs.size()));
    if (evs.size() == 16) begin
      int good = 0;
      for (int i = 7; i < 15; i++) if (evs[i].status == 0 && evs[i].data == q) good++;
      check(good == 8, "eight frames stored while the host was not reading");
      check(evs[15].status == 8'h05, $sformatf("ninth frame: no memory (%h)", evs[15].status));
    end

    // request too long for a time-triggered slot is dropped
    req_tt(0, 0, longint'(rtc) + 10, 600, 6);
    repeat (100) @(negedge clk);
    check(dropped_count == 1, "oversized time-triggered request dropped");
    check(parse_errors == 0 && ev_bytes.size() == 0, "event stream well formed");
    check(flushes == 16, $sformatf("one flush per event (%0d)", flushes));
    check(rx_lost_count == 0, "no receive report lost");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
