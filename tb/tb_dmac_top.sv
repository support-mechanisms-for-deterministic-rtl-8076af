// tb_dmac_top -- end-to-end test of the whole device at its default
// parameters: a host model behind the FX2LP model sends MultiLink-framed
// requests over the USB endpoints, two Lower MACs execute them against two
// behavioural PHYs, and the host parses the events that come back framed on
// the interrupt (radio 0) and bulk (radio 1) IN endpoints. The spare
// MultiLink channels carry test traffic in both directions at the same time.
//
// Every mechanism of the design is counted and must occur at least once:
// best-effort and time-triggered transmissions, preemption of a contending
// best-effort frame, a real-time failure on a busy medium, CCA configuration
// and RSSI-based busy detection, a channel change, good and erroneous
// receptions, the no-memory report, a dropped request, USB short packets
// committed with PKTEND, MultiLink frames on both IN endpoints and from both
// OUT endpoints, grants to all four endpoints and traffic on the spare
// channels. Data, FCS, statuses and timestamps are checked along the way.
module tb_dmac_top;
  import lmac_pkg::*;
  localparam int TPU = 40;           // default clock ticks per microsecond

  logic clk = 0, rst_n = 0, ifclk = 0, if_rst_n = 0;
  logic [RTC_W-1:0] rtc = 0;
  logic [7:0] fd_in, fd_out;
  logic fd_oe, sloe, slrd, slwr, pktend;
  logic [1:0] fifoadr;
  logic fa, fb, fc, fdf;
  logic [1:0] aux_tx_valid = 0, aux_tx_ready, aux_tx_flush = 0, aux_rx_valid, aux_rx_ready = '1;
  logic [1:0][7:0] aux_tx_data = 0, aux_rx_data;
  logic [1:0][RSSI_W-1:0] rssi = 0;
  logic [1:0][ADC_W-1:0] adc_i_in = 0, adc_q_in = 0, adc_i_out, adc_q_out;
  logic [1:0] txs_req, txs_cfm, txd_req, txd_cfm, txe_req, txe_cfm;
  logic [1:0][PWR_W-1:0] tvp; logic [1:0][LEN_W-1:0] tvl; logic [1:0][RATE_W-1:0] tvr;
  logic [1:0][7:0] txd;
  logic [1:0] rxs, rxd_i, rxe, fv, cl, ur, cca, chg_req, chg_cfm, on_air;
  logic [1:0][7:0] rxd, rvr, chg_id;
  logic [1:0][LEN_W-1:0] rvl;
  logic [1:0][7:0] tx_status; logic [1:0][3:0] cc_status; logic [1:0] medium_busy;
  logic [1:0][15:0] dropped_count, preempt_count, rx_lost_count;
  logic [15:0] grant_count [4];
  logic [15:0] int_frames_in, bulk_frames_in, bad_frames;

  dmac_top dut (
    .clk, .rst_n, .rtc, .ifclk, .if_rst_n, .fd_in, .fd_out, .fd_oe, .sloe, .slrd, .slwr, .pktend, .fifoadr,
    .flaga_ep2_empty(fa), .flagb_ep4_empty(fb), .flagc_ep6_full(fc), .flagd_ep8_full(fdf),
    .aux_tx_valid, .aux_tx_data, .aux_tx_ready, .aux_tx_flush, .aux_rx_valid, .aux_rx_data, .aux_rx_ready,
    .rssi, .adc_i_in, .adc_q_in, .adc_i_out, .adc_q_out,
    .phy_txstart_req(txs_req), .phy_txstart_cfm(txs_cfm), .phy_txdata_req(txd_req),
    .phy_txdata_cfm(txd_cfm), .phy_txend_req(txe_req), .phy_txend_cfm(txe_cfm),
    .txvector_power(tvp), .txvector_length(tvl), .txvector_rate(tvr), .phy_txdata(txd),
    .phy_rxstart_ind(rxs), .phy_rxdata_ind(rxd_i), .phy_rxdata(rxd), .phy_rxend_ind(rxe),
    .rxvector_length(rvl), .rxvector_rssi(rvr), .rxvector_formatviolation(fv),
    .rxvector_carrierlost(cl), .rxvector_unsupportedrate(ur), .phy_cca_ind(cca),
    .phy_chg_channel_req(chg_req), .phy_chg_channel_cfm(chg_cfm), .chg_channel_vector_id(chg_id),
    .tx_status, .cc_status, .medium_busy, .dropped_count, .preempt_count, .rx_lost_count,
    .grant_count, .int_frames_in, .bulk_frames_in, .bad_frames);

  fx2lp_model u_fx2 (.ifclk, .fifoadr, .sloe, .slrd, .slwr, .pktend, .fd_out, .fd_oe, .fd_in,
    .flaga_ep2_empty(fa), .flagb_ep4_empty(fb), .flagc_ep6_full(fc), .flagd_ep8_full(fdf));

  phy_model u_phy0 (
    .clk, .rtc, .txstart_req(txs_req[0]), .txstart_cfm(txs_cfm[0]), .txdata_req(txd_req[0]),
    .txdata_cfm(txd_cfm[0]), .txend_req(txe_req[0]), .txend_cfm(txe_cfm[0]),
    .txv_power(tvp[0]), .txv_length(tvl[0]), .txv_rate(tvr[0]), .txdata(txd[0]),
    .rxstart_ind(rxs[0]), .rxdata_ind(rxd_i[0]), .rxdata(rxd[0]), .rxend_ind(rxe[0]),
    .rxv_length(rvl[0]), .rxv_rssi(rvr[0]), .rxv_formatviolation(fv[0]), .rxv_carrierlost(cl[0]),
    .rxv_unsupportedrate(ur[0]), .cca_ind(cca[0]), .chg_req(chg_req[0]), .chg_cfm(chg_cfm[0]),
    .chg_id(chg_id[0]), .on_air(on_air[0]));
  phy_model u_phy1 (
    .clk, .rtc, .txstart_req(txs_req[1]), .txstart_cfm(txs_cfm[1]), .txdata_req(txd_req[1]),
    .txdata_cfm(txd_cfm[1]), .txend_req(txe_req[1]), .txend_cfm(txe_cfm[1]),
    .txv_power(tvp[1]), .txv_length(tvl[1]), .txv_rate(tvr[1]), .txdata(txd[1]),
    .rxstart_ind(rxs[1]), .rxdata_ind(rxd_i[1]), .rxdata(rxd[1]), .rxend_ind(rxe[1]),
    .rxv_length(rvl[1]), .rxv_rssi(rvr[1]), .rxv_formatviolation(fv[1]), .rxv_carrierlost(cl[1]),
    .rxv_unsupportedrate(ur[1]), .cca_ind(cca[1]), .chg_req(chg_req[1]), .chg_cfm(chg_cfm[1]),
    .chg_id(chg_id[1]), .on_air(on_air[1]));

  always #12 clk = ~clk;      // about 40 MHz
  always #16 ifclk = ~ifclk;  // about 30 MHz
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
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------- mechanism counters
  typedef enum int { M_BE, M_TT, M_PREEMPT, M_RTFAIL, M_CCA_BUSY, M_CHAN, M_RX_GOOD, M_RX_ERR,
                     M_NOMEM, M_DROP, M_PKTEND, M_INT_IN, M_BULK_IN, M_INT_OUT, M_BULK_OUT,
                     M_GRANT_ALL, M_AUX, M_COUNT } mech_e;
  int mech[M_COUNT];
  string mech_name[M_COUNT] = '{"best_effort_tx", "time_trig_tx", "preemption", "rt_fail",
    "cca_busy", "channel_change", "rx_good", "rx_error", "rx_nomem", "req_dropped", "usb_pktend",
    "int_in_frames", "bulk_in_frames", "int_out_grants", "bulk_out_grants", "all_ep_granted",
    "spare_channels"};

  // ------------------------------------------------------------- host side
  byte unsigned link_rx[2][2][$];    // [endpoint 0: interrupt, 1: bulk][link id]
  int frame_errors = 0;
  function automatic void demux();
    for (int e = 0; e < 2; e++) begin
      while (u_fx2.in_bytes[e].size() >= 3) begin
        int id, sz;
        id = u_fx2.in_bytes[e][0];
        sz = {u_fx2.in_bytes[e][1], u_fx2.in_bytes[e][2]};
        if (u_fx2.in_bytes[e].size() < 3 + sz) break;
        if (id > 1 || sz == 0 || sz > 509) frame_errors++;
        repeat (3) void'(u_fx2.in_bytes[e].pop_front());
        for (int i = 0; i < sz; i++) link_rx[e][id & 1].push_back(u_fx2.in_bytes[e].pop_front());
        if (e == 0) mech[M_INT_IN]++; else mech[M_BULK_IN]++;
      end
    end
  endfunction

  // radio r's requests travel in frames with link id r on EP2 (radio 0) or EP4 (radio 1)
  task automatic send(input int r, input byte unsigned b[$]);
    byte unsigned f[$];
    f = {8'(r), 8'(b.size() >> 8), 8'(b.size())};
    foreach (b[i]) f.push_back(b[i]);
    u_fx2.send(r, f);
  endtask

  function automatic byte unsigned pat(input int seed, input int i);
    return 8'(seed * 13 + i * 5 + (i >> 3));
  endfunction
  task automatic req_tx(input int r, input int bo, input int len, input int seed);
    byte unsigned b[$];
    b = {8'(OP_TX), 8'd2, 8'd3, 8'(bo >> 8), 8'(bo), 8'(len >> 8), 8'(len)};
    for (int i = 0; i < len; i++) b.push_back(pat(seed, i));
    send(r, b);
  endtask
  task automatic req_tt(input int r, input longint t, input int len, input int seed);
    byte unsigned b[$];
    b = {8'(OP_TX_TT), 8'd1, 8'd1};
    for (int k = 7; k >= 0; k--) b.push_back(8'(t >> (8 * k)));
    b.push_back(8'(len >> 8)); b.push_back(8'(len));
    for (int i = 0; i < len; i++) b.push_back(pat(seed, i));
    send(r, b);
  endtask

  typedef struct { int kind; int status; int q; int len; longint t; byte unsigned data[$]; } ev_t;
  ev_t evs[2][$];
  int parse_errors = 0;
  // radio 0 events: interrupt endpoint, link 0; radio 1 events: bulk endpoint, link 1
  function automatic void parse();
    demux();
    for (int r = 0; r < 2; r++) begin
      forever begin
        ev_t e;
        int n;
        if (link_rx[r][r].size() == 0) break;
        if (link_rx[r][r][0] == EV_TX) begin
          if (link_rx[r][r].size() < 11) break;
          e.kind = 1; e.status = link_rx[r][r][1]; e.q = link_rx[r][r][2]; e.t = 0;
          for (int k = 0; k < 8; k++) e.t = (e.t << 8) | longint'(link_rx[r][r][3 + k]);
          repeat (11) void'(link_rx[r][r].pop_front());
        end else if (link_rx[r][r][0] == EV_RX) begin
          if (link_rx[r][r].size() < 13) break;
          e.kind = 2; e.status = link_rx[r][r][1];
          e.len = {link_rx[r][r][3], link_rx[r][r][4]}; e.t = 0;
          for (int k = 0; k < 8; k++) e.t = (e.t << 8) | longint'(link_rx[r][r][5 + k]);
          n = (e.status == 0) ? e.len : 0;
          if (link_rx[r][r].size() < 13 + n) break;
          repeat (13) void'(link_rx[r][r].pop_front());
          for (int i = 0; i < n; i++) e.data.push_back(link_rx[r][r].pop_front());
        end else begin
          parse_errors++; void'(link_rx[r][r].pop_front()); continue;
        end
        evs[r].push_back(e);
      end
    end
  endfunction

  task automatic wait_events(input int r, input int n, input int max_cycles);
    for (int i = 0; i < max_cycles && evs[r].size() < n; i++) begin @(negedge clk); parse(); end
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

  // expected PHY octets of a request
  function automatic void expect_frame(ref byte unsigned exp[$], input int seed, input int len);
    byte unsigned q[$];
    logic [31:0] f;
    for (int i = 0; i < len; i++) q.push_back(pat(seed, i));
    f = crc32(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    foreach (q[i]) exp.push_back(q[i]);
  endfunction

  // spare channel traffic: both directions on both spare channels
  byte unsigned aux_sent[2][$], aux_got[2][$];
  always @(posedge clk) if (rst_n) for (int a = 0; a < 2; a++)
    if (aux_rx_valid[a] && aux_rx_ready[a]) aux_got[a].push_back(aux_rx_data[a]);

  initial begin
    byte unsigned exp0[$], exp1[$], q[$], aux_host_sent[2][$];
    logic [31:0] f;
    longint t0;
    repeat (4) @(negedge clk);
    rst_n = 1; if_rst_n = 1;
    repeat (10) @(negedge clk);

    // CCA configuration on both radios
    send(0, '{8'(OP_CCA), 8'h01, 8'd100});
    send(1, '{8'(OP_CCA), 8'h01, 8'd100});
    repeat (400) @(negedge clk);
    rssi[0] = 120; repeat (3) @(negedge clk);
    if (medium_busy[0]) mech[M_CCA_BUSY]++;
    check(medium_busy[0], "radio 0: RSSI above the configured threshold gives busy");
    rssi[0] = 0; repeat (3) @(negedge clk);
    check(!medium_busy[0], "radio 0: medium free again");

    // best-effort on both radios, time-triggered on radio 0
    req_tx(0, 7, 60, 1);   expect_frame(exp0, 1, 60);
    req_tx(1, 15, 300, 2); expect_frame(exp1, 2, 300);
    wait_events(0, 1, 200000);
    wait_events(1, 1, 200000);
    check(evs[0].size() == 1 && evs[0][0].status == 4 && evs[0][0].q == 0, "radio 0 best-effort success");
    check(evs[1].size() == 1 && evs[1][0].status == 4 && evs[1][0].q == 0, "radio 1 best-effort success");
    mech[M_BE] += 2;
    t0 = longint'(rtc) + 500;
    req_tt(0, t0, 100, 3); expect_frame(exp0, 3, 100);
    wait_events(0, 2, 200000);
    check(evs[0].size() == 2 && evs[0][1].status == 4 && evs[0][1].q == 1, "radio 0 time-triggered success");
    check(u_phy0.tx_start_rtc.size() == 2 && u_phy0.tx_start_rtc[1] >= t0 && u_phy0.tx_start_rtc[1] <= t0 + 1,
          "time-triggered frame starts within 1 us of its instant");
    if (evs[0].size() == 2) check(evs[0][1].t == u_phy0.tx_start_rtc[1], "event carries the start time");
    mech[M_TT]++;

    // preemption on radio 0
    req_tx(0, 1023, 40, 4);
    t0 = longint'(rtc) + 300;
    req_tt(0, t0, 30, 5);
    expect_frame(exp0, 5, 30); expect_frame(exp0, 4, 40);
    wait_events(0, 4, 800000);
    check(preempt_count[0] == 1 && evs[0].size() == 4 && evs[0][2].q == 1 && evs[0][3].q == 0,
          "contending best-effort frame preempted by the time-triggered one");
    mech[M_PREEMPT] += preempt_count[0];

    // real-time failure on radio 0
    rssi[0] = 150;
    req_tt(0, longint'(rtc) + 50, 10, 6);
    wait_events(0, 5, 200000);
    rssi[0] = 0;
    check(evs[0].size() == 5 && evs[0][4].status == 8'h08, "real-time on busy medium fails");
    if (evs[0].size() == 5 && evs[0][4].status == 8'h08) mech[M_RTFAIL]++;

    // channel change on radio 1
    send(1, '{8'(OP_CHAN), 8'd174});
    repeat (2000) @(negedge clk);
    check(u_phy1.chg_log.size() == 1 && u_phy1.chg_log[0] == 174, "radio 1 retuned to 174");
    mech[M_CHAN] += u_phy1.chg_log.size();

    // spare channels: host -> FPGA on link 0 bulk (EP4, id 0) and link 1 interrupt (EP2, id 1)
    begin
      byte unsigned b[$];
      for (int a = 0; a < 2; a++) begin
        b = {};
        for (int i = 0; i < 200; i++) b.push_back(8'($urandom));
        aux_host_sent[a] = b;
        begin
          byte unsigned fr[$];
          fr = {8'(a), 8'(0), 8'(200)};
          foreach (b[i]) fr.push_back(b[i]);
          u_fx2.send(a == 0 ? 1 : 0, fr);
        end
      end
    end
    // FPGA -> host on both spare channels
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int a = 0; a < 2; a++) begin
        aux_tx_valid[a] = aux_tx_ready[a];
        aux_tx_data[a] = 8'($urandom);
        if (aux_tx_valid[a]) aux_sent[a].push_back(aux_tx_data[a]);
      end
    end
    @(negedge clk); aux_tx_valid = 0; aux_tx_flush = '1;
    @(negedge clk); aux_tx_flush = 0;

    // receptions on radio 1
    q = {};
    for (int i = 0; i < 200; i++) q.push_back(8'($urandom));
    f = crc32(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    u_phy1.rx_frame(q, 0, 70);
    wait_events(1, 2, 200000);
    check(evs[1].size() == 2 && evs[1][1].kind == 2 && evs[1][1].status == 0 && evs[1][1].data == q,
          "radio 1 good reception delivered with its data");
    if (evs[1].size() == 2 && evs[1][1].status == 0) mech[M_RX_GOOD]++;
    u_phy1.rx_frame(q, 1, 70);
    wait_events(1, 3, 200000);
    check(evs[1].size() == 3 && evs[1][2].status == 8'h22, "radio 1 carrier lost reported");
    if (evs[1].size() == 3 && evs[1][2].status[RX_RXERR]) mech[M_RX_ERR]++;
    // radio 0 receptions while the host holds the interrupt IN endpoint: the
    // link and clock-crossing FIFOs fill, then the eight receive slots, then
    // frames are reported without memory; once the 16-entry report queue is
    // also full, further reports are counted as lost
    u_fx2.hold[0] = 1;
    for (int i = 0; i < 30; i++) u_phy0.rx_frame(q, 0, 40);
    u_fx2.hold[0] = 0;
    wait_events(0, 35, 300000);
    begin
      int nomem = 0, good = 0;
      for (int i = 5; i < evs[0].size(); i++) begin
        if (evs[0][i].status == 8'h05) nomem++;
        if (evs[0][i].status == 0 && evs[0][i].data == q) good++;
      end
      check(good + nomem + int'(rx_lost_count[0]) == 30 && nomem >= 1,
            $sformatf("radio 0: %0d events, %0d stored, %0d without memory, %0d lost", evs[0].size(), good, nomem, rx_lost_count[0]));
      mech[M_NOMEM] += nomem; mech[M_RX_GOOD] += good;
    end

    // request too long for a time-triggered slot
    req_tt(1, longint'(rtc) + 10, 700, 7);
    repeat (3000) @(negedge clk);
    check(dropped_count[1] == 1, "oversized request dropped");
    mech[M_DROP] += dropped_count[1];
    repeat (3000) @(negedge clk);
    parse();

    // end-of-run checks
    begin
      byte unsigned got[$];
      for (int i = 0; i < u_phy0.tx_bytes.size(); i++) got.push_back(u_phy0.tx_bytes[i]);
      // the failed real-time frame never reached the PHY
      check(got == exp0, $sformatf("radio 0 PHY octets (%0d of %0d)", got.size(), exp0.size()));
      got = {};
      for (int i = 0; i < u_phy1.tx_bytes.size(); i++) got.push_back(u_phy1.tx_bytes[i]);
      check(got == exp1, "radio 1 PHY octets");
    end
    check(aux_got[0] == aux_host_sent[0] && aux_got[1] == aux_host_sent[1], "spare channels downstream");
    check(link_rx[1][0] == aux_sent[0] && link_rx[0][1] == aux_sent[1], "spare channels upstream");
    if (aux_got[0].size() != 0 && link_rx[0][1].size() != 0) mech[M_AUX]++;
    check(parse_errors == 0 && frame_errors == 0 && bad_frames == 0,
          $sformatf("well-formed streams (%0d %0d %0d)", parse_errors, frame_errors, bad_frames));
    check(u_fx2.bus_errors == 0, "FX2LP bus protocol respected");
    check(rx_lost_count[1] == 0, "radio 1: no receive report lost");
    mech[M_PKTEND] = u_fx2.pktend_count;
    mech[M_INT_OUT] = int'(grant_count[0]);
    mech[M_BULK_OUT] = int'(grant_count[1]);
    mech[M_GRANT_ALL] = (grant_count[0] != 0 && grant_count[1] != 0 && grant_count[2] != 0 &&
                         grant_count[3] != 0) ? 1 : 0;
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-16s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
