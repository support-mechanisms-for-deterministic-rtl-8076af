// tb_phy_abstraction_layer -- drives the PHY shell against the behavioural
// PHY model. Transmission: a real-time frame starts one cycle after the
// request; a non real-time frame waits AIFS plus a whole number of 13 us
// slots not above txBackoffSlots, and waits longer while the medium is busy;
// the octets on the PHY are the memory contents followed by the FCS; the
// timestamp is the RTC at the start confirm; real-time on a busy medium
// fails on the next cycle; cancellation works in contention and on air.
// Reception: good, CRC error, carrier lost, no memory, format violation and
// unsupported rate frames give the rxStatus codes of the interface
// description, and stored octets match. Channel change shows 2, 4, 1 and is
// deferred by a busy medium; a cancel while blocked shows CCCAN.
module tb_phy_abstraction_layer;
  import lmac_pkg::*;
  localparam int TPU = 4;
  localparam int AIFS = (SIFS_US + 6 * SLOT_US) * TPU;
  localparam int SLOT = SLOT_US * TPU;

  logic clk = 0, rst_n = 0;
  logic [RTC_W-1:0] rtc = 0;
  logic medium_busy_tb = 0;
  logic tx_request = 0, tx_cancel = 0, tx_type = 0;
  logic [2:0] tx_id = 0;
  logic [LEN_W-1:0] tx_length = 0;
  logic [PWR_W-1:0] tx_power = 0;
  logic [RATE_W-1:0] tx_rate = 0;
  logic [BACKOFF_W-1:0] tx_backoff = 0;
  logic [7:0] tx_status;
  logic [RTC_W-1:0] tx_timestamp;
  logic [2:0] txmem_id;
  logic [11:0] txmem_off;
  logic [7:0] txmem_data;
  logic rx_ready;
  rx_event_t rx_info;
  logic rxmm_alloc, rxmm_full = 0, rxmem_we;
  logic [2:0] rxmm_alloc_id = 3, rxmem_id;
  logic [11:0] rxmem_off;
  logic [7:0] rxmem_data;
  logic cc_request = 0, cc_cancel = 0;
  logic [7:0] cc_value = 0;
  logic [3:0] cc_status;
  logic txs_req, txs_cfm, txd_req, txd_cfm, txe_req, txe_cfm;
  logic [PWR_W-1:0] tvp; logic [LEN_W-1:0] tvl; logic [RATE_W-1:0] tvr; logic [7:0] txd;
  logic rxs, rxd_i, rxe, fv, cl, ur, cca, chg_req, chg_cfm, on_air;
  logic [7:0] rxd; logic [LEN_W-1:0] rvl; logic [7:0] rvr; logic [7:0] chg_id;

  phy_abstraction_layer #(.TICKS_PER_US(TPU)) dut (
    .clk, .rst_n, .rtc, .medium_busy(medium_busy_tb || cca),
    .tx_request, .tx_cancel, .tx_type, .tx_id, .tx_length, .tx_power, .tx_rate, .tx_backoff,
    .tx_status, .tx_timestamp, .txmem_id, .txmem_off, .txmem_data,
    .rx_ready, .rx_info, .rxmm_alloc, .rxmm_alloc_id, .rxmm_full,
    .rxmem_we, .rxmem_id, .rxmem_off, .rxmem_data,
    .cc_request, .cc_cancel, .cc_value, .cc_status,
    .phy_txstart_req(txs_req), .phy_txstart_cfm(txs_cfm), .phy_txdata_req(txd_req),
    .phy_txdata_cfm(txd_cfm), .phy_txend_req(txe_req), .phy_txend_cfm(txe_cfm),
    .txvector_power(tvp), .txvector_length(tvl), .txvector_rate(tvr), .phy_txdata(txd),
    .phy_rxstart_ind(rxs), .phy_rxdata_ind(rxd_i), .phy_rxdata(rxd), .phy_rxend_ind(rxe),
    .rxvector_length(rvl), .rxvector_rssi(rvr), .rxvector_formatviolation(fv),
    .rxvector_carrierlost(cl), .rxvector_unsupportedrate(ur), .phy_cca_ind(cca),
    .phy_chg_channel_req(chg_req), .phy_chg_channel_cfm(chg_cfm), .chg_channel_vector_id(chg_id));

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

  // transmit memory model: slot s offset o holds txpat(s, o)
  function automatic logic [7:0] txpat(input int s, input int o);
    return 8'(s * 29 + o * 7 + (o >> 5));
  endfunction
  always_ff @(posedge clk) txmem_data <= txpat(int'(txmem_id), int'(txmem_off));

  // receive memory model
  logic [7:0] rxmem [8][2344];
  always_ff @(posedge clk) if (rxmem_we) rxmem[rxmem_id][rxmem_off] <= rxmem_data;
  int allocs = 0;
  always @(posedge clk) if (rxmm_alloc) allocs++;

  // receive report capture
  rx_event_t rx_q[$];
  always @(posedge clk) if (rx_ready) rx_q.push_back(rx_info);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] crc32(input byte unsigned b[$]);
    logic [31:0] c;
    c = '1;
    foreach (b[i]) begin
      c ^= 32'(b[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : (c >> 1);
    end
    return ~c;
  endfunction

  // issue a request; returns the number of cycles until txstart_req rose and the end status
  task automatic transmit(input bit rt, input int id, input int len, input int bo,
                          output int wait_cycles, output logic [7:0] end_status);
    int c0;
    @(negedge clk);
    tx_request = 1; tx_type = rt; tx_id = 3'(id); tx_length = LEN_W'(len);
    tx_power = 3'(id); tx_rate = 3'(len % 8); tx_backoff = BACKOFF_W'(bo);
    @(negedge clk); tx_request = 0;
    c0 = cyc; wait_cycles = -1;
    while (!(tx_status[TX_SUCCS] || tx_status[TX_FAILE] || tx_status[TX_CANCE])) begin
      if (txs_req && wait_cycles < 0) wait_cycles = cyc - c0;
      @(negedge clk);
    end
    end_status = tx_status;
    @(negedge clk);
  endtask

  task automatic check_frame(input int fi, input int id, input int len, input int base);
    byte unsigned q[$];
    logic [31:0] f;
    bit ok;
    for (int o = 0; o < len; o++) q.push_back(txpat(id, o));
    f = crc32(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    check(u_phy.tx_lens[fi] == len + 4, $sformatf("frame %0d: %0d octets on the PHY", fi, u_phy.tx_lens[fi]));
    check(u_phy.tx_vlen[fi] == len + 4, "TXVECTOR length includes the FCS");
    check(u_phy.tx_power[fi] == (id % 8) && u_phy.tx_rate[fi] == len % 8, "TXVECTOR power and rate");
    ok = 1;
    for (int i = 0; i < len + 4; i++) if (u_phy.tx_bytes[base + i] != q[i]) ok = 0;
    check(ok, $sformatf("frame %0d: data and FCS octets", fi));
  endtask

  initial begin
    int w; logic [7:0] st; int base; int k;
    byte unsigned q[$];
    logic [31:0] f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    base = 0;

    // 1. real-time on a free medium: starts the next cycle
    transmit(1, 2, 20, 0, w, st);
    check(st == 8'h04, $sformatf("RT success status %h", st));
    check(w == 0, $sformatf("RT start latency %0d cycles (expected 0 after request)", w));
    check_frame(0, 2, 20, base); base += 24;
    check(tx_timestamp == RTC_W'(u_phy.tx_start_rtc[0]), "timestamp = RTC at start confirm");

    // 2. non real-time, no backoff: exactly AIFS
    transmit(0, 1, 33, 0, w, st);
    check(st == 8'h04, "NRT success");
    check(w == AIFS, $sformatf("AIFS wait %0d, expected %0d", w, AIFS));
    check_frame(1, 1, 33, base); base += 37;

    // 3. non real-time with backoff bound 7: AIFS + k slots, k <= 7
    for (int n = 0; n < 6; n++) begin
      transmit(0, 3, 5, 7, w, st);
      k = (w - AIFS) / SLOT;
      check(w >= AIFS && (w - AIFS) % SLOT == 0 && k <= 7,
            $sformatf("backoff wait %0d = AIFS + %0d slots", w, k));
      check_frame(2 + n, 3, 5, base); base += 9;
    end

    // 4. busy medium during contention defers the start
    fork
      transmit(0, 4, 10, 0, w, st);
      begin repeat (AIFS / 2) @(negedge clk); medium_busy_tb = 1;
            repeat (300) @(negedge clk); medium_busy_tb = 0; end
    join
    check(w >= AIFS / 2 + 300 + AIFS - 3, $sformatf("deferral: started after %0d cycles", w));
    check_frame(8, 4, 10, base); base += 14;

    // 5. real-time on a busy medium fails on the next cycle
    medium_busy_tb = 1;
    @(negedge clk);
    tx_request = 1; tx_type = 1; tx_id = 0; tx_length = 8;
    @(negedge clk); tx_request = 0;
    check(tx_status == 8'h08, $sformatf("RT on busy medium: FAILE next cycle (%h)", tx_status));
    @(negedge clk);
    check(tx_status == 8'h00, "FAILE lasts one cycle");
    medium_busy_tb = 0;

    // 6. cancel during contention
    fork
      transmit(0, 5, 10, 3, w, st);
      begin repeat (20) @(negedge clk); check(tx_status == 8'h01, "CONTE during contention");
            tx_cancel = 1; @(negedge clk); tx_cancel = 0; end
    join
    check(st == 8'h10 && w < 0, "cancel in contention: CANCE, nothing sent");
    check(u_phy.tx_lens.size() == 9, "no frame sent after cancel in contention");

    // 7. cancel on air: early TXEND
    fork
      transmit(1, 6, 200, 0, w, st);
      begin repeat (60) @(negedge clk); check(tx_status == 8'h02, "ONGOI on air");
            tx_cancel = 1; @(negedge clk); tx_cancel = 0; end
    join
    check(st == 8'h10, "cancel on air: CANCE");
    check(u_phy.tx_early_end[9] && u_phy.tx_lens[9] < 200, "frame cut short by TXEND");

    // 8. receptions
    q = {};
    for (int i = 0; i < 50; i++) q.push_back(8'($urandom));
    f = crc32(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    u_phy.rx_frame(q, 0, 77);
    repeat (5) @(negedge clk);
    check(rx_q.size() == 1, "one rxReady pulse");
    if (rx_q.size() >= 1) begin
      bit ok; ok = 1;
      check(rx_q[0].status == 8'h00 && rx_q[0].id == 3 && rx_q[0].len == 54 && rx_q[0].rssi == 77,
            $sformatf("good frame report status %h len %0d", rx_q[0].status, rx_q[0].len));
      for (int i = 0; i < 54; i++) if (rxmem[3][i] != q[i]) ok = 0;
      check(ok, "received octets stored in the allocated slot");
      check(rx_q[0].tstamp <= rtc && rtc - rx_q[0].tstamp < 200, "receive timestamp");
    end
    check(allocs == 1, "one slot allocated");
    q[10] ^= 8'h40;
    u_phy.rx_frame(q, 0, 60);
    u_phy.rx_frame(q, 1, 60);
    rxmm_full = 1;
    q[10] ^= 8'h40;
    u_phy.rx_frame(q, 0, 60);
    u_phy.rx_frame(q, 1, 60);
    rxmm_full = 0;
    u_phy.rx_frame(q, 2, 60);
    u_phy.rx_frame(q, 3, 60);
    repeat (5) @(negedge clk);
    check(rx_q.size() == 7, $sformatf("%0d reports", rx_q.size()));
    if (rx_q.size() == 7) begin
      check(rx_q[1].status == 8'h12, $sformatf("CRC error 0x12 (%h)", rx_q[1].status));
      check(rx_q[2].status == 8'h22, $sformatf("carrier lost 0x22 (%h)", rx_q[2].status));
      check(rx_q[3].status == 8'h05, $sformatf("no memory 0x05 (%h)", rx_q[3].status));
      check(rx_q[4].status == 8'h27, $sformatf("carrier lost, no memory 0x27 (%h)", rx_q[4].status));
      check(rx_q[5].status == 8'h46 && rx_q[5].len == 0, $sformatf("format violation 0x46 (%h)", rx_q[5].status));
      check(rx_q[6].status == 8'h86 && rx_q[6].len == 0, $sformatf("unsupported rate 0x86 (%h)", rx_q[6].status));
    end
    check(allocs == 3, $sformatf("slots allocated only with memory and RXSTART (%0d)", allocs));

    // 9. channel change: 0 -> 2 -> 4 -> 1 -> 0 on a free medium
    begin
      logic [3:0] seq[$];
      @(negedge clk); cc_request = 1; cc_value = 8'd178; @(negedge clk); cc_request = 0;
      for (int i = 0; i < 40; i++) begin
        if (seq.size() == 0 || seq[$] != cc_status) seq.push_back(cc_status);
        @(negedge clk);
      end
      check(seq.size() == 4 && seq[0] == 2 && seq[1] == 4 && seq[2] == 1 && seq[3] == 0,
            "channel status sequence 2, 4, 1, 0");
      check(u_phy.chg_log.size() == 1 && u_phy.chg_log[0] == 178, "PHY tuned to 178");
    end
    // busy medium blocks, cancel while blocked
    medium_busy_tb = 1;
    @(negedge clk); cc_request = 1; cc_value = 8'd180; @(negedge clk); cc_request = 0;
    repeat (50) @(negedge clk);
    check(cc_status == 4'h2, "blocked while the medium is busy");
    cc_cancel = 1; @(negedge clk); cc_cancel = 0;
    check(cc_status == 4'h8, "CCCAN the cycle after cancel");
    @(negedge clk);
    check(cc_status == 4'h0 && u_phy.chg_log.size() == 1, "cancelled request never reaches the PHY");
    // blocked then released
    @(negedge clk); cc_request = 1; cc_value = 8'd172; @(negedge clk); cc_request = 0;
    repeat (30) @(negedge clk);
    check(cc_status == 4'h2 && u_phy.chg_log.size() == 1, "still blocked");
    medium_busy_tb = 0;
    repeat (40) @(negedge clk);
    check(u_phy.chg_log.size() == 2 && u_phy.chg_log[1] == 172, "deferred change done when free");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
