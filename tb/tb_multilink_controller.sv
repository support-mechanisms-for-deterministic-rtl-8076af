// tb_multilink_controller -- checks the MultiLink framing between four user
// channels (two links, each with a bounded-latency and a high-throughput
// channel) and the four endpoint FIFOs. Upstream, random byte streams with
// random flush pulses are written on every channel while the IN endpoints
// apply random back pressure; the endpoint streams are parsed as
// ID | SIZE(2) | DATA frames, each frame must be at most 512 bytes, carry
// the last-byte mark exactly on its final byte, and the data of each link
// must come back in order. A link with a full payload must be sent without
// a flush. Downstream, frames for both links and for an unknown link are
// fed into the OUT endpoints; each link must receive its own bytes and the
// unknown frame must be counted and discarded.
module tb_multilink_controller;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] int_tx_valid = 0, int_tx_ready, int_tx_flush = 0, int_rx_valid, int_rx_ready = '1;
  logic [N-1:0][7:0] int_tx_data = 0, int_rx_data;
  logic [N-1:0] bulk_tx_valid = 0, bulk_tx_ready, bulk_tx_flush = 0, bulk_rx_valid, bulk_rx_ready = '1;
  logic [N-1:0][7:0] bulk_tx_data = 0, bulk_rx_data;
  logic ep6_wr, ep8_wr, ep2_rd, ep4_rd;
  logic [8:0] ep6_data, ep8_data;
  logic ep6_full = 0, ep8_full = 0;
  logic [7:0] ep2_data = 0, ep4_data = 0;
  logic ep2_empty = 1, ep4_empty = 1;
  logic [15:0] int_frames_in, bulk_frames_in, bad_frames;

  multilink_controller #(.N_LINKS(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // endpoint models; index 0: interrupt, 1: bulk
  logic [8:0] in_ep[2][$];
  byte unsigned out_ep[2][$];
  always @(posedge clk) begin
    if (rst_n && ep6_wr) in_ep[0].push_back(ep6_data);
    if (rst_n && ep8_wr) in_ep[1].push_back(ep8_data);
    if (ep2_rd) void'(out_ep[0].pop_front());
    if (ep4_rd) void'(out_ep[1].pop_front());
    ep2_empty <= out_ep[0].size() == 0;
    ep4_empty <= out_ep[1].size() == 0;
    ep2_data  <= out_ep[0].size() != 0 ? out_ep[0][0] : 8'h0;
    ep4_data  <= out_ep[1].size() != 0 ? out_ep[1][0] : 8'h0;
  end

  // received user bytes, [channel][link]
  byte unsigned rx_got[2][N][$];
  always @(posedge clk) if (rst_n) for (int l = 0; l < N; l++) begin
    if (int_rx_valid[l] && int_rx_ready[l])   rx_got[0][l].push_back(int_rx_data[l]);
    if (bulk_rx_valid[l] && bulk_rx_ready[l]) rx_got[1][l].push_back(bulk_rx_data[l]);
  end

  byte unsigned tx_ref[2][N][$];
  int bad_last = 0, too_long = 0;
  // parse an endpoint stream into per-link data
  task automatic parse(input int c, output byte unsigned got[N][$], output int frames);
    int i; frames = 0;
    i = 0;
    while (i + 3 <= in_ep[c].size()) begin
      int id, sz;
      id = int'(in_ep[c][i][7:0]); sz = {in_ep[c][i+1][7:0], in_ep[c][i+2][7:0]};
      if (sz + 3 > 512) too_long++;
      for (int k = 0; k < 3; k++) if (in_ep[c][i+k][8]) bad_last++;
      for (int k = 0; k < sz; k++) begin
        if (in_ep[c][i+3+k][8] != (k == sz - 1)) bad_last++;
        if (id < N) got[id].push_back(in_ep[c][i+3+k][7:0]);
      end
      i += 3 + sz; frames++;
    end
  endtask

  initial begin
    byte unsigned got[N][$];
    int frames;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one full payload on link 1 bulk, no flush: sent on its own
    for (int k = 0; k < 509; k++) begin
      @(negedge clk);
      bulk_tx_valid = 2'b10; bulk_tx_data[1] = 8'(k);
      tx_ref[1][1].push_back(8'(k));
    end
    @(negedge clk); bulk_tx_valid = 0;
    repeat (600) @(negedge clk);
    check(bulk_frames_in == 1, "a full payload is sent without a flush");
    check(in_ep[1].size() == 512 && in_ep[1][511][8], "frame of exactly 512 bytes, last byte marked");
    // random traffic with flushes and back pressure
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      ep6_full = ($urandom % 4) == 0;
      ep8_full = ($urandom % 6) == 0;
      int_tx_flush = 0; bulk_tx_flush = 0;
      for (int l = 0; l < N; l++) begin
        int_tx_valid[l] = 0; bulk_tx_valid[l] = 0;
        if (($urandom % 8) == 0 && int_tx_ready[l]) begin
          int_tx_valid[l] = 1; int_tx_data[l] = 8'($urandom); tx_ref[0][l].push_back(int_tx_data[l]);
        end
        if (($urandom % 2) == 0 && bulk_tx_ready[l]) begin
          bulk_tx_valid[l] = 1; bulk_tx_data[l] = 8'($urandom); tx_ref[1][l].push_back(bulk_tx_data[l]);
        end
        if (($urandom % 64) == 0) int_tx_flush[l] = 1;
        if (($urandom % 400) == 0) bulk_tx_flush[l] = 1;
      end
    end
    @(negedge clk);
    int_tx_valid = 0; bulk_tx_valid = 0; ep6_full = 0; ep8_full = 0;
    int_tx_flush = '1; bulk_tx_flush = '1;
    @(negedge clk); int_tx_flush = 0; bulk_tx_flush = 0;
    repeat (5000) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      parse(c, got, frames);
      for (int l = 0; l < N; l++)
        check(got[l] == tx_ref[c][l], $sformatf("upstream channel %0d link %0d: %0d of %0d bytes", c, l,
              got[l].size(), tx_ref[c][l].size()));
      check(frames == (c == 0 ? int_frames_in : bulk_frames_in), "frame counter");
      got[0] = {}; got[1] = {};
    end
    check(bad_last == 0, "last-byte marks only on the final byte of each frame");
    check(too_long == 0, "no frame longer than 512 bytes");
    // downstream
    begin
      byte unsigned ref_rx[2][N][$];
      for (int f = 0; f < 40; f++) begin
        int c, id, sz;
        c = f % 2; id = (f % 7 == 6) ? 5 : ($urandom % N); sz = 1 + $urandom % 300;
        out_ep[c].push_back(8'(id)); out_ep[c].push_back(8'(sz >> 8)); out_ep[c].push_back(8'(sz));
        for (int k = 0; k < sz; k++) begin
          byte unsigned b = 8'($urandom);
          out_ep[c].push_back(b);
          if (id < N) ref_rx[c][id].push_back(b);
        end
      end
      for (int t = 0; t < 20000; t++) begin
        @(negedge clk);
        int_rx_ready = 2'($urandom); bulk_rx_ready = 2'($urandom);
      end
      int_rx_ready = '1; bulk_rx_ready = '1;
      repeat (100) @(negedge clk);
      for (int c = 0; c < 2; c++) for (int l = 0; l < N; l++)
        check(rx_got[c][l] == ref_rx[c][l], $sformatf("downstream channel %0d link %0d: %0d of %0d bytes",
              c, l, rx_got[c][l].size(), ref_rx[c][l].size()));
      check(bad_frames == 5, $sformatf("frames for an unknown link discarded (%0d)", bad_frames));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
