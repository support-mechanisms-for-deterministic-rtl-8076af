// tb_usb_multilink -- runs the FPGA side of MultiLink (FX2LP controller,
// clock-crossing FIFOs, MultiLink controller) against the FX2LP model, with
// the system clock and IFCLK unrelated. The host sends framed data for both
// links on both OUT endpoints; on the FPGA side every channel echoes what it
// receives, flushing at the end of each received frame, so the host must get
// every byte back on the matching IN endpoint, framed with the same link ID.
// Checks data and order per channel, frame well-formedness, short packets
// committed with PKTEND and the bus protocol. Finally a short message is
// timed through the interrupt channel: the FPGA's share of the round trip,
// host model drain included, must stay under 20 us, a small part of the
// millisecond the whole USB path may take.
module tb_usb_multilink;
  localparam int N = 2;
  logic clk = 0, rst_n = 0, ifclk = 0, if_rst_n = 0;
  logic [7:0] fd_in, fd_out;
  logic fd_oe, sloe, slrd, slwr, pktend;
  logic [1:0] fifoadr;
  logic fa, fb, fc, fdf;
  logic [N-1:0] int_tx_valid, int_tx_ready, int_tx_flush, int_rx_valid, int_rx_ready;
  logic [N-1:0][7:0] int_tx_data, int_rx_data;
  logic [N-1:0] bulk_tx_valid, bulk_tx_ready, bulk_tx_flush, bulk_rx_valid, bulk_rx_ready;
  logic [N-1:0][7:0] bulk_tx_data, bulk_rx_data;
  logic [15:0] grant_count [4];
  logic [15:0] int_frames_in, bulk_frames_in, bad_frames;

  usb_multilink #(.N_LINKS(N)) dut (.clk, .rst_n, .ifclk, .if_rst_n, .fd_in, .fd_out, .fd_oe, .sloe, .slrd,
    .slwr, .pktend, .fifoadr, .flaga_ep2_empty(fa), .flagb_ep4_empty(fb), .flagc_ep6_full(fc),
    .flagd_ep8_full(fdf), .int_tx_valid, .int_tx_data, .int_tx_ready, .int_tx_flush,
    .int_rx_valid, .int_rx_data, .int_rx_ready, .bulk_tx_valid, .bulk_tx_data, .bulk_tx_ready,
    .bulk_tx_flush, .bulk_rx_valid, .bulk_rx_data, .bulk_rx_ready, .grant_count,
    .int_frames_in, .bulk_frames_in, .bad_frames);

  fx2lp_model u_fx2 (.ifclk, .fifoadr, .sloe, .slrd, .slwr, .pktend, .fd_out, .fd_oe, .fd_in,
    .flaga_ep2_empty(fa), .flagb_ep4_empty(fb), .flagc_ep6_full(fc), .flagd_ep8_full(fdf));

  always #5 clk = ~clk;
  always #17 ifclk = ~ifclk;

  // echo: each channel loops back, flushing when its input has been idle for a while
  assign int_tx_valid  = int_rx_valid;
  assign int_tx_data   = int_rx_data;
  assign int_rx_ready  = int_tx_ready;
  assign bulk_tx_valid = bulk_rx_valid;
  assign bulk_tx_data  = bulk_rx_data;
  assign bulk_rx_ready = bulk_tx_ready;
  int idle[2][N];
  always_ff @(posedge clk) for (int l = 0; l < N; l++) begin
    idle[0][l] <= int_rx_valid[l] ? 0 : idle[0][l] + 1;
    idle[1][l] <= bulk_rx_valid[l] ? 0 : idle[1][l] + 1;
  end
  always_comb for (int l = 0; l < N; l++) begin
    int_tx_flush[l]  = idle[0][l] == 20;
    bulk_tx_flush[l] = idle[1][l] == 20;
  end

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

  byte unsigned sent[2][N][$];
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1; if_rst_n = 1;
    for (int f = 0; f < 24; f++) begin
      int ep, id, sz;
      byte unsigned fr[$];
      ep = f % 2; id = (f / 2) % N; sz = 1 + $urandom % (ep ? 500 : 60);
      fr = {8'(id), 8'(sz >> 8), 8'(sz)};
      for (int i = 0; i < sz; i++) begin
        byte unsigned b = 8'($urandom);
        fr.push_back(b); sent[ep][id].push_back(b);
      end
      u_fx2.send(ep, fr);
    end
    repeat (150000) @(negedge clk);
    for (int e = 0; e < 2; e++) begin
      byte unsigned got[N][$];
      int i, bad;
      i = 0; bad = 0;
      for (int l = 0; l < N; l++) got[l] = {};
      while (i + 3 <= u_fx2.in_bytes[e].size()) begin
        int id, sz;
        id = u_fx2.in_bytes[e][i]; sz = {u_fx2.in_bytes[e][i+1], u_fx2.in_bytes[e][i+2]};
        if (id >= N || sz == 0 || sz > 509) bad++;
        for (int k = 0; k < sz; k++) got[id % N].push_back(u_fx2.in_bytes[e][i + 3 + k]);
        i += 3 + sz;
      end
      check(bad == 0 && i == u_fx2.in_bytes[e].size(), $sformatf("endpoint %0d frames well formed", e));
      for (int l = 0; l < N; l++)
        check(got[l] == sent[e][l], $sformatf("endpoint pair %0d link %0d echoed (%0d of %0d bytes)", e, l,
              got[l].size(), sent[e][l].size()));
    end
    // bounded-latency channel: one short message on the interrupt endpoints,
    // timed from the host queueing it until the echo reaches the host. The
    // host model drains an IN packet DRAIN IFCLK cycles after its commit.
    begin
      int n0;
      longint t0, t1;
      n0 = u_fx2.in_bytes[0].size();
      t0 = longint'($time);
      u_fx2.send(0, '{8'd0, 8'd0, 8'd4, 8'h11, 8'h22, 8'h33, 8'h44});
      while (u_fx2.in_bytes[0].size() < n0 + 7 && longint'($time) - t0 < 1000000) @(posedge ifclk);
      t1 = longint'($time);
      $display("interrupt channel round trip through the FPGA: %0d ns", t1 - t0);
      check(u_fx2.in_bytes[0].size() == n0 + 7
            && u_fx2.in_bytes[0][n0 + 3] == 8'h11 && u_fx2.in_bytes[0][n0 + 6] == 8'h44,
            "short message echoed on the interrupt channel");
      check(t1 - t0 < 20000, "interrupt channel round trip under 20 us");
    end
    check(u_fx2.pktend_count > 0, "short packets committed with PKTEND");
    check(u_fx2.bus_errors == 0 && bad_frames == 0, "bus protocol and frame IDs");
    check(grant_count[0] != 0 && grant_count[1] != 0 && grant_count[2] != 0 && grant_count[3] != 0,
          "all four endpoints served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
