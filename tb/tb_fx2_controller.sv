// tb_fx2_controller -- checks the FX2LP slave FIFO master against the
// behavioural FX2LP model. With all four endpoints requesting at once the
// grants must follow the fixed priority EP8, EP4, EP6, EP2; OUT bytes must
// reach the local FIFOs in order, also while the local FIFO applies back
// pressure; IN frames must reach the host intact, frames shorter than a USB
// packet committed with PKTEND and a frame of exactly 512 bytes without it;
// the FD bus must never be driven from both sides.
module tb_fx2_controller;
  logic ifclk = 0, rst_n = 0;
  logic [7:0] fd_in, fd_out;
  logic fd_oe, sloe, slrd, slwr, pktend;
  logic [1:0] fifoadr;
  logic fa, fb, fc, fdf;
  logic int_out_wr, bulk_out_wr, int_in_rd, bulk_in_rd;
  logic [7:0] int_out_data, bulk_out_data;
  logic int_out_full = 0, bulk_out_full = 0;
  logic [8:0] int_in_data = 0, bulk_in_data = 0;
  logic int_in_empty = 1, bulk_in_empty = 1;
  logic [15:0] grant_count [4];

  fx2_controller dut (.ifclk, .rst_n, .fd_in, .fd_out, .fd_oe, .sloe, .slrd, .slwr, .pktend, .fifoadr,
    .flaga_ep2_empty(fa), .flagb_ep4_empty(fb), .flagc_ep6_full(fc), .flagd_ep8_full(fdf),
    .int_out_wr, .int_out_data, .int_out_full, .bulk_out_wr, .bulk_out_data, .bulk_out_full,
    .int_in_rd, .int_in_data, .int_in_empty, .bulk_in_rd, .bulk_in_data, .bulk_in_empty, .grant_count);

  fx2lp_model #(.DRAIN(20)) u_fx2 (.ifclk, .fifoadr, .sloe, .slrd, .slwr, .pktend, .fd_out, .fd_oe, .fd_in,
    .flaga_ep2_empty(fa), .flagb_ep4_empty(fb), .flagc_ep6_full(fc), .flagd_ep8_full(fdf));

  always #16 ifclk = ~ifclk;

  // local FIFO models
  logic [8:0] in_q[2][$];
  byte unsigned got_out[2][$];
  always @(posedge ifclk) begin
    if (int_out_wr)  begin if (int_out_full) failures++; got_out[0].push_back(int_out_data); end
    if (bulk_out_wr) begin if (bulk_out_full) failures++; got_out[1].push_back(bulk_out_data); end
    if (int_in_rd)  void'(in_q[0].pop_front());
    if (bulk_in_rd) void'(in_q[1].pop_front());
    int_in_empty  <= (in_q[0].size() == 0);
    bulk_in_empty <= (in_q[1].size() == 0);
    int_in_data   <= (in_q[0].size() != 0) ? in_q[0][0] : 9'h0;
    bulk_in_data  <= (in_q[1].size() != 0) ? in_q[1][0] : 9'h0;
  end

  // grant log
  int glog[$];
  logic [15:0] gprev [4];
  always @(posedge ifclk) begin
    for (int i = 0; i < 4; i++) begin
      if (rst_n && grant_count[i] != gprev[i]) glog.push_back(i);
      gprev[i] = grant_count[i];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  initial begin
    repeat (200000) @(posedge ifclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned ref_out[2][$], ref_in[2][$];
  task automatic load_in(input int e, input int n);
    for (int i = 0; i < n; i++) begin
      byte unsigned b = 8'($urandom);
      in_q[e].push_back({1'(i == n - 1), b});
      ref_in[e].push_back(b);
    end
  endtask
  task automatic load_out(input int e, input int n);
    byte unsigned q[$];
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    u_fx2.send(e, q);
    foreach (q[i]) ref_out[e].push_back(q[i]);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) gprev[i] = 0;
    repeat (3) @(negedge ifclk);
    rst_n = 1;
    // all four at once
    load_out(0, 20); load_out(1, 300); load_in(0, 50); load_in(1, 100);
    repeat (1500) @(negedge ifclk);
    check(glog.size() >= 4 && glog[0] == 3 && glog[1] == 1 && glog[2] == 2 && glog[3] == 0,
          "grant order EP8, EP4, EP6, EP2");
    check(u_fx2.pktend_count == 2, $sformatf("two short frames committed with PKTEND (%0d)", u_fx2.pktend_count));
    check(u_fx2.pkt_sizes[0].size() == 1 && u_fx2.pkt_sizes[0][0] == 50, "EP6 packet of 50");
    check(u_fx2.pkt_sizes[1].size() == 1 && u_fx2.pkt_sizes[1][0] == 100, "EP8 packet of 100");
    // exactly one full packet: no PKTEND
    load_in(1, 512);
    repeat (1500) @(negedge ifclk);
    check(u_fx2.pktend_count == 2, "a 512-byte frame is committed without PKTEND");
    check(u_fx2.pkt_sizes[1].size() == 2 && u_fx2.pkt_sizes[1][1] == 512, "EP8 packet of 512");
    // back pressure on every path
    load_out(0, 700); load_out(1, 900); load_in(0, 600); load_in(1, 333);
    for (int i = 0; i < 6000; i++) begin
      @(negedge ifclk);
      int_out_full  = ($urandom % 4) == 0;
      bulk_out_full = ($urandom % 3) == 0;
      u_fx2.hold[0] = ($urandom % 5) == 0;
      u_fx2.hold[1] = ($urandom % 7) == 0;
    end
    int_out_full = 0; bulk_out_full = 0; u_fx2.hold[0] = 0; u_fx2.hold[1] = 0;
    repeat (3000) @(negedge ifclk);
    for (int e = 0; e < 2; e++) begin
      check(got_out[e] == ref_out[e], $sformatf("OUT endpoint %0d bytes in order (%0d of %0d)", e,
            got_out[e].size(), ref_out[e].size()));
      check(u_fx2.in_bytes[e] == ref_in[e], $sformatf("IN endpoint %0d bytes in order (%0d of %0d)", e,
            u_fx2.in_bytes[e].size(), ref_in[e].size()));
    end
    check(u_fx2.bus_errors == 0, "no bus protocol errors");
    check(u_fx2.pktend_count == 4, $sformatf("PKTEND count %0d", u_fx2.pktend_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
