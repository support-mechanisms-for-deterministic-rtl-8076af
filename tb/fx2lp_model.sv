// fx2lp_model -- behavioural model of the FX2LP USB controller as seen from
// its synchronous slave FIFO pins, with the host computer behind it.
// Not synthesizable; used by the testbenches only.
//
// OUT endpoints (EP2 interrupt, EP4 bulk) hold byte queues that a testbench
// fills with send(); FLAGA/FLAGB report them empty. FD carries the head byte
// of the endpoint selected by FIFOADR and SLRD on a rising IFCLK edge pops
// it. IN endpoints (EP6 interrupt, EP8 bulk) collect bytes written with SLWR
// into a packet that is committed when it reaches 512 bytes or on PKTEND;
// committed packets go to the host after DRAIN cycles each, and FLAGC/FLAGD
// report full while two packets wait (double buffering) or while a testbench
// sets hold[]. Flags and FD are registered, so they change one IFCLK cycle
// after the access that changes them, as with the real part's flag latency.
// The host side keeps the concatenated IN bytes per endpoint (in_bytes),
// the committed packet sizes (pkt_sizes) and the number of PKTEND commits.
module fx2lp_model #(
  parameter int PKT   = 512,
  parameter int DRAIN = 40
) (
  input  logic       ifclk,
  input  logic [1:0] fifoadr,
  input  logic       sloe,
  input  logic       slrd,
  input  logic       slwr,
  input  logic       pktend,
  input  logic [7:0] fd_out,
  input  logic       fd_oe,
  output logic [7:0] fd_in,
  output logic       flaga_ep2_empty,
  output logic       flagb_ep4_empty,
  output logic       flagc_ep6_full,
  output logic       flagd_ep8_full
);
  byte unsigned out_q [2][$];    // 0: EP2, 1: EP4
  byte unsigned cur   [2][$];    // packet being filled, 0: EP6, 1: EP8
  int           pend  [2][$];    // committed packet sizes waiting for the host
  byte unsigned pend_b[2][$];
  byte unsigned in_bytes [2][$];
  int           pkt_sizes[2][$];
  int           pktend_count = 0, bus_errors = 0;
  bit           hold[2] = '{0, 0};
  int           drain_cnt[2] = '{0, 0};

  initial begin
    fd_in = 0; flaga_ep2_empty = 1; flagb_ep4_empty = 1; flagc_ep6_full = 0; flagd_ep8_full = 0;
  end

  task automatic send(input int ep_out, input byte unsigned b[$]);
    foreach (b[i]) out_q[ep_out].push_back(b[i]);
  endtask

  task automatic commit(input int e);
    pend[e].push_back(cur[e].size());
    foreach (cur[e][i]) pend_b[e].push_back(cur[e][i]);
    cur[e] = {};
  endtask

  always @(posedge ifclk) begin
    int o, e;
    if (sloe && fd_oe) bus_errors++;
    if (slrd) begin
      o = int'(fifoadr[0]);
      if (fifoadr[1] || !sloe || out_q[o].size() == 0) bus_errors++;
      else void'(out_q[o].pop_front());
    end
    if (slwr) begin
      e = int'(fifoadr[0]);
      if (!fifoadr[1] || !fd_oe || pend[e].size() >= 2) bus_errors++;
      else begin
        cur[e].push_back(fd_out);
        if (cur[e].size() == PKT) commit(e);
      end
    end
    if (pktend) begin
      e = int'(fifoadr[0]);
      if (!fifoadr[1]) bus_errors++;
      else begin pktend_count++; commit(e); end
    end
    for (int k = 0; k < 2; k++) begin
      if (pend[k].size() != 0 && !hold[k]) begin
        if (drain_cnt[k] == DRAIN) begin
          int n;
          drain_cnt[k] = 0;
          n = pend[k].pop_front();
          pkt_sizes[k].push_back(n);
          for (int i = 0; i < n; i++) in_bytes[k].push_back(pend_b[k].pop_front());
        end else drain_cnt[k]++;
      end
    end
    flaga_ep2_empty <= (out_q[0].size() == 0);
    flagb_ep4_empty <= (out_q[1].size() == 0);
    flagc_ep6_full  <= (pend[0].size() >= 2) || hold[0];
    flagd_ep8_full  <= (pend[1].size() >= 2) || hold[1];
    o = int'(fifoadr[0]);
    fd_in <= (out_q[o].size() != 0) ? out_q[o][0] : 8'h00;
  end
endmodule
