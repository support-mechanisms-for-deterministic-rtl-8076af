// dmac_top -- FPGA design of a two-radio 802.11p device whose MAC can be run
// deterministically from software on a host computer.
//
// Two Lower MACs, one per radio, talk to the host over a single USB link
// through MultiLink. Radio 0, meant for the control channel where
// deterministic MAC schemes run, uses the bounded-latency (interrupt
// endpoint) channel of link 0; radio 1, meant for the service channels, uses
// the high-throughput (bulk endpoint) channel of link 1. The two remaining
// channels (link 0 high-throughput, link 1 bounded-latency) are brought out
// as ports for other users of the USB link, such as GPS traffic or test
// tools. Each Lower MAC frames its events with a flush per event, so every
// event leaves in the next USB transfer.
//
// Outside this design, and connected through ports: the FX2LP USB controller
// (slave FIFO pins, IFCLK), the two OFDM PHYs (802.11 PHY primitives), the
// radio front ends (RSSI and ADC samples, which pass through the CCA
// controller's range-limiting gate) and the time keeping device (rtc, in
// microseconds).
//
// The radio-to-channel mapping follows the original driver architecture
// (bounded latency for one radio, high throughput for the other); the choice
// of which link each radio uses is this design's. Signals of radio r are
// element [r] of the per-radio port arrays.
module dmac_top
  import lmac_pkg::*;
#(
  parameter int TICKS_PER_US = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [RTC_W-1:0]          rtc,
  // ---- FX2LP slave FIFO interface
  input  logic                      ifclk,
  input  logic                      if_rst_n,
  input  logic [7:0]                fd_in,
  output logic [7:0]                fd_out,
  output logic                      fd_oe,
  output logic                      sloe,
  output logic                      slrd,
  output logic                      slwr,
  output logic                      pktend,
  output logic [1:0]                fifoadr,
  input  logic                      flaga_ep2_empty,
  input  logic                      flagb_ep4_empty,
  input  logic                      flagc_ep6_full,
  input  logic                      flagd_ep8_full,
  // ---- spare MultiLink channels: link 0 high-throughput, link 1 bounded-latency
  input  logic [1:0]                aux_tx_valid,
  input  logic [1:0][7:0]           aux_tx_data,
  output logic [1:0]                aux_tx_ready,
  input  logic [1:0]                aux_tx_flush,
  output logic [1:0]                aux_rx_valid,
  output logic [1:0][7:0]           aux_rx_data,
  input  logic [1:0]                aux_rx_ready,
  // ---- radio front ends
  input  logic [1:0][RSSI_W-1:0]    rssi,
  input  logic [1:0][ADC_W-1:0]     adc_i_in,
  input  logic [1:0][ADC_W-1:0]     adc_q_in,
  output logic [1:0][ADC_W-1:0]     adc_i_out,
  output logic [1:0][ADC_W-1:0]     adc_q_out,
  // ---- PHY primitives, per radio
  output logic [1:0]                phy_txstart_req,
  input  logic [1:0]                phy_txstart_cfm,
  output logic [1:0]                phy_txdata_req,
  input  logic [1:0]                phy_txdata_cfm,
  output logic [1:0]                phy_txend_req,
  input  logic [1:0]                phy_txend_cfm,
  output logic [1:0][PWR_W-1:0]     txvector_power,
  output logic [1:0][LEN_W-1:0]     txvector_length,
  output logic [1:0][RATE_W-1:0]    txvector_rate,
  output logic [1:0][7:0]           phy_txdata,
  input  logic [1:0]                phy_rxstart_ind,
  input  logic [1:0]                phy_rxdata_ind,
  input  logic [1:0][7:0]           phy_rxdata,
  input  logic [1:0]                phy_rxend_ind,
  input  logic [1:0][LEN_W-1:0]     rxvector_length,
  input  logic [1:0][RSSI_W-1:0]    rxvector_rssi,
  input  logic [1:0]                rxvector_formatviolation,
  input  logic [1:0]                rxvector_carrierlost,
  input  logic [1:0]                rxvector_unsupportedrate,
  input  logic [1:0]                phy_cca_ind,
  output logic [1:0]                phy_chg_channel_req,
  input  logic [1:0]                phy_chg_channel_cfm,
  output logic [1:0][CHAN_W-1:0]    chg_channel_vector_id,
  // ---- observation
  output logic [1:0][7:0]           tx_status,
  output logic [1:0][3:0]           cc_status,
  output logic [1:0]                medium_busy,
  output logic [1:0][15:0]          dropped_count,
  output logic [1:0][15:0]          preempt_count,
  output logic [1:0][15:0]          rx_lost_count,
  output logic [15:0]               grant_count [4],
  output logic [15:0]               int_frames_in,
  output logic [15:0]               bulk_frames_in,
  output logic [15:0]               bad_frames
);
  // MultiLink channels (index = link)
  logic [1:0]      int_tx_valid, int_tx_ready, int_tx_flush, int_rx_valid, int_rx_ready;
  logic [1:0][7:0] int_tx_data, int_rx_data;
  logic [1:0]      bulk_tx_valid, bulk_tx_ready, bulk_tx_flush, bulk_rx_valid, bulk_rx_ready;
  logic [1:0][7:0] bulk_tx_data, bulk_rx_data;

  // Lower MAC host-side streams (index = radio)
  logic [1:0]      cmd_valid, cmd_ready, ev_valid, ev_ready, ev_flush;
  logic [1:0][7:0] cmd_data, ev_data;

  usb_multilink #(.N_LINKS(2)) u_usb (
    .clk, .rst_n, .ifclk, .if_rst_n,
    .fd_in, .fd_out, .fd_oe, .sloe, .slrd, .slwr, .pktend, .fifoadr,
    .flaga_ep2_empty, .flagb_ep4_empty, .flagc_ep6_full, .flagd_ep8_full,
    .int_tx_valid, .int_tx_data, .int_tx_ready, .int_tx_flush,
    .int_rx_valid, .int_rx_data, .int_rx_ready,
    .bulk_tx_valid, .bulk_tx_data, .bulk_tx_ready, .bulk_tx_flush,
    .bulk_rx_valid, .bulk_rx_data, .bulk_rx_ready,
    .grant_count, .int_frames_in, .bulk_frames_in, .bad_frames);

  // radio 0 <-> link 0 bounded-latency channel
  assign int_tx_valid[0]  = ev_valid[0];
  assign int_tx_data[0]   = ev_data[0];
  assign int_tx_flush[0]  = ev_flush[0];
  assign ev_ready[0]      = int_tx_ready[0];
  assign cmd_valid[0]     = int_rx_valid[0];
  assign cmd_data[0]      = int_rx_data[0];
  assign int_rx_ready[0]  = cmd_ready[0];
  // radio 1 <-> link 1 high-throughput channel
  assign bulk_tx_valid[1] = ev_valid[1];
  assign bulk_tx_data[1]  = ev_data[1];
  assign bulk_tx_flush[1] = ev_flush[1];
  assign ev_ready[1]      = bulk_tx_ready[1];
  assign cmd_valid[1]     = bulk_rx_valid[1];
  assign cmd_data[1]      = bulk_rx_data[1];
  assign bulk_rx_ready[1] = cmd_ready[1];
  // spare channels: [0] = link 0 high-throughput, [1] = link 1 bounded-latency
  assign bulk_tx_valid[0] = aux_tx_valid[0];
  assign bulk_tx_data[0]  = aux_tx_data[0];
  assign bulk_tx_flush[0] = aux_tx_flush[0];
  assign aux_tx_ready[0]  = bulk_tx_ready[0];
  assign aux_rx_valid[0]  = bulk_rx_valid[0];
  assign aux_rx_data[0]   = bulk_rx_data[0];
  assign bulk_rx_ready[0] = aux_rx_ready[0];
  assign int_tx_valid[1]  = aux_tx_valid[1];
  assign int_tx_data[1]   = aux_tx_data[1];
  assign int_tx_flush[1]  = aux_tx_flush[1];
  assign aux_tx_ready[1]  = int_tx_ready[1];
  assign aux_rx_valid[1]  = int_rx_valid[1];
  assign aux_rx_data[1]   = int_rx_data[1];
  assign int_rx_ready[1]  = aux_rx_ready[1];

  for (genvar r = 0; r < 2; r++) begin : g_radio
    lower_mac #(.TICKS_PER_US(TICKS_PER_US)) u_lmac (
      .clk, .rst_n, .rtc,
      .cmd_valid(cmd_valid[r]), .cmd_data(cmd_data[r]), .cmd_ready(cmd_ready[r]),
      .ev_valid(ev_valid[r]), .ev_data(ev_data[r]), .ev_ready(ev_ready[r]), .ev_flush(ev_flush[r]),
      .rssi(rssi[r]), .adc_i_in(adc_i_in[r]), .adc_q_in(adc_q_in[r]),
      .adc_i_out(adc_i_out[r]), .adc_q_out(adc_q_out[r]),
      .phy_txstart_req(phy_txstart_req[r]), .phy_txstart_cfm(phy_txstart_cfm[r]),
      .phy_txdata_req(phy_txdata_req[r]), .phy_txdata_cfm(phy_txdata_cfm[r]),
      .phy_txend_req(phy_txend_req[r]), .phy_txend_cfm(phy_txend_cfm[r]),
      .txvector_power(txvector_power[r]), .txvector_length(txvector_length[r]),
      .txvector_rate(txvector_rate[r]), .phy_txdata(phy_txdata[r]),
      .phy_rxstart_ind(phy_rxstart_ind[r]), .phy_rxdata_ind(phy_rxdata_ind[r]),
      .phy_rxdata(phy_rxdata[r]), .phy_rxend_ind(phy_rxend_ind[r]),
      .rxvector_length(rxvector_length[r]), .rxvector_rssi(rxvector_rssi[r]),
      .rxvector_formatviolation(rxvector_formatviolation[r]),
      .rxvector_carrierlost(rxvector_carrierlost[r]),
      .rxvector_unsupportedrate(rxvector_unsupportedrate[r]),
      .phy_cca_ind(phy_cca_ind[r]),
      .phy_chg_channel_req(phy_chg_channel_req[r]), .phy_chg_channel_cfm(phy_chg_channel_cfm[r]),
      .chg_channel_vector_id(chg_channel_vector_id[r]),
      .tx_status(tx_status[r]), .cc_status(cc_status[r]), .medium_busy(medium_busy[r]),
      .dropped_count(dropped_count[r]), .preempt_count(preempt_count[r]),
      .rx_lost_count(rx_lost_count[r]));
  end
endmodule
