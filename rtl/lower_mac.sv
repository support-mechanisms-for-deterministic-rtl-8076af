// lower_mac -- the time-critical part of the 802.11p MAC for one radio,
// redesigned for deterministic medium access.
//
// Requests from the host arrive on a byte stream and are decoded by the
// command processor, which stores frames in two transmit memory banks
// (best effort, 8 slots of 2344 bytes; real time, 8 slots of 512 bytes) and
// queues them in the dispatcher. The dispatcher starts time-triggered frames
// when the RTC reaches their instant and best-effort frames under CSMA/CA,
// through the PHY abstraction layer, which also stores received frames in a
// third bank (8 slots of 2344 bytes) and performs channel changes. The CCA
// controller decides when the medium is busy (carrier sense on/off, RSSI
// threshold) and gates the ADC samples of the reception chain. The event
// handler sends transmit and receive events, with received data, back on a
// second byte stream, followed by a flush pulse per event.
//
// The set of modules and their roles follow the original architecture. The
// RTC is an input: the time keeping device that produces it is outside this
// design. Timing: see the individual modules; all run on one clock.
module lower_mac
  import lmac_pkg::*;
#(
  parameter int TICKS_PER_US  = 40,
  parameter int AIFSN         = 6,
  parameter int SLOTS         = 8,
  parameter int BE_SLOT_BYTES = 2344,
  parameter int TT_SLOT_BYTES = 512,
  parameter int RX_SLOT_BYTES = 2344
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [RTC_W-1:0]     rtc,
  // host link
  input  logic                 cmd_valid,
  input  logic [7:0]           cmd_data,
  output logic                 cmd_ready,
  output logic                 ev_valid,
  output logic [7:0]           ev_data,
  input  logic                 ev_ready,
  output logic                 ev_flush,
  // radio front end
  input  logic [RSSI_W-1:0]    rssi,
  input  logic [ADC_W-1:0]     adc_i_in,
  input  logic [ADC_W-1:0]     adc_q_in,
  output logic [ADC_W-1:0]     adc_i_out,
  output logic [ADC_W-1:0]     adc_q_out,
  // PHY primitives
  output logic                 phy_txstart_req,
  input  logic                 phy_txstart_cfm,
  output logic                 phy_txdata_req,
  input  logic                 phy_txdata_cfm,
  output logic                 phy_txend_req,
  input  logic                 phy_txend_cfm,
  output logic [PWR_W-1:0]     txvector_power,
  output logic [LEN_W-1:0]     txvector_length,
  output logic [RATE_W-1:0]    txvector_rate,
  output logic [7:0]           phy_txdata,
  input  logic                 phy_rxstart_ind,
  input  logic                 phy_rxdata_ind,
  input  logic [7:0]           phy_rxdata,
  input  logic                 phy_rxend_ind,
  input  logic [LEN_W-1:0]     rxvector_length,
  input  logic [RSSI_W-1:0]    rxvector_rssi,
  input  logic                 rxvector_formatviolation,
  input  logic                 rxvector_carrierlost,
  input  logic                 rxvector_unsupportedrate,
  input  logic                 phy_cca_ind,
  output logic                 phy_chg_channel_req,
  input  logic                 phy_chg_channel_cfm,
  output logic [CHAN_W-1:0]    chg_channel_vector_id,
  // observation
  output logic [7:0]           tx_status,
  output logic [3:0]           cc_status,
  output logic                 medium_busy,
  output logic [15:0]          dropped_count,
  output logic [15:0]          preempt_count,
  output logic [15:0]          rx_lost_count
);
  localparam int OFF_W = 12;

  // ---- command processor <-> banks / dispatcher
  logic be_alloc, tt_alloc, be_full, tt_full, be_we, tt_we;
  logic [2:0] be_alloc_id, tt_alloc_id, be_wr_id, tt_wr_id;
  logic [OFF_W-1:0] be_wr_off, tt_wr_off;
  logic [7:0] wr_data;
  logic be_push, tt_push, be_q_full, tt_q_full;
  tx_desc_t desc;
  logic cc_request;
  logic [CHAN_W-1:0] cc_value;
  logic cca_we, cca_cs_en;
  logic [RSSI_W-1:0] cca_threshold;

  command_processor #(.BE_SLOT_BYTES(BE_SLOT_BYTES), .TT_SLOT_BYTES(TT_SLOT_BYTES), .OFF_W(OFF_W)) u_cmd (
    .clk, .rst_n, .in_valid(cmd_valid), .in_data(cmd_data), .in_ready(cmd_ready),
    .be_alloc, .be_alloc_id, .be_mem_full(be_full), .be_we, .be_wr_id, .be_wr_off,
    .tt_alloc, .tt_alloc_id, .tt_mem_full(tt_full), .tt_we, .tt_wr_id, .tt_wr_off, .wr_data,
    .be_push, .tt_push, .desc, .be_q_full, .tt_q_full,
    .cc_request, .cc_value, .cca_we, .cca_cs_en, .cca_threshold, .dropped_count);

  // ---- memory banks
  logic [2:0] be_rd_id, tt_rd_id, be_rel_id, tt_rel_id, rx_rd_id, rx_rel_id, rx_alloc_id;
  logic [OFF_W-1:0] be_rd_off, tt_rd_off, rx_rd_off;
  logic [7:0] be_rd_data, tt_rd_data, rx_rd_data;
  logic be_release, tt_release, rx_release, rx_alloc, rx_full;
  logic rx_we;
  logic [2:0] rx_wr_id;
  logic [OFF_W-1:0] rx_wr_off;
  logic [7:0] rx_wr_data;

  memory_bank #(.SLOTS(SLOTS), .SLOT_BYTES(BE_SLOT_BYTES), .ID_W(3), .OFF_W(OFF_W)) u_be_bank (
    .clk, .rst_n, .alloc(be_alloc), .alloc_id(be_alloc_id), .full(be_full),
    .free(be_release), .rel_id(be_rel_id),
    .wr_en(be_we), .wr_id(be_wr_id), .wr_off(be_wr_off), .wr_data,
    .rd_id(be_rd_id), .rd_off(be_rd_off), .rd_data(be_rd_data));

  memory_bank #(.SLOTS(SLOTS), .SLOT_BYTES(TT_SLOT_BYTES), .ID_W(3), .OFF_W(OFF_W)) u_tt_bank (
    .clk, .rst_n, .alloc(tt_alloc), .alloc_id(tt_alloc_id), .full(tt_full),
    .free(tt_release), .rel_id(tt_rel_id),
    .wr_en(tt_we), .wr_id(tt_wr_id), .wr_off(tt_wr_off), .wr_data,
    .rd_id(tt_rd_id), .rd_off(tt_rd_off), .rd_data(tt_rd_data));

  memory_bank #(.SLOTS(SLOTS), .SLOT_BYTES(RX_SLOT_BYTES), .ID_W(3), .OFF_W(OFF_W)) u_rx_bank (
    .clk, .rst_n, .alloc(rx_alloc), .alloc_id(rx_alloc_id), .full(rx_full),
    .free(rx_release), .rel_id(rx_rel_id),
    .wr_en(rx_we), .wr_id(rx_wr_id), .wr_off(rx_wr_off), .wr_data(rx_wr_data),
    .rd_id(rx_rd_id), .rd_off(rx_rd_off), .rd_data(rx_rd_data));

  // ---- dispatcher <-> PHY shell
  logic tx_request, tx_cancel, tx_type;
  logic [2:0] tx_id, txmem_id;
  logic [LEN_W-1:0] tx_length;
  logic [PWR_W-1:0] tx_power;
  logic [RATE_W-1:0] tx_rate;
  logic [BACKOFF_W-1:0] tx_backoff;
  logic [RTC_W-1:0] tx_timestamp;
  logic [OFF_W-1:0] txmem_off;
  logic [7:0] txmem_data;
  logic txev_valid, txev_ready;
  tx_event_t txev;

  dispatcher #(.QDEPTH(SLOTS), .OFF_W(OFF_W)) u_disp (
    .clk, .rst_n, .rtc,
    .be_push, .be_desc(desc), .be_full(be_q_full),
    .tt_push, .tt_desc(desc), .tt_full(tt_q_full),
    .be_rd_id, .be_rd_off, .be_rd_data, .be_release, .be_rel_id,
    .tt_rd_id, .tt_rd_off, .tt_rd_data, .tt_release, .tt_rel_id,
    .tx_request, .tx_cancel, .tx_type, .tx_id, .tx_length, .tx_power, .tx_rate, .tx_backoff,
    .tx_status, .tx_timestamp, .txmem_id, .txmem_off, .txmem_data,
    .txev_valid, .txev, .txev_ready, .preempt_count);

  // ---- CCA controller
  logic cs_en_unused;
  logic [RSSI_W-1:0] threshold_unused;
  cca_controller u_cca (
    .clk, .rst_n, .cfg_we(cca_we), .cfg_cs_en(cca_cs_en), .cfg_threshold(cca_threshold),
    .rssi, .phy_carrier(phy_cca_ind), .adc_i_in, .adc_q_in, .adc_i_out, .adc_q_out,
    .busy(medium_busy), .cs_en(cs_en_unused), .threshold(threshold_unused));

  // ---- PHY abstraction layer
  logic rx_ready;
  rx_event_t rx_info;

  phy_abstraction_layer #(.TICKS_PER_US(TICKS_PER_US), .AIFSN(AIFSN),
                          .RX_SLOT_BYTES(RX_SLOT_BYTES), .OFF_W(OFF_W)) u_pal (
    .clk, .rst_n, .rtc, .medium_busy,
    .tx_request, .tx_cancel, .tx_type, .tx_id, .tx_length, .tx_power, .tx_rate, .tx_backoff,
    .tx_status, .tx_timestamp, .txmem_id, .txmem_off, .txmem_data,
    .rx_ready, .rx_info,
    .rxmm_alloc(rx_alloc), .rxmm_alloc_id(rx_alloc_id), .rxmm_full(rx_full),
    .rxmem_we(rx_we), .rxmem_id(rx_wr_id), .rxmem_off(rx_wr_off), .rxmem_data(rx_wr_data),
    .cc_request, .cc_cancel(1'b0), .cc_value, .cc_status,
    .phy_txstart_req, .phy_txstart_cfm, .phy_txdata_req, .phy_txdata_cfm,
    .phy_txend_req, .phy_txend_cfm, .txvector_power, .txvector_length, .txvector_rate,
    .phy_txdata, .phy_rxstart_ind, .phy_rxdata_ind, .phy_rxdata, .phy_rxend_ind,
    .rxvector_length, .rxvector_rssi, .rxvector_formatviolation, .rxvector_carrierlost,
    .rxvector_unsupportedrate, .phy_cca_ind,
    .phy_chg_channel_req, .phy_chg_channel_cfm, .chg_channel_vector_id);

  // ---- event handler
  event_handler #(.OFF_W(OFF_W)) u_ev (
    .clk, .rst_n, .txev_valid, .txev, .txev_ready, .rx_ready, .rx_info,
    .rd_id(rx_rd_id), .rd_off(rx_rd_off), .rd_data(rx_rd_data),
    .rel(rx_release), .rel_id(rx_rel_id),
    .out_valid(ev_valid), .out_data(ev_data), .out_ready(ev_ready), .out_flush(ev_flush),
    .rx_lost_count);
endmodule
