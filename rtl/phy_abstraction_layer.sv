// phy_abstraction_layer -- shell around the 802.11p PHY primitives.
//
// Three independent engines share the PHY:
//
// Transmission (txRequest group). A request names a slot of the transmit
// memory and the transmission parameters. A non real-time request (txType 0)
// runs CSMA/CA: the medium must be free for AIFS = aSIFSTime + AIFSN *
// aSlotTime, then for a random number of 13 us slots drawn from
// [0, txBackoffSlots]; a busy medium restarts the AIFS wait and freezes the
// remaining count. txStatus shows CONTE meanwhile. A real-time request
// (txType 1) skips every wait: it fails at once (FAILE) if the medium is busy
// and otherwise starts the PHY transmission in the next cycle. During the
// transmission (ONGOI) the frame is read from memory one octet at a time,
// handed to PHY_TXDATA and followed by the four FCS octets computed on the
// fly. txTimeStamp is the RTC value when PHY_TXSTART is confirmed. txCancel
// ends contention at once, or ends an ongoing transmission with an early
// PHY_TXEND; CANCE then shows for one cycle. SUCCS, FAILE and CANCE each
// show for exactly one cycle; a request while not idle is ignored.
//
// Reception (rxReady group). PHY_RXSTART allocates a slot of the receive
// memory; every PHY_RXDATA octet is stored and folded into the FCS check;
// PHY_RXEND produces one rxReady pulse with the status, slot, length
// (RXVECTOR length, FCS included), RSSI and the RTC value latched when the
// receiver's carrier indication rose. An RXEND without RXSTART (format
// violation, unsupported rate) is reported with length 0 and IDINV.
//
// Channel change (configChannel group). A request first shows CCBLK until the
// medium is free and no frame is being sent or received, then CCONG while
// PHY_CHG_CHANNEL is requested, then CCCPL for one cycle. configChannelCancel
// while blocked ends the request on the next cycle with CCCAN for one cycle.
//
// PHY handshake (this design's choice): every *_req is held, with its vector
// and data, until the PHY returns the matching one-cycle *_cfm. Indications
// from the PHY are one-cycle pulses; rxdata_ind validates phy_rxdata.
//
// The status encodings, one-hot txStatus, request/cancel semantics, the
// real-time bypass, the deferred channel change and the rxStatus error rules
// follow the original interface description; the AIFS rule, the LFSR draw of
// the backoff and the clock rate are this design's choices.
module phy_abstraction_layer
  import lmac_pkg::*;
#(
  parameter int TICKS_PER_US = 40,    // system clock cycles per microsecond
  parameter int AIFSN        = 6,     // AC_BE of the OCB EDCA set
  parameter int RX_SLOT_BYTES = 2344,
  parameter int OFF_W        = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [RTC_W-1:0]     rtc,
  input  logic                 medium_busy,      // from the CCA controller
  // ---- transmission group
  input  logic                 tx_request,
  input  logic                 tx_cancel,
  input  logic                 tx_type,          // 0 non real-time, 1 real-time
  input  logic [2:0]           tx_id,
  input  logic [LEN_W-1:0]     tx_length,        // octets, FCS excluded
  input  logic [PWR_W-1:0]     tx_power,
  input  logic [RATE_W-1:0]    tx_rate,
  input  logic [BACKOFF_W-1:0] tx_backoff,
  output logic [7:0]           tx_status,
  output logic [RTC_W-1:0]     tx_timestamp,
  // ---- transmit memory read port (one cycle latency)
  output logic [2:0]           txmem_id,
  output logic [OFF_W-1:0]     txmem_off,
  input  logic [7:0]           txmem_data,
  // ---- reception group
  output logic                 rx_ready,
  output rx_event_t            rx_info,
  // ---- receive memory manager and write port
  output logic                 rxmm_alloc,
  input  logic [2:0]           rxmm_alloc_id,
  input  logic                 rxmm_full,
  output logic                 rxmem_we,
  output logic [2:0]           rxmem_id,
  output logic [OFF_W-1:0]     rxmem_off,
  output logic [7:0]           rxmem_data,
  // ---- channel configuration group
  input  logic                 cc_request,
  input  logic                 cc_cancel,
  input  logic [CHAN_W-1:0]    cc_value,
  output logic [3:0]           cc_status,
  // ---- PHY
  output logic                 phy_txstart_req,
  input  logic                 phy_txstart_cfm,
  output logic                 phy_txdata_req,
  input  logic                 phy_txdata_cfm,
  output logic                 phy_txend_req,
  input  logic                 phy_txend_cfm,
  output logic [PWR_W-1:0]     txvector_power,
  output logic [LEN_W-1:0]     txvector_length,  // FCS included
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
  output logic [CHAN_W-1:0]    chg_channel_vector_id
);
  localparam int SLOT_TICKS = SLOT_US * TICKS_PER_US;
  localparam int AIFS_TICKS = (SIFS_US + AIFSN * SLOT_US) * TICKS_PER_US;
  localparam int TW = $clog2(AIFS_TICKS + SLOT_TICKS + 1);

  // ================================================================ TX
  typedef enum logic [3:0] {
    T_IDLE, T_AIFS, T_BACKOFF, T_START, T_FETCH, T_LOAD, T_SEND, T_FCS,
    T_END, T_ABORT, T_SUCC, T_FAIL, T_CANC
  } tx_state_e;
  tx_state_e ts;

  logic [2:0]           t_id;
  logic [LEN_W-1:0]     t_len, t_idx;
  logic [PWR_W-1:0]     t_pwr;
  logic [RATE_W-1:0]    t_rate;
  logic [BACKOFF_W-1:0] t_bo_left;
  logic [TW-1:0]        t_timer;
  logic [1:0]           t_fcs_idx;
  logic [31:0]          t_fcs;
  logic [7:0]           t_byte;
  logic [15:0]          lfsr;
  logic                 cc_ongoing;
  logic                 busy_eff;

  assign busy_eff = medium_busy || cc_ongoing;

  // free-running LFSR (x^16 + x^14 + x^13 + x^11 + 1) for the backoff draw
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  logic        crc_init, crc_en;
  logic [7:0]  crc_data;
  logic [31:0] crc_fcs;
  logic        crc_ok_unused;
  fcs_crc32 u_tx_fcs (.clk, .rst_n, .init(crc_init), .en(crc_en), .data(crc_data),
                      .fcs(crc_fcs), .check_ok(crc_ok_unused));

  assign crc_init = (ts == T_IDLE);
  assign crc_en   = (ts == T_LOAD);
  assign crc_data = txmem_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE;
      t_id <= '0; t_len <= '0; t_idx <= '0; t_pwr <= '0; t_rate <= '0;
      t_bo_left <= '0; t_timer <= '0; t_fcs_idx <= '0; t_fcs <= '0; t_byte <= '0;
      tx_timestamp <= '0;
    end else begin
      unique case (ts)
        T_IDLE: if (tx_request) begin
          t_id <= tx_id; t_len <= tx_length; t_pwr <= tx_power; t_rate <= tx_rate;
          t_idx <= '0; t_timer <= '0;
          t_bo_left <= BACKOFF_W'(32'(lfsr) % (32'(tx_backoff) + 1));
          if (tx_type) ts <= busy_eff ? T_FAIL : T_START;
          else         ts <= T_AIFS;
        end
        T_AIFS: begin
          if (tx_cancel)                        ts <= T_CANC;
          else if (busy_eff)                    t_timer <= '0;
          else if (32'(t_timer) == AIFS_TICKS - 1) begin
            t_timer <= '0;
            ts <= (t_bo_left == 0) ? T_START : T_BACKOFF;
          end else                              t_timer <= t_timer + 1'b1;
        end
        T_BACKOFF: begin
          if (tx_cancel)      ts <= T_CANC;
          else if (busy_eff) begin t_timer <= '0; ts <= T_AIFS; end
          else if (32'(t_timer) == SLOT_TICKS - 1) begin
            t_timer <= '0;
            t_bo_left <= t_bo_left - 1'b1;
            if (t_bo_left == 1) ts <= T_START;
          end else t_timer <= t_timer + 1'b1;
        end
        T_START: if (phy_txstart_cfm) begin
          tx_timestamp <= rtc;
          ts <= (t_len == 0) ? T_FCS : T_FETCH;
          t_fcs_idx <= '0;
        end else if (tx_cancel) ts <= T_CANC;
        T_FETCH: ts <= tx_cancel ? T_ABORT : T_LOAD;
        T_LOAD: begin
          t_byte <= txmem_data;
          ts <= T_SEND;
        end
        T_SEND: if (phy_txdata_cfm) begin
          t_idx <= t_idx + 1'b1;
          if (t_idx == t_len - 1'b1) ts <= T_FCS;
          else                       ts <= tx_cancel ? T_ABORT : T_FETCH;
        end
        T_FCS: begin
          if (t_fcs_idx == 0 && !phy_txdata_req) begin
            // first cycle in T_FCS: the CRC has folded every data octet
            t_fcs  <= crc_fcs;
            t_byte <= crc_fcs[7:0];
          end else if (phy_txdata_cfm) begin
            t_fcs_idx <= t_fcs_idx + 1'b1;
            t_byte    <= t_fcs[8*(32'(t_fcs_idx)+1) +: 8];
            if (t_fcs_idx == 2'd3) ts <= T_END;
          end
        end
        T_END:   if (phy_txend_cfm) ts <= T_SUCC;
        T_ABORT: if (phy_txend_cfm) ts <= T_CANC;
        T_SUCC, T_FAIL, T_CANC: ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end

  // the first FCS cycle loads the octet; from then on it is offered
  logic fcs_loaded;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fcs_loaded <= 1'b0;
    else        fcs_loaded <= (ts == T_FCS);
  end

  always_comb begin
    tx_status = '0;
    unique case (ts)
      T_AIFS, T_BACKOFF:                             tx_status[TX_CONTE] = 1'b1;
      T_START, T_FETCH, T_LOAD, T_SEND, T_FCS,
      T_END, T_ABORT:                                tx_status[TX_ONGOI] = 1'b1;
      T_SUCC:                                        tx_status[TX_SUCCS] = 1'b1;
      T_FAIL:                                        tx_status[TX_FAILE] = 1'b1;
      T_CANC:                                        tx_status[TX_CANCE] = 1'b1;
      default: ;
    endcase
  end

  assign txmem_id        = t_id;
  assign txmem_off       = OFF_W'(t_idx);
  assign phy_txstart_req = (ts == T_START);
  assign phy_txdata_req  = (ts == T_SEND) || (ts == T_FCS && fcs_loaded);
  assign phy_txend_req   = (ts == T_END) || (ts == T_ABORT);
  assign phy_txdata      = t_byte;
  assign txvector_power  = t_pwr;
  assign txvector_rate   = t_rate;
  assign txvector_length = t_len + LEN_W'(4);

  // ================================================================ RX
  typedef enum logic [1:0] { R_IDLE, R_RECV, R_CHECK } rx_state_e;
  rx_state_e rs;

  logic             r_nomem, r_carrl, r_fmt, r_rate;
  logic [LEN_W-1:0] r_cnt;
  logic             cca_q;
  logic [RTC_W-1:0] r_energy_ts;
  logic             rcrc_ok;
  logic [31:0]      rcrc_fcs_unused;

  fcs_crc32 u_rx_fcs (.clk, .rst_n, .init(rs == R_IDLE), .en(rs == R_RECV && phy_rxdata_ind),
                      .data(phy_rxdata), .fcs(rcrc_fcs_unused), .check_ok(rcrc_ok));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cca_q <= 1'b0;
      r_energy_ts <= '0;
    end else begin
      cca_q <= phy_cca_ind;
      if (phy_cca_ind && !cca_q) r_energy_ts <= rtc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE;
      r_nomem <= 1'b0; r_carrl <= 1'b0; r_fmt <= 1'b0; r_rate <= 1'b0;
      r_cnt <= '0;
      rx_info <= '0;
      rx_ready <= 1'b0;
    end else begin
      rx_ready <= 1'b0;
      unique case (rs)
        R_IDLE: begin
          r_cnt <= '0;
          if (phy_rxstart_ind) begin
            rs <= R_RECV;
            r_nomem <= rxmm_full;
            rx_info.id     <= rxmm_alloc_id;
            rx_info.len    <= rxvector_length;
            rx_info.rssi   <= rxvector_rssi;
            rx_info.tstamp <= cca_q ? r_energy_ts : rtc;
          end else if (phy_rxend_ind) begin
            // the PHY gave up before the frame body: nothing stored
            rx_ready <= 1'b1;
            rx_info.id     <= '0;
            rx_info.len    <= '0;
            rx_info.rssi   <= rxvector_rssi;
            rx_info.tstamp <= cca_q ? r_energy_ts : rtc;
            rx_info.status <= 8'((1 << RX_RXERR) | (1 << RX_IDINV)
                               | (int'(rxvector_carrierlost)     << RX_CARRL)
                               | (int'(rxvector_formatviolation) << RX_PARER)
                               | (int'(rxvector_unsupportedrate) << RX_RATER));
          end
        end
        R_RECV: begin
          if (phy_rxdata_ind) r_cnt <= r_cnt + 1'b1;
          if (phy_rxend_ind) begin
            r_carrl <= rxvector_carrierlost;
            r_fmt   <= rxvector_formatviolation;
            r_rate  <= rxvector_unsupportedrate;
            rs <= R_CHECK;
          end
        end
        R_CHECK: begin
          logic err;
          err = r_carrl || r_fmt || r_rate || !rcrc_ok;
          rx_ready <= 1'b1;
          rx_info.status <= 8'((int'(r_nomem) << RX_NOMEM) | (int'(r_nomem) << RX_IDINV)
                             | (int'(err) << RX_RXERR)
                             | (int'(!rcrc_ok && !r_carrl && !r_fmt && !r_rate) << RX_CRCER)
                             | (int'(r_carrl) << RX_CARRL)
                             | (int'(r_fmt)   << RX_PARER)
                             | (int'(r_rate)  << RX_RATER));
          rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  assign rxmm_alloc = (rs == R_IDLE) && phy_rxstart_ind && !rxmm_full;
  assign rxmem_we   = (rs == R_RECV) && phy_rxdata_ind && !r_nomem
                      && (32'(r_cnt) < RX_SLOT_BYTES);
  assign rxmem_id   = rx_info.id;
  assign rxmem_off  = OFF_W'(r_cnt);
  assign rxmem_data = phy_rxdata;

  // ============================================================ CHANNEL
  typedef enum logic [2:0] { C_IDLE, C_BLK, C_ONG, C_CPL, C_CAN } cc_state_e;
  cc_state_e cs;
  logic [CHAN_W-1:0] c_val;

  logic tx_on_air;
  assign tx_on_air = tx_status[TX_ONGOI];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= C_IDLE;
      c_val <= '0;
    end else begin
      unique case (cs)
        C_IDLE: if (cc_request) begin c_val <= cc_value; cs <= C_BLK; end
        C_BLK:
          if (cc_cancel) cs <= C_CAN;
          else if (!medium_busy && !tx_on_air && rs == R_IDLE && !phy_rxstart_ind) cs <= C_ONG;
        C_ONG: if (phy_chg_channel_cfm) cs <= C_CPL;
        C_CPL, C_CAN: cs <= C_IDLE;
        default: cs <= C_IDLE;
      endcase
    end
  end

  assign cc_ongoing            = (cs == C_ONG);
  assign phy_chg_channel_req   = (cs == C_ONG);
  assign chg_channel_vector_id = c_val;

  always_comb begin
    cc_status = '0;
    unique case (cs)
      C_BLK: cc_status[CC_CCBLK] = 1'b1;
      C_ONG: cc_status[CC_CCONG] = 1'b1;
      C_CPL: cc_status[CC_CCCPL] = 1'b1;
      C_CAN: cc_status[CC_CCCAN] = 1'b1;
      default: ;
    endcase
  end

  // ---- handshake rules
  a_txdata_held: assert property (@(posedge clk) disable iff (!rst_n)
    phy_txdata_req && !phy_txdata_cfm |=> phy_txdata_req && $stable(phy_txdata));
  a_onehot_status: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(tx_status));
endmodule
