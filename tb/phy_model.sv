// phy_model -- behavioural model of the 802.11p OFDM PHY primitive interface,
// for testbenches only.
//
// Transmit side: answers PHY_TXSTART, PHY_TXDATA and PHY_TXEND requests with
// one-cycle confirms after fixed latencies (TXDATA_LAT models the air rate),
// records every octet and, per frame, its length, its TXVECTOR, the RTC at
// the start confirm and whether it ended early. on_air is high from the start
// confirm to the end confirm. Channel change requests are confirmed after
// CHG_LAT cycles. Receive side: the task rx_frame plays a frame on the
// receive primitives: carrier indication, RXSTART with the RXVECTOR, one
// RXDATA pulse per octet every RX_GAP cycles, RXEND with the error flags.
module phy_model
  import lmac_pkg::*;
#(
  parameter int START_LAT  = 4,
  parameter int TXDATA_LAT = 3,
  parameter int END_LAT    = 2,
  parameter int CHG_LAT    = 20,
  parameter int RX_GAP     = 2
) (
  input  logic               clk,
  input  logic [RTC_W-1:0]   rtc,
  input  logic               txstart_req,
  output logic               txstart_cfm,
  input  logic               txdata_req,
  output logic               txdata_cfm,
  input  logic               txend_req,
  output logic               txend_cfm,
  input  logic [PWR_W-1:0]   txv_power,
  input  logic [LEN_W-1:0]   txv_length,
  input  logic [RATE_W-1:0]  txv_rate,
  input  logic [7:0]         txdata,
  output logic               rxstart_ind,
  output logic               rxdata_ind,
  output logic [7:0]         rxdata,
  output logic               rxend_ind,
  output logic [LEN_W-1:0]   rxv_length,
  output logic [RSSI_W-1:0]  rxv_rssi,
  output logic               rxv_formatviolation,
  output logic               rxv_carrierlost,
  output logic               rxv_unsupportedrate,
  output logic               cca_ind,
  input  logic               chg_req,
  output logic               chg_cfm,
  input  logic [CHAN_W-1:0]  chg_id,
  output logic               on_air
);
  byte unsigned tx_bytes[$];      // every transmitted octet, frames back to back
  int           tx_lens[$];       // octets per frame as sent
  int           tx_vlen[$];       // TXVECTOR length per frame
  int           tx_power[$], tx_rate[$];
  longint       tx_start_rtc[$];
  bit           tx_early_end[$];
  int           chg_log[$];
  int           cur_len;

  initial begin
    txstart_cfm = 0; txdata_cfm = 0; txend_cfm = 0;
    rxstart_ind = 0; rxdata_ind = 0; rxdata = 0; rxend_ind = 0;
    rxv_length = 0; rxv_rssi = 0; rxv_formatviolation = 0; rxv_carrierlost = 0;
    rxv_unsupportedrate = 0; cca_ind = 0; chg_cfm = 0; on_air = 0; cur_len = 0;
  end

  // ---- transmit primitives
  initial forever begin
    @(posedge clk);
    if (txstart_req) begin
      repeat (START_LAT - 1) @(posedge clk);
      txstart_cfm <= 1; on_air <= 1;
      tx_start_rtc.push_back(longint'(rtc));
      tx_vlen.push_back(int'(txv_length));
      tx_power.push_back(int'(txv_power));
      tx_rate.push_back(int'(txv_rate));
      cur_len = 0;
      @(posedge clk); txstart_cfm <= 0;
      forever begin
        @(posedge clk);
        if (txdata_req) begin
          repeat (TXDATA_LAT - 1) @(posedge clk);
          tx_bytes.push_back(txdata); cur_len++;
          txdata_cfm <= 1; @(posedge clk); txdata_cfm <= 0;
        end else if (txend_req) begin
          repeat (END_LAT - 1) @(posedge clk);
          txend_cfm <= 1; on_air <= 0;
          tx_lens.push_back(cur_len);
          tx_early_end.push_back(cur_len != int'(txv_length));
          @(posedge clk); txend_cfm <= 0;
          break;
        end
      end
    end
  end

  // ---- channel change
  initial forever begin
    @(posedge clk);
    if (chg_req) begin
      repeat (CHG_LAT - 1) @(posedge clk);
      chg_log.push_back(int'(chg_id));
      chg_cfm <= 1; @(posedge clk); chg_cfm <= 0;
      @(posedge clk);
    end
  end

  // ---- receive primitives
  // kind: 0 good frame, 1 carrier lost after half the frame,
  //       2 format violation (no RXSTART), 3 unsupported rate (no RXSTART)
  task automatic rx_frame(input byte unsigned b[$], input int kind, input int rssi);
    @(posedge clk);
    cca_ind <= 1;
    repeat (3) @(posedge clk);
    rxv_rssi <= 8'(rssi);
    if (kind >= 2) begin
      rxv_formatviolation <= (kind == 2);
      rxv_unsupportedrate <= (kind == 3);
      rxend_ind <= 1; rxv_length <= '0;
      @(posedge clk);
      rxend_ind <= 0; rxv_formatviolation <= 0; rxv_unsupportedrate <= 0; cca_ind <= 0;
      return;
    end
    rxstart_ind <= 1; rxv_length <= LEN_W'(b.size());
    @(posedge clk); rxstart_ind <= 0;
    foreach (b[i]) begin
      if (kind == 1 && i == b.size() / 2) break;
      repeat (RX_GAP - 1) @(posedge clk);
      rxdata_ind <= 1; rxdata <= b[i];
      @(posedge clk); rxdata_ind <= 0;
    end
    repeat (2) @(posedge clk);
    rxend_ind <= 1; rxv_carrierlost <= (kind == 1);
    @(posedge clk);
    rxend_ind <= 0; rxv_carrierlost <= 0; cca_ind <= 0;
  endtask
endmodule
