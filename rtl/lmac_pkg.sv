// lmac_pkg -- types and constants shared by the Lower MAC and the MultiLink
// USB system of the deterministic 802.11p device.
//
// The status bit fields follow the figures of the original description:
// txStatus (CONTE, ONGOI, SUCCS, FAILE, CANCE in bits 0..4), rxStatus
// (NOMEM, RXERR, IDINV, -, CRCER, CARRL, PARER, RATER in bits 0..7) and
// configChannelStatus (CCCPL, CCBLK, CCONG, CCCAN in bits 0..3; the bit
// positions of the last field are inferred from the documented status
// sequence 0 -> 2 -> 4 -> 1 of a successful channel change). The byte
// encoding of host requests and events is this design's own choice.
package lmac_pkg;

  // ---------------------------------------------------------------- widths
  localparam int RTC_W      = 64;  // real time clock, microseconds
  localparam int LEN_W      = 12;  // frame length in octets (max 2344 + FCS)
  localparam int PWR_W      = 3;   // txPowerLevel code
  localparam int RATE_W     = 3;   // txRate code, table of 8 rates
  localparam int BACKOFF_W  = 10;  // txBackoffSlots, up to aCWmax = 1023
  localparam int RSSI_W     = 8;
  localparam int CHAN_W     = 8;   // configChannelValue (172..184)
  localparam int ADC_W      = 10;  // AD9861 converter resolution

  // ------------------------------------------------------------ txStatus
  localparam int TX_CONTE = 0;   // contention phase
  localparam int TX_ONGOI = 1;   // physical transmission ongoing
  localparam int TX_SUCCS = 2;   // one cycle: success
  localparam int TX_FAILE = 3;   // one cycle: failure
  localparam int TX_CANCE = 4;   // one cycle: cancelled

  // ------------------------------------------------------------ rxStatus
  localparam int RX_NOMEM = 0;
  localparam int RX_RXERR = 1;
  localparam int RX_IDINV = 2;
  localparam int RX_CRCER = 4;
  localparam int RX_CARRL = 5;
  localparam int RX_PARER = 6;   // PHY format violation
  localparam int RX_RATER = 7;   // PHY unsupported rate

  // -------------------------------------------------- configChannelStatus
  localparam int CC_CCCPL = 0;   // one cycle: completed
  localparam int CC_CCBLK = 1;   // blocked, waiting for a free medium
  localparam int CC_CCONG = 2;   // tuning in progress
  localparam int CC_CCCAN = 3;   // one cycle: cancelled

  // ------------------------------------------- 802.11p OCB timing (10 MHz)
  localparam int SLOT_US  = 13;  // aSlotTime
  localparam int SIFS_US  = 32;  // aSIFSTime

  // ---------------------------------------------------- host request codes
  typedef enum logic [7:0] {
    OP_TX     = 8'h01,  // best effort:   op pwr rate bo_hi bo_lo len_hi len_lo data..
    OP_TX_TT  = 8'h02,  // time triggered: op pwr rate t7..t0 len_hi len_lo data..
    OP_CHAN   = 8'h03,  // change channel: op channel
    OP_CCA    = 8'h04   // configure CCA:  op flags(bit0 = carrier sense) threshold
  } op_e;

  // ------------------------------------------------------ event codes
  localparam logic [7:0] EV_TX = 8'h81;  // ev status queue t7..t0
  localparam logic [7:0] EV_RX = 8'h82;  // ev status rssi len_hi len_lo t7..t0 data..

  // Transmission parameters carried in a queue entry and to the PHY shell.
  typedef struct packed {
    logic [2:0]           id;       // memory slot
    logic [LEN_W-1:0]     len;      // octets, FCS excluded
    logic [PWR_W-1:0]     power;
    logic [RATE_W-1:0]    rate;
    logic [BACKOFF_W-1:0] backoff;  // upper bound of the backoff, slots
    logic [RTC_W-1:0]     ttime;    // time-triggered instant (microseconds)
  } tx_desc_t;

  // Transmit outcome handed from the dispatcher to the event handler.
  typedef struct packed {
    logic [7:0]       status;   // txStatus end value (SUCCS, FAILE or CANCE)
    logic             tt;       // 1: time-triggered queue
    logic [RTC_W-1:0] tstamp;
  } tx_event_t;

  // Receive report produced by the PHY shell (rxReady group).
  typedef struct packed {
    logic [7:0]        status;
    logic [2:0]        id;
    logic [LEN_W-1:0]  len;     // octets, FCS included; 0 when unknown
    logic [RSSI_W-1:0] rssi;
    logic [RTC_W-1:0]  tstamp;
  } rx_event_t;

endpackage
