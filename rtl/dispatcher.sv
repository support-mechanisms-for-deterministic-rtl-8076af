// dispatcher -- transmit queues and fixed-priority scheduler of the Lower MAC.
//
// Two queues hold the descriptors (slot and transmission parameters) of the
// packets already stored in memory: a time-triggered queue, whose packets are
// started as real-time transmissions (no collision avoidance) as soon as the
// RTC reaches their instant, and a best-effort queue, whose packets use
// CSMA/CA. The time-triggered queue has the higher priority: if its head
// becomes due while a best-effort packet is still contending, that
// transmission is cancelled through txCancel, the time-triggered packet goes
// first and the best-effort packet is tried again afterwards. When a
// transmission ends in success or failure, the slot is released in its
// memory bank and a transmit event (status, queue, timestamp) is offered to
// the event handler with a valid/ready handshake.
//
// The dispatcher also routes the PHY shell's transmit memory read port to the
// bank of the packet being sent.
//
// Queue per priority, fixed priority, RTC-triggered start and automatic slot
// release follow the original description, which implements exactly these
// two priority levels. The preemption of a contending best-effort packet, the
// in-order (FIFO) handling of time-triggered requests and sending a packet
// whose instant has already passed at once are this design's choices.
// Timing: a request reaches the PHY shell two cycles after the queue head
// becomes eligible.
module dispatcher
  import lmac_pkg::*;
#(
  parameter int QDEPTH = 8,
  parameter int OFF_W  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [RTC_W-1:0]     rtc,
  // queues
  input  logic                 be_push,
  input  tx_desc_t             be_desc,
  output logic                 be_full,
  input  logic                 tt_push,
  input  tx_desc_t             tt_desc,
  output logic                 tt_full,
  // memory banks: read ports and slot release
  output logic [2:0]           be_rd_id,
  output logic [OFF_W-1:0]     be_rd_off,
  input  logic [7:0]           be_rd_data,
  output logic                 be_release,
  output logic [2:0]           be_rel_id,
  output logic [2:0]           tt_rd_id,
  output logic [OFF_W-1:0]     tt_rd_off,
  input  logic [7:0]           tt_rd_data,
  output logic                 tt_release,
  output logic [2:0]           tt_rel_id,
  // PHY shell transmission group
  output logic                 tx_request,
  output logic                 tx_cancel,
  output logic                 tx_type,
  output logic [2:0]           tx_id,
  output logic [LEN_W-1:0]     tx_length,
  output logic [PWR_W-1:0]     tx_power,
  output logic [RATE_W-1:0]    tx_rate,
  output logic [BACKOFF_W-1:0] tx_backoff,
  input  logic [7:0]           tx_status,
  input  logic [RTC_W-1:0]     tx_timestamp,
  input  logic [2:0]           txmem_id,
  input  logic [OFF_W-1:0]     txmem_off,
  output logic [7:0]           txmem_data,
  // transmit events
  output logic                 txev_valid,
  output tx_event_t            txev,
  input  logic                 txev_ready,
  // statistics
  output logic [15:0]          preempt_count
);
  localparam int DW = $bits(tx_desc_t);

  tx_desc_t be_head, tt_head;
  logic be_empty, tt_empty, be_pop, tt_pop;
  logic [$clog2(QDEPTH+1)-1:0] be_cnt_unused, tt_cnt_unused;

  sync_fifo #(.WIDTH(DW), .DEPTH(QDEPTH)) u_be_q (
    .clk, .rst_n, .push(be_push), .din(be_desc), .full(be_full),
    .pop(be_pop), .dout(be_head), .empty(be_empty), .count(be_cnt_unused));
  sync_fifo #(.WIDTH(DW), .DEPTH(QDEPTH)) u_tt_q (
    .clk, .rst_n, .push(tt_push), .din(tt_desc), .full(tt_full),
    .pop(tt_pop), .dout(tt_head), .empty(tt_empty), .count(tt_cnt_unused));

  typedef enum logic [1:0] { D_IDLE, D_REQ, D_WAIT, D_REPORT } d_state_e;
  d_state_e st;

  tx_desc_t cur, be_hold;
  logic     cur_tt, be_hold_v;
  logic     tt_due;

  assign tt_due = !tt_empty && (rtc >= tt_head.ttime);
  assign tt_pop = (st == D_IDLE) && tt_due;
  assign be_pop = (st == D_IDLE) && !tt_due && !be_hold_v && !be_empty;

  logic tx_end;
  assign tx_end = tx_status[TX_SUCCS] || tx_status[TX_FAILE] || tx_status[TX_CANCE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; cur <= '0; cur_tt <= 1'b0; be_hold <= '0; be_hold_v <= 1'b0;
      txev <= '0; preempt_count <= '0;
    end else begin
      unique case (st)
        D_IDLE:
          if (tt_due)          begin cur <= tt_head; cur_tt <= 1'b1; st <= D_REQ; end
          else if (be_hold_v)  begin cur <= be_hold; cur_tt <= 1'b0; st <= D_REQ; end
          else if (!be_empty)  begin
            cur <= be_head; cur_tt <= 1'b0; be_hold <= be_head; be_hold_v <= 1'b1; st <= D_REQ;
          end
        D_REQ: st <= D_WAIT;
        D_WAIT: if (tx_end) begin
          if (tx_status[TX_CANCE] && !cur_tt) begin
            // pre-empted by a due time-triggered packet: keep it for later
            preempt_count <= preempt_count + 1'b1;
            st <= D_IDLE;
          end else begin
            if (!cur_tt) be_hold_v <= 1'b0;
            txev.status <= tx_status;
            txev.tt     <= cur_tt;
            txev.tstamp <= tx_status[TX_SUCCS] ? tx_timestamp : rtc;
            st <= D_REPORT;
          end
        end
        D_REPORT: if (txev_ready) st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end

  // slot release, one cycle, as the transmission ends
  logic rel;
  assign rel        = (st == D_WAIT) && tx_end && !(tx_status[TX_CANCE] && !cur_tt);
  assign be_release = rel && !cur_tt;
  assign tt_release = rel &&  cur_tt;
  assign be_rel_id  = cur.id;
  assign tt_rel_id  = cur.id;

  assign txev_valid = (st == D_REPORT);

  assign tx_request = (st == D_REQ);
  assign tx_cancel  = (st == D_WAIT) && !cur_tt && tt_due && tx_status[TX_CONTE];
  assign tx_type    = cur_tt;
  assign tx_id      = cur.id;
  assign tx_length  = cur.len;
  assign tx_power   = cur.power;
  assign tx_rate    = cur.rate;
  assign tx_backoff = cur_tt ? '0 : cur.backoff;

  assign be_rd_id   = txmem_id;
  assign be_rd_off  = txmem_off;
  assign tt_rd_id   = txmem_id;
  assign tt_rd_off  = txmem_off;
  assign txmem_data = cur_tt ? tt_rd_data : be_rd_data;
endmodule
