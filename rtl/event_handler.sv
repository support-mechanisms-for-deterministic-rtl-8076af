// event_handler -- conveys the Lower MAC's events to the host (UMAC).
//
// Transmit events come from the dispatcher with a valid/ready handshake;
// receive reports come from the PHY shell as one-cycle pulses and are queued
// (RXQ_DEPTH entries) so that none is lost while an earlier event is still
// being sent. Transmit events go first. Each event is written to the host
// link as a byte stream (valid/ready), most significant byte first:
//   EV_TX status queue time[63:0]                              (11 bytes)
//   EV_RX status rssi len[15:0] time[63:0] data[len if status == 0]
// A successful reception is sent together with its data, read from the
// receive memory (one cycle latency per byte), so the host never has to ask
// for it. After a receive event, the slot it used is released (unless the
// report says no slot was allocated), and every event ends with a one-cycle
// out_flush so that the link sends it without waiting for more data.
//
// Sending received data unrequested, releasing receive slots here and
// reporting status and timestamp for both event kinds follow the original
// description; the byte layout, the queue depth and the order between the
// two event kinds are this design's own.
module event_handler
  import lmac_pkg::*;
#(
  parameter int RXQ_DEPTH = 16,
  parameter int OFF_W     = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  // transmit events
  input  logic             txev_valid,
  input  tx_event_t        txev,
  output logic             txev_ready,
  // receive reports
  input  logic             rx_ready,
  input  rx_event_t        rx_info,
  // receive memory: read port and release
  output logic [2:0]       rd_id,
  output logic [OFF_W-1:0] rd_off,
  input  logic [7:0]       rd_data,
  output logic             rel,
  output logic [2:0]       rel_id,
  // event stream to the host
  output logic             out_valid,
  output logic [7:0]       out_data,
  input  logic             out_ready,
  output logic             out_flush,
  output logic [15:0]      rx_lost_count
);
  localparam int RW = $bits(rx_event_t);

  rx_event_t rq_head;
  logic rq_empty, rq_full, rq_pop;
  logic [$clog2(RXQ_DEPTH+1)-1:0] rq_cnt_unused;

  sync_fifo #(.WIDTH(RW), .DEPTH(RXQ_DEPTH)) u_rxq (
    .clk, .rst_n, .push(rx_ready), .din(rx_info), .full(rq_full),
    .pop(rq_pop), .dout(rq_head), .empty(rq_empty), .count(rq_cnt_unused));

  typedef enum logic [2:0] { E_IDLE, E_HDR, E_ADDR, E_WAIT, E_DATA, E_DONE } state_e;
  state_e st;

  logic [103:0] hdr;       // up to 13 header bytes, first byte in [103:96]
  logic [3:0]   hdr_left;
  logic         is_rx, with_data;
  rx_event_t    cur;
  logic [LEN_W-1:0] cnt;
  logic [7:0]   dbyte;

  assign txev_ready = (st == E_IDLE);
  assign rq_pop     = (st == E_IDLE) && !txev_valid && !rq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; hdr <= '0; hdr_left <= '0; is_rx <= 1'b0; with_data <= 1'b0;
      cur <= '0; cnt <= '0; dbyte <= '0; rx_lost_count <= '0;
    end else begin
      if (rx_ready && rq_full) rx_lost_count <= rx_lost_count + 1'b1;
      unique case (st)
        E_IDLE:
          if (txev_valid) begin
            hdr <= {EV_TX, txev.status, 7'd0, txev.tt, txev.tstamp, 16'd0};
            hdr_left <= 4'd11; is_rx <= 1'b0; with_data <= 1'b0; st <= E_HDR;
          end else if (!rq_empty) begin
            hdr <= {EV_RX, rq_head.status, rq_head.rssi, 16'(rq_head.len), rq_head.tstamp};
            hdr_left <= 4'd13; is_rx <= 1'b1; cur <= rq_head;
            with_data <= (rq_head.status == 8'h00) && (rq_head.len != 0);
            cnt <= '0;
            st <= E_HDR;
          end
        E_HDR: if (out_ready) begin
          hdr <= {hdr[95:0], 8'h00};
          hdr_left <= hdr_left - 1'b1;
          if (hdr_left == 1) st <= with_data ? E_ADDR : E_DONE;
        end
        E_ADDR: st <= E_WAIT;
        E_WAIT: begin dbyte <= rd_data; st <= E_DATA; end
        E_DATA: if (out_ready) begin
          cnt <= cnt + 1'b1;
          st <= (cnt == cur.len - 1'b1) ? E_DONE : E_ADDR;
        end
        E_DONE: st <= E_IDLE;
        default: st <= E_IDLE;
      endcase
    end
  end

  assign out_valid = (st == E_HDR) || (st == E_DATA);
  assign out_data  = (st == E_DATA) ? dbyte : hdr[103:96];
  assign out_flush = (st == E_DONE);
  assign rd_id     = cur.id;
  assign rd_off    = OFF_W'(cnt);
  assign rel       = (st == E_DONE) && is_rx && !cur.status[RX_IDINV];
  assign rel_id    = cur.id;
endmodule
