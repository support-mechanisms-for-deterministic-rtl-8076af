// fx2_controller -- master of the FX2LP synchronous slave FIFO interface.
//
// Runs on IFCLK (30 MHz, sourced by the FX2LP) and moves bytes between the
// four FX2LP endpoints and four dual-clock FIFOs:
//   EP2 interrupt OUT (FIFOADR 00, FLAGA = empty) -> int_out FIFO
//   EP4 bulk OUT      (FIFOADR 01, FLAGB = empty) -> bulk_out FIFO
//   EP6 interrupt IN  (FIFOADR 10, FLAGC = full)  <- int_in FIFO
//   EP8 bulk IN       (FIFOADR 11, FLAGD = full)  <- bulk_in FIFO
// The single 8-bit FD bus is shared, so one endpoint is served at a time,
// chosen by fixed priority, lowest to highest: INT OUT, INT IN, BULK OUT,
// BULK IN. A grant first drives FIFOADR for one cycle, then:
//  * OUT: SLOE is raised; on each following cycle where the endpoint is not
//    empty and the local FIFO has room, SLRD is asserted and FD is stored.
//    The burst ends when either side stops or after BURST bytes; SLOE then
//    drops and one idle cycle lets the FX2LP release FD before the FPGA may
//    drive it.
//  * IN: the IN FIFOs carry a ninth bit marking the last byte of a MultiLink
//    frame. Bytes are written with SLWR while the endpoint is not full, up to
//    and including the frame's last byte; a frame shorter than the 512-byte
//    USB packet is then committed with a one-cycle PKTEND.
// The FX2LP flags are taken as active high (their polarity is set by the
// firmware).
//
// The endpoint map, flag assignment, priority order, 8-bit bus, synchronous
// SLRD/SLWR, the wait state after SLOE and the use of PKTEND follow the
// original description; the burst limit and the one-cycle address phase are
// this design's choices.
module fx2_controller #(
  parameter int PKT_BYTES = 512,   // FX2LP endpoint buffer size
  parameter int BURST     = 512    // longest OUT burst before re-arbitration
) (
  input  logic       ifclk,
  input  logic       rst_n,
  // FX2LP slave FIFO pins
  input  logic [7:0] fd_in,
  output logic [7:0] fd_out,
  output logic       fd_oe,         // FPGA drives FD
  output logic       sloe,
  output logic       slrd,
  output logic       slwr,
  output logic       pktend,
  output logic [1:0] fifoadr,
  input  logic       flaga_ep2_empty,
  input  logic       flagb_ep4_empty,
  input  logic       flagc_ep6_full,
  input  logic       flagd_ep8_full,
  // dual-clock FIFO side
  output logic       int_out_wr,
  output logic [7:0] int_out_data,
  input  logic       int_out_full,
  output logic       bulk_out_wr,
  output logic [7:0] bulk_out_data,
  input  logic       bulk_out_full,
  output logic       int_in_rd,
  input  logic [8:0] int_in_data,
  input  logic       int_in_empty,
  output logic       bulk_in_rd,
  input  logic [8:0] bulk_in_data,
  input  logic       bulk_in_empty,
  output logic [15:0] grant_count [4]
);
  typedef enum logic [1:0] { EP2 = 2'd0, EP4 = 2'd1, EP6 = 2'd2, EP8 = 2'd3 } ep_e;
  typedef enum logic [2:0] { F_IDLE, F_ADDR, F_OE, F_READ, F_TURN, F_WRITE, F_PKTEND } f_state_e;
  f_state_e st;
  ep_e      ep;
  logic [$clog2(BURST+1)-1:0]     burst_cnt;
  logic [$clog2(PKT_BYTES+1)-1:0] pkt_cnt;

  logic want_ep2, want_ep4, want_ep6, want_ep8;
  assign want_ep2 = !flaga_ep2_empty && !int_out_full;
  assign want_ep4 = !flagb_ep4_empty && !bulk_out_full;
  assign want_ep6 = !flagc_ep6_full  && !int_in_empty;
  assign want_ep8 = !flagd_ep8_full  && !bulk_in_empty;

  // per-endpoint views of the selected path
  logic ep_empty, loc_full, ep_full, loc_empty;
  logic [8:0] loc_data;
  assign ep_empty  = (ep == EP2) ? flaga_ep2_empty : flagb_ep4_empty;
  assign loc_full  = (ep == EP2) ? int_out_full    : bulk_out_full;
  assign ep_full   = (ep == EP6) ? flagc_ep6_full  : flagd_ep8_full;
  assign loc_empty = (ep == EP6) ? int_in_empty    : bulk_in_empty;
  assign loc_data  = (ep == EP6) ? int_in_data     : bulk_in_data;

  logic rd_now, wr_now;
  assign rd_now = (st == F_READ) && !ep_empty && !loc_full && 32'(burst_cnt) < BURST;
  assign wr_now = (st == F_WRITE) && !ep_full && !loc_empty;

  always_ff @(posedge ifclk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; ep <= EP2; burst_cnt <= '0; pkt_cnt <= '0;
      for (int i = 0; i < 4; i++) grant_count[i] <= '0;
    end else begin
      unique case (st)
        F_IDLE: begin
          burst_cnt <= '0;
          // fixed priority, highest first
          if      (want_ep8) begin ep <= EP8; st <= F_ADDR; grant_count[3] <= grant_count[3] + 1'b1; end
          else if (want_ep4) begin ep <= EP4; st <= F_ADDR; grant_count[1] <= grant_count[1] + 1'b1; end
          else if (want_ep6) begin ep <= EP6; st <= F_ADDR; grant_count[2] <= grant_count[2] + 1'b1; end
          else if (want_ep2) begin ep <= EP2; st <= F_ADDR; grant_count[0] <= grant_count[0] + 1'b1; end
        end
        F_ADDR:  st <= (ep == EP2 || ep == EP4) ? F_OE : F_WRITE;
        F_OE:    st <= F_READ;
        F_READ: begin
          if (rd_now) burst_cnt <= burst_cnt + 1'b1;
          else        st <= F_TURN;
        end
        F_TURN:  st <= F_IDLE;
        F_WRITE: if (wr_now) begin
          if (loc_data[8]) begin
            pkt_cnt <= '0;
            st <= (32'(pkt_cnt) + 1 == PKT_BYTES) ? F_IDLE : F_PKTEND;
          end else if (32'(pkt_cnt) + 1 == PKT_BYTES) begin
            pkt_cnt <= '0;              // endpoint auto-commits a full packet
          end else pkt_cnt <= pkt_cnt + 1'b1;
        end
        F_PKTEND: st <= F_IDLE;
        default:  st <= F_IDLE;
      endcase
    end
  end

  assign fifoadr = ep;
  assign sloe    = (st == F_OE) || (st == F_READ);
  assign slrd    = rd_now;
  assign slwr    = wr_now;
  assign pktend  = (st == F_PKTEND);
  assign fd_oe   = (st == F_WRITE) || (st == F_PKTEND);
  assign fd_out  = loc_data[7:0];

  assign int_out_wr    = rd_now && (ep == EP2);
  assign bulk_out_wr   = rd_now && (ep == EP4);
  assign int_out_data  = fd_in;
  assign bulk_out_data = fd_in;
  assign int_in_rd     = wr_now && (ep == EP6);
  assign bulk_in_rd    = wr_now && (ep == EP8);

  a_no_bus_fight: assert property (@(posedge ifclk) disable iff (!rst_n) !(sloe && fd_oe));
endmodule
