// multilink_controller -- gives every link its own pair of bidirectional
// channels over the four FX2LP endpoints.
//
// Each of N_LINKS links has a bounded-latency channel, carried by the
// interrupt endpoints, and a high-throughput channel, carried by the bulk
// endpoints. Towards the host, one ml_tx_mux per IN endpoint frames the
// links' bytes as ID | SIZE | DATA (at most MAX_FRAME bytes, one USB
// transfer); from the host, one ml_rx_demux per OUT endpoint routes frames to
// the links' receive FIFOs. The endpoint side connects to the dual-clock
// FIFOs: IN bytes carry a ninth "last byte of frame" bit.
//
// Links, the two channel kinds and their mapping to interrupt and bulk
// endpoints follow the original MultiLink description. MAX_FRAME is 512, the
// FX2LP endpoint buffer size, rather than the 1024-byte USB transfer limit
// the description also mentions, so that a frame always fits one endpoint
// buffer.
module multilink_controller #(
  parameter int N_LINKS    = 2,
  parameter int MAX_FRAME  = 512,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // bounded-latency (interrupt) channel of each link
  input  logic [N_LINKS-1:0]      int_tx_valid,
  input  logic [N_LINKS-1:0][7:0] int_tx_data,
  output logic [N_LINKS-1:0]      int_tx_ready,
  input  logic [N_LINKS-1:0]      int_tx_flush,
  output logic [N_LINKS-1:0]      int_rx_valid,
  output logic [N_LINKS-1:0][7:0] int_rx_data,
  input  logic [N_LINKS-1:0]      int_rx_ready,
  // high-throughput (bulk) channel of each link
  input  logic [N_LINKS-1:0]      bulk_tx_valid,
  input  logic [N_LINKS-1:0][7:0] bulk_tx_data,
  output logic [N_LINKS-1:0]      bulk_tx_ready,
  input  logic [N_LINKS-1:0]      bulk_tx_flush,
  output logic [N_LINKS-1:0]      bulk_rx_valid,
  output logic [N_LINKS-1:0][7:0] bulk_rx_data,
  input  logic [N_LINKS-1:0]      bulk_rx_ready,
  // endpoint FIFOs (system clock side)
  output logic                    ep6_wr,      // interrupt IN
  output logic [8:0]              ep6_data,
  input  logic                    ep6_full,
  output logic                    ep8_wr,      // bulk IN
  output logic [8:0]              ep8_data,
  input  logic                    ep8_full,
  output logic                    ep2_rd,      // interrupt OUT
  input  logic [7:0]              ep2_data,
  input  logic                    ep2_empty,
  output logic                    ep4_rd,      // bulk OUT
  input  logic [7:0]              ep4_data,
  input  logic                    ep4_empty,
  output logic [15:0]             int_frames_in,
  output logic [15:0]             bulk_frames_in,
  output logic [15:0]             bad_frames
);
  logic int_out_valid, bulk_out_valid;
  logic [15:0] bad_int, bad_bulk;

  ml_tx_mux #(.N_LINKS(N_LINKS), .MAX_FRAME(MAX_FRAME), .FIFO_DEPTH(FIFO_DEPTH)) u_int_mux (
    .clk, .rst_n, .tx_valid(int_tx_valid), .tx_data(int_tx_data), .tx_ready(int_tx_ready),
    .tx_flush(int_tx_flush), .out_valid(int_out_valid), .out_data(ep6_data),
    .out_ready(!ep6_full), .frame_count(int_frames_in));
  assign ep6_wr = int_out_valid && !ep6_full;

  ml_tx_mux #(.N_LINKS(N_LINKS), .MAX_FRAME(MAX_FRAME), .FIFO_DEPTH(FIFO_DEPTH)) u_bulk_mux (
    .clk, .rst_n, .tx_valid(bulk_tx_valid), .tx_data(bulk_tx_data), .tx_ready(bulk_tx_ready),
    .tx_flush(bulk_tx_flush), .out_valid(bulk_out_valid), .out_data(ep8_data),
    .out_ready(!ep8_full), .frame_count(bulk_frames_in));
  assign ep8_wr = bulk_out_valid && !ep8_full;

  ml_rx_demux #(.N_LINKS(N_LINKS), .FIFO_DEPTH(FIFO_DEPTH)) u_int_demux (
    .clk, .rst_n, .in_data(ep2_data), .in_empty(ep2_empty), .in_rd(ep2_rd),
    .rx_valid(int_rx_valid), .rx_data(int_rx_data), .rx_ready(int_rx_ready),
    .bad_frame_count(bad_int));

  ml_rx_demux #(.N_LINKS(N_LINKS), .FIFO_DEPTH(FIFO_DEPTH)) u_bulk_demux (
    .clk, .rst_n, .in_data(ep4_data), .in_empty(ep4_empty), .in_rd(ep4_rd),
    .rx_valid(bulk_rx_valid), .rx_data(bulk_rx_data), .rx_ready(bulk_rx_ready),
    .bad_frame_count(bad_bulk));

  assign bad_frames = bad_int + bad_bulk;
endmodule
