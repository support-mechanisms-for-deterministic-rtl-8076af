// usb_multilink -- FPGA side of the MultiLink USB communication system.
//
// Joins the FX2LP controller (IFCLK domain) and the MultiLink controller
// (system clock domain) through four dual-clock FIFOs, one per endpoint:
// EP2 interrupt OUT and EP4 bulk OUT carry bytes towards the system clock,
// EP6 interrupt IN and EP8 bulk IN carry bytes plus an end-of-frame bit
// towards IFCLK. The user side offers, for each link, a bounded-latency and
// a high-throughput channel in each direction (see multilink_controller).
//
// The structure (FX2LP controller, dual-clock FIFOs, multiplexing controller)
// follows the original description; the FIFO depth (two 512-byte packets, as
// the FX2LP's own double buffering) is this design's choice. Each clock domain
// has its own asynchronous, active-low reset input.
module usb_multilink #(
  parameter int N_LINKS    = 2,
  parameter int MAX_FRAME  = 512,
  parameter int LINK_DEPTH = 1024,
  parameter int CDC_DEPTH  = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ifclk,
  input  logic                    if_rst_n,
  // FX2LP pins
  input  logic [7:0]              fd_in,
  output logic [7:0]              fd_out,
  output logic                    fd_oe,
  output logic                    sloe,
  output logic                    slrd,
  output logic                    slwr,
  output logic                    pktend,
  output logic [1:0]              fifoadr,
  input  logic                    flaga_ep2_empty,
  input  logic                    flagb_ep4_empty,
  input  logic                    flagc_ep6_full,
  input  logic                    flagd_ep8_full,
  // links
  input  logic [N_LINKS-1:0]      int_tx_valid,
  input  logic [N_LINKS-1:0][7:0] int_tx_data,
  output logic [N_LINKS-1:0]      int_tx_ready,
  input  logic [N_LINKS-1:0]      int_tx_flush,
  output logic [N_LINKS-1:0]      int_rx_valid,
  output logic [N_LINKS-1:0][7:0] int_rx_data,
  input  logic [N_LINKS-1:0]      int_rx_ready,
  input  logic [N_LINKS-1:0]      bulk_tx_valid,
  input  logic [N_LINKS-1:0][7:0] bulk_tx_data,
  output logic [N_LINKS-1:0]      bulk_tx_ready,
  input  logic [N_LINKS-1:0]      bulk_tx_flush,
  output logic [N_LINKS-1:0]      bulk_rx_valid,
  output logic [N_LINKS-1:0][7:0] bulk_rx_data,
  input  logic [N_LINKS-1:0]      bulk_rx_ready,
  output logic [15:0]             grant_count [4],
  output logic [15:0]             int_frames_in,
  output logic [15:0]             bulk_frames_in,
  output logic [15:0]             bad_frames
);
  // IFCLK side of the FIFOs
  logic       io_int_out_wr, io_bulk_out_wr, io_int_out_full, io_bulk_out_full;
  logic [7:0] io_int_out_data, io_bulk_out_data;
  logic       io_int_in_rd, io_bulk_in_rd, io_int_in_empty, io_bulk_in_empty;
  logic [8:0] io_int_in_data, io_bulk_in_data;
  // system clock side
  logic       ep2_rd, ep4_rd, ep2_empty, ep4_empty;
  logic [7:0] ep2_data, ep4_data;
  logic       ep6_wr, ep8_wr, ep6_full, ep8_full;
  logic [8:0] ep6_data, ep8_data;

  fx2_controller #(.PKT_BYTES(MAX_FRAME)) u_fx2 (
    .ifclk, .rst_n(if_rst_n), .fd_in, .fd_out, .fd_oe, .sloe, .slrd, .slwr, .pktend, .fifoadr,
    .flaga_ep2_empty, .flagb_ep4_empty, .flagc_ep6_full, .flagd_ep8_full,
    .int_out_wr(io_int_out_wr), .int_out_data(io_int_out_data), .int_out_full(io_int_out_full),
    .bulk_out_wr(io_bulk_out_wr), .bulk_out_data(io_bulk_out_data), .bulk_out_full(io_bulk_out_full),
    .int_in_rd(io_int_in_rd), .int_in_data(io_int_in_data), .int_in_empty(io_int_in_empty),
    .bulk_in_rd(io_bulk_in_rd), .bulk_in_data(io_bulk_in_data), .bulk_in_empty(io_bulk_in_empty),
    .grant_count);

  async_fifo #(.WIDTH(8), .DEPTH(CDC_DEPTH)) u_ep2 (
    .wclk(ifclk), .wrst_n(if_rst_n), .wr_en(io_int_out_wr), .wdata(io_int_out_data), .wfull(io_int_out_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(ep2_rd), .rdata(ep2_data), .rempty(ep2_empty));
  async_fifo #(.WIDTH(8), .DEPTH(CDC_DEPTH)) u_ep4 (
    .wclk(ifclk), .wrst_n(if_rst_n), .wr_en(io_bulk_out_wr), .wdata(io_bulk_out_data), .wfull(io_bulk_out_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(ep4_rd), .rdata(ep4_data), .rempty(ep4_empty));
  async_fifo #(.WIDTH(9), .DEPTH(CDC_DEPTH)) u_ep6 (
    .wclk(clk), .wrst_n(rst_n), .wr_en(ep6_wr), .wdata(ep6_data), .wfull(ep6_full),
    .rclk(ifclk), .rrst_n(if_rst_n), .rd_en(io_int_in_rd), .rdata(io_int_in_data), .rempty(io_int_in_empty));
  async_fifo #(.WIDTH(9), .DEPTH(CDC_DEPTH)) u_ep8 (
    .wclk(clk), .wrst_n(rst_n), .wr_en(ep8_wr), .wdata(ep8_data), .wfull(ep8_full),
    .rclk(ifclk), .rrst_n(if_rst_n), .rd_en(io_bulk_in_rd), .rdata(io_bulk_in_data), .rempty(io_bulk_in_empty));

  multilink_controller #(.N_LINKS(N_LINKS), .MAX_FRAME(MAX_FRAME), .FIFO_DEPTH(LINK_DEPTH)) u_ml (
    .clk, .rst_n,
    .int_tx_valid, .int_tx_data, .int_tx_ready, .int_tx_flush,
    .int_rx_valid, .int_rx_data, .int_rx_ready,
    .bulk_tx_valid, .bulk_tx_data, .bulk_tx_ready, .bulk_tx_flush,
    .bulk_rx_valid, .bulk_rx_data, .bulk_rx_ready,
    .ep6_wr, .ep6_data, .ep6_full, .ep8_wr, .ep8_data, .ep8_full,
    .ep2_rd, .ep2_data, .ep2_empty, .ep4_rd, .ep4_data, .ep4_empty,
    .int_frames_in, .bulk_frames_in, .bad_frames);
endmodule
