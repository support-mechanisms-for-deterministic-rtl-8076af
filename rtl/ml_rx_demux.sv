// ml_rx_demux -- MultiLink deframer for one OUT endpoint (host to FPGA).
//
// Reads the endpoint's byte stream (first-word-fall-through, in_empty /
// in_rd), parses frames ID | SIZE (high byte first) | SIZE data bytes and
// pushes the data bytes into the FIFO of link ID, from which the user reads
// with valid/ready. When that FIFO is full the deframer waits, which in turn
// holds back the USB endpoint. Frames addressed to a link that does not
// exist are read and discarded (bad_frame_count).
//
// The frame format follows the original multiplexing protocol; back-pressure
// and discarding unknown links are this design's choices.
module ml_rx_demux #(
  parameter int N_LINKS    = 2,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              in_data,
  input  logic                    in_empty,
  output logic                    in_rd,
  output logic [N_LINKS-1:0]      rx_valid,
  output logic [N_LINKS-1:0][7:0] rx_data,
  input  logic [N_LINKS-1:0]      rx_ready,
  output logic [15:0]             bad_frame_count
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [1:0] { R_ID, R_SZH, R_SZL, R_DATA } r_state_e;
  r_state_e st;
  logic [7:0]  id;
  logic [15:0] size, cnt;
  logic        id_ok;

  logic [N_LINKS-1:0] f_full, f_empty, f_push;
  logic [N_LINKS-1:0][CW-1:0] f_cnt_unused;

  assign id_ok = 32'(id) < N_LINKS;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(f_push[i]), .din(in_data), .full(f_full[i]),
      .pop(rx_ready[i]), .dout(rx_data[i]), .empty(f_empty[i]), .count(f_cnt_unused[i]));
    assign rx_valid[i] = !f_empty[i];
    assign f_push[i]   = (st == R_DATA) && in_rd && id_ok && (32'(id) == i);
  end

  logic dest_full;
  always_comb begin
    dest_full = 1'b0;
    for (int i = 0; i < N_LINKS; i++)
      if (32'(id) == i) dest_full = f_full[i];
  end
  assign in_rd     = !in_empty && !(st == R_DATA && dest_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_ID; id <= '0; size <= '0; cnt <= '0; bad_frame_count <= '0;
    end else if (in_rd) begin
      unique case (st)
        R_ID:  begin id <= in_data; st <= R_SZH; end
        R_SZH: begin size[15:8] <= in_data; st <= R_SZL; end
        R_SZL: begin
          size[7:0] <= in_data; cnt <= '0;
          if (!id_ok) bad_frame_count <= bad_frame_count + 1'b1;
          st <= ({size[15:8], in_data} == 16'd0) ? R_ID : R_DATA;
        end
        R_DATA: begin
          cnt <= cnt + 1'b1;
          if (cnt == size - 1'b1) st <= R_ID;
        end
        default: st <= R_ID;
      endcase
    end
  end
endmodule
