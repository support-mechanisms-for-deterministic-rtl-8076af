// ml_tx_mux -- MultiLink framer for one IN endpoint (FPGA to host).
//
// Each of the N_LINKS users writes bytes into its own FIFO (valid/ready) and
// may pulse flush to ask that what it has written be sent without waiting
// for more. A link is ready to send when it holds a full payload
// (MAX_FRAME - 3 bytes) or has a pending flush and holds data. Ready links
// are served round robin, one frame at a time. A frame is
//   ID (1 byte) | SIZE (2 bytes, high byte first) | SIZE data bytes
// and never exceeds MAX_FRAME bytes, so it travels as a single USB transfer.
// Output bytes carry a ninth bit that marks the last byte of the frame, used
// by the FX2LP controller to commit a short packet. A flush records how many
// bytes the link held when it was requested; that many bytes are then sent
// without waiting, and bytes written after the flush wait for a full payload
// or the next flush, so a slow writer does not cause a stream of tiny frames.
//
// The frame format, the size bound and the two sending conditions (enough
// data for a full packet, or an explicit request) follow the original
// description of the multiplexing protocol; the header field widths, the
// round-robin order and the FIFO depth are this design's choices.
module ml_tx_mux #(
  parameter int N_LINKS    = 2,
  parameter int MAX_FRAME  = 512,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_LINKS-1:0]        tx_valid,
  input  logic [N_LINKS-1:0][7:0]   tx_data,
  output logic [N_LINKS-1:0]        tx_ready,
  input  logic [N_LINKS-1:0]        tx_flush,
  output logic                      out_valid,
  output logic [8:0]                out_data,   // {last, byte}
  input  logic                      out_ready,
  output logic [15:0]               frame_count
);
  localparam int MAX_PAYLOAD = MAX_FRAME - 3;
  localparam int CW = $clog2(FIFO_DEPTH + 1);
  localparam int LW = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;

  logic [N_LINKS-1:0]         f_full, f_empty, f_pop;
  logic [N_LINKS-1:0][7:0]    f_dout;
  logic [N_LINKS-1:0][CW-1:0] f_cnt;
  logic [N_LINKS-1:0]         eligible;
  logic [N_LINKS-1:0][CW-1:0] flush_left;   // bytes still owed to a flush

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(tx_valid[i]), .din(tx_data[i]), .full(f_full[i]),
      .pop(f_pop[i]), .dout(f_dout[i]), .empty(f_empty[i]), .count(f_cnt[i]));
    assign tx_ready[i] = !f_full[i];
    assign eligible[i] = (32'(f_cnt[i]) >= MAX_PAYLOAD) || (flush_left[i] != '0);
  end

  typedef enum logic [1:0] { S_IDLE, S_HDR, S_DATA } m_state_e;
  m_state_e st;
  logic [1:0]    hdr_idx;
  logic [LW-1:0] cur, last_served;
  logic [15:0]   size, sent;

  // round robin: first eligible link after the last one served
  logic          found;
  logic [LW-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N_LINKS; k++) begin
      logic [LW-1:0] idx;
      idx = LW'((int'(last_served) + k) % N_LINKS);
      if (!found && eligible[idx]) begin
        found = 1'b1;
        pick  = LW'(idx);
      end
    end
  end

  logic take;
  assign take = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; hdr_idx <= '0; cur <= '0; last_served <= LW'(N_LINKS - 1);
      size <= '0; sent <= '0; flush_left <= '0; frame_count <= '0;
    end else begin
      for (int i = 0; i < N_LINKS; i++) begin
        if (tx_flush[i])
          flush_left[i] <= f_cnt[i] + CW'(tx_valid[i] && tx_ready[i]) - CW'(f_pop[i]);
        else if (f_pop[i] && flush_left[i] != '0)
          flush_left[i] <= flush_left[i] - 1'b1;
      end
      unique case (st)
        S_IDLE: if (found) begin
          cur <= pick;
          size <= (32'(f_cnt[pick]) >= MAX_PAYLOAD) ? 16'(MAX_PAYLOAD) : 16'(f_cnt[pick]);
          sent <= '0; hdr_idx <= '0; st <= S_HDR;
        end
        S_HDR: if (take) begin
          hdr_idx <= hdr_idx + 1'b1;
          if (hdr_idx == 2'd2) st <= S_DATA;
        end
        S_DATA: if (take) begin
          sent <= sent + 1'b1;
          if (sent == size - 1'b1) begin
            st <= S_IDLE; last_served <= cur; frame_count <= frame_count + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    f_pop     = '0;
    unique case (st)
      S_HDR: begin
        out_valid = 1'b1;
        unique case (hdr_idx)
          2'd0:    out_data = {1'b0, 8'(cur)};
          2'd1:    out_data = {1'b0, size[15:8]};
          default: out_data = {1'b0, size[7:0]};
        endcase
      end
      S_DATA: begin
        out_valid  = 1'b1;
        out_data   = {sent == size - 1'b1, f_dout[cur]};
        f_pop[cur] = out_ready;
      end
      default: ;
    endcase
  end
endmodule
