// command_processor -- decodes the host's (UMAC's) requests for one radio.
//
// Requests arrive as a byte stream (valid/ready) from the host link. Each
// starts with an operation code followed by its parameters, most significant
// byte first:
//   OP_TX    power rate backoff[15:0] len[15:0] data[len]   best effort
//   OP_TX_TT power rate time[63:0]    len[15:0] data[len]   time triggered
//   OP_CHAN  channel                                        change channel
//   OP_CCA   flags(bit 0 = carrier sense enable) threshold  configure CCA
// A transmit request claims a slot of the best-effort or real-time memory
// bank, writes the frame there one byte per cycle and appends a descriptor
// to the matching dispatcher queue. A request that cannot be executed at once
// (bank full, queue full, frame longer than a slot) is consumed and silently
// dropped; dropped_count counts them. Channel and CCA requests take effect
// immediately: a one-cycle cc_request to the PHY shell, a one-cycle cfg_we
// to the CCA controller. Unknown operation codes are skipped one byte at a
// time.
//
// The four requests, sequential execution, the assumption of an error-free
// protocol and dropping what cannot be executed follow the original
// description; the byte layout of the requests is this design's own.
module command_processor
  import lmac_pkg::*;
#(
  parameter int BE_SLOT_BYTES = 2344,
  parameter int TT_SLOT_BYTES = 512,
  parameter int OFF_W         = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request stream
  input  logic                 in_valid,
  input  logic [7:0]           in_data,
  output logic                 in_ready,
  // best-effort memory bank: allocation and write port
  output logic                 be_alloc,
  input  logic [2:0]           be_alloc_id,
  input  logic                 be_mem_full,
  output logic                 be_we,
  output logic [2:0]           be_wr_id,
  output logic [OFF_W-1:0]     be_wr_off,
  // time-triggered memory bank
  output logic                 tt_alloc,
  input  logic [2:0]           tt_alloc_id,
  input  logic                 tt_mem_full,
  output logic                 tt_we,
  output logic [2:0]           tt_wr_id,
  output logic [OFF_W-1:0]     tt_wr_off,
  output logic [7:0]           wr_data,      // shared by both write ports
  // dispatcher queues
  output logic                 be_push,
  output logic                 tt_push,
  output tx_desc_t             desc,
  input  logic                 be_q_full,
  input  logic                 tt_q_full,
  // channel change and CCA configuration
  output logic                 cc_request,
  output logic [CHAN_W-1:0]    cc_value,
  output logic                 cca_we,
  output logic                 cca_cs_en,
  output logic [RSSI_W-1:0]    cca_threshold,
  output logic [15:0]          dropped_count
);
  typedef enum logic [2:0] { S_OP, S_HDR, S_EXEC, S_DATA, S_PUSH } state_e;
  state_e st;

  logic [7:0]  op;
  logic [95:0] hdr;
  logic [3:0]  hdr_left;
  logic [15:0] len, cnt;
  logic        is_tt, drop;
  logic [2:0]  id;

  logic take;
  assign in_ready = (st == S_OP) || (st == S_HDR) || (st == S_DATA);
  assign take     = in_valid && in_ready;

  function automatic logic [3:0] hdr_bytes(input logic [7:0] o);
    unique case (o)
      OP_TX:    return 4'd6;
      OP_TX_TT: return 4'd12;
      OP_CHAN:  return 4'd1;
      OP_CCA:   return 4'd2;
      default:  return 4'd0;
    endcase
  endfunction

  // header fields, by position from the last received byte
  logic [15:0] h_len;
  assign h_len = hdr[15:0];

  logic mem_full, q_full;
  assign mem_full = is_tt ? tt_mem_full : be_mem_full;
  assign q_full   = is_tt ? tt_q_full   : be_q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_OP; op <= '0; hdr <= '0; hdr_left <= '0; len <= '0; cnt <= '0;
      is_tt <= 1'b0; drop <= 1'b0; id <= '0; desc <= '0; dropped_count <= '0;
    end else begin
      unique case (st)
        S_OP: if (take && hdr_bytes(in_data) != 0) begin
          op <= in_data; hdr_left <= hdr_bytes(in_data); st <= S_HDR;
          is_tt <= (in_data == OP_TX_TT);
        end
        S_HDR: if (take) begin
          hdr <= {hdr[87:0], in_data};
          hdr_left <= hdr_left - 1'b1;
          if (hdr_left == 1) st <= S_EXEC;
        end
        S_EXEC: begin
          unique case (op)
            OP_CHAN, OP_CCA: st <= S_OP;
            default: begin
              len <= h_len; cnt <= '0;
              drop <= mem_full || q_full ||
                      (32'(h_len) > (is_tt ? TT_SLOT_BYTES : BE_SLOT_BYTES));
              id <= is_tt ? tt_alloc_id : be_alloc_id;
              desc.len <= LEN_W'(h_len);
              if (is_tt) begin
                desc.power   <= PWR_W'(hdr[95:88]);
                desc.rate    <= RATE_W'(hdr[87:80]);
                desc.ttime   <= hdr[79:16];
                desc.backoff <= '0;
              end else begin
                desc.power   <= PWR_W'(hdr[47:40]);
                desc.rate    <= RATE_W'(hdr[39:32]);
                desc.backoff <= BACKOFF_W'(hdr[31:16]);
                desc.ttime   <= '0;
              end
              desc.id <= is_tt ? tt_alloc_id : be_alloc_id;
              st <= (h_len == 0) ? S_PUSH : S_DATA;
            end
          endcase
        end
        S_DATA: if (take) begin
          cnt <= cnt + 1'b1;
          if (cnt == len - 1'b1) st <= S_PUSH;
        end
        S_PUSH: begin
          if (drop) dropped_count <= dropped_count + 1'b1;
          st <= S_OP;
        end
        default: st <= S_OP;
      endcase
    end
  end

  logic exec_tx, exec_ok;
  assign exec_tx  = (st == S_EXEC) && (op == OP_TX || op == OP_TX_TT);
  assign exec_ok  = exec_tx && !mem_full && !q_full &&
                    (32'(h_len) <= (is_tt ? TT_SLOT_BYTES : BE_SLOT_BYTES));
  assign be_alloc = exec_ok && !is_tt;
  assign tt_alloc = exec_ok &&  is_tt;

  logic wr;
  assign wr        = (st == S_DATA) && take && !drop;
  assign be_we     = wr && !is_tt;
  assign tt_we     = wr &&  is_tt;
  assign be_wr_id  = id;
  assign tt_wr_id  = id;
  assign be_wr_off = OFF_W'(cnt);
  assign tt_wr_off = OFF_W'(cnt);
  assign wr_data   = in_data;

  assign be_push = (st == S_PUSH) && !drop && !is_tt;
  assign tt_push = (st == S_PUSH) && !drop &&  is_tt;

  assign cc_request = (st == S_EXEC) && (op == OP_CHAN);
  assign cca_we     = (st == S_EXEC) && (op == OP_CCA);
  assign cc_value      = hdr[7:0];
  assign cca_cs_en     = hdr[8];
  assign cca_threshold = hdr[7:0];
endmodule
