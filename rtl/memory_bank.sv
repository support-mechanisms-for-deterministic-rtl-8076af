// memory_bank -- slotted packet memory for one packet type and priority.
//
// The memory is divided into SLOTS slots of SLOT_BYTES bytes, each large
// enough for the biggest frame of its type; slot n starts at byte
// n * SLOT_BYTES. It has two independent ports so that the producer and the
// consumer of packets work at the same time: port A writes one byte per cycle,
// port B reads one byte per cycle with one cycle of latency (block RAM
// style). A slot_manager tracks which slots are in use.
//
// Sizes follow the original dimensioning: 8 slots per bank, 2344-byte slots
// for non real-time frames and 512-byte slots for real-time frames. Using a
// simple dual-port (write A / read B) memory rather than two read/write
// ports is this design's choice, as no user needs more.
module memory_bank #(
  parameter int SLOTS      = 8,
  parameter int SLOT_BYTES = 2344,
  parameter int ID_W       = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  parameter int OFF_W      = $clog2(SLOT_BYTES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // memory manager
  input  logic             alloc,
  output logic [ID_W-1:0]  alloc_id,
  output logic             full,
  input  logic             free,
  input  logic [ID_W-1:0]  rel_id,
  // port A: write
  input  logic             wr_en,
  input  logic [ID_W-1:0]  wr_id,
  input  logic [OFF_W-1:0] wr_off,
  input  logic [7:0]       wr_data,
  // port B: read, data one cycle after the address
  input  logic [ID_W-1:0]  rd_id,
  input  logic [OFF_W-1:0] rd_off,
  output logic [7:0]       rd_data
);
  localparam int DEPTH = SLOTS * SLOT_BYTES;
  localparam int AW    = $clog2(DEPTH);

  logic [7:0] mem [DEPTH];
  logic [SLOTS-1:0] in_use;

  slot_manager #(.SLOTS(SLOTS), .ID_W(ID_W)) u_mgr (
    .clk, .rst_n, .alloc, .alloc_id, .full, .free, .rel_id, .in_use);

  function automatic logic [AW-1:0] addr(input logic [ID_W-1:0] id, input logic [OFF_W-1:0] off);
    return AW'(id) * AW'(SLOT_BYTES) + AW'(off);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_off) < SLOT_BYTES) mem[addr(wr_id, wr_off)] <= wr_data;
    rd_data <= mem[addr(rd_id, rd_off)];
  end
endmodule
