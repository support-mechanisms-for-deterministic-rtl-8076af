// slot_manager -- memory manager of one packet memory bank.
//
// Keeps one "in use" bit per fixed-size slot. The lowest free slot is always
// presented on alloc_id (valid while full is low); pulsing alloc for one
// cycle claims it, pulsing free frees rel_id. Both take effect at the next
// clock edge, so a slot is allocated or released in a single cycle and both
// may happen in the same cycle. A free of a slot that is not in use is
// ignored; an alloc while full is ignored.
//
// The single-cycle allocate/free and the full flag follow the original
// description of the memory manager; the bitmap with a priority encoder is
// this design's choice of the simplest logic that does it.
module slot_manager #(
  parameter int SLOTS = 8,
  parameter int ID_W  = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            alloc,      // claim alloc_id
  output logic [ID_W-1:0] alloc_id,   // lowest free slot
  output logic            full,       // no slot free
  input  logic            free,    // free rel_id
  input  logic [ID_W-1:0] rel_id,
  output logic [SLOTS-1:0] in_use
);
  always_comb begin
    alloc_id = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!in_use[i]) alloc_id = ID_W'(i);
  end

  assign full = &in_use;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_use <= '0;
    else begin
      if (free) in_use[rel_id] <= 1'b0;
      if (alloc && !full) in_use[alloc_id] <= 1'b1;
    end
  end

endmodule
