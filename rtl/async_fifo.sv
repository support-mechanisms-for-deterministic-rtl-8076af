// async_fifo -- dual-clock FIFO between the FX2LP interface clock and the
// system clock.
//
// Classic Gray-coded pointer design: each side keeps a binary and a Gray
// pointer one bit wider than the address, the Gray pointer of the other side
// is brought over through two flip-flops, and full/empty are computed from
// the local pointer and the synchronised remote one (both conservative).
// The read side is first-word-fall-through: rdata shows the oldest word
// while rempty is low and rd_en removes it. Writes while full and reads while
// empty are ignored. DEPTH must be a power of two.
//
// The original description only states that dual-clock FIFOs cross between
// the two clock domains; this implementation and its depth are this design's.
module async_fifo #(
  parameter int WIDTH = 9,
  parameter int DEPTH = 1024
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write side
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + (AW+1)'(wr_en && !wfull);
  assign wfull  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n; wgray <= b2g(wbin_n);
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;

  // ---- read side
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + (AW+1)'(rd_en && !rempty);
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n; rgray <= b2g(rbin_n);
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
  end
endmodule
