// fcs_crc32 -- IEEE 802.11 frame check sequence, one octet per cycle.
//
// CRC-32 with generator 0x04C11DB7, processed least significant bit first
// (reflected form 0xEDB88320), register preset to all ones. `init` presets
// the register, `en` folds `data` into it. For transmission, `fcs` is the
// ones' complement of the register and its octets are sent low byte first.
// For reception the whole frame, FCS included, is folded in; `check_ok` is
// then high when the register holds the fixed residue 0xDEBB20E3.
//
// The Lower MAC generates and checks the FCS of every frame; the CRC itself
// is the one the 802.11 standard defines.
module fcs_crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [31:0] fcs,
  output logic        check_ok
);
  localparam logic [31:0] POLY_R  = 32'hEDB8_8320;
  localparam logic [31:0] RESIDUE = 32'hDEBB_20E3;

  logic [31:0] crc, nxt;

  always_comb begin
    nxt = crc ^ {24'h0, data};
    for (int b = 0; b < 8; b++)
      nxt = nxt[0] ? ((nxt >> 1) ^ POLY_R) : (nxt >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= nxt;
  end

  assign fcs      = ~crc;
  assign check_ok = (crc == RESIDUE);
endmodule
