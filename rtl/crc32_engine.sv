// crc32_engine: running CRC-32 register that folds up to four bytes per clock.
//
// Each cycle with `en` high, the `nbytes` (1..4) lowest byte lanes of `data`
// are folded into the CRC register, lane 0 (data[7:0]) first, so a 32-bit word
// holds bytes in little-endian address order. `init` reloads the preset
// (all ones) and takes priority over `en`. `crc` is the raw register: the
// caller applies any final inversion. The byte update is the reflected form of
// generator 0x04C11DB7 (see wimax_pkg); four byte steps are unrolled into one
// combinational stage, so the result of a word is visible the next cycle.
//
// The design specifies only that the module computes the CRC-32 of the PDU;
// the four-byte-per-clock width is this implementation's choice.
module crc32_engine
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [31:0] data,
  input  logic [2:0]  nbytes,   // 1..4 valid lanes starting at lane 0
  output logic [31:0] crc
);

  logic [31:0] crc_q, crc_d;

  always_comb begin
    crc_d = crc_q;
    for (int k = 0; k < 4; k++)
      if (k < int'(nbytes)) crc_d = crc32_byte(crc_d, data[8*k +: 8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc_q <= CRC32_INIT;
    else if (init) crc_q <= CRC32_INIT;
    else if (en)   crc_q <= crc_d;
  end

  assign crc = crc_q;

endmodule
