// crc8_encoder -- check-bit generator of the (24,16) CRC-based EDAC.
//
// The 8 check bits are the remainder of the polynomial division of the
// 16-bit message (times x^8) by the generator POLY over GF(2). The seed is
// zero, as the document sets it, so the seed contributes no XOR gates and
// the whole division reduces to a fixed XOR matrix: check bit r is the XOR
// of the message bits j whose single-bit remainder crc_col(j) has bit r set.
// The matrix is computed at elaboration from POLY. The default generator,
// x^8 + x^2 + x + 1, is this design's choice (the document only asks for an
// 8-bit generator); it gives the 24-bit codeword minimum distance 4.
//
// Interface: data (16 bits) in, check (8 bits) out. Purely combinational.
module crc8_encoder
  import edac_pkg::*;
#(
  parameter logic [CHK_W-1:0] POLY = CRC_POLY
) (
  input  logic [DATA_W-1:0] data,
  output logic [CHK_W-1:0]  check
);

  always_comb begin
    check = '0;
    for (int j = 0; j < DATA_W; j++)
      if (data[j]) check ^= crc_col(j, POLY);
  end

endmodule
