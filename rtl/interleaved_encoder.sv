// interleaved_encoder -- check-bit generator of the interleaved EDAC.
//
// The 32-bit message is split by bit position: the even bits (0, 2, .., 30)
// form the 16-bit word of the even encoder and the odd bits (1, 3, .., 31)
// that of the odd encoder. Each encoder produces 8 check bits, and the
// 16-bit check-bit interleaves them again: check-bit 2i comes from the even
// encoder, 2i+1 from the odd one. Two physically adjacent bits of the
// 48-bit codeword therefore always belong to different SEC-DED codes, so a
// double-adjacent error is two correctable single errors.
//
// EVEN_CODE / ODD_CODE choose the code of each half (Hsiao or CRC). The
// default pairs a Hsiao even half with a CRC odd half, the combination the
// document's title and summary name; setting both to the same code gives
// the identical-encoder configuration its interleaving section describes.
// The even/odd split and the check-bit interleave follow the document's
// figure; the bit order inside each half is this design's choice.
//
// Interface: msg (32 bits) in, check (16 bits) out. Purely combinational.
module interleaved_encoder
  import edac_pkg::*;
#(
  parameter code_e EVEN_CODE = CODE_HSIAO,
  parameter code_e ODD_CODE  = CODE_CRC
) (
  input  logic [MSG_W-1:0] msg,
  output logic [CB_W-1:0]  check
);

  logic [DATA_W-1:0] even_d, odd_d;
  logic [CHK_W-1:0]  even_c, odd_c;

  always_comb
    for (int i = 0; i < DATA_W; i++) begin
      even_d[i] = msg[2*i];
      odd_d[i]  = msg[2*i+1];
    end

  if (EVEN_CODE == CODE_HSIAO) begin : g_even_hsiao
    hsiao_encoder u_even (.data(even_d), .check(even_c));
  end else begin : g_even_crc
    crc8_encoder  u_even (.data(even_d), .check(even_c));
  end

  if (ODD_CODE == CODE_HSIAO) begin : g_odd_hsiao
    hsiao_encoder u_odd (.data(odd_d), .check(odd_c));
  end else begin : g_odd_crc
    crc8_encoder  u_odd (.data(odd_d), .check(odd_c));
  end

  always_comb
    for (int i = 0; i < CHK_W; i++) begin
      check[2*i]   = even_c[i];
      check[2*i+1] = odd_c[i];
    end

endmodule
