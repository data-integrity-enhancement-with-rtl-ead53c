// hsiao_encoder -- check-bit generator of the (24,16) Hsiao SEC-DED code.
//
// Check bit r is the XOR of the data bits whose column in the Hsiao
// parity-check matrix (edac_pkg::HSIAO_COL) has a one in row r. Every data
// column has weight 3 and every row of the data part has six ones, so each
// check bit is a 6-input XOR tree and every data bit feeds three of them.
// The column-weight, row-weight and minimum-ones rules and the search that
// picks the matrix follow the document; the particular matrix is the first
// one that search finds.
//
// Interface: data (16 bits) in, check (8 bits) out. Purely combinational.
module hsiao_encoder
  import edac_pkg::*;
(
  input  logic [DATA_W-1:0] data,
  output logic [CHK_W-1:0]  check
);

  always_comb begin
    check = '0;
    for (int j = 0; j < DATA_W; j++)
      if (data[j]) check ^= HSIAO_COL[j];
  end

endmodule
