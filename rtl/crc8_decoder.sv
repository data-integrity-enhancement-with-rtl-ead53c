// crc8_decoder -- syndrome generator and SEC-DED corrector of the (24,16)
// CRC-based EDAC.
//
// The syndrome is the stored check byte XOR the CRC recomputed from the
// received data (a crc8_encoder instance). Because the generator gives the
// 24-bit code minimum distance 4, the 24 single-bit errors have distinct
// non-zero syndromes: crc_col(j) for data bit j, a one-hot byte for check
// bit r. A syndrome equal to one of them is corrected by flipping that bit;
// any other non-zero syndrome (every double-bit error among them) is
// reported as detected and uncorrectable, and the received bits pass
// through unchanged. Correction by syndrome matching is this design's
// choice; the document gives only the encoder and calls the EDAC SEC-DED.
//
// Interface: received data/check in; corrected data/check, the syndrome and
// the status out. Purely combinational.
module crc8_decoder
  import edac_pkg::*;
#(
  parameter logic [CHK_W-1:0] POLY = CRC_POLY
) (
  input  logic [DATA_W-1:0] data_in,
  input  logic [CHK_W-1:0]  check_in,
  output logic [DATA_W-1:0] data_out,
  output logic [CHK_W-1:0]  check_out,
  output logic [CHK_W-1:0]  syndrome,
  output err_e              status
);

  logic [CHK_W-1:0] recomputed;

  crc8_encoder #(.POLY(POLY)) u_enc (.data(data_in), .check(recomputed));

  assign syndrome = recomputed ^ check_in;

  always_comb begin
    logic hit;
    hit       = 1'b0;
    data_out  = data_in;
    check_out = check_in;
    for (int j = 0; j < DATA_W; j++)
      if (syndrome == crc_col(j, POLY)) begin
        data_out[j] = ~data_in[j];
        hit = 1'b1;
      end
    for (int r = 0; r < CHK_W; r++)
      if (syndrome == col_t'(1) << r) begin
        check_out[r] = ~check_in[r];
        hit = 1'b1;
      end
    if (syndrome == '0) status = ERR_NONE;
    else if (hit)       status = ERR_CORRECTED;
    else                status = ERR_DETECTED;
  end

endmodule
