// hsiao_decoder -- syndrome generator and SEC-DED corrector of the (24,16)
// Hsiao code.
//
// The syndrome is the stored check byte XOR the check byte recomputed from
// the received data (an hsiao_encoder instance). A zero syndrome means no
// error. A syndrome equal to a data column of H flips that data bit; one of
// weight 1 points at a check bit, which is flipped in the corrected check
// output. Any other non-zero syndrome is reported as detected and
// uncorrectable: an even-weight syndrome is a double-bit error (the odd
// column weights of a Hsiao matrix guarantee this), an odd-weight one that
// matches no column is an error of three or more bits. double_err flags the
// even-weight case on its own. The outputs for an uncorrectable word pass
// the received bits through unchanged; the document only says such data is
// reported and discarded.
//
// Interface: received data/check in; corrected data/check, the syndrome and
// the status out. Purely combinational.
module hsiao_decoder
  import edac_pkg::*;
(
  input  logic [DATA_W-1:0] data_in,
  input  logic [CHK_W-1:0]  check_in,
  output logic [DATA_W-1:0] data_out,
  output logic [CHK_W-1:0]  check_out,
  output logic [CHK_W-1:0]  syndrome,
  output err_e              status,
  output logic              double_err
);

  logic [CHK_W-1:0] recomputed;

  hsiao_encoder u_enc (.data(data_in), .check(recomputed));

  assign syndrome = recomputed ^ check_in;

  always_comb begin
    logic hit;
    hit       = 1'b0;
    data_out  = data_in;
    check_out = check_in;
    for (int j = 0; j < DATA_W; j++)
      if (syndrome == HSIAO_COL[j]) begin
        data_out[j] = ~data_in[j];
        hit = 1'b1;
      end
    for (int r = 0; r < CHK_W; r++)
      if (syndrome == col_t'(1) << r) begin
        check_out[r] = ~check_in[r];
        hit = 1'b1;
      end
    double_err = (syndrome != '0) && !(^syndrome);
    if (syndrome == '0) status = ERR_NONE;
    else if (hit)       status = ERR_CORRECTED;
    else                status = ERR_DETECTED;
  end

endmodule
