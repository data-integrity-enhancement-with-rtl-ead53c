// interleaved_decoder -- syndrome generators and correctors of the
// interleaved EDAC.
//
// The 48-bit codeword (32-bit message, 16-bit check-bit) is split into the
// even and odd halves exactly as interleaved_encoder builds them. Each half
// goes through its own SEC-DED decoder (Hsiao or CRC, per EVEN_CODE /
// ODD_CODE), and the corrected halves are interleaved back. One error in
// each half is corrected, so the decoder repairs any single-bit error, any
// double-adjacent error, and any double error with one bit in an even and
// one in an odd position. Two errors in the same half are reported as
// ERR_DETECTED in that half's status.
//
// Interface: msg_in/check_in in; corrected msg_out/check_out, the two
// syndromes and the two statuses out. Purely combinational.
module interleaved_decoder
  import edac_pkg::*;
#(
  parameter code_e EVEN_CODE = CODE_HSIAO,
  parameter code_e ODD_CODE  = CODE_CRC
) (
  input  logic [MSG_W-1:0] msg_in,
  input  logic [CB_W-1:0]  check_in,
  output logic [MSG_W-1:0] msg_out,
  output logic [CB_W-1:0]  check_out,
  output logic [CHK_W-1:0] even_syndrome,
  output logic [CHK_W-1:0] odd_syndrome,
  output err_e             even_err,
  output err_e             odd_err
);

  logic [DATA_W-1:0] even_d, odd_d, even_dc, odd_dc;
  logic [CHK_W-1:0]  even_c, odd_c, even_cc, odd_cc;

  always_comb begin
    for (int i = 0; i < DATA_W; i++) begin
      even_d[i] = msg_in[2*i];
      odd_d[i]  = msg_in[2*i+1];
    end
    for (int i = 0; i < CHK_W; i++) begin
      even_c[i] = check_in[2*i];
      odd_c[i]  = check_in[2*i+1];
    end
  end

  if (EVEN_CODE == CODE_HSIAO) begin : g_even_hsiao
    logic unused_double;
    hsiao_decoder u_even (
      .data_in(even_d), .check_in(even_c), .data_out(even_dc),
      .check_out(even_cc), .syndrome(even_syndrome), .status(even_err),
      .double_err(unused_double)
    );
  end else begin : g_even_crc
    crc8_decoder u_even (
      .data_in(even_d), .check_in(even_c), .data_out(even_dc),
      .check_out(even_cc), .syndrome(even_syndrome), .status(even_err)
    );
  end

  if (ODD_CODE == CODE_HSIAO) begin : g_odd_hsiao
    logic unused_double;
    hsiao_decoder u_odd (
      .data_in(odd_d), .check_in(odd_c), .data_out(odd_dc),
      .check_out(odd_cc), .syndrome(odd_syndrome), .status(odd_err),
      .double_err(unused_double)
    );
  end else begin : g_odd_crc
    crc8_decoder u_odd (
      .data_in(odd_d), .check_in(odd_c), .data_out(odd_dc),
      .check_out(odd_cc), .syndrome(odd_syndrome), .status(odd_err)
    );
  end

  always_comb begin
    for (int i = 0; i < DATA_W; i++) begin
      msg_out[2*i]   = even_dc[i];
      msg_out[2*i+1] = odd_dc[i];
    end
    for (int i = 0; i < CHK_W; i++) begin
      check_out[2*i]   = even_cc[i];
      check_out[2*i+1] = odd_cc[i];
    end
  end

endmodule
