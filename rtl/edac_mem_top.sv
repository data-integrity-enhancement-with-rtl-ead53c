// edac_mem_top -- interleaved Hsiao/CRC EDAC protecting a narrow memory.
//
// A 32-bit message from the host is encoded by two interleaved SEC-DED
// encoders (even message bits through one, odd bits through the other)
// into a 16-bit check-bit. The controller stores the resulting 48-bit
// codeword in an 8-bit or 16-bit memory device: the message at the host's
// address, the check-bit at the top of the address space (last message
// address shifted right and inverted). On a read it fetches the codeword,
// the interleaved decoder corrects one error in each half, and a corrected
// codeword is scrubbed back to memory before the host gets its data. The
// structure follows the document; the host handshake and the memory bus
// are this design's own.
//
// Parameters: MEM_W (8 or 16) is the memory device width; EVEN_CODE and
// ODD_CODE select Hsiao or CRC for each half (default Hsiao even, CRC odd).
// Ports: host request/response (valid/ready in, one-cycle response pulse
// out), and a synchronous memory bus with read data one cycle after the
// read beat. Timing is that of codeword_mem_ctrl; encoder and decoder add
// no cycles.
module edac_mem_top
  import edac_pkg::*;
#(
  parameter int unsigned MEM_W     = 8,
  parameter code_e       EVEN_CODE = CODE_HSIAO,
  parameter code_e       ODD_CODE  = CODE_CRC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  req_t              req,
  output logic              resp_valid,
  output resp_t             resp,
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [MEM_W-1:0]  mem_wdata,
  input  logic [MEM_W-1:0]  mem_rdata
);

  logic [MSG_W-1:0] enc_msg, dec_msg, dec_msg_corr;
  logic [CB_W-1:0]  enc_check, dec_check, dec_check_corr;
  logic [CHK_W-1:0] even_syn, odd_syn;
  err_e             even_err, odd_err;

  interleaved_encoder #(.EVEN_CODE(EVEN_CODE), .ODD_CODE(ODD_CODE)) u_enc (
    .msg(enc_msg), .check(enc_check)
  );

  interleaved_decoder #(.EVEN_CODE(EVEN_CODE), .ODD_CODE(ODD_CODE)) u_dec (
    .msg_in(dec_msg), .check_in(dec_check),
    .msg_out(dec_msg_corr), .check_out(dec_check_corr),
    .even_syndrome(even_syn), .odd_syndrome(odd_syn),
    .even_err(even_err), .odd_err(odd_err)
  );

  codeword_mem_ctrl #(.MEM_W(MEM_W)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req, .resp_valid, .resp,
    .enc_msg, .enc_check,
    .dec_msg, .dec_check, .dec_msg_corr, .dec_check_corr,
    .dec_even_err(even_err), .dec_odd_err(odd_err),
    .dec_even_syn(even_syn), .dec_odd_syn(odd_syn),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

endmodule
