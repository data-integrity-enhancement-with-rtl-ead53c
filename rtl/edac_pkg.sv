// edac_pkg -- constants and types shared by the interleaved Hsiao/CRC EDAC.
//
// Each half of the interleaved EDAC is a (24,16) single-error-correcting,
// double-error-detecting code: 16 data bits protected by 8 check bits.
//
// Hsiao code: the parity-check matrix is H = [D | I8]. D holds 16 distinct
// columns of weight 3 taken from the C(8,3) = 56 weight-3 vectors, chosen so
// that every row of D holds exactly six ones (seven with the identity part).
// HSIAO_COL below is the first such choice met when the 56 vectors are
// listed in lexicographic order of their row indexes and the C(56,16)
// subsets are tried in lexicographic order. Bit r of HSIAO_COL[j] is the
// entry in row r+1 of data column j.
//
// CRC code: the check byte is the remainder of the 16-bit message times x^8
// divided by the generator CRC_POLY, with a zero seed, message MSB first.
// The generator polynomial x^8 + x^2 + x + 1 (0x07) is this design's choice;
// with 16 message bits it gives every single-bit error a distinct non-zero
// syndrome and no double-bit error the syndrome of a single-bit error
// (minimum distance 4), which is what SEC-DED decoding needs. crc_col()
// returns the syndrome of a single error in data bit j (a column of the
// CRC encoder matrix); the check bits contribute the identity part.
//
// The host side of the memory controller uses req_t / resp_t; err_e is the
// status one SEC-DED half reports.
package edac_pkg;

  localparam int unsigned DATA_W  = 16;         // data bits per half
  localparam int unsigned CHK_W   = 8;          // check bits per half
  localparam int unsigned MSG_W   = 2 * DATA_W; // 32-bit message
  localparam int unsigned CB_W    = 2 * CHK_W;  // 16-bit check-bit
  localparam int unsigned CW_W    = MSG_W + CB_W; // 48-bit codeword
  localparam int unsigned ADDR_W  = 32;

  typedef logic [CHK_W-1:0] col_t;

  // Data columns of the Hsiao parity-check matrix (row r -> bit r).
  localparam col_t HSIAO_COL [DATA_W] = '{
    8'h07, 8'h0b, 8'h13, 8'h23, 8'h43, 8'h83, 8'h1c, 8'h2c,
    8'h4c, 8'h8c, 8'h34, 8'hc8, 8'h70, 8'hb0, 8'hd0, 8'he0
  };

  localparam logic [CHK_W-1:0] CRC_POLY = 8'h07;  // x^8 + x^2 + x + 1

  // CRC remainder of a 16-bit message, zero seed, MSB first.
  function automatic logic [CHK_W-1:0] crc8(input logic [DATA_W-1:0] d,
                                            input logic [CHK_W-1:0] poly);
    logic [CHK_W-1:0] r;
    logic fb;
    r = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb = d[i] ^ r[CHK_W-1];
      r  = {r[CHK_W-2:0], 1'b0} ^ (fb ? poly : '0);
    end
    return r;
  endfunction

  // Column j of the CRC encoder matrix: the check byte of a message with
  // only bit j set.
  function automatic col_t crc_col(input int unsigned j,
                                   input logic [CHK_W-1:0] poly);
    return crc8(DATA_W'(1) << j, poly);
  endfunction

  typedef enum logic [0:0] { CODE_HSIAO = 1'b0, CODE_CRC = 1'b1 } code_e;

  typedef enum logic [1:0] {
    ERR_NONE      = 2'd0,   // syndrome zero
    ERR_CORRECTED = 2'd1,   // single-bit error found and corrected
    ERR_DETECTED  = 2'd2    // error found that cannot be corrected
  } err_e;

  typedef struct packed {
    logic              write;  // 1: store wdata, 0: read
    logic [ADDR_W-1:0] addr;   // byte address of the 32-bit message
    logic [MSG_W-1:0]  wdata;
  } req_t;

  typedef struct packed {
    logic [MSG_W-1:0]  rdata;      // corrected message (reads)
    err_e              even_err;   // status of the even half
    err_e              odd_err;    // status of the odd half
    logic              scrubbed;   // corrected codeword was written back
    logic [CHK_W-1:0]  even_syn;   // syndrome of the even half (reads)
    logic [CHK_W-1:0]  odd_syn;    // syndrome of the odd half (reads)
  } resp_t;

endpackage
