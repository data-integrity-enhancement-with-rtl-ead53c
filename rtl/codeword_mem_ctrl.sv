// codeword_mem_ctrl -- fault-tolerant memory controller that keeps 48-bit
// EDAC codewords in a narrow (8-bit or 16-bit) memory device.
//
// Storage format. A codeword is the 32-bit message plus its 16-bit
// check-bit. The message goes to the host's byte address A (4-byte aligned)
// as four bytes (MEM_W = 8) or two 16-bit words (MEM_W = 16), least
// significant part first. The check-bit goes to the top of the address
// space: the controller takes the address of the last message beat,
// L = A + 4 - MEM_W/8, shifts it right by one and inverts it. For A = 0 on
// an 8-bit device this gives L = 0000_0003h and check address FFFF_FFFEh;
// the low check byte is written there and the high byte at FFFF_FFFFh. On a
// 16-bit device L = 0000_0002h and the whole check-bit is one word at
// FFFF_FFFEh. Message space grows up from 0 and check space down from the
// top, two check bytes for every four message bytes. This address
// algorithm follows the document; the byte order within the message and
// the 16-bit word is this design's choice.
//
// Operation. The controller accepts one request at a time (req_valid /
// req_ready). A write takes the check-bit from the encoder (enc_msg is the
// request's data, enc_check comes back combinationally) and issues
// NBEATS = 48/MEM_W back-to-back write beats. A read issues NBEATS read
// beats, collects the codeword, hands it to the decoder (dec_msg/dec_check
// out; corrected results, statuses and syndromes back) and answers with the corrected
// message. When the decoder corrected an error and found none it could not
// correct, the controller scrubs: it writes the corrected codeword back to
// the same location (NBEATS more write beats) before it answers, and sets
// resp.scrubbed. An uncorrectable word is answered with its status and is
// not written back. Scrubbing on correction follows the document; the
// handshake, the timing and the no-write-back rule are this design's own.
//
// Memory bus: one access per cycle, mem_en with mem_we; read data is
// expected on mem_rdata one cycle after the read beat (a synchronous SRAM).
// Timing, with NBEATS = 6 (8-bit) or 3 (16-bit), counted in clock edges
// from the one that accepts the request to the first cycle resp_valid is
// high: a write takes NBEATS + 1, a read NBEATS + 3 (beats, last data,
// decode, answer), a scrubbed read 2 * NBEATS + 3. resp_valid is a
// one-cycle pulse and a new request is accepted from that cycle on.
// Asynchronous active-low reset.
module codeword_mem_ctrl
  import edac_pkg::*;
#(
  parameter int unsigned MEM_W = 8   // memory device width: 8 or 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              req_valid,
  output logic              req_ready,
  input  req_t              req,
  output logic              resp_valid,
  output resp_t             resp,
  // to the interleaved encoder
  output logic [MSG_W-1:0]  enc_msg,
  input  logic [CB_W-1:0]   enc_check,
  // to the interleaved decoder
  output logic [MSG_W-1:0]  dec_msg,
  output logic [CB_W-1:0]   dec_check,
  input  logic [MSG_W-1:0]  dec_msg_corr,
  input  logic [CB_W-1:0]   dec_check_corr,
  input  err_e              dec_even_err,
  input  err_e              dec_odd_err,
  input  logic [CHK_W-1:0]  dec_even_syn,
  input  logic [CHK_W-1:0]  dec_odd_syn,
  // memory device
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [MEM_W-1:0]  mem_wdata,
  input  logic [MEM_W-1:0]  mem_rdata
);

  localparam int unsigned BYTES_PER_BEAT = MEM_W / 8;
  localparam int unsigned MSG_BEATS      = MSG_W / MEM_W;
  localparam int unsigned NBEATS         = CW_W / MEM_W;
  localparam int unsigned BEAT_W         = $clog2(NBEATS);

  if (MEM_W != 8 && MEM_W != 16) begin : g_bad_width
    $error("codeword_mem_ctrl: MEM_W must be 8 or 16");
  end

  typedef enum logic [2:0] {
    S_IDLE, S_WRITE, S_READ, S_READ_LAST, S_CHECK, S_SCRUB, S_RESP
  } state_e;

  state_e              state;
  logic [ADDR_W-1:0]   base;      // message byte address
  logic [ADDR_W-1:0]   chk_base;  // check-bit byte address
  logic [CW_W-1:0]     cw;        // {check-bit, message}
  logic [BEAT_W-1:0]   beat;
  logic [BEAT_W-1:0]   cap_beat;
  logic                cap_valid;
  logic                was_read;
  err_e                even_err_q, odd_err_q;
  logic                scrubbed_q;
  logic [CHK_W-1:0]    even_syn_q, odd_syn_q;
  logic [ADDR_W-1:0]   aligned;

  assign aligned = {req.addr[ADDR_W-1:2], 2'b00};

  // Check-bit address: last message beat address, shifted right, inverted.
  function automatic logic [ADDR_W-1:0] check_addr(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] last;
    last = a + ADDR_W'(4 - BYTES_PER_BEAT);
    return ~(last >> 1);
  endfunction

  assign req_ready = (state == S_IDLE);
  assign enc_msg   = req.wdata;
  assign dec_msg   = cw[MSG_W-1:0];
  assign dec_check = cw[CW_W-1:MSG_W];

  // Memory beat generation
  always_comb begin
    mem_en    = (state == S_WRITE) || (state == S_READ) || (state == S_SCRUB);
    mem_we    = (state == S_WRITE) || (state == S_SCRUB);
    mem_wdata = cw[beat*MEM_W +: MEM_W];
    if (beat < BEAT_W'(MSG_BEATS))
      mem_addr = base + ADDR_W'(beat) * ADDR_W'(BYTES_PER_BEAT);
    else
      mem_addr = chk_base + ADDR_W'(beat - BEAT_W'(MSG_BEATS)) * ADDR_W'(BYTES_PER_BEAT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      base       <= '0;
      chk_base   <= '0;
      cw         <= '0;
      beat       <= '0;
      cap_beat   <= '0;
      cap_valid  <= 1'b0;
      was_read   <= 1'b0;
      even_err_q <= ERR_NONE;
      odd_err_q  <= ERR_NONE;
      scrubbed_q <= 1'b0;
      even_syn_q <= '0;
      odd_syn_q  <= '0;
      resp_valid <= 1'b0;
      resp       <= '0;
    end else begin
      resp_valid <= 1'b0;
      cap_valid  <= 1'b0;
      if (cap_valid) cw[cap_beat*MEM_W +: MEM_W] <= mem_rdata;

      unique case (state)
        S_IDLE: if (req_valid) begin
          base       <= aligned;
          chk_base   <= check_addr(aligned);
          beat       <= '0;
          was_read   <= !req.write;
          even_err_q <= ERR_NONE;
          odd_err_q  <= ERR_NONE;
          scrubbed_q <= 1'b0;
          even_syn_q <= '0;
          odd_syn_q  <= '0;
          if (req.write) begin
            cw    <= {enc_check, req.wdata};
            state <= S_WRITE;
          end else begin
            state <= S_READ;
          end
        end
        S_WRITE, S_SCRUB: begin
          beat <= beat + 1'b1;
          if (beat == BEAT_W'(NBEATS - 1)) state <= S_RESP;
        end
        S_READ: begin
          cap_valid <= 1'b1;
          cap_beat  <= beat;
          beat      <= beat + 1'b1;
          if (beat == BEAT_W'(NBEATS - 1)) state <= S_READ_LAST;
        end
        S_READ_LAST: state <= S_CHECK;   // last read beat lands in cw
        S_CHECK: begin
          even_err_q <= dec_even_err;
          odd_err_q  <= dec_odd_err;
          even_syn_q <= dec_even_syn;
          odd_syn_q  <= dec_odd_syn;
          beat       <= '0;
          cw         <= {dec_check_corr, dec_msg_corr};
          if ((dec_even_err == ERR_CORRECTED || dec_odd_err == ERR_CORRECTED) &&
              dec_even_err != ERR_DETECTED && dec_odd_err != ERR_DETECTED) begin
            scrubbed_q <= 1'b1;
            state      <= S_SCRUB;
          end else begin
            state      <= S_RESP;
          end
        end
        S_RESP: begin
          resp_valid     <= 1'b1;
          resp.rdata     <= was_read ? cw[MSG_W-1:0] : '0;
          resp.even_err  <= even_err_q;
          resp.odd_err   <= odd_err_q;
          resp.scrubbed  <= scrubbed_q;
          resp.even_syn  <= even_syn_q;
          resp.odd_syn   <= odd_syn_q;
          state          <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request must stay unchanged until it is accepted.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req);
  endproperty
  a_req_stable: assert property (p_req_stable)
    else $error("codeword_mem_ctrl: request changed before it was accepted");

endmodule
