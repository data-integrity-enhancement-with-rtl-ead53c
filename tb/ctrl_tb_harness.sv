// ctrl_tb_harness -- checks one codeword_mem_ctrl of memory width W against
// the storage format, used by tb_codeword_mem_ctrl for W = 8 and W = 16.
//
// The encoder and decoder are replaced by stubs the harness controls: the
// check-bit of a message is msg[15:0] ^ msg[31:16] ^ A5C3h, and the decoder
// returns the statuses, syndromes and correction masks the harness sets.
// A bus monitor records every write beat. The harness checks: the beat
// addresses and data of writes to codewords 0..3 (message at 4k, check-bit
// at ~((last message beat address) >> 1), low byte first) against the
// document's tables, the device contents, the read path, scrubbing of a
// corrected word, no write-back of an uncorrectable word, and the latency
// of each kind of request. It raises done when finished.
module ctrl_tb_harness
  import edac_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned NB = 48 / W;  // beats per codeword
  localparam int unsigned BB = W / 8;   // bytes per beat

  logic             req_valid, req_ready, resp_valid;
  req_t             req;
  resp_t            resp;
  logic [31:0]      enc_msg, dec_msg, flip_msg;
  logic [15:0]      enc_check, dec_check, flip_chk;
  err_e             st_even, st_odd;
  logic [7:0]       syn_even, syn_odd;
  logic             mem_en, mem_we;
  logic [31:0]      mem_addr;
  logic [W-1:0]     mem_wdata, mem_rdata;

  function automatic logic [15:0] stub_check(input logic [31:0] m);
    return m[15:0] ^ m[31:16] ^ 16'ha5c3;
  endfunction

  assign enc_check = stub_check(enc_msg);

  codeword_mem_ctrl #(.MEM_W(W)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp,
    .enc_msg, .enc_check, .dec_msg, .dec_check,
    .dec_msg_corr(dec_msg ^ flip_msg), .dec_check_corr(dec_check ^ flip_chk),
    .dec_even_err(st_even), .dec_odd_err(st_odd),
    .dec_even_syn(syn_even), .dec_odd_syn(syn_odd),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  mem_device_model #(.W(W)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  logic [31:0]  wr_addr [$];
  logic [W-1:0] wr_data [$];
  int unsigned  n_rd_beats = 0;

  always @(posedge clk)
    if (rst_n && mem_en) begin
      if (mem_we) begin
        wr_addr.push_back(mem_addr);
        wr_data.push_back(mem_wdata);
      end else n_rd_beats++;
    end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (W=%0d): %s", W, what);
    end
  endtask

  // Issue one request, wait for the response, return the latency in cycles
  // from the accepting edge to the first cycle resp_valid is seen.
  task automatic run(input bit wr, input logic [31:0] a, input logic [31:0] d,
                     output int unsigned lat);
    req_valid  = 1'b1;
    req.write  = wr;
    req.addr   = a;
    req.wdata  = d;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 1'b0;
    lat = 0;
    while (!resp_valid) begin
      @(posedge clk);
      lat++;
      #1;
      if (lat > 100) break;
    end
  endtask

  // Expected write beats of codeword m/c at message address a.
  task automatic check_beats(input logic [31:0] a, input logic [31:0] m,
                             input logic [15:0] c, input string what);
    logic [47:0] cw;
    logic [31:0] last, chk;
    cw   = {c, m};
    last = a + 32'(4 - BB);
    chk  = ~(last >> 1);
    expect_true(wr_addr.size() == NB, $sformatf("%s: %0d write beats", what, wr_addr.size()));
    for (int b = 0; b < NB && b < wr_addr.size(); b++) begin
      logic [31:0] ea;
      ea = b < 32 / W ? a + 32'(b * BB) : chk + 32'((b - 32 / W) * BB);
      expect_true(wr_addr[b] == ea && wr_data[b] == cw[b*W +: W],
                  $sformatf("%s beat %0d: %h<=%h, want %h<=%h", what, b,
                            wr_addr[b], wr_data[b], ea, cw[b*W +: W]));
    end
    wr_addr.delete();
    wr_data.delete();
  endtask

  initial begin
    logic [31:0] msgs [4];
    int unsigned lat;
    done = 1'b0; checks = 0; failures = 0;
    req_valid = 1'b0; req = '0;
    flip_msg = '0; flip_chk = '0; st_even = ERR_NONE; st_odd = ERR_NONE;
    syn_even = '0; syn_odd = '0;
    wait (rst_n);
    @(posedge clk); #1;
    u_mem.n_bad = 0;

    // Four codewords, as in the storage-format tables.
    for (int k = 0; k < 4; k++) begin
      msgs[k] = $urandom;
      run(1'b1, 32'(4 * k), msgs[k], lat);
      expect_true(lat == NB + 1, $sformatf("write latency %0d", lat));
      check_beats(32'(4 * k), msgs[k], stub_check(msgs[k]), $sformatf("write %0d", k));
    end
    // Check-bit region: 8 bytes FFFF_FFF8..FFFF_FFFF hold codewords 3..0.
    for (int k = 0; k < 4; k++) begin
      logic [15:0] c;
      logic [31:0] lo;
      c  = stub_check(msgs[k]);
      lo = 32'hffff_fffe - 32'(2 * k);
      if (W == 8)
        expect_true(u_mem.peek(lo) == W'(c[7:0]) && u_mem.peek(lo + 1) == W'(c[15:8]),
                    $sformatf("check-bit %0d at %h", k, lo));
      else
        expect_true(u_mem.peek(lo) == W'(c), $sformatf("check-bit %0d at %h", k, lo));
    end
    if (W == 8) begin
      expect_true(u_mem.peek(32'h0000_0003) == W'(msgs[0][31:24]), "byte 3 of message 0");
      expect_true(u_mem.peek(32'h0000_000c) == W'(msgs[3][7:0]), "byte 0 of message 3");
    end else begin
      expect_true(u_mem.peek(32'h0000_0002) == W'(msgs[0][31:16]), "word 1 of message 0");
      expect_true(u_mem.peek(32'h0000_000e) == W'(msgs[3][31:16]), "word 1 of message 3");
    end
    expect_true(resp.scrubbed == 1'b0, "write not scrubbed");

    // Clean read.
    n_rd_beats = 0;
    syn_even = 8'h00;
    run(1'b0, 32'd8, 32'h0, lat);
    expect_true(lat == NB + 3, $sformatf("read latency %0d", lat));
    expect_true(n_rd_beats == NB && wr_addr.size() == 0, "clean read beats");
    expect_true(resp.rdata == msgs[2] && resp.even_err == ERR_NONE &&
                resp.odd_err == ERR_NONE && !resp.scrubbed,
                $sformatf("clean read %h", resp.rdata));

    // Read with a corrected error in the even half: scrub.
    st_even = ERR_CORRECTED; flip_msg = 32'h0000_0100; flip_chk = 16'h0001;
    syn_even = 8'h5a; syn_odd = 8'h00;
    run(1'b0, 32'd4, 32'h0, lat);
    expect_true(lat == 2 * NB + 3, $sformatf("scrub read latency %0d", lat));
    expect_true(resp.rdata == (msgs[1] ^ 32'h100) && resp.even_err == ERR_CORRECTED &&
                resp.odd_err == ERR_NONE && resp.scrubbed && resp.even_syn == 8'h5a,
                $sformatf("corrected read %h", resp.rdata));
    check_beats(32'd4, msgs[1] ^ 32'h100, stub_check(msgs[1]) ^ 16'h1, "scrub");

    // Read with an uncorrectable error in the odd half: no write-back.
    st_even = ERR_CORRECTED; st_odd = ERR_DETECTED;
    run(1'b0, 32'd12, 32'h0, lat);
    expect_true(lat == NB + 3, $sformatf("detected read latency %0d", lat));
    expect_true(wr_addr.size() == 0 && !resp.scrubbed && resp.odd_err == ERR_DETECTED,
                "uncorrectable word not written back");
    st_even = ERR_NONE; st_odd = ERR_NONE; flip_msg = '0; flip_chk = '0;

    // An unaligned host address selects the same codeword.
    run(1'b0, 32'd14, 32'h0, lat);
    expect_true(resp.rdata == msgs[3], "address bits 1:0 ignored");
    expect_true(W == 8 || u_mem.n_bad == 0, "16-bit device saw only even addresses");
    done = 1'b1;
  end

endmodule
