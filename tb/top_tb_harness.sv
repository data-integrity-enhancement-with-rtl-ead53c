// top_tb_harness -- the end-to-end checks of tb_edac_mem_top for any
// configuration of edac_mem_top (memory width W, code of each half EC/OC,
// 0 = Hsiao, 1 = CRC); used by tb_edac_mem_configs. It raises done when
// finished and reports its check and failure counts.
module top_tb_harness
  import edac_pkg::*;
  import tb_edac_ref_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter bit          EC = 1'b0,
  parameter bit          OC = 1'b1
) (
  input  logic        clk,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned SLOTS = 32;
  localparam int unsigned NB    = 48 / W;
  localparam int unsigned BB    = W / 8;

  logic          rst_n = 1'b0;
  logic          req_valid, req_ready, resp_valid;
  req_t          req;
  resp_t         resp;
  logic          mem_en, mem_we;
  logic [31:0]   mem_addr;
  logic [W-1:0]  mem_wdata, mem_rdata;
  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

  edac_mem_top #(.MEM_W(W), .EVEN_CODE(code_e'(EC)), .ODD_CODE(code_e'(OC))) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  mem_device_model #(.W(W)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (W=%0d EC=%0d OC=%0d): %s", W, EC, OC, what);
    end
  endtask

  task automatic run(input bit wr, input logic [31:0] a, input logic [31:0] d,
                     output int unsigned lat);
    req_valid = 1'b1;
    req.write = wr;
    req.addr  = a;
    req.wdata = d;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 1'b0;
    lat = 0;
    while (!resp_valid && lat <= 100) begin
      @(posedge clk);
      lat++;
      #1;
    end
  endtask

  // Device address and bit of codeword bit k ({check-bit, message}) of the
  // codeword whose message sits at byte address a.
  function automatic logic [31:0] cw_addr(input logic [31:0] a, input int unsigned k);
    logic [31:0] chk;
    chk = ~((a + 32'(4 - BB)) >> 1);
    return k < 32 ? a + 32'((k / W) * BB) : chk + 32'(((k - 32) / W) * BB);
  endfunction

  function automatic void upset(input logic [31:0] a, input int unsigned k);
    u_mem.flip(cw_addr(a, k), k % W);
  endfunction

  function automatic logic [47:0] stored(input logic [31:0] a);
    logic [47:0] cw;
    for (int k = 0; k < 48; k += W) cw[k +: W] = u_mem.peek(cw_addr(a, k));
    return cw;
  endfunction

  logic [31:0] msgs [SLOTS];
  int unsigned none [$];   // empty upset list

  int unsigned n_write = 0, n_clean = 0, n_single_msg = 0, n_single_chk = 0;
  int unsigned n_adj_in = 0, n_adj_cross = 0, n_even_odd = 0, n_detect = 0;
  int unsigned n_scrub = 0, n_no_writeback = 0;

  // Read slot s after upsetting the codeword bits in list ks; check it.
  task automatic read_with(input int unsigned s, input int unsigned ks [$]);
    logic [31:0] a;
    logic [47:0] good, prior;
    int unsigned ne, no, lat;
    bit correctable;
    a    = 32'(4 * s);
    good = {ref_check(msgs[s], EC, OC), msgs[s]};
    ne = 0; no = 0;
    foreach (ks[i]) begin
      upset(a, ks[i]);
      if (ks[i] % 2 == 0) ne++; else no++;
    end
    prior = stored(a);
    correctable = ne <= 1 && no <= 1;
    run(1'b0, a, '0, lat);
    expect_true(resp.even_err == (ne == 0 ? ERR_NONE : ne == 1 ? ERR_CORRECTED : ERR_DETECTED) &&
                resp.odd_err  == (no == 0 ? ERR_NONE : no == 1 ? ERR_CORRECTED : ERR_DETECTED),
                $sformatf("slot %0d upsets %p: status %s/%s", s, ks,
                          resp.even_err.name(), resp.odd_err.name()));
    if (correctable) begin
      expect_true(resp.rdata == msgs[s],
                  $sformatf("slot %0d upsets %p: data %h want %h", s, ks, resp.rdata, msgs[s]));
      expect_true(stored(a) == good, $sformatf("slot %0d memory after read", s));
      if (ne + no == 0) begin
        expect_true(!resp.scrubbed && lat == NB + 3, $sformatf("clean read latency %0d", lat));
        n_clean++;
      end else begin
        expect_true(resp.scrubbed && lat == 2 * NB + 3,
                    $sformatf("scrubbed read latency %0d", lat));
        if (resp.scrubbed) n_scrub++;
      end
    end else begin
      expect_true(!resp.scrubbed && stored(a) == prior && lat == NB + 3,
                  $sformatf("slot %0d uncorrectable word left in place", s));
      if (!resp.scrubbed && stored(a) == prior) n_no_writeback++;
      n_detect++;
      // Put the codeword back for later tests.
      foreach (ks[i]) upset(a, ks[i]);
    end
  endtask

  initial begin
    int unsigned lat;
    req_valid = 1'b0;
    req = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    for (int s = 0; s < SLOTS; s++) begin
      msgs[s] = $urandom;
      run(1'b1, 32'(4 * s), msgs[s], lat);
      expect_true(lat == NB + 1, $sformatf("write latency %0d", lat));
      expect_true(stored(32'(4 * s)) == {ref_check(msgs[s], EC, OC), msgs[s]},
                  $sformatf("slot %0d stored codeword", s));
      n_write++;
    end
    // The first codeword's check-bit sits at FFFF_FFFEh/FFFF_FFFFh.
    if (W == 8)
      expect_true({u_mem.peek(32'hffff_ffff), u_mem.peek(32'hffff_fffe)} ==
                  16'(ref_check(msgs[0], EC, OC)), "check-bit of slot 0 at the top");
    else
      expect_true(16'(u_mem.peek(32'hffff_fffe)) == ref_check(msgs[0], EC, OC),
                  "check-bit of slot 0 at the top");

    for (int s = 0; s < SLOTS; s++) begin
      int unsigned k, p, q;
      read_with(s, none);
      k = $urandom_range(31);
      read_with(s, {k});                        n_single_msg++;
      k = 32 + $urandom_range(15);
      read_with(s, {k});                        n_single_chk++;
      k = 8 * $urandom_range(5) + $urandom_range(6);
      read_with(s, {k, k + 1});                 n_adj_in++;
      k = 8 * (1 + $urandom_range(4)) - 1;
      read_with(s, {k, k + 1});                 n_adj_cross++;
      p = 2 * $urandom_range(23);
      q = 2 * $urandom_range(23) + 1;
      while (q == p + 1 || p == q + 1) q = 2 * $urandom_range(23) + 1;
      read_with(s, {p, q});                     n_even_odd++;
      p = $urandom_range(23);
      q = (p + 1 + $urandom_range(22)) % 24;
      k = $urandom_range(1);
      read_with(s, {2 * p + k, 2 * q + k});
      read_with(s, none);
    end
    // Rewrite one slot and read it back.
    msgs[5] = ~msgs[5];
    run(1'b1, 32'd20, msgs[5], lat);
    read_with(5, none);

    expect_true(n_write > 0 && n_clean > 0 && n_single_msg > 0 && n_single_chk > 0,
                "writes, clean reads and single corrections happened");
    expect_true(n_adj_in > 0 && n_adj_cross > 0, "double-adjacent corrections happened");
    expect_true(n_even_odd > 0, "even+odd double corrections happened");
    expect_true(n_detect > 0 && n_no_writeback == n_detect, "uncorrectable detections happened");
    expect_true(n_scrub == SLOTS * 5, $sformatf("scrubs %0d", n_scrub));
    $display("W=%0d EC=%0d OC=%0d mechanisms: writes=%0d clean=%0d single_msg=%0d single_chk=%0d adj_in_byte=%0d adj_cross_byte=%0d even_odd=%0d detected=%0d scrubs=%0d",
             W, EC, OC, n_write, n_clean, n_single_msg, n_single_chk, n_adj_in, n_adj_cross,
             n_even_odd, n_detect, n_scrub);
    done = 1'b1;
  end
endmodule
