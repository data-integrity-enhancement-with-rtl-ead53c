// tb_interleaved_decoder -- self-checking testbench of the interleaved
// decoder.
//
// Two instances: the default pairing (Hsiao even, CRC odd) and two identical
// Hsiao decoders. Codewords come from the reference encoder. Each is shown
// clean; with every one of the 48 single-bit errors; with every one of the
// 47 double-adjacent errors; with random pairs of one even and one odd bit
// error anywhere in the codeword (all corrected, statuses per half); and
// with random pairs inside one half (that half detected, the other clean).
// Bit k of the codeword {check, msg} is message bit k for k < 32 and
// check-bit k-32 otherwise; it belongs to the even half when k is even.
module tb_interleaved_decoder;
  import edac_pkg::*;
  import tb_edac_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [31:0] msg_in;
  logic [15:0] check_in;
  logic [31:0] m_mix, m_hh;
  logic [15:0] c_mix, c_hh;
  logic [7:0]  es_mix, os_mix, es_hh, os_hh;
  err_e        ee_mix, oe_mix, ee_hh, oe_hh;

  interleaved_decoder dut_mix (
    .msg_in, .check_in, .msg_out(m_mix), .check_out(c_mix),
    .even_syndrome(es_mix), .odd_syndrome(os_mix), .even_err(ee_mix), .odd_err(oe_mix)
  );
  interleaved_decoder #(.EVEN_CODE(CODE_HSIAO), .ODD_CODE(CODE_HSIAO)) dut_hh (
    .msg_in, .check_in, .msg_out(m_hh), .check_out(c_hh),
    .even_syndrome(es_hh), .odd_syndrome(os_hh), .even_err(ee_hh), .odd_err(oe_hh)
  );

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present good codeword cw_mix/cw_hh with error mask e; check results.
  task automatic present(input logic [47:0] cw_mix, input logic [47:0] cw_hh,
                         input logic [47:0] e, input string what);
    logic [47:0] even_mask;
    bit e_even, e_odd, e_even2, e_odd2, correctable;
    int ne, no;
    even_mask = 48'h5555_5555_5555;
    ne = $countones(e & even_mask);
    no = $countones(e & ~even_mask);
    correctable = (ne <= 1) && (no <= 1);
    for (int pass = 0; pass < 2; pass++) begin
      logic [47:0] good, got;
      err_e ee, oe;
      good = pass == 0 ? cw_mix : cw_hh;
      {check_in, msg_in} = good ^ e; #1;
      got = pass == 0 ? {c_mix, m_mix} : {c_hh, m_hh};
      ee  = pass == 0 ? ee_mix : ee_hh;
      oe  = pass == 0 ? oe_mix : oe_hh;
      if (correctable)
        expect_true(got == good &&
                    ee == (ne == 1 ? ERR_CORRECTED : ERR_NONE) &&
                    oe == (no == 1 ? ERR_CORRECTED : ERR_NONE),
                    $sformatf("%s pass %0d mask %h: got %h want %h (%s/%s)", what, pass,
                              e, got, good, ee.name(), oe.name()));
      else
        expect_true((ne == 2 ? ee == ERR_DETECTED : ee == (ne == 1 ? ERR_CORRECTED : ERR_NONE)) &&
                    (no == 2 ? oe == ERR_DETECTED : oe == (no == 1 ? ERR_CORRECTED : ERR_NONE)),
                    $sformatf("%s pass %0d mask %h: status %s/%s", what, pass, e,
                              ee.name(), oe.name()));
    end
  endtask

  int unsigned n_adjacent = 0;

  initial begin
    logic [31:0] m;
    logic [47:0] cwm, cwh, e;
    for (int t = 0; t < 30; t++) begin
      m   = $urandom;
      cwm = {ref_check(m, 1'b0, 1'b1), m};
      cwh = {ref_check(m, 1'b0, 1'b0), m};
      present(cwm, cwh, '0, "clean");
      for (int i = 0; i < 48; i++) present(cwm, cwh, 48'h1 << i, "single");
      for (int i = 0; i < 47; i++) begin
        present(cwm, cwh, 48'h3 << i, "adjacent");
        n_adjacent++;
      end
      for (int n = 0; n < 50; n++) begin
        int unsigned a, b;
        a = 2 * $urandom_range(23);
        b = 2 * $urandom_range(23) + 1;
        present(cwm, cwh, (48'h1 << a) | (48'h1 << b), "even+odd");
      end
      for (int n = 0; n < 50; n++) begin
        int unsigned a, b, par;
        par = $urandom_range(1);
        a = $urandom_range(23);
        b = (a + 1 + $urandom_range(22)) % 24;
        present(cwm, cwh, (48'h1 << (2 * a + par)) | (48'h1 << (2 * b + par)), "same half");
      end
    end
    expect_true(n_adjacent == 30 * 47, "adjacent error cases run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
