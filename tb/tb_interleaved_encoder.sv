// tb_interleaved_encoder -- self-checking testbench of the interleaved
// check-bit generator.
//
// Three instances cover the default pairing (Hsiao even, CRC odd), two
// identical Hsiao encoders and two identical CRC encoders. Each is driven
// with walking-one messages and random messages, and its 16-bit check-bit
// is compared with the reference: even message bits through the even code
// into the even check-bit positions, odd bits likewise.
module tb_interleaved_encoder;
  import edac_pkg::*;
  import tb_edac_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [31:0] msg;
  logic [15:0] chk_mix, chk_hh, chk_cc;

  interleaved_encoder dut_mix (.msg(msg), .check(chk_mix));
  interleaved_encoder #(.EVEN_CODE(CODE_HSIAO), .ODD_CODE(CODE_HSIAO))
    dut_hh (.msg(msg), .check(chk_hh));
  interleaved_encoder #(.EVEN_CODE(CODE_CRC), .ODD_CODE(CODE_CRC))
    dut_cc (.msg(msg), .check(chk_cc));

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

  task automatic try(input logic [31:0] m);
    msg = m; #1;
    expect_true(chk_mix == ref_check(m, 1'b0, 1'b1),
                $sformatf("mix %h: %h expected %h", m, chk_mix, ref_check(m, 1'b0, 1'b1)));
    expect_true(chk_hh == ref_check(m, 1'b0, 1'b0),
                $sformatf("hsiao %h: %h expected %h", m, chk_hh, ref_check(m, 1'b0, 1'b0)));
    expect_true(chk_cc == ref_check(m, 1'b1, 1'b1),
                $sformatf("crc %h: %h expected %h", m, chk_cc, ref_check(m, 1'b1, 1'b1)));
  endtask

  initial begin
    try(32'h0);
    // Bit 0 is even data bit 0: Hsiao column 0 = rows 1,2,3 -> check bits 0,2,4.
    msg = 32'h1; #1;
    expect_true(chk_mix == 16'h0015, $sformatf("bit0 gives %h", chk_mix));
    // Bit 1 is odd data bit 0: CRC remainder 07 -> check bits 1,3,5.
    msg = 32'h2; #1;
    expect_true(chk_mix == 16'h002a, $sformatf("bit1 gives %h", chk_mix));
    for (int i = 0; i < 32; i++) try(32'h1 << i);
    for (int n = 0; n < 2000; n++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
