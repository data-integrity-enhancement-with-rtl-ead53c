// tb_crc8_encoder -- self-checking testbench of the CRC check-bit
// generator.
//
// It checks the CRC-8 generator 0x07 against three known remainders and then
// drives all 65536 messages, comparing the check byte with a long division
// of d * x^8 by x^8 + x^2 + x + 1 done in the reference model.
module tb_crc8_encoder;
  import edac_pkg::*;
  import tb_edac_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [15:0] data;
  logic [7:0]  check;

  crc8_encoder dut (.data(data), .check(check));

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

  initial begin
    data = 16'h3132; #1;
    expect_true(check == 8'h72, $sformatf("crc(3132) = %h", check));
    data = 16'h1234; #1;
    expect_true(check == 8'hf1, $sformatf("crc(1234) = %h", check));
    data = 16'h0001; #1;
    expect_true(check == 8'h07, $sformatf("crc(0001) = %h", check));

    for (int v = 0; v < 65536; v++) begin
      data = 16'(v);
      #1;
      expect_true(check == ref_crc(data),
                  $sformatf("data %h check %h expected %h", data, check, ref_crc(data)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
