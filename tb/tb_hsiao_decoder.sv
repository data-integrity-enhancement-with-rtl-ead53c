// tb_hsiao_decoder -- self-checking testbench of the Hsiao SEC-DED decoder.
//
// For random data words it encodes with the reference model and then
// presents: the clean codeword (status none, zero syndrome); every one of
// the 24 single-bit errors (status corrected, data and check restored);
// every one of the 276 double-bit errors (status detected, double_err set,
// received bits passed through); and random triple errors (status not
// none).
module tb_hsiao_decoder;
  import edac_pkg::*;
  import tb_edac_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [15:0] data_in, data_out;
  logic [7:0]  check_in, check_out, syndrome;
  err_e        status;
  logic        double_err;

  hsiao_decoder dut (
    .data_in, .check_in, .data_out, .check_out, .syndrome, .status, .double_err
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

  initial begin
    logic [15:0] d;
    logic [7:0]  c;
    logic [23:0] cw, bad;
    for (int t = 0; t < 40; t++) begin
      d  = 16'($urandom);
      c  = ref_hsiao(d);
      cw = {c, d};
      {check_in, data_in} = cw; #1;
      expect_true(status == ERR_NONE && syndrome == 8'h00 && !double_err &&
                  data_out == d && check_out == c, $sformatf("clean %h", cw));
      for (int i = 0; i < 24; i++) begin
        bad = cw;
        bad[i] = ~bad[i];
        {check_in, data_in} = bad; #1;
        expect_true(status == ERR_CORRECTED && !double_err &&
                    {check_out, data_out} == cw,
                    $sformatf("single %h bit %0d: status %s out %h", cw, i,
                              status.name(), {check_out, data_out}));
      end
      for (int i = 0; i < 24; i++)
        for (int k = i + 1; k < 24; k++) begin
          bad = cw;
          bad[i] = ~bad[i];
          bad[k] = ~bad[k];
          {check_in, data_in} = bad; #1;
          expect_true(status == ERR_DETECTED && double_err &&
                      {check_out, data_out} == bad,
                      $sformatf("double %h bits %0d,%0d: status %s", cw, i, k,
                                status.name()));
        end
      for (int n = 0; n < 20; n++) begin
        int unsigned a, b, e;
        a = $urandom_range(23); b = (a + 1 + $urandom_range(21)) % 24;
        e = $urandom_range(23);
        while (e == a || e == b) e = $urandom_range(23);
        bad = cw;
        bad[a] = ~bad[a]; bad[b] = ~bad[b]; bad[e] = ~bad[e];
        {check_in, data_in} = bad; #1;
        expect_true(status != ERR_NONE && !double_err,
                    $sformatf("triple %h: status %s", cw, status.name()));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
