// tb_edac_mem_configs -- end-to-end checks of the other configurations of
// edac_mem_top: the default code pairing on a 16-bit device, two identical
// Hsiao halves and two identical CRC halves on an 8-bit device, and a CRC
// even half with a Hsiao odd half on a 16-bit device. Each runs the checks
// of top_tb_harness; the results are summed.
module tb_edac_mem_configs;
  logic        clk = 1'b0;
  logic [3:0]  done;
  int unsigned c [4], f [4];
  int unsigned cycles = 0;

  always #5 clk = ~clk;

  top_tb_harness #(.W(16), .EC(1'b0), .OC(1'b1)) h0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  top_tb_harness #(.W(8),  .EC(1'b0), .OC(1'b0)) h1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  top_tb_harness #(.W(8),  .EC(1'b1), .OC(1'b1)) h2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  top_tb_harness #(.W(16), .EC(1'b1), .OC(1'b0)) h3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));

  function automatic int unsigned sum(input int unsigned v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  always @(posedge clk) begin
    cycles++;
    if (cycles == 200000) begin
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
      $finish;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end
endmodule
