// tb_codeword_mem_ctrl -- self-checking testbench of the codeword storage
// controller, for an 8-bit and a 16-bit memory device (one ctrl_tb_harness
// each, run in parallel).
module tb_codeword_mem_ctrl;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        done8, done16;
  int unsigned c8, f8, c16, f16;
  int unsigned cycles = 0;

  always #5 clk = ~clk;

  ctrl_tb_harness #(.W(8))  h8  (.clk, .rst_n, .done(done8),  .checks(c8),  .failures(f8));
  ctrl_tb_harness #(.W(16)) h16 (.clk, .rst_n, .done(done16), .checks(c16), .failures(f16));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 5000) begin
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c8 + c16, f8 + f16 + 1);
      $finish;
    end
  end

  initial begin
    wait (done8 && done16);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16, f8 + f16);
    $finish;
  end
endmodule
