// tb_hsiao_encoder -- self-checking testbench of the Hsiao check-bit
// generator.
//
// It first checks the matrix against the three Hsiao rules: every data
// column has three ones (odd weight) and all 16 are distinct and not of
// weight one, the matrix holds 16*3 + 8 = 56 ones, and every row holds six
// data ones (seven with its check bit). It then repeats the matrix search
// of the generator flowchart -- the 56 weight-3 columns of eight rows in
// lexicographic order, subsets of 16 tried in lexicographic order, the first
// one whose rows all weigh six kept -- and checks that the matrix in the
// design is that result. Finally it drives all 65536 data words and
// compares the check byte with the table-based reference model.
module tb_hsiao_encoder;
  import edac_pkg::*;
  import tb_edac_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [15:0] data;
  logic [7:0]  check;

  hsiao_encoder dut (.data(data), .check(check));

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

  // First 16-of-56 column choice, in lexicographic order, whose rows all
  // hold six ones. Iterative depth-first search with a row-weight bound.
  function automatic void first_matrix(output logic [7:0] m [16], output bit found);
    logic [7:0]  cols [56];
    int          idx [16];
    int unsigned rw [8];
    int          n, k;
    n = 0;
    for (int a = 0; a < 8; a++)
      for (int b = a + 1; b < 8; b++)
        for (int c = b + 1; c < 8; c++)
          cols[n++] = 8'((1 << a) | (1 << b) | (1 << c));
    for (int r = 0; r < 8; r++) rw[r] = 0;
    found = 1'b0;
    k = 0;
    idx[0] = 0;
    while (k >= 0 && !found) begin
      if (idx[k] > 56 - (16 - k)) begin
        k--;
        if (k >= 0) begin
          for (int r = 0; r < 8; r++) rw[r] -= cols[idx[k]][r];
          idx[k]++;
        end
      end else begin
        bit fits;
        fits = 1'b1;
        for (int r = 0; r < 8; r++)
          if (cols[idx[k]][r] && rw[r] == 6) fits = 1'b0;
        if (!fits) idx[k]++;
        else begin
          for (int r = 0; r < 8; r++) rw[r] += cols[idx[k]][r];
          if (k == 15) begin
            found = 1'b1;   // 48 ones in 8 rows of at most 6: all rows are 6
            for (int j = 0; j < 16; j++) m[j] = cols[idx[j]];
          end else begin
            k++;
            idx[k] = idx[k-1] + 1;
          end
        end
      end
    end
  endfunction

  initial begin
    logic [7:0] gen [16];
    bit         found;
    int unsigned total;
    int unsigned row_w [8];
    total = 8;  // identity part
    for (int r = 0; r < 8; r++) row_w[r] = 0;
    for (int j = 0; j < 16; j++) begin
      expect_true($countones(HSIAO_COL[j]) == 3, $sformatf("column %0d weight", j));
      total += $countones(HSIAO_COL[j]);
      for (int r = 0; r < 8; r++) row_w[r] += HSIAO_COL[j][r];
      for (int k = 0; k < j; k++)
        expect_true(HSIAO_COL[j] != HSIAO_COL[k], $sformatf("columns %0d/%0d distinct", k, j));
    end
    expect_true(total == 56, $sformatf("total ones %0d", total));
    for (int r = 0; r < 8; r++)
      expect_true(row_w[r] == 6, $sformatf("row %0d weight %0d", r + 1, row_w[r]));

    first_matrix(gen, found);
    expect_true(found, "matrix search found a matrix");
    for (int j = 0; j < 16; j++)
      expect_true(gen[j] == HSIAO_COL[j],
                  $sformatf("column %0d is %h, search gives %h", j, HSIAO_COL[j], gen[j]));

    for (int v = 0; v < 65536; v++) begin
      data = 16'(v);
      #1;
      expect_true(check == ref_hsiao(data),
                  $sformatf("data %h check %h expected %h", data, check, ref_hsiao(data)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
