// tb_compressor_7_2_row: checks a 32-column row of modified 7:2 compressors.
// Random rows (dense and sparse) are compared bit by bit with the
// count-level row model. For sparse rows (one 1 per column at most, so no
// compressor sees more than three 1s) sum_row + carry_row must also equal the
// exact sum of the seven rows.
module tb_compressor_7_2_row;
  import c72_model_pkg::*;
  localparam int W = 32;
  logic [6:0][W-1:0] rows;
  logic [W-1:0] sum_row, carry_row;
  logic [6:0][63:0] rows64;
  logic [63:0] s_ref, c_ref, exact;
  int checks = 0, failures = 0;

  compressor_7_2_row #(.W(W)) dut (.rows(rows), .sum_row(sum_row), .carry_row(carry_row));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(bit sparse);
    #1;
    for (int r = 0; r < 7; r++) rows64[r] = 64'(rows[r]);
    row_model(rows64, W, s_ref, c_ref);
    checks++;
    if (sum_row != s_ref[W-1:0] || carry_row != c_ref[W-1:0]) begin
      failures++;
      $display("FAIL row model: s=%h/%h c=%h/%h", sum_row, s_ref[W-1:0], carry_row, c_ref[W-1:0]);
    end
    if (sparse) begin
      exact = 0;
      for (int r = 0; r < 7; r++) exact += rows64[r];
      checks++;
      if (W'(sum_row + carry_row) != exact[W-1:0]) begin
        failures++;
        $display("FAIL sparse sum %h vs %h", W'(sum_row + carry_row), exact[W-1:0]);
      end
    end
  endtask

  initial begin
    // one 1 per column at most: spread a random word over the rows
    for (int t = 0; t < 200; t++) begin
      logic [W-1:0] v;
      v = $urandom;
      rows = '0;
      for (int c = 0; c < W; c++) rows[$urandom_range(6, 0)][c] = v[c];
      check_one(1'b1);
    end
    for (int t = 0; t < 500; t++) begin
      for (int r = 0; r < 7; r++) rows[r] = $urandom;
      check_one(1'b0);
    end
    rows = '1;
    check_one(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
