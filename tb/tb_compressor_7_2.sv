// tb_compressor_7_2: exhaustive check of the modified 7:2 compressor.
// All 512 patterns of x1..x7, cin1, cin2: outputs match the count-level
// model; the count sum + 2*(carry+cout1+cout2) is exact whenever at most
// three inputs are 1; it never exceeds the true count; and exactly 186
// patterns are approximate, the worst by 5.
module tb_compressor_7_2;
  import c72_model_pkg::*;
  logic [6:0] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  c72_t ref_o;
  int checks = 0, failures = 0;
  int n_approx = 0, max_err = 0, cnt, err;

  compressor_7_2 dut (
    .x(x), .cin1(cin1), .cin2(cin2),
    .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin2, cin1, x} = 9'(v);
      #1;
      ref_o = c72_model(x, cin1, cin2);
      checks++;
      if ({sum, carry, cout1, cout2} != {ref_o.sum, ref_o.carry, ref_o.cout1, ref_o.cout2}) begin
        failures++;
        $display("FAIL model x=%b cin=%b%b", x, cin2, cin1);
      end
      cnt = int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2));
      err = $countones({cin2, cin1, x}) - cnt;
      if (err != 0) n_approx++;
      checks++;
      if (err < 0) begin
        failures++;
        $display("FAIL over-count x=%b cin=%b%b", x, cin2, cin1);
      end
      if (err < 0 ? -err > max_err : err > max_err) max_err = err < 0 ? -err : err;
      if ($countones({cin2, cin1, x}) <= 3) begin
        checks++;
        if (err != 0) begin
          failures++;
          $display("FAIL sparse input miscounted x=%b cin=%b%b", x, cin2, cin1);
        end
      end
    end
    checks++;
    if (n_approx != 186) begin
      failures++;
      $display("FAIL %0d approximate patterns, expected 186", n_approx);
    end
    checks++;
    if (max_err != 5) begin
      failures++;
      $display("FAIL worst error %0d, expected 5", max_err);
    end
    $display("approximate patterns %0d of 512, worst error %0d", n_approx, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
