// tb_ripple_carry_adder: checks the 32-bit ripple-carry adder against the
// built-in addition, modulo 2^32, on corner cases (full carry ripple) and
// random operands.
module tb_ripple_carry_adder;
  localparam int W = 32;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.x(x), .y(y), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (s != W'(x + y)) begin
      failures++;
      $display("FAIL %h + %h = %h", x, y, s);
    end
  endtask

  initial begin
    x = '1; y = 32'd1; check_one();
    x = '1; y = '1; check_one();
    x = 32'h5555_5555; y = 32'haaaa_aaab; check_one();
    x = '0; y = '0; check_one();
    for (int t = 0; t < 500; t++) begin
      x = $urandom;
      y = $urandom;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
