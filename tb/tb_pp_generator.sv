// tb_pp_generator: random and corner checks of the AND array,
// pp[i][j] must equal a[j] & b[i] for every bit.
module tb_pp_generator;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  pp_generator #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pp[i] != (b[i] ? a : '0)) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h pp=%h", i, a, b, pp[i]);
      end
    end
  endtask

  initial begin
    a = '1; b = '1; check_one();
    a = 16'h00ff; b = 16'h0f0f; check_one();
    for (int t = 0; t < 200; t++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
