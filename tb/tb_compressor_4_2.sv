// tb_compressor_4_2: exhaustive check of the exact 4:2 compressor.
// For all 32 input patterns: a1+a2+a3+a4+cin = sum + 2*(carry+cout), the
// outputs match the count-level model, and cout does not change with cin.
module tb_compressor_4_2;
  import c72_model_pkg::*;
  logic [3:0] a;
  logic cin, sum, carry, cout, cout_cin0;
  c42_t ref_o;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.a(a), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      cin = 1'b0;
      #1;
      cout_cin0 = cout;
      for (int ci = 0; ci < 2; ci++) begin
        cin = 1'(ci);
        #1;
        ref_o = c42_model(a, cin);
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones({a, cin})) begin
          failures++;
          $display("FAIL count a=%b cin=%b", a, cin);
        end
        checks++;
        if ({sum, carry, cout} != {ref_o.sum, ref_o.carry, ref_o.cout}) begin
          failures++;
          $display("FAIL model a=%b cin=%b got %b%b%b", a, cin, sum, carry, cout);
        end
        checks++;
        if (cout != cout_cin0) begin
          failures++;
          $display("FAIL cout depends on cin, a=%b", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
