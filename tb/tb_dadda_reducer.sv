// tb_dadda_reducer: checks the Dadda reducer on two matrix shapes.
//  * 6 full rows of 32 bits (the shape left by the compressor rows is a
//    sub-shape of it): expects 3 stages (limits 4, 3, 2).
//  * the 16 x 16 partial-product parallelogram (row r covers columns
//    r .. r+15): expects 6 stages (limits 13, 9, 6, 4, 3, 2).
// For random operands row_a + row_b must equal the sum of the input rows
// modulo 2^32.
module tb_dadda_reducer;
  localparam int W = 32;

  function automatic logic [15:0][W-1:0] pp_mask();
    logic [15:0][W-1:0] m;
    for (int r = 0; r < 16; r++) m[r] = W'(32'hffff) << r;
    return m;
  endfunction

  localparam logic [15:0][W-1:0] PP_MASK = pp_mask();

  logic [5:0][W-1:0]  rows6;
  logic [W-1:0]       a6, b6;
  logic [15:0][W-1:0] rows16;
  logic [W-1:0]       a16, b16;
  logic [15:0]        opa, opb;
  logic [W-1:0]       exact;
  int checks = 0, failures = 0;

  dadda_reducer #(.W(W), .ROWS(6)) dut6 (.rows(rows6), .row_a(a6), .row_b(b6));
  dadda_reducer #(.W(W), .ROWS(16), .ROW_MASK(PP_MASK)) dut16 (.rows(rows16), .row_a(a16), .row_b(b16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut6.NS != 3) begin
      failures++;
      $display("FAIL 6-row matrix uses %0d stages, expected 3", dut6.NS);
    end
    checks++;
    if (dut16.NS != 6) begin
      failures++;
      $display("FAIL 16x16 matrix uses %0d stages, expected 6", dut16.NS);
    end
    for (int t = 0; t < 1000; t++) begin
      if (t == 0) rows6 = '1;
      else for (int r = 0; r < 6; r++) rows6[r] = $urandom;
      opa = (t == 0) ? '1 : 16'($urandom);
      opb = (t == 0) ? '1 : 16'($urandom);
      for (int r = 0; r < 16; r++) rows16[r] = opb[r] ? (W'(opa) << r) : '0;
      #1;
      exact = '0;
      for (int r = 0; r < 6; r++) exact += rows6[r];
      checks++;
      if (W'(a6 + b6) != exact) begin
        failures++;
        $display("FAIL 6 rows: %h + %h != %h", a6, b6, exact);
      end
      checks++;
      if (W'(a16 + b16) != W'(opa * opb)) begin
        failures++;
        $display("FAIL 16x16: %h * %h -> %h", opa, opb, W'(a16 + b16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
