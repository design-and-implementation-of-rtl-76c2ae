// tb_maj_fa -- exhaustive self-check of the majority-logic full adder:
// {co, s} must equal a + b + ci for all 8 input patterns.
module tb_maj_fa;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  maj_fa dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      {a, b, ci} = 3'(v);
      #1;
      sum = int'(a) + int'(b) + int'(ci);
      checks += 2;
      if (s !== sum[0])  begin failures++; $display("FAIL sum a=%b b=%b ci=%b s=%b", a, b, ci, s); end
      if (co !== sum[1]) begin failures++; $display("FAIL carry a=%b b=%b ci=%b co=%b", a, b, ci, co); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
