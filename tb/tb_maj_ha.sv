// tb_maj_ha -- exhaustive self-check of the majority-logic half adder:
// {co, s} must equal a + b.
module tb_maj_ha;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  maj_ha dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 4; v++) begin
      int sum;
      {a, b} = 2'(v);
      #1;
      sum = int'(a) + int'(b);
      checks += 2;
      if (s !== sum[0])  begin failures++; $display("FAIL sum a=%b b=%b s=%b", a, b, s); end
      if (co !== sum[1]) begin failures++; $display("FAIL carry a=%b b=%b co=%b", a, b, co); end
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
