// tb_xor_maj -- exhaustive self-check of the majority-gate XOR, including the
// two intermediate nets (X1 = A OR B, X2 = A NAND B).
module tb_xor_maj;
  logic a, b, y;
  int checks = 0, failures = 0;

  xor_maj dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 3;
      if (y !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
      if (dut.x1 !== (a | b)) begin
        failures++;
        $display("FAIL X1 a=%b b=%b x1=%b", a, b, dut.x1);
      end
      if (dut.x2 !== ~(a & b)) begin
        failures++;
        $display("FAIL X2 a=%b b=%b x2=%b", a, b, dut.x2);
      end
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
