// tb_wallace4x4_maj -- exhaustive self-check of the hand-placed 4x4
// multiplier: all 256 operand pairs, product compared with a * b.
module tb_wallace4x4_maj;
  logic [3:0] a, b;
  logic [7:0] y;
  int checks = 0, failures = 0;

  wallace4x4_maj dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (y !== 8'(a) * 8'(b)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", a, b, y);
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
