// tb_maj5 -- exhaustive self-check of the five-input majority gate, plus the
// two constant-input uses of it in the multiplier: M5(a,b,0,0,1) = a AND b and
// M5(a,b,c,0,1) = M3(a,b,c).
module tb_maj5;
  logic [4:0] x;
  logic       y;
  int checks = 0, failures = 0;

  maj5 dut (.x(x), .y(y));

  initial begin
    for (int v = 0; v < 32; v++) begin
      int ones;
      x = 5'(v);
      #1;
      ones = 0;
      for (int i = 0; i < 5; i++) if (((v >> i) & 1) == 1) ones++;
      checks++;
      if (y !== (ones >= 3)) begin
        failures++;
        $display("FAIL x=%b y=%b", x, y);
      end
      // AND use: inputs {a,b,0,0,1}
      if (x[2:0] == 3'b001) begin
        checks++;
        if (y !== (x[4] & x[3])) begin
          failures++;
          $display("FAIL AND use x=%b y=%b", x, y);
        end
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
