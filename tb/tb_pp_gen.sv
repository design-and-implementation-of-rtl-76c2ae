// tb_pp_gen -- self-check of the partial-product array.
// The default 16x16 array is driven with edge and random operands and every
// bit pp[i][j] is compared with b[i] & a[j]; a 4x4 instance is run through
// all 256 operand pairs.
module tb_pp_gen;
  localparam int N = 16;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  logic [3:0]          a4, b4;
  logic [3:0][3:0]     pp4;
  int checks = 0, failures = 0;

  pp_gen            dut   (.a(a),  .b(b),  .pp(pp));
  pp_gen #(.N(4))   dut4  (.a(a4), .b(b4), .pp(pp4));

  task automatic check16();
    #1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (pp[i][j] !== (b[i] & a[j])) begin
          failures++;
          $display("FAIL N=16 i=%0d j=%0d a=%h b=%h", i, j, a, b);
        end
      end
  endtask

  initial begin
    a = '1; b = '1; check16();
    a = '0; b = '1; check16();
    a = 16'h8001; b = 16'h7ffe; check16();
    for (int t = 0; t < 200; t++) begin
      a = N'($urandom); b = N'($urandom); check16();
    end
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (pp4[i][j] !== (b4[i] & a4[j])) begin
            failures++;
            $display("FAIL N=4 i=%0d j=%0d a=%h b=%h", i, j, a4, b4);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
