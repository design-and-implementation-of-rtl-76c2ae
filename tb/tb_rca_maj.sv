// tb_rca_maj -- self-check of the majority ripple-carry adder.
// The default 32-bit adder gets carry-chain corner cases (all ones plus one,
// alternating patterns) and random operands with both carry-in values; a
// 4-bit instance is run exhaustively. Expected sums come from the
// testbench's own 64-bit addition.
module tb_rca_maj;
  localparam int W = 32;
  logic [W-1:0] a, b, s;
  logic         ci, co;
  logic [3:0]   a4, b4, s4;
  logic         ci4, co4;
  int checks = 0, failures = 0;

  rca_maj          dut  (.a(a),  .b(b),  .ci(ci),  .s(s),  .co(co));
  rca_maj #(.W(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));

  task automatic check32();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(ci);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%b got=%h exp=%h", a, b, ci, {co, s}, exp);
    end
  endtask

  initial begin
    a = '1; b = '0; ci = 1'b1; check32();
    a = '1; b = '1; ci = 1'b1; check32();
    a = 32'haaaaaaaa; b = 32'h55555555; ci = 1'b1; check32();
    a = '0; b = '0; ci = 1'b0; check32();
    for (int t = 0; t < 2000; t++) begin
      a = $urandom; b = $urandom; ci = 1'($urandom); check32();
    end
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== (5'(a4) + 5'(b4) + 5'(ci4))) begin
        failures++;
        $display("FAIL W=4 a=%h b=%h ci=%b got=%h", a4, b4, ci4, {co4, s4});
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
