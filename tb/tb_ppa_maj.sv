// tb_ppa_maj -- self-check of the majority parallel-prefix adder.
// The default 4-bit adder is run through all 512 operand/carry-in patterns;
// 13-bit and 32-bit instances (prefix trees with partial blocks and with the
// full 6 levels) get random operands and carry-chain corner cases. Expected
// sums come from the testbench's own addition.
module tb_ppa_maj;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;
  int checks = 0, failures = 0;

  ppa_maj           dut4  (.a(a4),  .b(b4),  .ci(ci4),  .s(s4),  .co(co4));
  ppa_maj #(.W(13)) dut13 (.a(a13), .b(b13), .ci(ci13), .s(s13), .co(co13));
  ppa_maj #(.W(32)) dut32 (.a(a32), .b(b32), .ci(ci32), .s(s32), .co(co32));

  task automatic check_wide();
    logic [13:0] e13;
    logic [32:0] e32;
    #1;
    e13 = 14'(a13) + 14'(b13) + 14'(ci13);
    e32 = 33'(a32) + 33'(b32) + 33'(ci32);
    checks += 2;
    if ({co13, s13} !== e13) begin
      failures++;
      $display("FAIL W=13 a=%h b=%h ci=%b got=%h exp=%h", a13, b13, ci13, {co13, s13}, e13);
    end
    if ({co32, s32} !== e32) begin
      failures++;
      $display("FAIL W=32 a=%h b=%h ci=%b got=%h exp=%h", a32, b32, ci32, {co32, s32}, e32);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== (5'(a4) + 5'(b4) + 5'(ci4))) begin
        failures++;
        $display("FAIL W=4 a=%h b=%h ci=%b got=%h", a4, b4, ci4, {co4, s4});
      end
    end
    a13 = '1; b13 = '0; ci13 = 1'b1; a32 = '1; b32 = '0; ci32 = 1'b1; check_wide();
    a13 = '1; b13 = '1; ci13 = 1'b0; a32 = '1; b32 = '1; ci32 = 1'b0; check_wide();
    for (int t = 0; t < 3000; t++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      a32 = $urandom; b32 = $urandom; ci32 = 1'($urandom);
      check_wide();
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
