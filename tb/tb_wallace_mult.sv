// tb_wallace_mult -- self-check of the NxN majority Wallace multiplier.
// The default 16x16 multiplier gets 73 * 380 = 27740, the extreme operands
// and random pairs; an 8x8 instance is run through all 65536 pairs and a
// 5x5 instance (odd width) through all 1024. The parallel-prefix final adder
// is checked the same way: 16x16 with random pairs, 8x8 exhaustively.
// Products are compared with the testbench's own multiplication.
module tb_wallace_mult;
  logic [15:0] a, b;
  logic [31:0] p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [31:0] pq;
  logic [15:0] pq8;
  int checks = 0, failures = 0;

  wallace_mult          dut  (.a(a),  .b(b),  .p(p));
  wallace_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  wallace_mult #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));
  wallace_mult #(.N(16), .PREFIX_FINAL(1'b1)) dutq  (.a(a),  .b(b),  .p(pq));
  wallace_mult #(.N(8),  .PREFIX_FINAL(1'b1)) dutq8 (.a(a8), .b(b8), .p(pq8));

  task automatic check16();
    #1;
    checks += 2;
    if (p !== 32'(a) * 32'(b)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d", a, b, p);
    end
    if (pq !== 32'(a) * 32'(b)) begin
      failures++;
      $display("FAIL prefix %0d * %0d = %0d", a, b, pq);
    end
  endtask

  initial begin
    a = 16'd73;  b = 16'd380; check16();
    a = '1;      b = '1;      check16();
    a = '0;      b = '1;      check16();
    a = 16'h8000; b = 16'h8000; check16();
    for (int t = 0; t < 5000; t++) begin
      a = 16'($urandom); b = 16'($urandom); check16();
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks += 2;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL N=8 %0d * %0d = %0d", a8, b8, p8);
      end
      if (pq8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        $display("FAIL N=8 prefix %0d * %0d = %0d", a8, b8, pq8);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v);
      #1;
      checks++;
      if (p5 !== 10'(a5) * 10'(b5)) begin
        failures++;
        $display("FAIL N=5 %0d * %0d = %0d", a5, b5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
