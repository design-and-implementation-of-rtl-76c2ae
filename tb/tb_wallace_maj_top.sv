// tb_wallace_maj_top -- end-to-end check of the top at its default size.
// Both multipliers are driven together: the 4x4 one through all 256 pairs,
// the 16x16 one with 73 * 380 = 27740, extreme operands and random pairs.
// Besides the products, the test counts how often the mechanisms of the
// design were exercised and fails if one never was:
//   - a carry reaching the 4x4 multiplier's top product bit (prefix-adder
//     carry-out, y7 = 1),
//   - a carry rippling through the whole 16x16 final adder (ripple-carry
//     adder with every bit propagating, detected as p[31] = 1),
//   - a product that leaves the final adder unused (p below 2^adder_lo).
module tb_wallace_maj_top;
  import wallace_pkg::*;
  logic [3:0]  a4, b4;
  logic [7:0]  y4;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int n_y7 = 0, n_top = 0, n_low = 0;

  wallace_maj_top dut (.a4(a4), .b4(b4), .y4(y4), .a(a), .b(b), .p(p));

  task automatic check();
    #1;
    checks += 2;
    if (y4 !== 8'(a4) * 8'(b4)) begin
      failures++;
      $display("FAIL 4x4 %0d * %0d = %0d", a4, b4, y4);
    end
    if (p !== 32'(a) * 32'(b)) begin
      failures++;
      $display("FAIL 16x16 %0d * %0d = %0d", a, b, p);
    end
    if (y4[7]) n_y7++;
    if (p[31]) n_top++;
    if (p < (32'(1) << adder_lo(16))) n_low++;
  endtask

  initial begin
    a4 = 4'd0; b4 = 4'd0; a = 16'd73; b = 16'd380; check();
    if (p != 32'd27740) $display("FAIL 73 * 380 gave %0d", p);
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      a = 16'($urandom); b = 16'($urandom);
      if (v == 1) begin a = '1; b = '1; end
      if (v == 2) begin a = 16'd3; b = 16'd5; end
      check();
    end
    for (int t = 0; t < 20000; t++) begin
      a4 = 4'($urandom); b4 = 4'($urandom);
      a = 16'($urandom); b = 16'($urandom);
      check();
    end
    $display("coverage: y7=%0d p31=%0d low_only=%0d", n_y7, n_top, n_low);
    checks += 3;
    if (n_y7 == 0)  begin failures++; $display("FAIL 4x4 top carry never seen"); end
    if (n_top == 0) begin failures++; $display("FAIL 16x16 top bit never set"); end
    if (n_low == 0) begin failures++; $display("FAIL small product never seen"); end
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
