// tb_wallace_reduce -- self-check of the Wallace reduction tree.
// Arbitrary bit patterns (not only real partial products) are applied to the
// default 16x16 tree and to a 5x5 tree (odd width, uneven columns); the two
// output rows must add up to the weighted sum of all input bits,
// sum(pp[i][j] * 2^(i+j)), computed here with plain integers. The stage
// count for N = 4, 8, 16 is compared with log2(N*N/4).
module tb_wallace_reduce;
  import wallace_pkg::*;
  localparam int N = 16;
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      r0, r1;
  logic [4:0][4:0]     pp5;
  logic [9:0]          r0_5, r1_5;
  int checks = 0, failures = 0;

  wallace_reduce          dut  (.pp(pp),  .row0(r0),   .row1(r1));
  wallace_reduce #(.N(5)) dut5 (.pp(pp5), .row0(r0_5), .row1(r1_5));

  task automatic apply_and_check();
    logic [63:0] e16, e5;
    #1;
    e16 = '0;
    e5  = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (pp[i][j]) e16 += 64'(1) << (i + j);
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        if (pp5[i][j]) e5 += 64'(1) << (i + j);
    checks += 2;
    if (32'(r0 + r1) !== e16[31:0]) begin
      failures++;
      $display("FAIL N=16 rows %h + %h, expected %h", r0, r1, e16[31:0]);
    end
    if (10'(r0_5 + r1_5) !== e5[9:0]) begin
      failures++;
      $display("FAIL N=5 rows %h + %h, expected %h", r0_5, r1_5, e5[9:0]);
    end
  endtask

  initial begin
    foreach (pp[i]) pp[i] = '1;
    foreach (pp5[i]) pp5[i] = '1;
    apply_and_check();
    foreach (pp[i]) pp[i] = '0;
    foreach (pp5[i]) pp5[i] = '0;
    apply_and_check();
    for (int t = 0; t < 3000; t++) begin
      foreach (pp[i]) pp[i] = N'($urandom);
      foreach (pp5[i]) pp5[i] = 5'($urandom);
      apply_and_check();
    end
    for (int n = 4; n <= 16; n *= 2) begin
      checks++;
      if (num_stages(n) != $clog2(n * n / 4)) begin
        failures++;
        $display("FAIL N=%0d uses %0d stages, expected %0d", n, num_stages(n), $clog2(n * n / 4));
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
