// tb_vit_branch_metric -- exhaustive Hamming distances for N = 2 and N = 3.
module tb_vit_branch_metric;
  int checks = 0, failures = 0;
  logic [1:0] rx2, ex2;
  logic [2:0] rx3, ex3;
  logic [1:0] m2, m3;

  vit_branch_metric #(.N(2)) dut2 (.rx(rx2), .expected(ex2), .metric(m2));
  vit_branch_metric #(.N(3)) dut3 (.rx(rx3), .expected(ex3), .metric(m3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        automatic int d3 = 0, d2 = 0;
        rx3 = 3'(a); ex3 = 3'(b); rx2 = 2'(a); ex2 = 2'(b);
        #1;
        for (int i = 0; i < 3; i++) if (rx3[i] != ex3[i]) d3++;
        for (int i = 0; i < 2; i++) if (rx2[i] != ex2[i]) d2++;
        checks += 2;
        if (int'(m3) != d3) begin failures++; $display("FAIL n3 %0d %0d", a, b); end
        if (int'(m2) != d2) begin failures++; $display("FAIL n2 %0d %0d", a, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
