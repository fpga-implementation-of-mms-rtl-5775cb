// tb_vit_acs -- random and corner-case path/branch metrics: the smaller sum
// must be kept, the decision must name it, and a tie keeps path 0.
module tb_vit_acs;
  int checks = 0, failures = 0;
  logic [9:0] pm0, pm1, pm_out;
  logic [1:0] bm0, bm1;
  logic       decision;

  vit_acs #(.PM_W(10), .BM_W(2)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int a, b, s0, s1;
      a = int'($urandom_range(0, 800));
      b = (n % 4 == 0) ? a : int'($urandom_range(0, 800));
      pm0 = 10'(a); pm1 = 10'(b);
      bm0 = 2'($urandom_range(0, 2)); bm1 = 2'($urandom_range(0, 2));
      #1;
      s0 = a + int'(bm0); s1 = b + int'(bm1);
      checks += 2;
      if (int'(pm_out) != ((s1 < s0) ? s1 : s0)) begin failures++; $display("FAIL pm %0d %0d", s0, s1); end
      if (decision !== (s1 < s0)) begin failures++; $display("FAIL dec %0d %0d", s0, s1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
