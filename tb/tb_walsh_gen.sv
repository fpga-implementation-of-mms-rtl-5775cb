// tb_walsh_gen -- checks every 64-chip Walsh code against a Hadamard matrix
// built by the doubling rule H2n = [H H; H ~H], and checks that any two
// different codes agree on exactly half of their chips (orthogonality).
module tb_walsh_gen;
  localparam int LEN = 64;
  int checks = 0, failures = 0;
  logic [5:0]  idx;
  logic [63:0] code;
  logic        h [LEN][LEN];
  logic [63:0] all_codes [LEN];

  walsh_gen #(.LEN(LEN)) dut (.idx(idx), .code(code));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h[0][0] = 1'b0;
    for (int n = 1; n < LEN; n *= 2)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          h[i][j + n]     = h[i][j];
          h[i + n][j]     = h[i][j];
          h[i + n][j + n] = ~h[i][j];
        end
    for (int i = 0; i < LEN; i++) begin
      idx = 6'(i);
      #1;
      all_codes[i] = code;
      for (int j = 0; j < LEN; j++) begin
        checks++;
        if (code[j] !== h[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL idx %0d chip %0d", i, j);
        end
      end
    end
    for (int a = 0; a < LEN; a++)
      for (int b = a + 1; b < LEN; b++) begin
        checks++;
        if ($countones(all_codes[a] ^ all_codes[b]) != LEN / 2) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
