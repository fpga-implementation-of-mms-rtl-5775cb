// tb_data_burst_randomizer -- random long-code words at all four rates.
// Checks the number of transmitted groups (16/8/4/2), that each half-rate
// pair sends exactly the group named by its PN bit, and that the quarter-
// and eighth-rate groups are nested inside the next higher rate's choice
// with one group per block of 4 (quarter) or 8 (eighth) groups.
module tb_data_burst_randomizer;
  int checks = 0, failures = 0;
  logic [1:0]  rate;
  logic [13:0] pn;
  logic [15:0] mask;
  logic [15:0] m [4];

  data_burst_randomizer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      pn = 14'($urandom);
      for (int r = 0; r < 4; r++) begin rate = 2'(r); #1; m[r] = mask; end
      checks += 4;
      if (m[0] !== 16'hFFFF) failures++;
      if ($countones(m[1]) != 8) failures++;
      if ($countones(m[2]) != 4) failures++;
      if ($countones(m[3]) != 2) failures++;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (m[1][2*i + 1] !== pn[i] || m[1][2*i] !== !pn[i]) begin failures++; $display("FAIL half pair %0d", i); end
      end
      for (int i = 0; i < 4; i++) begin
        // the quarter-rate group lies in half-rate pair 2i + b(8+i)
        automatic int pair = 2*i + int'(pn[8 + i]);
        checks++;
        if (m[2][4*i +: 4] !== (m[1][4*i +: 4] & ((pair % 2) ? 4'b1100 : 4'b0011))) begin
          failures++; $display("FAIL quarter block %0d", i);
        end
      end
      for (int i = 0; i < 2; i++) begin
        automatic int q = 2*i + int'(pn[12 + i]);
        checks++;
        if (m[3][8*i +: 8] !== (m[2][8*i +: 8] & ((q % 2) ? 8'hF0 : 8'h0F))) begin
          failures++; $display("FAIL eighth block %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
