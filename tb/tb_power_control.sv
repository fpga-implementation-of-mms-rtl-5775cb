// tb_power_control -- symbol magnitudes of alternating strong and weak
// groups: each 24-symbol group must give its exact energy sum, the change
// from the previous group, bit 1 (lower power) at or above the setpoint and
// bit 0 below it, and sym_first must realign the grouping.
module tb_power_control;
  localparam int G = 24, NG = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic sym_valid = 0, sym_first = 0;
  logic [14:0] sym_mag = '0;
  logic [19:0] setpoint = 20'd24000;
  logic pc_valid, pc_bit;
  logic [19:0] group_energy;
  logic signed [20:0] energy_diff;
  int exp_e [NG];
  int got = 0, ups = 0, downs = 0;

  power_control #(.GROUP(G), .MAG_W(15)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (pc_valid) begin
      checks += 3;
      if (int'(group_energy) != exp_e[got]) begin failures++; $display("FAIL energy %0d: %0d vs %0d", got, group_energy, exp_e[got]); end
      if (pc_bit !== (exp_e[got] >= 24000)) begin failures++; $display("FAIL bit %0d", got); end
      if (got > 0 && int'(energy_diff) != exp_e[got] - exp_e[got-1]) begin failures++; $display("FAIL diff %0d", got); end
      if (pc_bit) downs <= downs + 1; else ups <= ups + 1;
      got <= got + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a stray partial group first: sym_first at group 0 must discard it
    for (int i = 0; i < 7; i++) begin sym_valid = 1; sym_mag = 15'd5000; @(negedge clk); end
    for (int g = 0; g < NG; g++) begin
      exp_e[g] = 0;
      for (int i = 0; i < G; i++) begin
        automatic int m = (g % 2 == 0) ? int'($urandom_range(1100, 1400)) : int'($urandom_range(600, 900));
        if ($urandom_range(0, 3) == 0) begin sym_valid = 0; @(negedge clk); end
        sym_valid = 1; sym_mag = 15'(m); sym_first = (g == 0 && i == 0);
        exp_e[g] += m;
        @(negedge clk);
      end
    end
    sym_valid = 0; sym_first = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (got != NG) begin failures++; $display("FAIL groups %0d", got); end
    if (ups == 0 || downs == 0) begin failures++; $display("FAIL ups %0d downs %0d", ups, downs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
