// power_control -- closed-loop power control measurement.
//
// Every received symbol brings the magnitude of its despread correlation,
// a measure of the received signal strength. The unit sums it over one
// power control group of GROUP symbols (24 symbols = 1.25 ms at 19.2
// ksym/s, 16 groups per 20 ms frame) and at the end of each group issues a
// power control bit: 1 (transmitter lower your power) when the group energy
// reached the setpoint, 0 (raise your power) otherwise, the IS-95 sense of
// the bit. It also reports the group energy and the change from the
// previous group. sym_first (start of frame) realigns the group count.
//
// Interface: pc_valid pulses one cycle after the last symbol of a group.
// The design names a power control scheme without giving its rule; the
// group length, the threshold rule and the widths are this design's
// choices.
module power_control #(
  parameter int unsigned GROUP = 24,
  parameter int unsigned MAG_W = 15,
  localparam int unsigned SUM_W = MAG_W + $clog2(GROUP + 1),
  localparam int unsigned GW    = $clog2(GROUP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sym_valid,
  input  logic                    sym_first,
  input  logic [MAG_W-1:0]        sym_mag,
  input  logic [SUM_W-1:0]        setpoint,
  output logic                    pc_valid,
  output logic                    pc_bit,
  output logic [SUM_W-1:0]        group_energy,
  output logic signed [SUM_W:0]   energy_diff
);
  logic [GW-1:0]    count, count_use;
  logic [SUM_W-1:0] sum, sum_next;

  assign count_use = sym_first ? '0 : count;
  assign sum_next  = (count_use == '0 ? '0 : sum) + SUM_W'(sym_mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      sum          <= '0;
      pc_valid     <= 1'b0;
      pc_bit       <= 1'b0;
      group_energy <= '0;
      energy_diff  <= '0;
    end else begin
      pc_valid <= 1'b0;
      if (sym_valid) begin
        sum <= sum_next;
        if (count_use == GW'(GROUP - 1)) begin
          count        <= '0;
          pc_valid     <= 1'b1;
          pc_bit       <= (sum_next >= setpoint);
          group_energy <= sum_next;
          energy_diff  <= $signed({1'b0, sum_next}) - $signed({1'b0, group_energy});
        end else begin
          count <= count_use + 1'b1;
        end
      end
    end
  end
endmodule
