// viterbi_decoder -- fully parallel hard-decision Viterbi decoder with
// register-exchange survivor memory.
//
// The decoder works frame by frame. Code symbols arrive one per transfer;
// every N symbols form one trellis step. For each of the S = 2^(K-1)
// states two encoder-engine replicas generate the expected symbols of the
// two incoming branches (no stored trellis), two branch-metric units
// compute their Hamming distances (2*S*N XORs per step) and one ACS unit
// keeps the better of the two paths. All S states are updated in the same
// cycle, so a step costs one cycle once its symbols are in.
//
// Memories:
//   * path metric memory: S registers of PM_W bits, sized so that a whole
//     frame of L steps never overflows (state 0 starts at 0, all others at
//     a value larger than any frame's worth of branch metrics);
//   * survivor memory: S registers of L bits, one per state, each holding
//     the decoded bits of the survivor path into that state. On each step
//     state ns copies the register of its winning predecessor and appends
//     its own input bit (register exchange), so no trace-back is needed;
//   * present state: the state whose survivor is output at frame end. The
//     8 zero tail bits force the encoder to state 0, so it is state 0.
// After L steps the first L-(K-1) bits of state 0's survivor (information
// and CRC bits; the tail is dropped) are read out one per transfer, oldest first, with
// out_first/out_last framing; no input is taken meanwhile. in_first on a
// symbol restarts the frame (metrics reinitialised, step count 0).
// Requires N >= 2.
module viterbi_decoder #(
  parameter int unsigned K = 9,
  parameter int unsigned N = 2,
  parameter logic [N-1:0][K-1:0] GEN = {9'o561, 9'o753},
  parameter int unsigned L = 192,
  localparam int unsigned S     = 1 << (K - 1),
  localparam int unsigned BM_W  = $clog2(N + 1),
  localparam int unsigned PM_W  = $clog2(2 * N * L + 2),
  localparam int unsigned NW    = $clog2(N),
  localparam int unsigned LW    = $clog2(L + 1),
  localparam int unsigned OUT_N = L - (K - 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_sym,
  input  logic in_first,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_first,
  output logic out_last
);
  localparam logic [PM_W-1:0] PM_INF = PM_W'(N * L + 1);

  typedef enum logic {RUN, DRAIN} phase_e;
  phase_e phase;

  logic [PM_W-1:0] pm      [S];
  logic [PM_W-1:0] pm_new  [S];
  logic [L-1:0]    surv    [S];
  logic            dec     [S];
  logic [N-1:0]    rx_buf, rx_word;
  logic [NW-1:0]   sym_cnt, cnt_use;
  logic [LW-1:0]   step_cnt;
  logic [LW-1:0]   out_cnt;
  logic            fire, step;

  assign in_ready = (phase == RUN);
  assign fire     = in_valid && in_ready;
  assign cnt_use  = in_first ? '0 : sym_cnt;
  assign step     = fire && (cnt_use == NW'(N - 1));

  // received word: earlier symbols of this step plus the current one
  always_comb begin
    rx_word = rx_buf;
    rx_word[cnt_use] = in_sym;
  end

  // per-state branch generation, branch metrics and ACS
  for (genvar ns = 0; ns < S; ns++) begin : g_state
    localparam logic [K-2:0] NS = (K-1)'(ns);
    logic [K-2:0]    pred0, pred1, nxt0, nxt1;
    logic [N-1:0]    exp0, exp1;
    logic [BM_W-1:0] bm0, bm1;
    if (K > 2) begin : g_pred
      assign pred0 = {NS[K-3:0], 1'b0};
      assign pred1 = {NS[K-3:0], 1'b1};
    end else begin : g_pred1
      assign pred0 = 1'b0;
      assign pred1 = 1'b1;
    end
    vit_encoder_engine #(.K(K), .N(N), .GEN(GEN)) u_eng0 (
      .state(pred0), .in_bit(NS[K-2]), .next_state(nxt0), .syms(exp0));
    vit_encoder_engine #(.K(K), .N(N), .GEN(GEN)) u_eng1 (
      .state(pred1), .in_bit(NS[K-2]), .next_state(nxt1), .syms(exp1));
    vit_branch_metric #(.N(N)) u_bm0 (.rx(rx_word), .expected(exp0), .metric(bm0));
    vit_branch_metric #(.N(N)) u_bm1 (.rx(rx_word), .expected(exp1), .metric(bm1));
    // both branches must land on this state (trellis wiring check)
    always_comb assert (nxt0 == NS && nxt1 == NS);

    vit_acs #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .pm0(pm[pred0]), .bm0(bm0), .pm1(pm[pred1]), .bm1(bm1),
      .pm_out(pm_new[ns]), .decision(dec[ns]));

    // survivor register exchange (no reset needed: L shifts refill it)
    always_ff @(posedge clk) begin
      if (step) surv[ns] <= {surv[dec[ns] ? pred1 : pred0][L-2:0], NS[K-2]};
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        pm[ns] <= (ns == 0) ? '0 : PM_INF;
      else if (fire && in_first)
        pm[ns] <= (ns == 0) ? '0 : PM_INF;
      else if (step)
        pm[ns] <= pm_new[ns];
      else if (phase == DRAIN && out_valid && out_ready && out_last)
        pm[ns] <= (ns == 0) ? '0 : PM_INF;
    end
  end

  assign out_valid = (phase == DRAIN);
  assign out_bit   = surv[0][LW'(L - 1) - out_cnt];
  assign out_first = (out_cnt == '0);
  assign out_last  = (out_cnt == LW'(OUT_N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= RUN;
      rx_buf   <= '0;
      sym_cnt  <= '0;
      step_cnt <= '0;
      out_cnt  <= '0;
    end else begin
      if (fire) begin
        rx_buf <= rx_word;
        if (step) begin
          sym_cnt <= '0;
          if ((in_first ? '0 : step_cnt) == LW'(L - 1)) begin
            step_cnt <= '0;
            phase    <= DRAIN;
          end else begin
            step_cnt <= (in_first ? '0 : step_cnt) + 1'b1;
          end
        end else begin
          sym_cnt <= cnt_use + 1'b1;
          if (in_first) step_cnt <= '0;
        end
      end
      if (out_valid && out_ready) begin
        if (out_last) begin
          out_cnt <= '0;
          phase   <= RUN;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end
endmodule
