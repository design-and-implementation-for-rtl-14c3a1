// acs_array: fully parallel add-compare-select array with the path metric
// memory of the space-time trellis decoder.
//
// One acs_unit is dedicated to each of the N_STATES trellis states (the fast,
// fully parallel arrangement the document describes), so one trellis step is
// processed per clock. For the 4-state code every state is reachable from
// every state; the metric of branch s -> u is bm[branch_label(s, u)].
// Path metrics live in PM_W-bit registers and wrap freely (modulo
// normalization, see acs_unit).
//
// On frame_start (with or before the first step of a frame) the metrics are
// loaded with 0 for state 0 and PM_INIT for the other states, so the search
// begins in the encoder's known start state. PM_INIT is this design's choice.
//
// Interface: in_valid with bm[16] -> one clock later out_valid, the decision
// vector dec[u] (surviving origin state of each state u), the updated metrics
// pm[u] and best, the state with the smallest metric.
//
// All registers use the asynchronous reset. rst_n also appears in the
// 'disable iff' of the spread assertion below; a linter may report that as
// a synchronous use of the reset, but no logic uses it that way.
module acs_array
  import sttc_pkg::*;
#(
  parameter int unsigned PM_W    = 8,
  parameter int unsigned BM_W    = 2,
  parameter int unsigned PM_INIT = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             in_valid,
  input  logic [BM_W-1:0]  bm  [N_LABELS],
  output logic             out_valid,
  output state_t           dec [N_STATES],
  output logic [PM_W-1:0]  pm  [N_STATES],
  output state_t           best
);

  logic [PM_W-1:0] pm_cur  [N_STATES];
  logic [PM_W-1:0] pm_next [N_STATES];
  state_t          dec_next[N_STATES];
  logic [BM_W-1:0] bm_branch [N_STATES][N_STATES];   // [to][from]

  // Path metrics the step starts from: the stored ones, or the initial ones
  always_comb begin
    for (int s = 0; s < N_STATES; s++) begin
      if (frame_start) pm_cur[s] = (s == 0) ? '0 : PM_W'(PM_INIT);
      else             pm_cur[s] = pm[s];
    end
  end

  always_comb begin
    for (int u = 0; u < N_STATES; u++)
      for (int s = 0; s < N_STATES; s++)
        bm_branch[u][s] = bm[branch_label(state_t'(s), state_t'(u))];
  end

  for (genvar u = 0; u < N_STATES; u++) begin : g_acs
    acs_unit #(.NUM_IN(N_STATES), .PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .pm_in  (pm_cur),
      .bm_in  (bm_branch[u]),
      .pm_out (pm_next[u]),
      .dec    (dec_next[u])
    );
  end

  // Best state of the updated metrics (modulo comparison)
  always_comb begin
    logic [PM_W-1:0] diff;
    best = '0;
    for (int s = 1; s < N_STATES; s++) begin
      diff = pm[s] - pm[best];
      if (diff[PM_W-1]) best = state_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int s = 0; s < N_STATES; s++) begin
        pm[s]  <= (s == 0) ? '0 : PM_W'(PM_INIT);
        dec[s] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pm  <= pm_next;
        dec <= dec_next;
      end else if (frame_start) begin
        pm  <= pm_cur;
      end
    end
  end

  // Modulo normalization is exact only while every metric lies within half
  // the number circle of the best one.
  logic [PM_W-1:0] spread [N_STATES];
  for (genvar s = 0; s < N_STATES; s++) begin : g_spread
    assign spread[s] = pm[s] - pm[best];
    a_spread: assert property (@(posedge clk) disable iff (!rst_n) !spread[s][PM_W-1])
      else $error("acs_array: path metric spread exceeds half the modulo range");
  end

endmodule
