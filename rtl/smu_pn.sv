// smu_pn: survivor memory unit built from a permutation network driven in the
// forward (modified register exchange) direction.
//
// The unit keeps the last T decision vectors of the ACS array in a window of
// registers (N_STATES x T decisions: memory N*T). A combinational network of
// T columns of multiplexers mimics the trellis over that window. Column 0 is
// loaded with the state numbers themselves (the "state address of the first
// stage"); in every later column the multiplexer of state u, steered by u's
// decision, copies the label of u's surviving predecessor. The label that
// arrives at the state with the best path metric at the newest end is
// therefore the state, T steps back, on the best survivor path. Since the
// trellis state of this code equals the two input bits of its step, that
// label is the decoded symbol. No trace-back, no LIFO: one decoded symbol
// per trellis step with a latency of T steps, which is the figure the
// document gives for this architecture.
//
// Timing: in_valid with dec/best -> the window shifts at that edge; out_valid
// and out_sym follow one clock later. out_sym of a step is the symbol of the
// step T earlier. The first output of a frame appears after T+1 steps
// (the oldest stage must be a real data step, not the start state).
// frame_start with the first step of a frame restarts that count.
module smu_pn
  import sttc_pkg::*;
#(
  parameter int unsigned T = 20          // truncation length (decoding window)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    frame_start,
  input  logic    in_valid,
  input  state_t  dec  [N_STATES],        // surviving predecessor of each state
  input  state_t  best,                   // state with the smallest path metric
  output logic    out_valid,
  output sym_t    out_sym
);

  state_t win [T][N_STATES];             // win[0] oldest, win[T-1] newest
  state_t best_q;
  logic   fire;
  logic [$clog2(T+2)-1:0] fill;

  // Forward permutation network over the window
  state_t lab [T+1][N_STATES];
  always_comb begin
    for (int s = 0; s < N_STATES; s++) lab[0][s] = state_t'(s);
    for (int k = 0; k < T; k++)
      for (int u = 0; u < N_STATES; u++)
        lab[k+1][u] = lab[k][win[k][u]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < T; k++)
        for (int s = 0; s < N_STATES; s++) win[k][s] <= '0;
      best_q    <= '0;
      fill      <= '0;
      fire      <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      if (in_valid) begin
        for (int k = 0; k < T-1; k++) win[k] <= win[k+1];
        win[T-1] <= dec;
        best_q   <= best;
        if (frame_start)        fill <= 1;
        else if (fill <= ($clog2(T+2))'(T))     fill <= fill + 1'b1;
        fire <= !frame_start && (fill >= ($clog2(T+2))'(T));
      end else begin
        fire <= 1'b0;
      end
      out_valid <= fire;
      if (fire) out_sym <= sym_t'(lab[T][best_q]);
    end
  end

endmodule
