// sttc_decoder: Viterbi decoder for the 4-state space-time trellis coded QPSK
// scheme with two transmit antennas.
//
// The decoder is the usual three-part Viterbi pipeline: the branch metric
// unit (bmu) turns received samples and channel gains into 2-bit metrics for
// the 16 branch labels, the ACS array with its path metric memory
// (acs_array) performs one trellis step per clock and emits a decision vector
// and the best state, and the survivor memory unit recovers the decoded
// symbols. The survivor memory is the permutation-network / modified register
// exchange unit (smu_pn, latency T) when SMU_SEG = 1, or its area-reduced
// form (smu_pn_seg) whose network spans T/SMU_SEG stages when SMU_SEG > 1.
//
// Interface: one received vector r (one complex sample per receive antenna)
// per in_valid, with the channel gains h held for the frame (quasi-static
// channel). frame_start marks the first step of a frame, which starts from
// trellis state 0. out_valid/out_sym deliver the decoded input pairs {c1,c2}
// in order; with SMU_SEG = 1 the symbol of step t leaves T+3 clocks after it
// entered (1 clock BMU, 1 clock ACS, T steps window, 1 clock output register)
// when steps arrive every clock. To flush the end of a frame, the sender
// appends at least T tail steps (the decoder never sees the frame end).
module sttc_decoder
  import sttc_pkg::*;
#(
  parameter int unsigned N_R      = 1,
  parameter int unsigned BM_W     = 2,
  parameter int unsigned BM_SHIFT = 9,
  parameter int unsigned PM_W     = 8,
  parameter int unsigned PM_INIT  = 16,
  parameter int unsigned T        = 20,
  parameter int unsigned SMU_SEG  = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_start,
  input  logic   in_valid,
  input  cplx_t  r_in [N_R],
  input  cplx_t  h_in [N_R][N_T],
  output logic   out_valid,
  output sym_t   out_sym
);

  logic              bm_valid, acs_valid;
  logic              fs_bm, fs_acs;
  logic [BM_W-1:0]   bm   [N_LABELS];
  state_t            dec  [N_STATES];
  logic [PM_W-1:0]   pm   [N_STATES];
  state_t            best;

  // frame_start travels with its step through the pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_bm  <= 1'b0;
      fs_acs <= 1'b0;
    end else begin
      fs_bm  <= frame_start & in_valid;
      fs_acs <= fs_bm & bm_valid;
    end
  end

  bmu #(.N_R(N_R), .BM_W(BM_W), .BM_SHIFT(BM_SHIFT)) u_bmu (
    .clk, .rst_n,
    .in_valid  (in_valid),
    .r_in      (r_in),
    .h_in      (h_in),
    .out_valid (bm_valid),
    .bm        (bm)
  );

  acs_array #(.PM_W(PM_W), .BM_W(BM_W), .PM_INIT(PM_INIT)) u_acs (
    .clk, .rst_n,
    .frame_start (fs_bm),
    .in_valid    (bm_valid),
    .bm          (bm),
    .out_valid   (acs_valid),
    .dec         (dec),
    .pm          (pm),
    .best        (best)
  );

  if (SMU_SEG <= 1) begin : g_smu
    smu_pn #(.T(T)) u_smu (
      .clk, .rst_n,
      .frame_start (fs_acs),
      .in_valid    (acs_valid),
      .dec         (dec),
      .best        (best),
      .out_valid   (out_valid),
      .out_sym     (out_sym)
    );
  end else begin : g_smu
    smu_pn_seg #(.T(T), .SEG(SMU_SEG)) u_smu (
      .clk, .rst_n,
      .frame_start (fs_acs),
      .in_valid    (acs_valid),
      .dec         (dec),
      .best        (best),
      .out_valid   (out_valid),
      .out_sym     (out_sym)
    );
  end

endmodule
