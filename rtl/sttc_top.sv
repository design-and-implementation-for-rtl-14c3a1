// sttc_top: the space-time trellis coded link of the design, transmit and
// receive side next to each other.
//
// The transmit side is the space-time trellis encoder: each input pair
// {c1,c2} becomes two QPSK symbol indices, one per transmit antenna. The
// receive side is the Viterbi decoder: received complex samples (one per
// receive antenna) and the channel gains of the frame go in, decoded input
// pairs come out after the survivor-memory latency. The channel between the
// two lies outside the chip; the two halves share only clock and reset.
//
// Parameters are those of sttc_decoder; their defaults are the document's
// sizes where it gives them (2-bit branch metrics, 8-bit path metrics,
// decoding window 20) and this design's choices elsewhere.
module sttc_top
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
  // transmit side
  input  logic   tx_frame_start,
  input  logic   tx_valid,
  input  sym_t   tx_data,
  output logic   tx_sym_valid,
  output sym_t   tx_sym [N_T],
  // receive side
  input  logic   rx_frame_start,
  input  logic   rx_valid,
  input  cplx_t  rx_r [N_R],
  input  cplx_t  rx_h [N_R][N_T],
  output logic   rx_out_valid,
  output sym_t   rx_out_data
);

  sttc_encoder u_enc (
    .clk, .rst_n,
    .frame_start (tx_frame_start),
    .in_valid    (tx_valid),
    .c_in        (tx_data),
    .out_valid   (tx_sym_valid),
    .x_out       (tx_sym)
  );

  sttc_decoder #(
    .N_R(N_R), .BM_W(BM_W), .BM_SHIFT(BM_SHIFT), .PM_W(PM_W),
    .PM_INIT(PM_INIT), .T(T), .SMU_SEG(SMU_SEG)
  ) u_dec (
    .clk, .rst_n,
    .frame_start (rx_frame_start),
    .in_valid    (rx_valid),
    .r_in        (rx_r),
    .h_in        (rx_h),
    .out_valid   (rx_out_valid),
    .out_sym     (rx_out_data)
  );

endmodule
