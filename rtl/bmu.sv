// bmu: branch metric unit of the space-time trellis decoder.
//
// For every branch label (x1, x2) of the trellis (16 labels for two QPSK
// antennas) it computes the squared Euclidean distance between the received
// samples and the noiseless received value the label would produce:
//     d(x1,x2) = sum_j | r_j - (h_j1 * x1 + h_j2 * x2) |^2,  j = 1..N_R,
// with perfect channel knowledge h supplied from outside. Multiplying a gain by
// a QPSK point is a 90-degree rotation, so no multipliers are needed for the
// hypotheses; only the squares use them.
//
// The document sizes branch metrics at 2 bits. How the wide distance is cut
// down to 2 bits is this design's choice: the smallest distance of the step is
// subtracted from every distance (metrics stay relative, which the path
// metric arithmetic does not mind), the result is shifted right by BM_SHIFT
// and saturated to 2^BM_W - 1.
//
// Interface: in_valid with r and h; out_valid and bm one clock later
// (registered). bm is indexed by the label {x1, x2}.
module bmu
  import sttc_pkg::*;
#(
  parameter int unsigned N_R      = 1,   // receive antennas
  parameter int unsigned BM_W     = 2,   // branch metric width
  parameter int unsigned BM_SHIFT = 9    // scaling of the distance before saturation
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  cplx_t             r_in [N_R],
  input  cplx_t             h_in [N_R][N_T],
  output logic              out_valid,
  output logic [BM_W-1:0]   bm   [N_LABELS]
);

  localparam int unsigned E_W = SAMPLE_W + 3;                 // width of r - s
  localparam int unsigned D_W = 2 * E_W + 1 + $clog2(N_R + 1); // width of a distance
  localparam logic [BM_W-1:0] BM_MAX = {BM_W{1'b1}};

  logic [D_W-1:0] dsq [N_LABELS];
  logic [D_W-1:0] dmin;
  logic [BM_W-1:0] bm_c [N_LABELS];

  always_comb begin
    for (int l = 0; l < N_LABELS; l++) begin
      logic [D_W-1:0] acc;
      acc = '0;
      for (int j = 0; j < N_R; j++) begin
        logic signed [SAMPLE_W:0]   ar, ai, br, bi;
        logic signed [E_W-1:0]      er, ei;
        rot90((SAMPLE_W+1)'(h_in[j][0].re), (SAMPLE_W+1)'(h_in[j][0].im), sym_t'(l >> M_BITS), ar, ai);
        rot90((SAMPLE_W+1)'(h_in[j][1].re), (SAMPLE_W+1)'(h_in[j][1].im), sym_t'(l), br, bi);
        er = E_W'(r_in[j].re) - E_W'(ar) - E_W'(br);
        ei = E_W'(r_in[j].im) - E_W'(ai) - E_W'(bi);
        acc = acc + D_W'(er * er) + D_W'(ei * ei);
      end
      dsq[l] = acc;
    end
  end

  always_comb begin
    dmin = dsq[0];
    for (int l = 1; l < N_LABELS; l++)
      if (dsq[l] < dmin) dmin = dsq[l];
  end

  always_comb begin
    for (int l = 0; l < N_LABELS; l++) begin
      logic [D_W-1:0] rel;
      rel = (dsq[l] - dmin) >> BM_SHIFT;
      bm_c[l] = (rel > D_W'(BM_MAX)) ? BM_MAX : rel[BM_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < N_LABELS; l++) bm[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int l = 0; l < N_LABELS; l++) bm[l] <= bm_c[l];
    end
  end

endmodule
