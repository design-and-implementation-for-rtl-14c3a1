// acs_unit: add-compare-select element for one trellis state.
//
// Each of the NUM_IN branches entering the state adds its branch metric to
// the path metric of its origin state; the smallest sum survives. Path
// metrics are PM_W-bit two's-complement numbers that are allowed to wrap
// (modulo normalization): two candidates a and b are compared through the
// sign of the wrapped difference a - b, which is correct as long as all
// metrics lie within half the number circle of each other. This is the
// normalization the document adopts; no metric is ever rescaled.
//
// The compare-select is a chain of two-way compare-select cells (the
// document's basic two-way ACS element), evaluated in one clock cycle
// (combinational here; registering is done by the caller). On a tie the
// lower-numbered origin wins (this design's choice).
//
// Outputs: pm_out, the new path metric, and dec, the index of the surviving
// origin (the decision bits written to the survivor memory).
module acs_unit #(
  parameter int unsigned NUM_IN = 4,   // branches entering the state
  parameter int unsigned PM_W   = 8,   // path metric width
  parameter int unsigned BM_W   = 2,   // branch metric width
  localparam int unsigned DEC_W = (NUM_IN > 1) ? $clog2(NUM_IN) : 1
) (
  input  logic [PM_W-1:0]  pm_in [NUM_IN],   // path metrics of the origin states
  input  logic [BM_W-1:0]  bm_in [NUM_IN],   // metrics of the entering branches
  output logic [PM_W-1:0]  pm_out,
  output logic [DEC_W-1:0] dec
);

  // a is smaller than b on the modulo circle
  function automatic logic mod_less(input logic [PM_W-1:0] a, input logic [PM_W-1:0] b);
    logic [PM_W-1:0] diff;
    diff = a - b;
    return diff[PM_W-1];
  endfunction

  always_comb begin
    logic [PM_W-1:0] best;
    logic [PM_W-1:0] cand;
    best = pm_in[0] + PM_W'(bm_in[0]);
    dec  = '0;
    for (int i = 1; i < NUM_IN; i++) begin
      cand = pm_in[i] + PM_W'(bm_in[i]);
      if (mod_less(cand, best)) begin
        best = cand;
        dec  = DEC_W'(i);
      end
    end
    pm_out = best;
  end

endmodule
