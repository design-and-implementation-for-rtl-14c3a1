// sttc_pkg: shared constants, types and trellis functions for the space-time
// trellis coded QPSK system with two transmit antennas.
//
// The code is the 4-state delay-diversity code: two binary input streams
// c1, c2 each pass through a one-stage shift register (memory order 1 each,
// total memory v = 2, 2^v = 4 states) and are weighted by the generator
// sequences g1 = [(0,2),(2,0)] and g2 = [(0,1),(1,0)], the products being
// summed modulo 4. For input c_t = (c1,c2) and state s = (c1,c2) of the
// previous step this gives x1 = 2*s1 + s2 and x2 = 2*c1 + c2: antenna 1 sends
// the previous symbol, antenna 2 the current one. The trellis state after a
// step equals the two input bits of that step, so every state has all four
// states as predecessors and the decoded symbol of a stage is the state itself.
//
// QPSK symbol k in {0,1,2,3} is the point exp(j*pi*k/2); multiplying a channel
// gain by a QPSK point is therefore a rotation by a multiple of 90 degrees,
// which needs no multiplier.
//
// The code and its generators follow the document's worked example; the
// sample width of received values and channel gains is this design's choice.
package sttc_pkg;

  // Modulation and code structure
  localparam int unsigned M_BITS   = 2;             // bits per trellis step (m)
  localparam int unsigned N_T      = 2;             // transmit antennas
  localparam int unsigned MEM_K    = 1;             // memory order per shift register (v_k)
  localparam int unsigned V_TOTAL  = M_BITS * MEM_K;// total memory order v
  localparam int unsigned N_STATES = 1 << V_TOTAL;  // 4 trellis states
  localparam int unsigned ST_W     = V_TOTAL;       // width of a state number
  localparam int unsigned N_LABELS = 1 << (M_BITS * N_T); // 16 branch labels (x1,x2)
  localparam int unsigned LBL_W    = M_BITS * N_T;

  // Fixed-point width of one real component of a received sample or gain
  localparam int unsigned SAMPLE_W = 8;

  typedef logic [M_BITS-1:0] sym_t;    // one QPSK symbol / one input pair
  typedef logic [ST_W-1:0]   state_t;
  typedef logic [LBL_W-1:0]  label_t;  // {x1, x2}

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // Generator coefficients g^k_{j,i}: k = register (0: c1, 1: c2),
  // j = delay tap (0..MEM_K), i = antenna (0..N_T-1). Elements of Z_4.
  typedef logic [1:0] gen_t [M_BITS][MEM_K+1][N_T];
  localparam gen_t GEN = '{
    '{ '{2'd0, 2'd2}, '{2'd2, 2'd0} },   // g1 = [(0,2),(2,0)]
    '{ '{2'd0, 2'd1}, '{2'd1, 2'd0} }    // g2 = [(0,1),(1,0)]
  };

  // Encoder output symbol of antenna i for current input 'cin' and
  // previous input 'cprev' (Eq. x_t^i = sum_k sum_j g^k_{j,i} c^k_{t-j} mod 4).
  // Input bit order: cin[1] = c1 (upper register), cin[0] = c2.
  function automatic sym_t enc_symbol(input sym_t cin, input sym_t cprev, input int i);
    logic [1:0] acc;
    acc = '0;
    for (int k = 0; k < M_BITS; k++) begin
      if (cin[M_BITS-1-k])   acc = acc + GEN[k][0][i];
      if (cprev[M_BITS-1-k]) acc = acc + GEN[k][1][i];
    end
    return acc;
  endfunction

  // Branch label {x1, x2} of the transition from state 'from' to state 'to'.
  // With MEM_K = 1 the state is the previous input and the input is the new state.
  function automatic label_t branch_label(input state_t from, input state_t to);
    return {enc_symbol(to, from, 0), enc_symbol(to, from, 1)};
  endfunction

  // Rotate a complex value by k*90 degrees: value * exp(j*pi*k/2).
  function automatic void rot90(input logic signed [SAMPLE_W:0] re_in,
                                input logic signed [SAMPLE_W:0] im_in,
                                input sym_t k,
                                output logic signed [SAMPLE_W:0] re_out,
                                output logic signed [SAMPLE_W:0] im_out);
    unique case (k)
      2'd0: begin re_out =  re_in; im_out =  im_in; end
      2'd1: begin re_out = -im_in; im_out =  re_in; end
      2'd2: begin re_out = -re_in; im_out = -im_in; end
      default: begin re_out =  im_in; im_out = -re_in; end
    endcase
  endfunction

endpackage
