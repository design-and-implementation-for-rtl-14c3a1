// smu_pn_seg: area-reduced survivor memory unit. The permutation network of
// smu_pn is cut to L = T/SEG trellis stages, and registers at both of its
// ends hold partial survivor paths, so the network shrinks by the factor SEG
// at the price of SEG extra clocks per segment to find the merge state.
//
// How it works:
//  * Decision vectors are collected into a segment of L stages. When the
//    last one arrives, a combinational network over the segment (N_STATES x L
//    decisions) computes, for every state u at the segment end, the state at
//    the segment start on u's survivor (origin[u]) and the L states the
//    survivor visits inside the segment (path[u], oldest first). The
//    network works forward like register exchange: column 0 holds the state
//    numbers, every multiplexer copies its predecessor's contents and
//    appends its own state number.
//  * These results are kept for the last SEG+1 segments (the registers at the two ends of the network).
//  * After each new segment, a walk over SEG segments (one table lookup per
//    clock, SEG clocks) follows the origins back from the newest best state to
//    the end state of the oldest stored segment. Its path then gives the L
//    decoded symbols of that segment, which leave one per clock.
//  Each decoded symbol is thus backed by at least T = SEG*L trellis steps of
//  survivor history. Because the trellis state of this code equals the input
//  pair of its step, the visited states are the decoded symbols.
//
// The document gives the idea (network over T/M stages, extra registers at
// both ends, M extra cycles); the segment bookkeeping above is this design's
// own. Requires SEG < L so that the walk ends before the next segment.
//
// Interface: as smu_pn. out_valid/out_sym deliver symbols in order, in bursts
// of L, the first of a frame SEG clocks after segment SEG+1 of that frame
// completes. To flush a frame the sender appends at least T + L tail steps.
// All registers use the asynchronous reset; rst_n is also read by the
// 'disable iff' of the walk assertion, which is not logic.
module smu_pn_seg
  import sttc_pkg::*;
#(
  parameter int unsigned T   = 20,        // truncation length
  parameter int unsigned SEG = 4,         // area reduction factor (M)
  localparam int unsigned L  = T / SEG    // stages spanned by the network
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    frame_start,
  input  logic    in_valid,
  input  state_t  dec  [N_STATES],
  input  state_t  best,
  output logic    out_valid,
  output sym_t    out_sym
);

  if (SEG >= L || L * SEG != T) begin : g_check
    $error("smu_pn_seg: T must be a multiple of SEG with SEG < T/SEG");
  end

  // ---- segment collection -------------------------------------------------
  state_t seg_buf [L][N_STATES];
  logic [$clog2(L+1)-1:0] seg_cnt;       // stages already in seg_buf
  logic [$clog2(L+1)-1:0] seg_pos;       // slot of the incoming vector
  logic   seg_done;

  assign seg_pos  = frame_start ? '0 : seg_cnt;
  assign seg_done = in_valid && (32'(seg_pos) == L - 1);

  // ---- network over one segment ---------------------------------------------
  // The newest stage comes straight from the input, the others from seg_buf.
  state_t net_org  [L+1][N_STATES];
  state_t net_path [L+1][N_STATES][L];
  always_comb begin
    for (int s = 0; s < N_STATES; s++) begin
      net_org[0][s] = state_t'(s);
      for (int k = 0; k < L; k++) net_path[0][s][k] = '0;
    end
    for (int c = 0; c < L; c++) begin
      for (int u = 0; u < N_STATES; u++) begin
        state_t p;
        p = (c == L - 1) ? dec[u] : seg_buf[c][u];
        net_org[c+1][u]  = net_org[c][p];
        net_path[c+1][u] = net_path[c][p];
        net_path[c+1][u][c] = state_t'(u);
      end
    end
  end

  // ---- stored segment results, index SEG newest, 0 oldest -----------------
  state_t org_q  [SEG+1][N_STATES];
  state_t path_q [SEG+1][N_STATES][L];
  logic [$clog2(SEG+2)-1:0] nseg;        // segments of this frame stored

  // ---- merge-state walk and output ----------------------------------------
  logic   walking, load_req;
  logic [$clog2(SEG+1)-1:0] walk_idx;    // segment whose origin is looked up next
  state_t walk_state;                    // end state of segment walk_idx
  sym_t   obuf [L];
  logic [$clog2(L+1)-1:0] ocnt;          // symbols still to send
  logic [$clog2(SEG+2)-1:0] nseg_next;

  always_comb begin
    if (frame_start)      nseg_next = 1;
    else if (32'(nseg) <= SEG) nseg_next = nseg + 1'b1;
    else                  nseg_next = nseg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++)
        for (int s = 0; s < N_STATES; s++) seg_buf[k][s] <= '0;
      for (int g = 0; g <= SEG; g++)
        for (int s = 0; s < N_STATES; s++) begin
          org_q[g][s] <= '0;
          for (int k = 0; k < L; k++) path_q[g][s][k] <= '0;
        end
      for (int k = 0; k < L; k++) obuf[k] <= '0;
      seg_cnt    <= '0;
      nseg       <= '0;
      walking    <= 1'b0;
      load_req   <= 1'b0;
      walk_idx   <= '0;
      walk_state <= '0;
      ocnt       <= '0;
      out_valid  <= 1'b0;
      out_sym    <= '0;
    end else begin
      // collect decisions
      if (in_valid) begin
        seg_buf[seg_pos] <= dec;
        seg_cnt <= seg_done ? '0 : seg_pos + 1'b1;
      end

      // store a finished segment; start the walk once SEG+1 are stored
      if (seg_done) begin
        for (int g = 0; g < SEG; g++) begin
          org_q[g]  <= org_q[g+1];
          path_q[g] <= path_q[g+1];
        end
        org_q[SEG]  <= net_org[L];
        path_q[SEG] <= net_path[L];
        nseg        <= nseg_next;
        if (32'(nseg_next) > SEG) begin
          walking    <= 1'b1;
          walk_idx   <= ($clog2(SEG+1))'(SEG);
          walk_state <= best;
        end
      end else begin
        if (in_valid && frame_start) nseg <= '0;
        if (walking) begin
          // end of segment walk_idx -> end of segment walk_idx-1
          walk_state <= org_q[walk_idx][walk_state];
          walk_idx   <= walk_idx - 1'b1;
          if (walk_idx == 1) begin
            walking  <= 1'b0;
            load_req <= 1'b1;
          end
        end
      end

      // load the decoded oldest segment, then send it one symbol per clock
      if (load_req) begin
        load_req <= 1'b0;
        for (int k = 0; k < L-1; k++) obuf[k] <= path_q[0][walk_state][k+1];
        ocnt      <= ($clog2(L+1))'(L-1);
        out_valid <= 1'b1;
        out_sym   <= path_q[0][walk_state][0];
      end else if (ocnt != 0) begin
        out_valid <= 1'b1;
        out_sym   <= obuf[0];
        for (int k = 0; k < L-1; k++) obuf[k] <= obuf[k+1];
        ocnt <= ocnt - 1'b1;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  // The merge-state walk must be over before the next segment is stored,
  // which holds when SEG < L and steps do not come faster than one per clock.
  a_walk_done: assert property (@(posedge clk) disable iff (!rst_n) !(seg_done && walking))
    else $error("smu_pn_seg: segment finished while the merge-state walk was running");

endmodule
