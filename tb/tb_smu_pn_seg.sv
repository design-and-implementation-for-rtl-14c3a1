// tb_smu_pn_seg: feeds the segmented survivor memory with random decision
// vectors and best states, back to back and with gaps, over several frames.
// Expected output: for every finished segment j >= SEG of a frame, the L
// states of segment j-SEG on the survivor traced back from the best state
// at the end of segment j, oldest first. Also checks the burst timing: the
// first symbol of a burst leaves SEG+1 clocks after the step that finished
// the segment.
module tb_smu_pn_seg;
  import sttc_pkg::*;

  localparam int T = 20, SEG = 4, L = T / SEG;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, in_valid, out_valid;
  state_t dec [N_STATES];
  state_t best;
  sym_t   out_sym;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  smu_pn_seg #(.T(T), .SEG(SEG)) dut (.clk, .rst_n, .frame_start, .in_valid, .dec, .best,
                                      .out_valid, .out_sym);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];          // expected symbols
  int got_q [$];          // received symbols
  int burst_due [$];      // cycle at which each burst must begin

  // output monitor
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      if (got_q.size() % L == 0) begin
        checks++;
        if (burst_due.size() == 0) begin
          failures++; $display("FAIL unexpected burst at cycle %0d", cycle);
        end else begin
          int due;
          due = burst_due.pop_front();
          if (cycle != due) begin
            failures++; $display("FAIL burst at cycle %0d expected %0d", cycle, due);
          end
        end
      end
      got_q.push_back(int'(out_sym));
    end
  end

  int dh [$][N_STATES];
  int bh [$];

  initial begin
    frame_start = 0; in_valid = 0; best = '0;
    for (int s = 0; s < N_STATES; s++) dec[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 5; f++) begin
      int len;
      len = (f == 1) ? 23 : 300 + f;
      dh.delete(); bh.delete();
      for (int t = 0; t < len; t++) begin
        int d [N_STATES];
        int b;
        // mostly permutations (survivors that never merge, so the trace
        // depth matters), sometimes random decisions that merge survivors
        begin
          int rot, x;
          rot = $urandom_range(0, 3);
          x = $urandom_range(0, 3);
          for (int s = 0; s < N_STATES; s++) begin
            d[s] = ($urandom_range(0, 7) == 0) ? $urandom_range(0, 3) : ((s ^ x) + rot) % 4;
            dec[s] = state_t'(d[s]);
          end
        end
        b = $urandom_range(0, 3);
        best = state_t'(b);
        dh.push_back(d); bh.push_back(b);
        frame_start <= (t == 0);
        in_valid <= 1'b1;
        @(posedge clk);
        #1;
        if ((t + 1) % L == 0 && (t + 1) / L > SEG) begin
          int j, s;
          j = (t + 1) / L - 1;
          burst_due.push_back(cycle + SEG + 1);
          // trace from the end of segment j to the end of segment j-SEG
          s = b;
          for (int k = t; k > (j - SEG + 1) * L - 1; k--) s = dh[k][s];
          // then the L states of segment j-SEG, newest first
          begin
            int seg_states [L];
            for (int k = L - 1; k >= 0; k--) begin
              seg_states[k] = s;
              s = dh[(j - SEG) * L + k][s];
            end
            for (int k = 0; k < L; k++) exp_q.push_back(seg_states[k]);
          end
        end
        frame_start <= 1'b0;
        in_valid <= 1'b0;
        // gaps only in some frames; a segment always takes at least L clocks
        if (f >= 3 && $urandom_range(0, 3) == 0) @(posedge clk);
        @(negedge clk);
      end
      repeat (2 * L + SEG + 4) @(posedge clk);
      @(negedge clk);
    end
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++; $display("FAIL %0d symbols out, %0d expected", got_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      checks++;
      if (got_q[i] != exp_q[i]) begin
        failures++; $display("FAIL symbol %0d: %0d expected %0d", i, got_q[i], exp_q[i]);
      end
    end
    checks++;
    if (burst_due.size() != 0) begin failures++; $display("FAIL %0d bursts missing", burst_due.size()); end
    $display("symbols checked: %0d", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
