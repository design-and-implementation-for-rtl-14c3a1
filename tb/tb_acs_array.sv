// tb_acs_array: drives the ACS array with random branch metric vectors over
// several frames and compares, step by step, the decision vector, the best
// state and the wrapped path metrics with the exact integer Viterbi
// reference. Long frames make the 8-bit metrics wrap many times, which the
// modulo comparison must survive. Idle cycles check that nothing moves
// without in_valid.
module tb_acs_array;
  import sttc_pkg::*;
  import sttc_ref_pkg::*;

  localparam int PM_W = 8, BM_W = 2, PM_INIT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, in_valid, out_valid;
  logic [BM_W-1:0] bm  [N_LABELS];
  state_t          dec [N_STATES];
  logic [PM_W-1:0] pm  [N_STATES];
  state_t          best;
  int checks = 0, failures = 0, n_wrap = 0;

  always #5 clk = ~clk;

  acs_array #(.PM_W(PM_W), .BM_W(BM_W), .PM_INIT(PM_INIT)) dut (
    .clk, .rst_n, .frame_start, .in_valid, .bm, .out_valid, .dec, .pm, .best);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  viterbi_ref vr;

  initial begin
    frame_start = 0; in_valid = 0;
    for (int l = 0; l < N_LABELS; l++) bm[l] = '0;
    vr = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 5; f++) begin
      vr.start(PM_INIT);
      for (int t = 0; t < 1500; t++) begin
        int b [NL];
        longint old_max;
        old_max = vr.pm[0];
        for (int l = 0; l < NL; l++) begin
          b[l] = (f % 2 == 0) ? $urandom_range(1, 3) : $urandom_range(0, 3);
          bm[l] = BM_W'(b[l]);
        end
        vr.step(b);
        frame_start <= (t == 0);
        in_valid <= 1'b1;
        @(posedge clk);
        frame_start <= 1'b0;
        in_valid <= 1'b0;
        @(negedge clk);
        checks++;
        if (!out_valid) begin failures++; $display("FAIL out_valid"); end
        for (int s = 0; s < N_STATES; s++) begin
          checks += 2;
          if (int'(dec[s]) != vr.dec_hist[t][s]) begin
            failures++; $display("FAIL f=%0d t=%0d dec[%0d]=%0d expected %0d", f, t, s, dec[s], vr.dec_hist[t][s]);
          end
          if (pm[s] != PM_W'(vr.pm[s])) begin
            failures++; $display("FAIL f=%0d t=%0d pm[%0d]=%0d expected %0d", f, t, s, pm[s], vr.pm[s] % 256);
          end
        end
        checks++;
        if (int'(best) != vr.best_hist[t]) begin
          failures++; $display("FAIL f=%0d t=%0d best %0d expected %0d", f, t, best, vr.best_hist[t]);
        end
        if (old_max / 256 != vr.pm[0] / 256) n_wrap++;
        if ($urandom_range(0, 9) == 0) begin
          @(posedge clk); @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("FAIL out_valid while idle"); end
        end
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL path metrics never wrapped"); end
    $display("path metric wraps: %0d, final metrics %0d %0d %0d %0d", n_wrap, vr.pm[0], vr.pm[1], vr.pm[2], vr.pm[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
