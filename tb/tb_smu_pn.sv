// tb_smu_pn: feeds the permutation-network survivor memory with random
// decision vectors and best states and compares each decoded symbol with an
// explicit trace-back of T steps over the same decisions. Also checks that
// the first output of a frame comes after T+1 steps, that each output comes
// one clock after its step, that idle cycles produce nothing, and that a frame
// restart begins a new count.
module tb_smu_pn;
  import sttc_pkg::*;

  localparam int T = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, in_valid, out_valid;
  state_t dec [N_STATES];
  state_t best;
  sym_t   out_sym;
  int checks = 0, failures = 0, n_out = 0;

  always #5 clk = ~clk;

  smu_pn #(.T(T)) dut (.clk, .rst_n, .frame_start, .in_valid, .dec, .best, .out_valid, .out_sym);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dh [$][N_STATES];
  int bh [$];

  initial begin
    frame_start = 0; in_valid = 0; best = '0;
    for (int s = 0; s < N_STATES; s++) dec[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 6; f++) begin
      int len;
      len = (f == 2) ? 10 : 400;           // one frame shorter than the window
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
        frame_start <= 1'b0;
        in_valid <= 1'b0;
        @(posedge clk);               // output register
        @(negedge clk);
        checks++;
        if (t >= T) begin
          int s;
          s = bh[t];
          for (int k = t; k > t - T; k--) s = dh[k][s];
          n_out++;
          if (!out_valid) begin
            failures++; $display("FAIL f=%0d t=%0d no output", f, t);
          end else if (int'(out_sym) != s) begin
            failures++; $display("FAIL f=%0d t=%0d sym %0d expected %0d", f, t, out_sym, s);
          end
        end else if (out_valid) begin
          failures++; $display("FAIL f=%0d t=%0d output before window filled", f, t);
        end
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("FAIL output while idle"); end
        end
      end
    end
    checks++;
    if (n_out == 0) begin failures++; $display("FAIL no output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
