// tb_sttc_decoder: runs coded frames through a simulated flat-fading channel
// into two decoders, one with the full permutation-network survivor memory
// (SMU_SEG = 1) and one with the segmented form (SMU_SEG = 4). Each frame has
// its own random channel gains and noise. The expected output is bit-exact:
// the reference computes the same 2-bit branch metrics from the equations,
// runs an exact-integer Viterbi search and traces back as each survivor
// memory is specified to. Noiseless frames must also decode to the sent data.
// The latency of the SMU_SEG = 1 decoder (T+3 clocks) is checked.
module tb_sttc_decoder;
  import sttc_pkg::*;
  import sttc_ref_pkg::*;

  localparam int T = 20, SEG = 4, L = T / SEG, SHIFT = 9, PM_INIT = 16;
  localparam int DATA = 200, TAIL = T + L, LEN = DATA + TAIL;
  localparam int NFRAMES = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, in_valid;
  cplx_t r_in [1];
  cplx_t h_in [1][N_T];
  logic  v_a, v_b;
  sym_t  o_a, o_b;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sttc_decoder dut_a (.clk, .rst_n, .frame_start, .in_valid, .r_in, .h_in,
                      .out_valid(v_a), .out_sym(o_a));
  sttc_decoder #(.SMU_SEG(SEG)) dut_b (.clk, .rst_n, .frame_start, .in_valid, .r_in, .h_in,
                                       .out_valid(v_b), .out_sym(o_b));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_a [$], exp_b [$], got_a [$], got_b [$];
  int due_a [$];        // cycle at which each output of dut_a is due

  always @(posedge clk) begin
    #1;
    if (v_a) begin
      got_a.push_back(int'(o_a));
      checks++;
      if (due_a.size() == 0 || due_a.pop_front() != cycle) begin
        failures++; $display("FAIL dut_a output at cycle %0d not when due", cycle);
      end
    end
    if (v_b) got_b.push_back(int'(o_b));
  end

  viterbi_ref vr;

  initial begin
    int data [LEN];
    int n_data_err = 0;
    frame_start = 0; in_valid = 0;
    r_in[0] = '0; h_in[0][0] = '0; h_in[0][1] = '0;
    vr = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int noise, prev;
      noise = (f == 0) ? 0 : 10 * f;
      // quasi-static channel: gains fixed for the frame
      for (int i = 0; i < N_T; i++) begin
        h_in[0][i].re = 8'(int'($urandom_range(0, 60)) - 30);
        h_in[0][i].im = 8'(int'($urandom_range(0, 60)) - 30);
      end
      h_in[0][0].re = 8'(40 + $urandom_range(0, 10));
      vr.start(PM_INIT);
      prev = 0;
      for (int t = 0; t < LEN; t++) begin
        int x, x1, x2, sre, sim;
        longint d [NL];
        int b [NL];
        data[t] = (t < DATA) ? $urandom_range(0, 3) : 0;
        x = ref_enc(data[t], prev);
        prev = data[t];
        x1 = x >> 2; x2 = x & 3;
        sre = h_in[0][0].re * qpsk_re(x1) - h_in[0][0].im * qpsk_im(x1)
            + h_in[0][1].re * qpsk_re(x2) - h_in[0][1].im * qpsk_im(x2);
        sim = h_in[0][0].re * qpsk_im(x1) + h_in[0][0].im * qpsk_re(x1)
            + h_in[0][1].re * qpsk_im(x2) + h_in[0][1].im * qpsk_re(x2);
        if (noise > 0) begin
          sre += int'($urandom_range(0, 2 * noise)) - noise;
          sim += int'($urandom_range(0, 2 * noise)) - noise;
        end
        r_in[0].re = 8'(sre);
        r_in[0].im = 8'(sim);
        for (int l = 0; l < NL; l++)
          d[l] = ref_dist(r_in[0].re, r_in[0].im, h_in[0][0].re, h_in[0][0].im,
                          h_in[0][1].re, h_in[0][1].im, l);
        ref_quant(d, SHIFT, 3, b);
        vr.step(b);
        frame_start = (t == 0);
        in_valid = 1'b1;
        @(posedge clk);
        #1;
        // expected from the T-step window decoder
        if (t >= T) begin
          exp_a.push_back(vr.trace(t, vr.best_hist[t], t - T));
          due_a.push_back(cycle + 3);
        end
        // expected from the segmented decoder
        if ((t + 1) % L == 0 && (t + 1) / L > SEG) begin
          int j, s;
          j = (t + 1) / L - 1;
          s = vr.trace(t, vr.best_hist[t], (j - SEG + 1) * L - 1);
          for (int k = 0; k < L; k++)
            exp_b.push_back(vr.trace((j - SEG + 1) * L - 1, s, (j - SEG) * L + k));
        end
        @(negedge clk);
        frame_start = 0;
        in_valid = 0;
      end
      // the window decoder's output of this frame must match the data
      for (int t = 0; t < DATA; t++) begin
        if (exp_a[exp_a.size() - (LEN - T) + t] != data[t]) begin
          n_data_err++;
          if (noise == 0) begin
            failures++; $display("FAIL noiseless frame %0d: reference disagrees with data", f);
          end
        end
      end
    end
    repeat (3 * T) @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (got_a.size() != exp_a.size()) begin
      failures++; $display("FAIL dut_a %0d symbols, expected %0d", got_a.size(), exp_a.size());
    end
    if (got_b.size() != exp_b.size()) begin
      failures++; $display("FAIL dut_b %0d symbols, expected %0d", got_b.size(), exp_b.size());
    end
    for (int i = 0; i < exp_a.size() && i < got_a.size(); i++) begin
      checks++;
      if (got_a[i] != exp_a[i]) begin failures++; $display("FAIL dut_a symbol %0d", i); end
    end
    for (int i = 0; i < exp_b.size() && i < got_b.size(); i++) begin
      checks++;
      if (got_b[i] != exp_b[i]) begin failures++; $display("FAIL dut_b symbol %0d", i); end
    end
    $display("decoded symbols %0d / %0d, symbol errors against sent data %0d",
             got_a.size(), got_b.size(), n_data_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
