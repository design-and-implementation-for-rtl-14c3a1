// tb_sttc_top: end-to-end test of the link at the default parameters.
// Random data goes into the transmit side; the two antenna symbols it
// produces pass through a simulated quasi-static flat-fading channel with
// noise (new gains every frame) into the receive side, and the decoded pairs
// are compared with an exact reference (same 2-bit metrics, integer Viterbi,
// T-step trace-back) and, for noiseless frames, with the sent data. Encoder
// symbols are checked against the reference encoder, and the decoder latency
// (T+3 clocks) is checked on every output.
//
// Mechanisms that must occur, each counted: path metric wrap-around
// (modulo normalization), saturated branch metrics, channel steps whose
// transmitted label was not the locally best one (errors the trellis must
// correct), frame restarts, and the first-output delay of a frame.
module tb_sttc_top;
  import sttc_pkg::*;
  import sttc_ref_pkg::*;

  localparam int T = 20, SHIFT = 9, PM_INIT = 16;
  localparam int DATA = 1000, LEN = DATA + T;
  localparam int NFRAMES = 5;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  tx_frame_start, tx_valid, tx_sym_valid;
  sym_t  tx_data;
  sym_t  tx_sym [N_T];
  logic  rx_frame_start, rx_valid, rx_out_valid;
  cplx_t rx_r [1];
  cplx_t rx_h [1][N_T];
  sym_t  rx_out_data;
  int checks = 0, failures = 0, cycle = 0;
  int n_wrap = 0, n_sat = 0, n_local_err = 0, n_restart = 0, n_first_delay = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sttc_top dut (.*);

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$], got_q [$], due_q [$];

  // output monitor with latency check
  always @(posedge clk) begin
    #1;
    if (rx_out_valid) begin
      got_q.push_back(int'(rx_out_data));
      checks++;
      if (due_q.size() == 0 || due_q.pop_front() != cycle) begin
        failures++; $display("FAIL output at cycle %0d not when due", cycle);
      end
    end
  end

  // path metric wrap-around of the best state's metric
  logic [7:0] last_min = '0;
  always @(posedge clk) begin
    #1;
    if (dut.u_dec.acs_valid) begin
      logic [7:0] m;
      m = dut.u_dec.pm[dut.u_dec.best];
      if (m < last_min && (last_min - m) > 8'd128) n_wrap++;
      last_min = m;
    end
    if (dut.u_dec.bm_valid)
      for (int l = 0; l < N_LABELS; l++)
        if (dut.u_dec.bm[l] == 2'd3) begin n_sat++; break; end
  end

  viterbi_ref vr;

  initial begin
    int data [LEN];
    int n_data_err = 0;
    tx_frame_start = 0; tx_valid = 0; tx_data = '0;
    rx_frame_start = 0; rx_valid = 0;
    rx_r[0] = '0; rx_h[0][0] = '0; rx_h[0][1] = '0;
    vr = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int noise, prev, first_out_step;
      noise = (f % 2 == 0) ? 0 : 20 + 10 * f;
      for (int i = 0; i < N_T; i++) begin
        rx_h[0][i].re = 8'(int'($urandom_range(0, 60)) - 30);
        rx_h[0][i].im = 8'(int'($urandom_range(0, 60)) - 30);
      end
      rx_h[0][i_strong(f)].re = 8'(45 + $urandom_range(0, 10));
      vr.start(PM_INIT);
      prev = 0;
      if (f > 0) n_restart++;
      first_out_step = -1;
      for (int t = 0; t < LEN; t++) begin
        int x1, x2, xr, sre, sim;
        longint d [NL];
        int b [NL];
        data[t] = (t < DATA) ? $urandom_range(0, 3) : 0;
        // transmit side
        tx_frame_start = (t == 0);
        tx_valid = 1'b1;
        tx_data = sym_t'(data[t]);
        @(posedge clk);
        #1;
        tx_frame_start = 0;
        tx_valid = 0;
        xr = ref_enc(data[t], prev);
        prev = data[t];
        checks++;
        if (!tx_sym_valid || {tx_sym[0], tx_sym[1]} != 4'(xr)) begin
          failures++; $display("FAIL encoder frame %0d step %0d", f, t);
        end
        // channel
        x1 = int'(tx_sym[0]); x2 = int'(tx_sym[1]);
        sre = rx_h[0][0].re * qpsk_re(x1) - rx_h[0][0].im * qpsk_im(x1)
            + rx_h[0][1].re * qpsk_re(x2) - rx_h[0][1].im * qpsk_im(x2);
        sim = rx_h[0][0].re * qpsk_im(x1) + rx_h[0][0].im * qpsk_re(x1)
            + rx_h[0][1].re * qpsk_im(x2) + rx_h[0][1].im * qpsk_re(x2);
        if (noise > 0) begin
          sre += int'($urandom_range(0, 2 * noise)) - noise;
          sim += int'($urandom_range(0, 2 * noise)) - noise;
        end
        rx_r[0].re = 8'(sre);
        rx_r[0].im = 8'(sim);
        for (int l = 0; l < NL; l++)
          d[l] = ref_dist(rx_r[0].re, rx_r[0].im, rx_h[0][0].re, rx_h[0][0].im,
                          rx_h[0][1].re, rx_h[0][1].im, l);
        ref_quant(d, SHIFT, 3, b);
        if (b[xr] != 0) n_local_err++;
        vr.step(b);
        // receive side
        rx_frame_start = (t == 0);
        rx_valid = 1'b1;
        @(posedge clk);
        #1;
        rx_frame_start = 0;
        rx_valid = 0;
        if (t >= T) begin
          exp_q.push_back(vr.trace(t, vr.best_hist[t], t - T));
          due_q.push_back(cycle + 3);
          if (first_out_step < 0) first_out_step = t;
        end
      end
      checks++;
      if (first_out_step == T) n_first_delay++;
      else begin failures++; $display("FAIL first output of frame %0d after step %0d", f, first_out_step); end
      for (int t = 0; t < DATA; t++)
        if (exp_q[exp_q.size() - DATA + t] != data[t]) begin
          n_data_err++;
          if (noise == 0) begin
            failures++; $display("FAIL noiseless frame %0d step %0d not decoded to the data", f, t);
          end
        end
    end
    repeat (2 * T) @(posedge clk);
    @(negedge clk);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++; $display("FAIL %0d decoded symbols, expected %0d", got_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      checks++;
      if (got_q[i] != exp_q[i]) begin failures++; $display("FAIL decoded symbol %0d", i); end
    end
    $display("path metric wraps %0d, steps with saturated metrics %0d, locally wrong steps %0d, frame restarts %0d, frames with first output after T+1 steps %0d",
             n_wrap, n_sat, n_local_err, n_restart, n_first_delay);
    $display("symbols decoded %0d, errors against sent data %0d", got_q.size(), n_data_err);
    checks += 5;
    if (n_wrap == 0)        begin failures++; $display("FAIL no path metric wrap"); end
    if (n_sat == 0)         begin failures++; $display("FAIL no saturated branch metric"); end
    if (n_local_err == 0)   begin failures++; $display("FAIL no channel error to correct"); end
    if (n_restart == 0)     begin failures++; $display("FAIL no frame restart"); end
    if (n_first_delay == 0) begin failures++; $display("FAIL no frame start-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int i_strong(int f);
    return f % 2;
  endfunction
endmodule
