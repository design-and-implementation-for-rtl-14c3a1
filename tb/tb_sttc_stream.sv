// tb_sttc_stream: long-run workload at the default parameters. One frame of
// 500,020 trellis steps streams through the
// encoder, a noisy quasi-static channel and the decoder, one step per clock,
// without any restart, as in a bit-error-rate run; one million decoded
// information bits leave the decoder. Every decoded pair is
// compared with the exact reference decoder (same 2-bit metrics, integer
// Viterbi search, T-step trace-back); the bit error rate against the sent data
// is reported. The 8-bit path metrics wrap many times on the way.
module tb_sttc_stream;
  import sttc_pkg::*;
  import sttc_ref_pkg::*;

  localparam int T = 20, SHIFT = 9, PM_INIT = 16;
  localparam int STEPS = 500000 + T;   // the last T steps stay in the window
  localparam int NOISE = 30;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  tx_frame_start, tx_valid, tx_sym_valid;
  sym_t  tx_data;
  sym_t  tx_sym [N_T];
  logic  rx_frame_start, rx_valid, rx_out_valid;
  cplx_t rx_r [1];
  cplx_t rx_h [1][N_T];
  sym_t  rx_out_data;
  int checks = 0, failures = 0;
  longint n_bit_err = 0, n_bits = 0;
  int n_wrap = 0;

  always #5 clk = ~clk;

  sttc_top dut (.*);

  initial begin : watchdog
    repeat (STEPS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected decoder outputs and the sent data, in order
  int exp_q [$];
  int sent_q [$];

  always @(posedge clk) begin
    #1;
    if (rx_out_valid) begin
      int e, s, o;
      checks++;
      o = int'(rx_out_data);
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL output with nothing expected");
      end else begin
        e = exp_q.pop_front();
        s = sent_q.pop_front();
        if (o != e) begin
          failures++;
          if (failures < 10) $display("FAIL decoded %0d expected %0d", o, e);
        end
        n_bits += 2;
        n_bit_err += ((o ^ s) & 1) + (((o ^ s) >> 1) & 1);
      end
    end
  end

  logic [7:0] last_min = '0;
  always @(posedge clk) begin
    #1;
    if (dut.u_dec.acs_valid) begin
      logic [7:0] m;
      m = dut.u_dec.pm[dut.u_dec.best];
      if (m < last_min && (last_min - m) > 8'd128) n_wrap++;
      last_min = m;
    end
  end

  // sliding reference: metrics and the last T+1 decision vectors
  longint rpm [4];
  int     rdec [$][4];

  initial begin
    int x_prev;
    int data_hist [$];
    tx_frame_start = 0; tx_valid = 0; tx_data = '0;
    rx_frame_start = 0; rx_valid = 0;
    rx_h[0][0].re = 8'sd44; rx_h[0][0].im = -8'sd13;
    rx_h[0][1].re = 8'sd17; rx_h[0][1].im = 8'sd38;
    rx_r[0] = '0;
    rpm[0] = 0; rpm[1] = PM_INIT; rpm[2] = PM_INIT; rpm[3] = PM_INIT;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // the transmit side runs one clock ahead of the receive side
    for (int t = 0; t <= STEPS; t++) begin
      int d;
      d = $urandom_range(0, 3);
      tx_frame_start = (t == 0);
      tx_valid = (t < STEPS);
      tx_data = sym_t'(d);
      if (t > 0) begin
        // receive the symbols produced for step t-1
        int x1, x2, sre, sim, best, xr;
        longint dd [NL];
        int b [NL];
        longint npm [4];
        int dv [4];
        x1 = int'(tx_sym[0]); x2 = int'(tx_sym[1]);
        xr = ref_enc(data_hist[data_hist.size() - 1], x_prev);
        checks++;
        if (!tx_sym_valid || {tx_sym[0], tx_sym[1]} != 4'(xr)) begin
          failures++; $display("FAIL encoder at step %0d", t - 1);
        end
        x_prev = data_hist[data_hist.size() - 1];
        sre = rx_h[0][0].re * qpsk_re(x1) - rx_h[0][0].im * qpsk_im(x1)
            + rx_h[0][1].re * qpsk_re(x2) - rx_h[0][1].im * qpsk_im(x2)
            + int'($urandom_range(0, 2 * NOISE)) - NOISE;
        sim = rx_h[0][0].re * qpsk_im(x1) + rx_h[0][0].im * qpsk_re(x1)
            + rx_h[0][1].re * qpsk_im(x2) + rx_h[0][1].im * qpsk_re(x2)
            + int'($urandom_range(0, 2 * NOISE)) - NOISE;
        rx_r[0].re = 8'(sre);
        rx_r[0].im = 8'(sim);
        rx_frame_start = (t == 1);
        rx_valid = 1'b1;
        // reference step
        for (int l = 0; l < NL; l++)
          dd[l] = ref_dist(rx_r[0].re, rx_r[0].im, rx_h[0][0].re, rx_h[0][0].im,
                           rx_h[0][1].re, rx_h[0][1].im, l);
        ref_quant(dd, SHIFT, 3, b);
        for (int u = 0; u < 4; u++) begin
          npm[u] = rpm[0] + b[ref_enc(u, 0)]; dv[u] = 0;
          for (int s = 1; s < 4; s++)
            if (rpm[s] + b[ref_enc(u, s)] < npm[u]) begin npm[u] = rpm[s] + b[ref_enc(u, s)]; dv[u] = s; end
        end
        rpm = npm;
        best = 0;
        for (int s = 1; s < 4; s++) if (rpm[s] < rpm[best]) best = s;
        rdec.push_back(dv);
        if (rdec.size() > T) begin
          int st;
          st = best;
          for (int k = rdec.size() - 1; k > 0; k--) st = rdec[k][st];
          exp_q.push_back(st);
          sent_q.push_back(data_hist[0]);
          void'(rdec.pop_front());
          void'(data_hist.pop_front());
        end
      end else begin
        x_prev = 0;
        rx_valid = 1'b0;
      end
      if (t < STEPS) data_hist.push_back(d);
      @(posedge clk);
      @(negedge clk);
      tx_frame_start = 0; tx_valid = 0; rx_frame_start = 0; rx_valid = 0;
    end
    repeat (T + 10) @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL %0d expected outputs never came", exp_q.size());
    end
    if (n_wrap < 10) begin failures++; $display("FAIL path metrics wrapped only %0d times", n_wrap); end
    $display("bits decoded %0d, bit errors %0d, path metric wraps %0d", n_bits, n_bit_err, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
