// tb_bmu: checks the branch metric unit against the reference distance model
// (complex multiply by the QPSK points, minimum subtraction, shift, saturation)
// for random received samples and channel gains, one and two receive
// antennas, and checks the one-clock latency. Noiseless samples must give
// metric 0 on the transmitted label.
module tb_bmu;
  import sttc_pkg::*;
  import sttc_ref_pkg::*;

  localparam int BM_W = 2, SHIFT = 9;
  localparam int BMAX = (1 << BM_W) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, v1, v2;
  cplx_t r1 [1];
  cplx_t h1 [1][N_T];
  cplx_t r2 [2];
  cplx_t h2 [2][N_T];
  logic [BM_W-1:0] bm1 [N_LABELS];
  logic [BM_W-1:0] bm2 [N_LABELS];
  int checks = 0, failures = 0;
  int n_sat = 0, n_mid = 0;

  always #5 clk = ~clk;

  bmu dut1 (.clk, .rst_n, .in_valid, .r_in(r1), .h_in(h1), .out_valid(v1), .bm(bm1));
  bmu #(.N_R(2)) dut2 (.clk, .rst_n, .in_valid, .r_in(r2), .h_in(h2), .out_valid(v2), .bm(bm2));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    in_valid = 0;
    for (int j = 0; j < 2; j++) begin
      r2[j] = '0;
      for (int i = 0; i < N_T; i++) h2[j][i] = '0;
    end
    r1[0] = '0; h1[0][0] = '0; h1[0][1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      longint d1 [NL];
      longint d2 [NL];
      int e1 [NL];
      int e2 [NL];
      int tl;
      bit noiseless;
      noiseless = (n % 4 == 0);
      tl = $urandom_range(0, 15);
      for (int j = 0; j < 2; j++)
        for (int i = 0; i < N_T; i++) begin
          h2[j][i].re = 8'(rnd(-60, 60));
          h2[j][i].im = 8'(rnd(-60, 60));
        end
      h1[0][0] = h2[0][0]; h1[0][1] = h2[0][1];
      for (int j = 0; j < 2; j++) begin
        int nre, nim, sre, sim, x1, x2;
        x1 = tl >> 2; x2 = tl & 3;
        sre = h2[j][0].re * qpsk_re(x1) - h2[j][0].im * qpsk_im(x1)
            + h2[j][1].re * qpsk_re(x2) - h2[j][1].im * qpsk_im(x2);
        sim = h2[j][0].re * qpsk_im(x1) + h2[j][0].im * qpsk_re(x1)
            + h2[j][1].re * qpsk_im(x2) + h2[j][1].im * qpsk_re(x2);
        nre = noiseless ? 0 : rnd(-40, 40);
        nim = noiseless ? 0 : rnd(-40, 40);
        r2[j].re = 8'(sre + nre);
        r2[j].im = 8'(sim + nim);
      end
      r1[0] = r2[0];
      for (int l = 0; l < NL; l++) begin
        d1[l] = ref_dist(r1[0].re, r1[0].im, h1[0][0].re, h1[0][0].im, h1[0][1].re, h1[0][1].im, l);
        d2[l] = d1[l] + ref_dist(r2[1].re, r2[1].im, h2[1][0].re, h2[1][0].im,
                                 h2[1][1].re, h2[1][1].im, l);
      end
      ref_quant(d1, SHIFT, BMAX, e1);
      ref_quant(d2, SHIFT, BMAX, e2);
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      @(negedge clk);
      checks++;
      if (!v1 || !v2) begin failures++; $display("FAIL out_valid not one clock after in_valid"); end
      for (int l = 0; l < NL; l++) begin
        checks += 2;
        if (int'(bm1[l]) != e1[l]) begin
          failures++; $display("FAIL n=%0d N_R=1 label %0d: %0d expected %0d", n, l, bm1[l], e1[l]);
        end
        if (int'(bm2[l]) != e2[l]) begin
          failures++; $display("FAIL n=%0d N_R=2 label %0d: %0d expected %0d", n, l, bm2[l], e2[l]);
        end
        if (e1[l] == BMAX) n_sat++;
        else if (e1[l] > 0) n_mid++;
      end
      // a noiseless sample would be out of range if it overflowed 8 bits
      if (noiseless && (d1[tl] == 0)) begin
        checks++;
        if (bm1[tl] != 0) begin failures++; $display("FAIL noiseless label metric not 0"); end
      end
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (v1) begin failures++; $display("FAIL out_valid without in_valid"); end
    end
    checks++;
    if (n_sat == 0 || n_mid == 0) begin
      failures++; $display("FAIL metric range not exercised (sat %0d, mid %0d)", n_sat, n_mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
