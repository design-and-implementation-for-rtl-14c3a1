// tb_acs_unit: checks one add-compare-select element. Random path metrics are
// drawn within a window of true (unbounded) values, then wrapped to PM_W bits
// as the hardware holds them; the element must pick the same survivor as an
// exact integer comparison (lowest index on ties) and return the wrapped
// survivor metric. Windows that straddle the wrap point are forced often.
module tb_acs_unit;

  localparam int PM_W = 8, BM_W = 2, NUM_IN = 4;

  logic [PM_W-1:0] pm_in [NUM_IN];
  logic [BM_W-1:0] bm_in [NUM_IN];
  logic [PM_W-1:0] pm_out;
  logic [1:0]      dec;
  int checks = 0, failures = 0, n_wrap = 0;

  acs_unit #(.NUM_IN(NUM_IN), .PM_W(PM_W), .BM_W(BM_W)) dut (.pm_in, .bm_in, .pm_out, .dec);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int base, tv [NUM_IN], bmv [NUM_IN], best, bi;
      bit wrapped;
      base = (n % 3 == 0) ? 256 - $urandom_range(0, 40) : $urandom_range(0, 100000);
      wrapped = 0;
      for (int i = 0; i < NUM_IN; i++) begin
        tv[i]  = base + $urandom_range(0, 60);
        bmv[i] = $urandom_range(0, 3);
        if (n % 7 == 0) begin tv[i] = base + 5; end   // forced ties
        pm_in[i] = PM_W'(tv[i]);
        bm_in[i] = BM_W'(bmv[i]);
      end
      best = tv[0] + bmv[0]; bi = 0;
      for (int i = 1; i < NUM_IN; i++)
        if (tv[i] + bmv[i] < best) begin best = tv[i] + bmv[i]; bi = i; end
      for (int i = 0; i < NUM_IN; i++)
        if ((tv[i] + bmv[i]) / 256 != (tv[0] + bmv[0]) / 256) wrapped = 1;
      if (wrapped) n_wrap++;
      #1;
      checks += 2;
      if (int'(dec) != bi) begin
        failures++; $display("FAIL n=%0d dec %0d expected %0d", n, dec, bi);
      end
      if (pm_out != PM_W'(best)) begin
        failures++; $display("FAIL n=%0d pm %0d expected %0d", n, pm_out, best % 256);
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL no wrapped comparison exercised"); end
    $display("wrapped comparisons: %0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
