// tb_sttc_encoder: checks the space-time trellis encoder against the worked
// example of the code (inputs 10,01,11,00,01 give symbol pairs
// 02,21,13,30,01) and against the reference encoder for random input,
// including a frame restart, idle cycles and the one-clock output latency.
module tb_sttc_encoder;
  import sttc_pkg::*;
  import sttc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start, in_valid, out_valid;
  sym_t c_in;
  sym_t x_out [N_T];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sttc_encoder dut (.clk, .rst_n, .frame_start, .in_valid, .c_in, .out_valid, .x_out);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic fs, input logic v, input int c, input int exp_pair);
    frame_start <= fs; in_valid <= v; c_in <= sym_t'(c);
    @(posedge clk);
    frame_start <= 1'b0; in_valid <= 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid !== v) begin
      failures++; $display("FAIL valid %0b expected %0b", out_valid, v);
    end else if (v && ({x_out[0], x_out[1]} !== 4'(exp_pair))) begin
      failures++;
      $display("FAIL c=%0d got %0d%0d expected %0d%0d", c, x_out[0], x_out[1],
               exp_pair >> 2, exp_pair & 3);
    end
  endtask

  initial begin
    int ex_in [5]  = '{2, 1, 3, 0, 1};          // 10, 01, 11, 00, 01
    int ex_out [5] = '{'h2, 'h9, 'h7, 'hC, 'h1}; // 02, 21, 13, 30, 01 as x1*4+x2
    int prev;
    frame_start = 0; in_valid = 0; c_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // worked example
    for (int t = 0; t < 5; t++) step(t == 0, 1'b1, ex_in[t], ex_out[t]);
    // random frames with idle cycles
    for (int f = 0; f < 4; f++) begin
      prev = 0;
      for (int t = 0; t < 200; t++) begin
        int c;
        logic v;
        c = $urandom_range(0, 3);
        v = (t == 0) || ($urandom_range(0, 4) != 0);
        step(t == 0, v, c, ref_enc(c, prev));
        if (v) prev = c;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
