// sttc_encoder: space-time trellis encoder for QPSK with two transmit antennas.
//
// Each step takes a pair of information bits c = (c1, c2). Bit c1 enters the
// upper shift register and c2 the lower one (memory order 1 each). The current
// and delayed bits are multiplied by the generator coefficients in sttc_pkg
// and added modulo 4, giving one QPSK symbol index per transmit antenna
// (x1 for antenna 1, x2 for antenna 2). With the package's generators this is
// the 4-state delay-diversity code: x1 is the previous input pair, x2 the
// current one. The structure (shift registers, coefficient multipliers,
// modulo-M adders) follows the document; the handshake is this design's own.
//
// Interface: in_valid/c_in present one input pair; frame_start clears the
// shift registers first, so the frame starts from state 0. out_valid/x_out
// appear one clock later (registered outputs). No back-pressure.
module sttc_encoder
  import sttc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,          // clear the shift registers (state 0)
  input  logic  in_valid,
  input  sym_t  c_in,                 // {c1, c2}
  output logic  out_valid,
  output sym_t  x_out [N_T]           // QPSK symbol index per antenna
);

  sym_t sreg;                          // delayed input pair, {c1_{t-1}, c2_{t-1}}
  sym_t prev;

  assign prev = frame_start ? '0 : sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < N_T; i++) x_out[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sreg <= c_in;
        for (int i = 0; i < N_T; i++) x_out[i] <= enc_symbol(c_in, prev, i);
      end else if (frame_start) begin
        sreg <= '0;
      end
    end
  end

endmodule
