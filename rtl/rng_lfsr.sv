// rng_lfsr: 32-bit LFSR whose seed and tap set can be changed at run time.
//
// While `reset` is high at a clock edge the register takes the seed `init`
// and a tap mask looked up from `inittap` in the tap table (rng_tap_lut); the
// seed itself is the first output word. On every other edge the register
// shifts one place towards bit 0 and the XOR of the state bits under the tap
// mask enters at bit 31 (Fibonacci form). `data` is the register itself, so a
// new word appears every clock with no extra latency.
//
// The load-on-reset behaviour, the four ports and the separate tap register
// follow the design description. The shift direction and tap convention are
// fixed by the published output sequence: seeded with 3869298507 and tap row
// 6, the register produces 1934649253, 967324626, 2631145961, ...
// `rst_n` (asynchronous, clears state and mask) is this implementation's
// addition so that the register starts from a known value; an all-zero
// register stays at zero until the next load.
module rng_lfsr
  import rng_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     reset,     // load seed and tap (synchronous, from the controller)
  input  tap_sel_t inittap,   // tap table row used on load
  input  word_t    init,      // seed used on load
  output word_t    data       // current LFSR state
);

  word_t lut_mask;
  word_t tap_q;

  rng_tap_lut u_tap_lut (
    .sel  (inittap),
    .mask (lut_mask)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data  <= '0;
      tap_q <= '0;
    end else if (reset) begin
      data  <= init;
      tap_q <= lut_mask;
    end else begin
      data  <= {^(data & tap_q), data[WORD_W-1:1]};
    end
  end

endmodule
