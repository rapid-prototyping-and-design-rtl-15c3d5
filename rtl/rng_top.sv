// rng_top: cell-seeded random number generator, one 32-bit word per clock.
//
// Raw bits from random-bit cells are stored in the conditioner's memory
// through the cell_* write port. The XOR handler (rng_xor_handler) XORs
// N_WORDS stored words into one conditioned word; the controller
// (rng_controller) turns each conditioned word into a seed, a tap-set choice
// and a refresh time, reloads the tap-switching LFSR (rng_lfsr) with them,
// and registers the LFSR state as `finalbits` every clock.
//
// Interface: `clk` (50 MHz in the original prototype), active-low
// asynchronous `rst_n`, the cell memory write port, the output word
// `finalbits` with `finalbits_valid`, and `refresh_time`, the TR of the seed
// now in use. The cell memory may be written at any time, also while `rst_n`
// is low; the XOR handler starts reading at address 0 when reset is released.
// The first output word (the first seed) appears N_WORDS+4 cycles after the
// reset release.
//
// The three-module split, the wiring between them (got_it, rdy_snd, bitsin,
// LFSR_in, LFSR_reset, LFSR_seed, LFSR_tap, finalbits) and the sizes follow
// the original design; reset, the write port, finalbits_valid and
// refresh_time are this implementation's additions.
module rng_top
  import rng_pkg::*;
#(
  parameter int unsigned ADDR_W  = 20,   // cell memory: 2^ADDR_W words
  parameter int unsigned N_WORDS = 16    // cell words XORed per conditioned word
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cell_we,
  input  logic [ADDR_W-1:0] cell_waddr,
  input  word_t             cell_wdata,
  output word_t             finalbits,
  output logic              finalbits_valid,
  output tr_t               refresh_time
);

  logic     got_it;
  logic     rdy_snd;
  word_t    cond_word;
  word_t    lfsr_data;
  logic     lfsr_reset;
  word_t    lfsr_seed;
  tap_sel_t lfsr_tap;

  rng_xor_handler #(
    .ADDR_W  (ADDR_W),
    .N_WORDS (N_WORDS)
  ) u_xorhd (
    .clk        (clk),
    .rst_n      (rst_n),
    .got_it     (got_it),
    .rdy_snd    (rdy_snd),
    .bitsout    (cond_word),
    .cell_we    (cell_we),
    .cell_waddr (cell_waddr),
    .cell_wdata (cell_wdata)
  );

  rng_controller u_cont (
    .clock      (clk),
    .rst_n      (rst_n),
    .rdy_snd    (rdy_snd),
    .bitsin     (cond_word),
    .got_it     (got_it),
    .LFSR_in    (lfsr_data),
    .LFSR_reset (lfsr_reset),
    .LFSR_seed  (lfsr_seed),
    .LFSR_tap   (lfsr_tap),
    .bitsout    (finalbits),
    .bits_valid (finalbits_valid),
    .TR         (refresh_time)
  );

  rng_lfsr u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .reset   (lfsr_reset),
    .inittap (lfsr_tap),
    .init    (lfsr_seed),
    .data    (lfsr_data)
  );

endmodule
