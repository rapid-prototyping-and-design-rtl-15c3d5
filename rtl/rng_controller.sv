// rng_controller: reseeds the LFSR from conditioned words and drives the output.
//
// Each conditioned word (LFSR_IN) from the XOR handler supplies everything
// the LFSR needs: the whole word is the seed, bits [23,10,2] select the tap
// set and bits [22,20,18,16,12,10,6,4,2,0] give the time of refresh TR, the
// number of clock cycles the seed is used before the next reseed. The
// controller takes a word when one is due and the XOR handler has one ready
// (`rdy_snd`), answers with a one-cycle `got_it`, and in the next cycle pulses
// `LFSR_reset` with the new seed and tap on `LFSR_seed` / `LFSR_tap`. It then
// counts cycles; the next reseed is due TR cycles after the previous reload
// pulse. If the XOR handler is not ready at that moment the LFSR simply keeps
// running on its old seed and tap (a late refresh) until a word arrives. Every
// cycle the LFSR word is registered into `bitsout`, the generator's output.
//
// Timing: the reload pulse is in cycle r, the seed is in the LFSR in cycle
// r+1 and on `bitsout` in cycle r+2; without a late refresh a seed accounts
// for exactly max(TR,2) output words (a word cannot be taken in the cycle of
// the got_it pulse, so reloads are at least two cycles apart). `bits_valid` rises with the first seed
// on `bitsout` and stays high.
//
// From the design description: the pin list (clock, rdy_snd, bitsin,
// LFSR_in, LFSR_reset, got_it, LFSR_seed, LFSR_tap, bitsout, TR), the field
// extraction, the 11-bit cycle counter compared with the 10-bit TR. This
// implementation's choices: TR counted from reload pulse to reload pulse
// (TR below 2 acts as 2), continuing on the old seed when no word is ready,
// the registered one-cycle got_it / LFSR_reset pulses, the active-low
// asynchronous reset and the `bits_valid` flag.
module rng_controller
  import rng_pkg::*;
(
  input  logic     clock,
  input  logic     rst_n,
  // from the XOR handler
  input  logic     rdy_snd,
  input  word_t    bitsin,
  output logic     got_it,
  // to and from the LFSR
  input  word_t    LFSR_in,
  output logic     LFSR_reset,
  output word_t    LFSR_seed,
  output tap_sel_t LFSR_tap,
  // output stream
  output word_t    bitsout,
  output logic     bits_valid,
  output tr_t      TR            // time of refresh of the current seed
);

  localparam int unsigned CNT_W = TR_W + 1;

  typedef enum logic {ST_START, ST_RUN} state_e;

  state_e           state;
  logic [CNT_W-1:0] count;    // cycles since the last reload pulse
  logic             due;      // a new seed is due
  logic             take;     // take bitsin this cycle
  logic             seeded;   // the LFSR holds a seed

  always_comb begin
    due  = (state == ST_START) || ((count + 1'b1) >= {1'b0, TR});
    take = due && rdy_snd && !got_it;
  end

  always_ff @(posedge clock or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_START;
      count      <= '0;
      got_it     <= 1'b0;
      LFSR_reset <= 1'b0;
      LFSR_seed  <= '0;
      LFSR_tap   <= '0;
      TR         <= '0;
      seeded     <= 1'b0;
      bitsout    <= '0;
      bits_valid <= 1'b0;
    end else begin
      got_it     <= take;
      LFSR_reset <= take;
      if (take) begin
        LFSR_seed <= bitsin;
        LFSR_tap  <= extract_tap_sel(bitsin);
        TR        <= extract_tr(bitsin);
        count     <= '0;
        state     <= ST_RUN;
      end else if (count != '1) begin
        count <= count + 1'b1;
      end
      if (LFSR_reset) seeded <= 1'b1;
      bitsout    <= LFSR_in;
      bits_valid <= seeded;
    end
  end

  // got_it only acknowledges a word that is on offer.
  assert property (@(posedge clock) disable iff (!rst_n) got_it |-> rdy_snd)
    else $error("got_it without rdy_snd");
  // The reload pulse and the acknowledge are the same one-cycle event.
  assert property (@(posedge clock) disable iff (!rst_n) LFSR_reset == got_it)
    else $error("LFSR_reset and got_it out of step");

endmodule
