// tb_rng_controller: checks the controller against a model of its contract.
// The testbench plays the XOR handler (offering random words after random
// delays, some with a small time of refresh) and the LFSR (a fresh random word
// each cycle). It checks that
//  - got_it and LFSR_reset are one-cycle pulses only while a word is offered,
//  - seed, tap select and TR are the documented fields of the word taken,
//  - reloads are exactly max(TR,2) cycles apart when a word is ready in time,
//    and follow one cycle after the word appears when it is late,
//  - bitsout is LFSR_in delayed by one cycle, valid from the first seed on.
module tb_rng_controller;
  import rng_pkg::*;

  int checks = 0;
  int failures = 0;

  logic     clock = 1'b0;
  logic     rst_n = 1'b0;
  logic     rdy_snd = 1'b0;
  word_t    bitsin = '0;
  logic     got_it;
  word_t    LFSR_in = '0;
  logic     LFSR_reset;
  word_t    LFSR_seed;
  tap_sel_t LFSR_tap;
  word_t    bitsout;
  logic     bits_valid;
  tr_t      TR;

  rng_controller dut (.*);

  always #5 clock = ~clock;

  int cycle = 0;
  int n_ontime = 0;
  int n_late = 0;
  int n_tr_zero = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // XOR handler model: after each got_it, wait a random time, then offer a
  // new word until it is taken.
  word_t offered [$];
  bit    model_done = 0;
  initial begin
    @(posedge rst_n);
    for (int w = 0; w < 300; w++) begin
      word_t v;
      repeat ($urandom % (w % 3 == 0 ? 40 : 4)) @(negedge clock);
      v = $urandom;
      // keep TR mostly small so the test stays short
      if (w % 5 != 4) v &= ~32'h0055_1455 | (32'h1 << ($urandom % 32));
      if (w % 17 == 3) v &= ~32'h0055_1455;     // TR = 0
      offered.push_back(v);
      rdy_snd = 1'b1; bitsin = v;
      do @(negedge clock); while (!got_it);
      @(negedge clock);   // the handler drops rdy_snd after seeing got_it
      rdy_snd = 1'b0; bitsin = $urandom;
    end
    model_done = 1;
  end

  // LFSR model: any new value each cycle; remember the last one
  word_t prev_in;
  int    last_reload = -1;
  int    cur_tr = 0;
  bit    reload_seen = 0;
  word_t taken;
  int    valid_since = -1;

  // LFSR model: a new value each cycle. bitsout must show, during the whole
  // next cycle, the value LFSR_in had at the clock edge.
  always @(negedge clock) begin
    LFSR_in <= $urandom;
    #1;
    if (rst_n && bits_valid) check(bitsout == prev_in, "bitsout is not LFSR_in delayed");
  end

  int offer_cycle = -1;

  always @(posedge clock) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (rdy_snd && !got_it && offer_cycle < 0) offer_cycle = cycle;
      #1;
      // bitsout follows LFSR_in with one cycle of delay
      if (LFSR_reset) begin
        check(got_it, "LFSR_reset without got_it");
        taken = offered[0];
        check(LFSR_seed == taken, "seed is not the offered word");
        check(LFSR_tap == {taken[23], taken[10], taken[2]}, "tap select field wrong");
        check(TR == {taken[22], taken[20], taken[18], taken[16], taken[12],
                     taken[10], taken[6], taken[4], taken[2], taken[0]}, "TR field wrong");
        if (last_reload >= 0) begin
          int want;
          want = (cur_tr < 2) ? 2 : cur_tr;
          check(cycle - last_reload >= want,
                $sformatf("reload after %0d cycles, TR %0d", cycle - last_reload, cur_tr));
          if (cycle - last_reload == want) n_ontime++;
          else begin
            n_late++;
            check(cycle - offer_cycle == 1,
                  $sformatf("late reload %0d cycles after the offer", cycle - offer_cycle));
          end
        end
        if (TR == 0) n_tr_zero++;
        last_reload = cycle;
        cur_tr = int'(TR);
        offered.delete(0);
        offer_cycle = -1;
      end else if (got_it) begin
        check(0, "got_it without LFSR_reset");
      end
    end
  end

  always @(posedge clock) prev_in = LFSR_in;

  initial begin
    repeat (3) @(negedge clock);
    check(!bits_valid && !got_it && !LFSR_reset, "outputs active in reset");
    rst_n = 1'b1;
    wait (model_done);
    repeat (1200) @(negedge clock);
    // count the reloads of the 300 words and the two kinds of reload
    $display("on-time reloads %0d, late reloads %0d, TR=0 words %0d",
             n_ontime, n_late, n_tr_zero);
    check(n_ontime > 0, "no on-time reload");
    check(n_late > 0, "no late reload");
    check(n_tr_zero > 0, "no TR = 0 word");
    check(n_ontime + n_late == 299, "not every offered word was reloaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
