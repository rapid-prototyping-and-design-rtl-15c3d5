// tb_rng_xor_handler: checks the conditioner with a 256-word cell memory.
// The memory is loaded with random words during reset; the testbench then
// plays the controller, taking words after random delays. Each offered word
// must be the XOR of the next sixteen stored words (wrapping at the end of
// the memory), rdy_snd must rise exactly N_WORDS+2 cycles after a got_it
// pulse (N_WORDS+1 after reset), and the word must be held until taken.
module tb_rng_xor_handler;
  import rng_pkg::*;

  localparam int unsigned ADDR_W  = 8;
  localparam int unsigned N_WORDS = 16;
  localparam int unsigned DEPTH   = 2 ** ADDR_W;

  int checks = 0;
  int failures = 0;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              got_it = 1'b0;
  logic              rdy_snd;
  word_t             bitsout;
  logic              cell_we = 1'b0;
  logic [ADDR_W-1:0] cell_waddr = '0;
  word_t             cell_wdata = '0;

  rng_xor_handler #(.ADDR_W(ADDR_W), .N_WORDS(N_WORDS)) dut (.*);

  always #5 clk = ~clk;

  word_t image [DEPTH];
  int    cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    int addr;
    word_t exp;
    // load the memory while in reset
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      image[i] = $urandom;
      cell_we = 1'b1; cell_waddr = ADDR_W'(i); cell_wdata = image[i];
    end
    @(negedge clk);
    cell_we = 1'b0;
    check(!rdy_snd, "rdy_snd high during reset");
    rst_n = 1'b1;
    start = cycle;
    addr  = 0;
    // 40 words: more than the 16 that fit in the memory, so it wraps
    for (int w = 0; w < 40; w++) begin
      int delay;
      while (!rdy_snd) @(negedge clk);
      check(cycle - start == int'(N_WORDS) + (w == 0 ? 1 : 2),
            $sformatf("word %0d ready after %0d cycles", w, cycle - start));
      exp = '0;
      for (int i = 0; i < int'(N_WORDS); i++) begin
        exp ^= image[addr % DEPTH];
        addr++;
      end
      check(bitsout == exp, $sformatf("word %0d = %h expected %h", w, bitsout, exp));
      // hold the word a random time before taking it
      delay = $urandom % 6;
      repeat (delay) begin
        @(negedge clk);
        check(rdy_snd && bitsout == exp, "word not held");
      end
      got_it = 1'b1;
      @(negedge clk);
      got_it = 1'b0;
      start = cycle - 1;
      check(!rdy_snd, "rdy_snd still high after got_it");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
