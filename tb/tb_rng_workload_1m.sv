// tb_rng_workload_1m: one million 32-bit output words at the default sizes.
//
// The original design was verified by comparing one million 32-bit outputs
// of the hardware with a behavioural model; this bench does the same against
// rng_ref_pkg. It also applies the frequency (monobit) test to the output
// bits at 100 bits and at 1,000,000 bits: with S the sum of the bits mapped
// to +1/-1 over n bits, s = |S|/sqrt(n) must lie in the range where the
// test's p-value erfc(s/sqrt(2)) is between 0.0001 and 0.9999, that is
// 0.000125 < s < 3.891.
//
// Thirty-two behavioural cells (biased 56 % to 64 % towards one) fill the
// first 64,000 words of the memory while reset is held; the first group of
// sixteen is adjusted so that the first seed is the published 3869298507 and
// the first twenty outputs must be the published sequence. The tested bit
// stream is bit 0 of each output word, the bit the LFSR shifts out: a word
// shares 31 bits with the one before it, so taking whole words would count
// each bit up to 32 times.
module tb_rng_workload_1m;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  localparam int unsigned ADDR_W  = 20;
  localparam int unsigned N_WORDS = 16;
  localparam int unsigned DEPTH   = 2 ** ADDR_W;
  localparam int unsigned GROUPS  = 4000;           // groups written
  localparam int unsigned FILL    = GROUPS * N_WORDS;
  
  int checks = 0;
  int failures = 0;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              cell_we = 1'b0;
  logic [ADDR_W-1:0] cell_waddr = '0;
  word_t             cell_wdata = '0;
  word_t             finalbits;
  logic              finalbits_valid;
  tr_t               refresh_time;

  rng_top dut (.*);

  always #5 clk = ~clk;

  // the cell array
  logic [31:0] node_a, node_b;
  for (genvar c = 0; c < 32; c++) begin : g_cell
    rng_cell_model #(.BIAS_PERMILLE(560 + (c % 5) * 20)) u_cell (
      .vsource (clk),
      .node_a  (node_a[c]),
      .node_b  (node_b[c])
    );
  end

  logic [31:0] golden [20] = '{
    32'd3869298507, 32'd1934649253, 32'd967324626, 32'd2631145961, 32'd1315572980,
    32'd657786490, 32'd328893245, 32'd2311930270, 32'd1155965135, 32'd2725466215,
    32'd1362733107, 32'd681366553, 32'd2488166924, 32'd1244083462, 32'd2769525379,
    32'd3532246337, 32'd1766123168, 32'd3030545232, 32'd3662756264, 32'd1831378132
  };

  stream_ref ref_m;
  int        cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cycle, what);
    end
  endtask

  // A conditioned word with the given tap row. With `long_tr` clear, every
  // TR bit not shared with the row select is 0, so TR <= 18; with it set,
  // TR >= 512.
  function automatic word_t make_word(int unsigned row, bit long_tr);
    word_t w;
    w = $urandom;
    {w[23], w[10], w[2]} = 3'(row);
    {w[22], w[20], w[18], w[16], w[12], w[6], w[4], w[0]} = '0;
    w[22] = long_tr;
    return w;
  endfunction

  initial begin
    repeat (1100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned release_cycle;
    int unsigned n_valid;
    int unsigned gaps;
    longint      sum100;
    longint      sum_all;
    longint      n_bits;
    real         s_obs;
    word_t       acc;

    ref_m = new(N_WORDS, DEPTH);
    for (int i = 0; i < int'(FILL); i++) begin
      word_t w;
      @(posedge clk);
      #2;
      w = node_a;
      if (i % N_WORDS == 0) acc = '0;
      if (i == N_WORDS - 1) w = (golden[0]) ^ acc;
      acc ^= w;
      ref_m.image[i] = w;
      @(negedge clk);
      cell_we = 1'b1; cell_waddr = ADDR_W'(i); cell_wdata = w;
    end
    @(negedge clk);
    cell_we = 1'b0;
    rst_n = 1'b1;
    release_cycle = cycle;
    n_valid = 0;
    gaps = 0;
    sum100 = 0;
    sum_all = 0;
    n_bits = 0;
    while (n_valid < 1000000) begin
      @(posedge clk);
      #1;
      if (finalbits_valid) begin
        if (n_valid < 20)
          check(finalbits == (golden[n_valid]),
                $sformatf("published word %0d: %0d", n_valid, finalbits));
        checks++;
        if (!ref_m.push(finalbits)) failures++;
        // bit stream: the bit shifted out of the LFSR
        if (n_bits < 1000000) sum_all += finalbits[0] ? 1 : -1;
        if (n_bits < 100) sum100 += finalbits[0] ? 1 : -1;
        n_bits++;
        n_valid++;
      end else if (n_valid > 0) begin
        gaps++;
      end
    end
    check(gaps == 0, $sformatf("%0d cycles without an output word", gaps));
    check(ref_m.next_k * N_WORDS <= FILL, "ran past the stored cell words");
    $display("outputs %0d reseeds %0d on-time %0d late %0d cell words used %0d",
             ref_m.outputs, ref_m.reseeds, ref_m.ontime, ref_m.late, ref_m.next_k * N_WORDS);
    s_obs = (sum100 < 0 ? -sum100 : sum100) / $sqrt(100.0);
    $display("monobit, 100 bits: s = %f", s_obs);
    // s takes few values at n = 100 (0 among them), so only the upper bound
    check(s_obs < 3.891, "monobit test (100 bits) failed");
    s_obs = (sum_all < 0 ? -sum_all : sum_all) / $sqrt(1000000.0);
    $display("monobit, 1000000 bits: s = %f", s_obs);
    check(s_obs > 0.000125 && s_obs < 3.891, "monobit test (1000000 bits) failed");
    check(ref_m.ontime > 0 && ref_m.late > 0, "on-time and late reseeds not both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
