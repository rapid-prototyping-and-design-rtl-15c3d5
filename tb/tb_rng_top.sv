// tb_rng_top: end-to-end test of the generator with a 1024-word cell memory.
//
// Thirty-two behavioural cells (biased 56 % to 64 % towards one) fill the
// memory while reset is held. A few groups of sixteen words are adjusted so
// that their XOR is a chosen conditioned word: group 0 gives the published
// seed 3869298507, so the first twenty outputs must be the published
// sequence; other groups force every tap row, TR = 0 and small TRs (late
// refresh). Every output word is then compared with the reference model in
// rng_ref_pkg, which also fixes the cycle of every reseed. The test runs
// past the end of the memory so the read address wraps. It also checks one
// output per clock, the latency to the first word, and that conditioning
// lowers the bias of the raw cell bits (over the groups not adjusted).
module tb_rng_top;
  import rng_pkg::*;
  import rng_ref_pkg::*;

  localparam int unsigned ADDR_W  = 10;
  localparam int unsigned N_WORDS = 16;
  localparam int unsigned DEPTH   = 2 ** ADDR_W;
  localparam int unsigned GROUPS  = DEPTH / N_WORDS;
  localparam int unsigned SEEDS   = GROUPS + 12;   // runs past the wrap

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

  rng_top #(.ADDR_W(ADDR_W), .N_WORDS(N_WORDS)) dut (.*);

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ones_raw;
    int unsigned ones_cond;
    int unsigned release_cycle;
    int unsigned first_cycle;
    int unsigned n_valid;
    int unsigned gaps;
    real p_raw, p_cond;
    word_t acc;

    ref_m = new(N_WORDS, DEPTH);
    ones_raw = 0;
    // fill the memory from the cells, one word per clock, during reset
    for (int i = 0; i < int'(DEPTH); i++) begin
      word_t w;
      @(posedge clk);
      #2;
      w = node_a;
      ones_raw += $countones(w);
      if (i % N_WORDS == 0) acc = '0;
      if (i % N_WORDS == N_WORDS - 1) begin
        int g;
        word_t target;
        g = i / N_WORDS;
        target = '0;
        if (g == 0) target = (golden[0]);
        else if (g >= 1 && g <= 8) target = make_word(g - 1, 1'b0);         // every row, small TR
        else if (g == 9 || g == 10) target = make_word($urandom % 8, 1'b1); // long TR
        else if (g == 11) begin
          target = $urandom;
          {target[22], target[20], target[18], target[16], target[12],
           target[10], target[6], target[4], target[2], target[0]} = '0;        // TR = 0
        end
        if (g <= 11) w = target ^ acc;
      end
      acc ^= w;
      ref_m.image[i] = w;
      @(negedge clk);
      cell_we = 1'b1; cell_waddr = ADDR_W'(i); cell_wdata = w;
    end
    @(negedge clk);
    cell_we = 1'b0;
    check(!finalbits_valid, "output valid during reset");

    // run
    rst_n = 1'b1;
    release_cycle = cycle;
    first_cycle = 0;
    n_valid = 0;
    gaps = 0;
    ones_cond = 0;
    while (ref_m.reseeds < SEEDS || ref_m.run_len < 2) begin
      @(posedge clk);
      #1;
      if (finalbits_valid) begin
        if (n_valid == 0) first_cycle = cycle;
        if (n_valid < 20)
          check(finalbits == (golden[n_valid]),
                $sformatf("published word %0d: %0d", n_valid, finalbits));
        checks++;
        if (!ref_m.push(finalbits)) failures++;
        if (ref_m.run_len == 1) begin
          check(refresh_time == tr_t'(rng_ref_pkg::stream_ref::tr_of(finalbits)),
                "refresh_time is not the TR of the new seed");
        end
        n_valid++;
      end else if (n_valid > 0) begin
        gaps++;
      end
    end

    // rate and latency
    check(gaps == 0, $sformatf("%0d cycles without an output word", gaps));
    check(first_cycle - release_cycle == N_WORDS + 4,
          $sformatf("first word %0d cycles after reset release", first_cycle - release_cycle));

    // conditioning lowers the bias (bias = |P1 - 0.5|)
    p_raw  = real'(ones_raw) / real'(32 * DEPTH);
    // over the groups left exactly as the cells produced them
    for (int unsigned k = 12; k < GROUPS; k++) ones_cond += $countones(ref_m.cond(k));
    p_cond = real'(ones_cond) / real'(32 * (GROUPS - 12));
    $display("fraction of ones: raw cells %f, conditioned words %f", p_raw, p_cond);
    check(p_raw > 0.55 && p_raw < 0.65, "raw cell bias outside the model's setting");
    check((p_cond - 0.5) ** 2 < (p_raw - 0.5) ** 2 / 4.0, "conditioning did not reduce the bias");

    // every mechanism happened
    $display("outputs %0d reseeds %0d on-time %0d late %0d TR=0 %0d after-wrap %0d",
             ref_m.outputs, ref_m.reseeds, ref_m.ontime, ref_m.late, ref_m.tr_zero, ref_m.wraps);
    check(ref_m.ontime > 0, "no on-time reseed");
    check(ref_m.late > 0, "no late refresh");
    check(ref_m.tr_zero > 0, "no TR = 0 seed");
    check(ref_m.wraps > 0, "memory address never wrapped");
    for (int r = 0; r < 8; r++) begin
      $display("tap row %0d used %0d times", r, ref_m.row_seen[r]);
      check(ref_m.row_seen[r] > 0, $sformatf("tap row %0d never used", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
