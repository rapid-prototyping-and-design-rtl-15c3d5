// tb_rng_lfsr: checks the reloadable LFSR.
//  1. Seeded with 3869298507 and tap row 6, it must reproduce the published
//     twenty-word output sequence (the seed is the first word).
//  2. Random seeds and rows are compared with a reference model that builds
//     the feedback bit from the tap positions, including reloads mid-run and
//     a reload on consecutive cycles.
module tb_rng_lfsr;
  import rng_pkg::*;

  int checks = 0;
  int failures = 0;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     reset = 1'b0;
  tap_sel_t inittap = '0;
  word_t    init = '0;
  word_t    data;

  rng_lfsr dut (.*);

  always #5 clk = ~clk;

  int unsigned pos [8][4] = '{
    '{31, 30, 28, 0}, '{31, 30, 4, 3}, '{31, 29, 7, 2}, '{31, 29, 6, 3},
    '{31, 28, 5, 4},  '{31, 28, 5, 3}, '{31, 25, 14, 6}, '{31, 30, 15, 1}
  };

  logic [31:0] golden [20] = '{
    32'd3869298507, 32'd1934649253, 32'd967324626, 32'd2631145961, 32'd1315572980,
    32'd657786490, 32'd328893245, 32'd2311930270, 32'd1155965135, 32'd2725466215,
    32'd1362733107, 32'd681366553, 32'd2488166924, 32'd1244083462, 32'd2769525379,
    32'd3532246337, 32'd1766123168, 32'd3030545232, 32'd3662756264, 32'd1831378132
  };

  function automatic word_t ref_step(word_t s, int row);
    logic fb;
    fb = 1'b0;
    for (int k = 0; k < 4; k++) fb ^= s[pos[row][k]];
    return {fb, s[31:1]};
  endfunction

  task automatic check(word_t exp, string what);
    checks++;
    if (data !== exp) begin
      failures++;
      $display("%s: data %0d expected %0d", what, data, exp);
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
    word_t model;
    int row;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1. published sequence
    @(negedge clk);
    reset = 1'b1; init = (golden[0]); inittap = 3'd6;
    @(negedge clk);
    reset = 1'b0; init = $urandom; inittap = 3'($urandom);
    for (int i = 0; i < 20; i++) begin
      check((golden[i]), $sformatf("published word %0d", i));
      @(negedge clk);
    end
    // 2. random seeds and rows against the model
    for (int t = 0; t < 200; t++) begin
      row   = t % 8;
      model = $urandom;
      reset = 1'b1; init = model; inittap = tap_sel_t'(row);
      @(negedge clk);
      reset = 1'b0; init = $urandom; inittap = 3'($urandom);
      check(model, "seed after load");
      for (int i = 0; i < ($urandom % 40); i++) begin
        @(negedge clk);
        model = ref_step(model, row);
        check(model, $sformatf("row %0d step %0d", row, i));
      end
      @(negedge clk);
    end
    // 3. two loads in a row: the second wins
    reset = 1'b1; init = 32'h1234_5678; inittap = 3'd1;
    @(negedge clk);
    init = 32'h8765_4321; inittap = 3'd4;
    @(negedge clk);
    reset = 1'b0;
    check(32'h8765_4321, "second load");
    @(negedge clk);
    check(ref_step(32'h8765_4321, 4), "step after second load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
