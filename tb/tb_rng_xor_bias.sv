// tb_rng_xor_bias: the conditioner in its two-input form (N_WORDS = 2)
// against the bias arithmetic of an XOR of two biased cells.
//
// Cell A gives 1 with probability PA1, cell B with probability PB1. Then
//   P(Y=1) = PA0*PB1 + PA1*PB0,  P(Y=0) = PA0*PB0 + PA1*PB1,
// a cell's bias is (|0.5-P0| + |0.5-P1|)/2, the pair's bias is the mean of
// the four terms, and Y's bias is (|0.5-PY0| + |0.5-PY1|)/2.
// Even memory words come from 32 cells biased like A, odd words from 32
// cells biased like B, so each conditioned bit is the XOR of one A bit and
// one B bit. The measured fraction of ones over 65,536 conditioned bits must
// match P(Y=1) within 0.01 (about five standard deviations).
module tb_rng_xor_bias;
  import rng_pkg::*;

  localparam int unsigned ADDR_W   = 12;
  localparam int unsigned N_WORDS  = 2;
  localparam int unsigned DEPTH    = 2 ** ADDR_W;
  localparam int unsigned PA1_PM   = 600;   // per mille
  localparam int unsigned PB1_PM   = 700;

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

  logic [31:0] a_q, a_qn, b_q, b_qn;
  for (genvar c = 0; c < 32; c++) begin : g_cells
    rng_cell_model #(.BIAS_PERMILLE(PA1_PM)) u_a (.vsource(clk), .node_a(a_q[c]), .node_b(a_qn[c]));
    rng_cell_model #(.BIAS_PERMILLE(PB1_PM)) u_b (.vsource(clk), .node_a(b_q[c]), .node_b(b_qn[c]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pa1, pa0, pb1, pb0, py1, py0, pb_ab, pb_y, meas1, meas_bias;
    int unsigned ones;
    word_t w;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(posedge clk);
      #2;
      w = (i % 2 == 0) ? a_q : b_q;
      check(((i % 2 == 0) ? a_qn : b_qn) == ~w, "cell nodes not complementary");
      @(negedge clk);
      cell_we = 1'b1; cell_waddr = ADDR_W'(i); cell_wdata = w;
    end
    @(negedge clk);
    cell_we = 1'b0;
    rst_n = 1'b1;
    ones = 0;
    for (int k = 0; k < int'(DEPTH / N_WORDS); k++) begin
      while (!rdy_snd) @(negedge clk);
      ones += $countones(bitsout);
      got_it = 1'b1;
      @(negedge clk);
      got_it = 1'b0;
    end
    pa1 = PA1_PM / 1000.0; pa0 = 1.0 - pa1;
    pb1 = PB1_PM / 1000.0; pb0 = 1.0 - pb1;
    py1 = pa0 * pb1 + pa1 * pb0;
    py0 = pa0 * pb0 + pa1 * pb1;
    pb_ab = (absr(0.5 - pa0) + absr(0.5 - pa1) + absr(0.5 - pb0) + absr(0.5 - pb1)) / 4.0;
    pb_y  = (absr(0.5 - py0) + absr(0.5 - py1)) / 2.0;
    meas1 = real'(ones) / real'(32 * DEPTH / N_WORDS);
    meas_bias = absr(0.5 - meas1);
    $display("P(Y=1): predicted %f measured %f; bias of the pair %f, of Y predicted %f measured %f",
             py1, meas1, pb_ab, pb_y, meas_bias);
    check(absr(meas1 - py1) < 0.01, "fraction of ones does not match P(Y=1)");
    check(meas_bias < pb_ab, "XOR did not lower the bias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
