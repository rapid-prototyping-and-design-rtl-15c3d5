// rng_cell_model: behavioural stand-in for one random-bit cell.
//
// The real cell is a pair of cross-coupled inverters whose two nodes are
// pulled high by two PMOS devices while the clock (`vsource`) is low. When
// `vsource` rises the pull-ups release, the pair is left balanced and noise
// decides which node falls. This model reproduces only that logical
// behaviour: both nodes high while `vsource` is low; one time unit after
// `vsource` rises, node_a becomes 1 with probability BIAS_PERMILLE/1000 and
// node_b its complement. The bias stands for the device mismatch that makes
// a real cell favour one side. Not synthesizable; for testbenches only.
module rng_cell_model #(
  parameter int unsigned BIAS_PERMILLE = 500   // chance, in 1/1000, of node_a = 1
) (
  input  logic vsource,
  output logic node_a,   // output Q
  output logic node_b    // output ~Q
);

  always @(vsource) begin
    if (!vsource) begin
      node_a = 1'b1;
      node_b = 1'b1;
    end else begin
      #1;
      node_a = (($urandom % 1000) < BIAS_PERMILLE);
      node_b = !node_a;
    end
  end

endmodule
