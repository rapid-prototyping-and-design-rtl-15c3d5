// rng_cell_mem: storage for the raw bits sampled from the random-bit cells.
//
// A simple dual-port RAM of 2^ADDR_W words of WIDTH bits. The write port stores
// sampled cell words (one per clock while `we` is high); the read port
// returns the word at `raddr` one clock later on `rdata` (synchronous read,
// as an FPGA block RAM does). The contents are not reset.
//
// A memory that holds the cell bits inside the conditioner, and its 20-bit
// address (2^20 words), come from the design description. The write port, the
// one-cycle read latency and the two-port organisation are this
// implementation's choices: the original prototype had the memory filled
// before simulation started.
module rng_cell_mem #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = 20
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
