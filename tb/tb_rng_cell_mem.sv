// tb_rng_cell_mem: writes random words to random addresses of the full-size
// cell memory and reads them back, checking the one-cycle read latency and
// that a write does not disturb other addresses.
module tb_rng_cell_mem;

  localparam int unsigned ADDR_W = 20;

  int checks = 0;
  int failures = 0;

  logic              clk = 1'b0;
  logic              we = 1'b0;
  logic [ADDR_W-1:0] waddr = '0;
  logic [31:0]       wdata = '0;
  logic [ADDR_W-1:0] raddr = '0;
  logic [31:0]       rdata;

  rng_cell_mem dut (.*);

  always #5 clk = ~clk;

  logic [31:0]       model [logic [ADDR_W-1:0]];
  logic [ADDR_W-1:0] addrs [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // writes, including the first and last address
    for (int i = 0; i < 600; i++) begin
      logic [ADDR_W-1:0] a;
      a = (i == 0) ? '0 : (i == 1) ? '1 : ADDR_W'($urandom);
      if (!model.exists(a)) addrs.push_back(a);
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = $urandom;
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // reads: data appears one cycle after the address
    foreach (addrs[i]) begin
      raddr = addrs[i];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[addrs[i]]) begin
        failures++;
        $display("addr %h: read %h expected %h", addrs[i], rdata, model[addrs[i]]);
      end
    end
    // read and write of the same address in one cycle returns the old word
    raddr = addrs[0]; waddr = addrs[0]; wdata = ~model[addrs[0]]; we = 1'b1;
    @(posedge clk);
    #1;
    we = 1'b0;
    checks++;
    if (rdata !== model[addrs[0]]) begin
      failures++;
      $display("read during write returned %h expected old %h", rdata, model[addrs[0]]);
    end
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== ~model[addrs[0]]) begin
      failures++;
      $display("written word not read back: %h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
