// tb_axil_master.svh: AXI4-Lite master tasks for the accelerator testbenches.
// The including module declares clk, the s_axi_* signals of the device under
// test (without the prefix: awaddr, awvalid, ...), and the counters checks
// and failures. One transaction at a time; responses are returned to the
// caller.

task automatic axi_write(input int addr, input int data, output logic [1:0] resp);
  awaddr = 20'(addr); awvalid = 1'b1;
  wdata = data; wstrb = 4'hf; wvalid = 1'b1;
  #1;  // let the ready signals settle
  while (!(awready && wready)) begin @(negedge clk); #1; end
  @(negedge clk);
  awvalid = 1'b0; wvalid = 1'b0;
  while (!bvalid) @(negedge clk);
  resp = bresp;
  bready = 1'b1;
  @(negedge clk);
  bready = 1'b0;
endtask

task automatic axi_read(input int addr, output int data, output logic [1:0] resp);
  araddr = 20'(addr); arvalid = 1'b1;
  #1;
  while (!arready) begin @(negedge clk); #1; end
  @(negedge clk);
  arvalid = 1'b0;
  while (!rvalid) @(negedge clk);
  data = rdata; resp = rresp;
  rready = 1'b1;
  @(negedge clk);
  rready = 1'b0;
endtask

task automatic chk(input bit cond, input string msg);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask
