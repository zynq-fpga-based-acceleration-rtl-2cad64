// tb_cdft_axil: drives the AXI4-Lite slave of a 4 x 4 configuration with a
// bus master written here, against models of the engine (busy, done) and of
// the two buffers (one-cycle read). Checks the register map, the start pulse
// (exactly one, and none while busy), the sticky done bit cleared by a CTRL
// read, buffer writes and reads at the right index and word, SLVERR for
// every refused access, and responses held while the master stalls.
module tb_cdft_axil;
  import cdft_pkg::*;

  localparam int M = 4, N = 4, MN = 16, AW_ = 20;

  logic clk = 1'b0;
  logic rst_n;
  logic [AW_-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic start, busy, done;
  mode_e mode;
  host_req_t ib_req, ob_req;
  sample_t ib_rdata, ob_rdata;
  int checks = 0, failures = 0;
  int n_start = 0;

  cdft_axil #(.M(M), .N(N), .ADDR_W(AW_)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .start, .mode, .busy, .done, .ib_req, .ib_rdata, .ob_req, .ob_rdata
  );

  always #5 clk = ~clk;

  // buffer models
  sample_t ib_mem [2][MN];
  sample_t ob_mem [2][MN];
  always @(posedge clk) begin
    if (ib_req.en) begin
      if (ib_req.we) ib_mem[ib_req.im][ib_req.addr] <= ib_req.wdata;
      else           ib_rdata <= ib_mem[ib_req.im][ib_req.addr];
    end
    if (ob_req.en) begin
      if (ob_req.we) begin
        failures++;
        $display("FAIL: output buffer write strobe");
      end
      ob_rdata <= ob_mem[ob_req.im][ob_req.addr];
    end
    if (start) n_start++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Write: address first, data 'skew' cycles later; B held 'stall' cycles.
  task automatic axi_write(int addr, int data, output logic [1:0] resp, input int skew = 0,
                           input int stall = 0);
    awaddr = AW_'(addr); awvalid = 1'b1;
    wdata = data; wstrb = 4'hf;
    if (skew == 0) wvalid = 1'b1;
    for (int k = 0; k < skew; k++) begin
      @(negedge clk);
      #1;
      chk(!awready, "no address accept before data");
    end
    wvalid = 1'b1;
    #1;  // let the ready signals settle
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
    resp = bresp;
    for (int k = 0; k < stall; k++) begin
      @(negedge clk);
      chk(bvalid && bresp == resp, "B held while stalled");
    end
    bready = 1'b1;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(int addr, output int data, output logic [1:0] resp, input int stall = 0);
    araddr = AW_'(addr); arvalid = 1'b1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    data = rdata; resp = rresp;
    for (int k = 0; k < stall; k++) begin
      @(negedge clk);
      chk(rvalid && rdata == data, "R held while stalled");
    end
    rready = 1'b1;
    @(negedge clk);
    rready = 1'b0;
  endtask

  initial begin
    logic [1:0] resp;
    int d;
    rst_n = 1'b0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0; busy = 0; done = 0;
    ob_rdata = '0; ib_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    axi_read(32'h8, d, resp);
    chk(resp == 2'b00 && d == {16'(N), 16'(M)}, $sformatf("SIZE = %h", d));
    axi_read(32'h0, d, resp);
    chk(resp == 2'b00 && d == 32'h4, $sformatf("CTRL idle = %h", d));
    axi_write(32'h4, 1, resp, 2, 3);
    chk(resp == 2'b00 && mode == MODE_IDFT, "MODE write");
    axi_read(32'h4, d, resp, 2);
    chk(d == 1, "MODE readback");
    axi_write(32'h4, 0, resp);
    chk(mode == MODE_DFT, "MODE back to DFT");

    // buffers: fill input real/imag, read them back
    for (int i = 0; i < MN; i++) begin
      axi_write(32'h1_0000 + 4*i, 1000 + i, resp);
      chk(resp == 2'b00, "in re write ok");
      axi_write(32'h2_0000 + 4*i, -i, resp);
      chk(resp == 2'b00, "in im write ok");
    end
    for (int i = 0; i < MN; i++) begin
      chk(ib_mem[0][i] == 1000 + i && ib_mem[1][i] == -i, $sformatf("input word %0d stored", i));
      axi_read(32'h1_0000 + 4*i, d, resp);
      chk(resp == 2'b00 && d == 1000 + i, $sformatf("in re read %0d", i));
      axi_read(32'h2_0000 + 4*i, d, resp);
      chk(resp == 2'b00 && d == -i, $sformatf("in im read %0d", i));
    end
    for (int i = 0; i < MN; i++) begin
      ob_mem[0][i] = $urandom;
      ob_mem[1][i] = $urandom;
    end
    for (int i = 0; i < MN; i++) begin
      axi_read(32'h3_0000 + 4*i, d, resp);
      chk(resp == 2'b00 && d == ob_mem[0][i], $sformatf("out re read %0d", i));
      axi_read(32'h4_0000 + 4*i, d, resp, 1);
      chk(resp == 2'b00 && d == ob_mem[1][i], $sformatf("out im read %0d", i));
    end

    // refused accesses
    axi_write(32'h3_0000, 5, resp);          chk(resp == 2'b10, "write to output buffer refused");
    axi_write(32'h1_0000 + 4*MN, 5, resp);   chk(resp == 2'b10, "index out of range refused");
    axi_read(32'h5_0000, d, resp);           chk(resp == 2'b10, "unmapped region refused");
    axi_write(32'h8, 5, resp);               chk(resp == 2'b10, "SIZE is read only");
    axi_read(32'hC, d, resp);                chk(resp == 2'b10, "unmapped register refused");

    // start, busy, done
    n_start = 0;
    axi_write(32'h0, 1, resp);
    chk(resp == 2'b00 && n_start == 1, $sformatf("one start pulse (%0d)", n_start));
    busy = 1'b1;
    axi_read(32'h0, d, resp);
    chk(d == 32'h1, $sformatf("CTRL busy = %h", d));
    axi_write(32'h0, 1, resp);
    chk(n_start == 1, "start while busy ignored");
    axi_write(32'h1_0000, 77, resp);
    chk(resp == 2'b10 && ib_mem[0][0] == 1000, "input write while busy refused");
    axi_read(32'h3_0000, d, resp);
    chk(resp == 2'b10, "output read while busy refused");
    @(negedge clk);
    done = 1'b1; busy = 1'b0;
    @(negedge clk);
    done = 1'b0;
    repeat (3) @(negedge clk);
    axi_read(32'h0, d, resp);
    chk(d == 32'h6, $sformatf("CTRL done+idle = %h", d));
    axi_read(32'h0, d, resp);
    chk(d == 32'h4, $sformatf("done cleared by read = %h", d));
    axi_write(32'h0, 0, resp);
    chk(n_start == 1, "writing 0 to CTRL does not start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
