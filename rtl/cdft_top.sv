// cdft_top: the CDFT accelerator as seen from the processor: a combined 2-D
// DFT / IDFT engine with its input and output buffers, behind one AXI4-Lite
// slave port.
//
// In the tracker this accelerator serves, software does everything except the
// Fourier transforms. For each transform it copies the M x N samples into the
// input buffer, selects DFT or IDFT, starts the engine, waits for done, and
// copies the M x N results out of the output buffer (see cdft_axil for the
// memory map). Inside, cdft_core evaluates the transform directly from its
// definition with table-lookup twiddles and fixed-point arithmetic, LANES
// products per cycle; cdft_in_buf and cdft_out_buf are the single-port
// buffers the processor and the engine take turns on.
//
// Defaults: a 32 x 32 transform, 32-bit real and 32-bit imaginary words, all
// M*N products of one output point in parallel (LANES = M*N), so a run takes
// M*N + 5 cycles between the start write and done. The processor-side
// interconnect is outside this module: the AXI4-Lite port connects to it
// directly.
module cdft_top
  import cdft_pkg::*;
#(
  parameter int unsigned M      = 32,
  parameter int unsigned N      = 32,
  parameter int unsigned LANES  = M * N,
  parameter int unsigned ADDR_W = 20,
  localparam int unsigned MN = M * N,
  localparam int unsigned CH = MN / LANES,
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1,
  localparam int unsigned AW = (MN > 1) ? $clog2(MN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic              done_irq   // one-cycle pulse at the end of a run
);

  logic          start, busy, done;
  mode_e         mode;
  host_req_t     ib_req, ob_req;
  sample_t       ib_rdata, ob_rdata;
  logic          ib_rd, ib_rd_im;
  logic [CW-1:0] ib_addr;
  cplx_t         ib_data [LANES];
  logic          ob_we;
  logic [AW-1:0] ob_addr;
  cplx_t         ob_data;

  cdft_axil #(.M(M), .N(N), .ADDR_W(ADDR_W)) u_axil (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .start, .mode, .busy, .done,
    .ib_req, .ib_rdata, .ob_req, .ob_rdata
  );

  cdft_in_buf #(.M(M), .N(N), .LANES(LANES)) u_in_buf (
    .clk, .core_sel(busy), .h_req(ib_req), .h_rdata(ib_rdata),
    .c_rd(ib_rd), .c_rd_im(ib_rd_im), .c_addr(ib_addr), .c_data(ib_data)
  );

  cdft_core #(.M(M), .N(N), .LANES(LANES)) u_core (
    .clk, .rst_n, .start, .mode_in(mode), .busy, .done,
    .ib_rd, .ib_rd_im, .ib_addr, .ib_data,
    .ob_we, .ob_addr, .ob_data
  );

  cdft_out_buf #(.M(M), .N(N)) u_out_buf (
    .clk, .core_sel(busy), .h_req(ob_req), .h_rdata(ob_rdata),
    .c_we(ob_we), .c_addr(ob_addr), .c_data(ob_data)
  );

  assign done_irq = done;

endmodule
