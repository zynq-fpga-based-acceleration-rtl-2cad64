// cdft_out_buf: output buffer of the CDFT engine (real and imaginary words).
//
// The engine writes each finished transform point (u, v) at index u*N + v;
// the host reads the results after the run. Both words sit in single-port
// RAMs of M*N entries whose port is shared in time: while 'core_sel' is high
// the engine owns it, otherwise the host. The host can only read; its write
// strobes are ignored. Sharing rule and read-only host side are this
// design's choices.
//
// Timing: a host read returns data on h_rdata one clock after the request;
// an engine write takes effect at the clock edge that samples it.
module cdft_out_buf
  import cdft_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int unsigned N = 32,
  localparam int unsigned AW = (M * N > 1) ? $clog2(M * N) : 1
) (
  input  logic          clk,
  input  logic          core_sel,
  // host side
  input  host_req_t     h_req,
  output sample_t       h_rdata,
  // engine side
  input  logic          c_we,
  input  logic [AW-1:0] c_addr,
  input  cplx_t         c_data
);

  logic          en_re, en_im, we;
  logic [AW-1:0] addr;
  logic          h_im_q;
  sample_t       rd_re, rd_im;

  always_comb begin
    we    = core_sel && c_we;
    addr  = core_sel ? c_addr : AW'(h_req.addr);
    en_re = core_sel ? c_we : (h_req.en && !h_req.we && !h_req.im);
    en_im = core_sel ? c_we : (h_req.en && !h_req.we &&  h_req.im);
  end

  cdft_sp_ram #(.WIDTH(DATA_W), .DEPTH(M * N)) u_re (
    .clk, .en(en_re), .we, .addr, .wdata(c_data.re), .rdata(rd_re)
  );
  cdft_sp_ram #(.WIDTH(DATA_W), .DEPTH(M * N)) u_im (
    .clk, .en(en_im), .we, .addr, .wdata(c_data.im), .rdata(rd_im)
  );

  always_ff @(posedge clk) begin
    if (h_req.en && !core_sel) h_im_q <= h_req.im;
  end

  assign h_rdata = h_im_q ? rd_im : rd_re;

endmodule
