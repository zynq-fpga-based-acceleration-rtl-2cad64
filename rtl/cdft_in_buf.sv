// cdft_in_buf: input buffer of the CDFT engine (real and imaginary words).
//
// The host fills the buffer with the M*N input samples, index i = x*N + y,
// then starts the engine. The engine needs LANES samples per cycle, so the
// buffer is split into LANES banks of single-port RAM: sample i lives in
// bank (i mod LANES) at word (i / LANES), and engine read c returns samples
// c*LANES .. c*LANES+LANES-1 in one cycle. With LANES = M*N each bank is a
// single register. Real and imaginary words have banks of their own; in DFT
// mode the engine does not read the imaginary banks.
//
// Each bank has a single port, shared in time: while 'core_sel' is high the
// engine owns every bank and host accesses have no effect; otherwise the host
// owns them. Single-port banks follow the accelerator description (its
// dual-port variant did not fit the device); the sharing rule is this
// design's choice.
//
// Timing: reads, from either side, return data one clock after the request.
module cdft_in_buf
  import cdft_pkg::*;
#(
  parameter int unsigned M     = 32,
  parameter int unsigned N     = 32,
  parameter int unsigned LANES = 4,
  localparam int unsigned CH = (M * N) / LANES,
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic      clk,
  input  logic      core_sel,
  // host side
  input  host_req_t h_req,
  output sample_t   h_rdata,
  // engine side
  input  logic      c_rd,
  input  logic      c_rd_im,
  input  logic [CW-1:0] c_addr,
  output cplx_t     c_data [LANES]
);

  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1;

  logic [LW-1:0] h_bank, h_bank_q;
  logic [CW-1:0] h_word;
  logic          h_im_q;
  sample_t       rd_re [LANES];
  sample_t       rd_im [LANES];

  always_comb begin
    h_bank = LW'(int'(h_req.addr) % int'(LANES));
    h_word = CW'(int'(h_req.addr) / int'(LANES));
  end

  for (genvar l = 0; l < int'(LANES); l++) begin : g_bank
    logic          en_re, en_im, we;
    logic [CW-1:0] addr;
    logic          hit;

    always_comb begin
      hit   = h_req.en && (h_bank == LW'(l));
      we    = !core_sel && hit && h_req.we;
      addr  = core_sel ? c_addr : h_word;
      en_re = core_sel ? c_rd : (hit && !h_req.im);
      en_im = core_sel ? (c_rd && c_rd_im) : (hit && h_req.im);
    end

    cdft_sp_ram #(.WIDTH(DATA_W), .DEPTH(CH)) u_re (
      .clk, .en(en_re), .we, .addr, .wdata(h_req.wdata), .rdata(rd_re[l])
    );
    cdft_sp_ram #(.WIDTH(DATA_W), .DEPTH(CH)) u_im (
      .clk, .en(en_im), .we, .addr, .wdata(h_req.wdata), .rdata(rd_im[l])
    );

    always_comb begin
      c_data[l].re = rd_re[l];
      c_data[l].im = rd_im[l];
    end
  end

  always_ff @(posedge clk) begin
    if (h_req.en && !core_sel) begin
      h_bank_q <= h_bank;
      h_im_q   <= h_req.im;
    end
  end

  assign h_rdata = h_im_q ? rd_im[h_bank_q] : rd_re[h_bank_q];

endmodule
