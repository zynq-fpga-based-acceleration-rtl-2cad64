// cdft_core: the combined 2-D DFT / IDFT engine (CDFT) without its buffers.
//
// It evaluates the transform by its definition, one output point at a time:
//   DFT : F(u,v) = sum_{x,y} f(x,y) * e^(-j*2*pi*(u*x/M + v*y/N))
//   IDFT: f(x,y) = 1/(M*N) * sum_{u,v} F(u,v) * e^(+j*2*pi*(u*x/M + v*y/N))
// (the IDFT is the same loop with the roles of (x,y) and (u,v) exchanged and
// the kernel sign flipped, so one datapath serves both). Sine and cosine come
// from a precomputed table, the arithmetic is fixed point, the DFT input is
// taken as real, and the loops are pipelined with an initiation interval of
// one, as in the accelerator description. LANES samples are multiplied and
// summed per cycle: LANES = M*N (the default) fully unrolls the inner double
// sum, so one output point completes per cycle; a smaller LANES trades speed
// for multipliers. The choice of LANES and the lane-per-sample organisation
// are this design's.
//
// Pipeline (one stage per clock):
//   S0  cdft_ctrl issues (u, v, chunk c); the input buffer is read at chunk c
//       and each lane l looks up the twiddle of sample s = c*LANES + l,
//       x = s / N, y = s mod N, at a = (u*x) mod M, b = (v*y) mod N.
//   S1  cdft_cmac lanes multiply sample by twiddle.
//   S2  cdft_accum adds the lanes; S3 accumulates, scales, saturates;
//   S4  the point is written to the output buffer at u*N + v.
// 'done' pulses one cycle after the last write, so a run of the default
// 32 x 32 transform takes 1 + 1024 + 4 cycles from 'start' to 'done'.
//
// Interface: start/mode_in/busy/done towards the host registers, a read port
// to cdft_in_buf and a write port to cdft_out_buf.
module cdft_core
  import cdft_pkg::*;
#(
  parameter int unsigned M     = 32,
  parameter int unsigned N     = 32,
  parameter int unsigned LANES = M * N,
  localparam int unsigned MN = M * N,
  localparam int unsigned CH = MN / LANES,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1,
  localparam int unsigned AW = (MN > 1) ? $clog2(MN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  mode_e         mode_in,
  output logic          busy,
  output logic          done,
  // input buffer read port
  output logic          ib_rd,
  output logic          ib_rd_im,
  output logic [CW-1:0] ib_addr,
  input  cplx_t         ib_data [LANES],
  // output buffer write port
  output logic          ob_we,
  output logic [AW-1:0] ob_addr,
  output cplx_t         ob_data
);

  // ---------------- S0: sequencer
  mode_e         mode;
  logic          iss_valid, iss_first, iss_last;
  logic [MW-1:0] iss_u;
  logic [NW-1:0] iss_v;
  logic [CW-1:0] iss_c;

  cdft_ctrl #(.M(M), .N(N), .LANES(LANES), .DRAIN(3)) u_ctrl (
    .clk, .rst_n, .start, .mode_in, .busy, .done, .mode,
    .iss_valid, .iss_first, .iss_last, .iss_u, .iss_v, .iss_c
  );

  assign ib_rd    = iss_valid;
  assign ib_rd_im = (mode == MODE_IDFT);
  assign ib_addr  = iss_c;

  // Twiddle indices of every lane.
  logic [MW-1:0] tw_a [LANES];
  logic [NW-1:0] tw_b [LANES];

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      int s, x, y;
      s = int'(iss_c) * int'(LANES) + l;
      x = s / int'(N);
      y = s % int'(N);
      tw_a[l] = MW'((int'(iss_u) * x) % int'(M));
      tw_b[l] = NW'((int'(iss_v) * y) % int'(N));
    end
  end

  twiddle_t tw [LANES];

  cdft_twiddle_rom #(.M(M), .N(N), .NPORTS(LANES)) u_rom (
    .clk, .en(iss_valid), .a(tw_a), .b(tw_b), .tw
  );

  // Tag of the output point, carried alongside the data.
  logic          s1_valid, s1_first, s1_last;
  logic [AW-1:0] s1_tag;
  logic          s2_valid, s2_first, s2_last;
  logic [AW-1:0] s2_tag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
    end else begin
      s1_valid <= iss_valid;
      s2_valid <= s1_valid;
    end
    s1_first <= iss_first;
    s1_last  <= iss_last;
    s1_tag   <= AW'(int'(iss_u) * int'(N) + int'(iss_v));
    s2_first <= s1_first;
    s2_last  <= s1_last;
    s2_tag   <= s1_tag;
  end

  // ---------------- S1: lane multipliers
  prod_t p_re [LANES];
  prod_t p_im [LANES];

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    cdft_cmac u_mac (
      .clk, .en(s1_valid), .mode, .f(ib_data[l]), .tw(tw[l]),
      .p_re(p_re[l]), .p_im(p_im[l])
    );
  end

  // ---------------- S2-S3: reduction, accumulation, scaling
  cdft_accum #(.M(M), .N(N), .LANES(LANES), .TAG_W(AW)) u_acc (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_first(s2_first), .in_last(s2_last),
    .in_mode(mode), .in_tag(s2_tag), .p_re, .p_im,
    .out_valid(ob_we), .out_tag(ob_addr), .out_data(ob_data)
  );

endmodule
