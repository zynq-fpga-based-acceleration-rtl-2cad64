// cdft_accum: reduction, accumulation and output scaling of the CDFT engine.
//
// Each valid cycle brings LANES lane products (real and imaginary) that
// belong to one output point (u, v). Stage 1 adds the lanes. Stage 2 adds
// that partial sum to the running sum of the point (restarting on 'first'),
// and on 'last' the point is complete: the sum is scaled back to the sample
// format and written out. Scaling removes the twiddle fraction bits with
// round-half-up; in IDFT mode it also multiplies by 1/(M*N), as the inverse
// transform requires, using the constant INV_MN = round(2^INV_SH / (M*N))
// (exact when M*N is a power of two; otherwise the relative error is below
// 2^-29 of the result). Results beyond the 32-bit sample range
// saturate. Rounding, the reciprocal constant and saturation are this
// design's choices; the accumulation follows the double sums of the 2-D DFT
// and IDFT.
//
// Timing: out_valid comes two clocks after the in_valid cycle marked 'last';
// the tag (output index) and mode travel with the data.
module cdft_accum
  import cdft_pkg::*;
#(
  parameter int unsigned M     = 32,
  parameter int unsigned N     = 32,
  parameter int unsigned LANES = 4,
  parameter int unsigned TAG_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  mode_e            in_mode,
  input  logic [TAG_W-1:0] in_tag,
  input  prod_t            p_re [LANES],
  input  prod_t            p_im [LANES],
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output cplx_t            out_data
);

  localparam int unsigned MN     = M * N;
  localparam int unsigned ACC_W  = PROD_W + $clog2(MN) + 1;
  localparam int unsigned INV_SH = 30;
  localparam int unsigned MUL_W  = ACC_W + 32;
  localparam longint      INV_MN = ((longint'(1) << INV_SH) + longint'(MN / 2)) / longint'(MN);

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [MUL_W-1:0] mul_t;

  // ---- stage 1: sum over lanes
  acc_t             lsum_re, lsum_im;
  acc_t             s1_re, s1_im;
  logic             s1_valid, s1_first, s1_last;
  mode_e            s1_mode;
  logic [TAG_W-1:0] s1_tag;

  always_comb begin
    lsum_re = '0;
    lsum_im = '0;
    for (int l = 0; l < int'(LANES); l++) begin
      lsum_re += ACC_W'(p_re[l]);
      lsum_im += ACC_W'(p_im[l]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid;
    end
    if (in_valid) begin
      s1_re    <= lsum_re;
      s1_im    <= lsum_im;
      s1_first <= in_first;
      s1_last  <= in_last;
      s1_mode  <= in_mode;
      s1_tag   <= in_tag;
    end
  end

  // ---- stage 2: accumulate over chunks, scale, saturate
  acc_t acc_re, acc_im, nxt_re, nxt_im;

  function automatic sample_t scale(acc_t v, mode_e md);
    mul_t   w;
    mul_t   r;
    int     sh;
    mul_t   maxv, minv;
    if (md == MODE_IDFT) begin
      w  = MUL_W'(v) * MUL_W'(INV_MN);
      sh = int'(COEF_FRAC + INV_SH);
    end else begin
      w  = MUL_W'(v);
      sh = int'(COEF_FRAC);
    end
    r    = (w + (mul_t'(1) <<< (sh - 1))) >>> sh;
    maxv = MUL_W'({1'b0, {(DATA_W-1){1'b1}}});
    minv = -maxv - 1;
    if (r > maxv)      return sample_t'(maxv);
    else if (r < minv) return sample_t'(minv);
    else               return sample_t'(r);
  endfunction

  always_comb begin
    nxt_re = s1_first ? s1_re : acc_re + s1_re;
    nxt_im = s1_first ? s1_im : acc_im + s1_im;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= s1_valid && s1_last;
    end
    if (s1_valid) begin
      acc_re <= nxt_re;
      acc_im <= nxt_im;
      if (s1_last) begin
        out_tag     <= s1_tag;
        out_data.re <= scale(nxt_re, s1_mode);
        out_data.im <= scale(nxt_im, s1_mode);
      end
    end
  end

endmodule
