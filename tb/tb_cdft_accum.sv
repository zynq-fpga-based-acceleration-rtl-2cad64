// tb_cdft_accum: feeds groups of lane products for a 2 x 3 transform with 3
// lanes (2 chunks per point) and checks each finished point against the sum
// computed here: for DFT divided by 2^16 and rounded, for IDFT divided by
// 6 * 2^16 (within 1 LSB + 2^-28 of the value, the reciprocal being
// inexact for 6), with
// saturation at the 32-bit range. Also checks the output tag, that no output
// appears before a 'last' chunk, the two-cycle latency, and back-to-back
// points without gaps.
module tb_cdft_accum;
  import cdft_pkg::*;

  localparam int M = 2, N = 3, LANES = 3, CH = 2, TAG_W = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_first, in_last;
  mode_e in_mode;
  logic [TAG_W-1:0] in_tag;
  prod_t p_re [LANES];
  prod_t p_im [LANES];
  logic out_valid;
  logic [TAG_W-1:0] out_tag;
  cplx_t out_data;
  int checks = 0, failures = 0;
  int n_sat = 0;

  cdft_accum #(.M(M), .N(N), .LANES(LANES), .TAG_W(TAG_W)) dut (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .in_mode, .in_tag,
    .p_re, .p_im, .out_valid, .out_tag, .out_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results in issue order.
  typedef struct { int tag; longint re; longint im; bit inv; } exp_t;
  exp_t q [$];

  function automatic longint expect_scaled(real sum, bit inv);
    real v;
    v = inv ? sum / (6.0 * 65536.0) : sum / 65536.0;
    v = $floor(v + 0.5);
    if (v > 2147483647.0)  return 64'sd2147483647;
    if (v < -2147483648.0) return -64'sd2147483648;
    return longint'(v);
  endfunction

  // Output checker: every out_valid pops one expectation.
  int cyc = 0, last_cyc [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_last) last_cyc.push_back(cyc);
    if (rst_n && out_valid) begin
      exp_t e;
      int lc;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        longint tol;
        e  = q.pop_front();
        lc = last_cyc.pop_front();
        // the reciprocal of 6 is inexact: relative error below 2^-28
        tol = e.inv ? 1 + ((e.re < 0 ? -e.re : e.re) + (e.im < 0 ? -e.im : e.im)) / (64'sd1 << 28) : 0;
        if (int'(out_tag) != e.tag ||
            longint'(out_data.re) > e.re + tol || longint'(out_data.re) < e.re - tol ||
            longint'(out_data.im) > e.im + tol || longint'(out_data.im) < e.im - tol) begin
          failures++;
          $display("point %0d: got tag %0d (%0d,%0d) exp (%0d,%0d)", e.tag, out_tag,
                   out_data.re, out_data.im, e.re, e.im);
        end
        if (e.re == 64'sd2147483647 || e.re == -64'sd2147483648) n_sat++;
        checks++;
        if (cyc - lc != 2) begin
          failures++;
          $display("latency %0d, expected 2", cyc - lc);
        end
      end
    end
  end

  task automatic run_point(int tag, bit inv, longint mag, bit gap);
    real sr = 0.0, si = 0.0;
    exp_t e;
    for (int c = 0; c < CH; c++) begin
      in_valid = 1'b1;
      in_first = (c == 0);
      in_last  = (c == CH - 1);
      in_mode  = inv ? MODE_IDFT : MODE_DFT;
      in_tag   = TAG_W'(tag);
      for (int l = 0; l < LANES; l++) begin
        longint vr, vi;
        vr = longint'($urandom_range(0, 2000000)) - 1000000;
        vi = longint'($urandom_range(0, 2000000)) - 1000000;
        vr = vr * mag;
        vi = vi * mag;
        p_re[l] = PROD_W'(vr);
        p_im[l] = PROD_W'(vi);
        sr += real'(vr);
        si += real'(vi);
      end
      @(negedge clk);
      if (gap) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    e.tag = tag;
    e.inv = inv;
    e.re  = expect_scaled(sr, inv);
    e.im  = expect_scaled(si, inv);
    q.push_back(e);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    in_mode = MODE_DFT; in_tag = '0;
    for (int l = 0; l < LANES; l++) begin p_re[l] = '0; p_im[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      // magnitudes: small, large, and large enough to saturate
      longint mag;
      mag = (t % 3 == 0) ? 1 : (t % 3 == 1) ? 1000 : 1000000000;
      run_point(t % (M * N), t % 2 == 1, mag, t % 5 == 0);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d points never came out", q.size());
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
