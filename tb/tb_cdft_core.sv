// tb_cdft_core: runs two engines on a 4 x 6 transform, one with 4 lanes (6
// chunks accumulated per output point) and one fully unrolled (24 lanes),
// each with a one-cycle-latency input memory and an output memory modelled
// here. Runs: a DFT of a random real image (the imaginary input holds
// garbage, which must be ignored), an IDFT of a random complex spectrum, and
// a DFT of a constant image whose DC term saturates. Results are compared
// with a double-precision DFT/IDFT within the twiddle rounding bound. Also
// checks that every point is written exactly once before 'done', and the run
// time of M*N*(M*N/LANES) + 5 cycles from start to done.
module tb_cdft_core;
  import cdft_pkg::*;
  import tb_cdft_ref_pkg::*;

  localparam int M = 4, N = 6, MN = 24;
  localparam int LA = 4, CHA = 6;    // engine A
  localparam int LB = 24, CHB = 1;   // engine B

  logic clk = 1'b0;
  logic rst_n, start;
  mode_e mode_in;
  int checks = 0, failures = 0;
  int cyc = 0;

  sample_t in_re [MN];
  sample_t in_im [MN];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- engine A
  logic a_busy, a_done, a_rd, a_rd_im, a_we;
  logic [2:0] a_addr;
  cplx_t a_data [LA];
  logic [4:0] a_oaddr;
  cplx_t a_odata;
  cplx_t a_out [MN];
  int a_wr_cnt [MN];
  int a_done_cyc;

  cdft_core #(.M(M), .N(N), .LANES(LA)) dut_a (
    .clk, .rst_n, .start, .mode_in, .busy(a_busy), .done(a_done),
    .ib_rd(a_rd), .ib_rd_im(a_rd_im), .ib_addr(a_addr), .ib_data(a_data),
    .ob_we(a_we), .ob_addr(a_oaddr), .ob_data(a_odata)
  );

  always @(posedge clk) begin
    if (a_rd) for (int l = 0; l < LA; l++) begin
      a_data[l].re <= in_re[int'(a_addr) * LA + l];
      if (a_rd_im) a_data[l].im <= in_im[int'(a_addr) * LA + l];
    end
    if (a_we) begin
      a_out[a_oaddr] <= a_odata;
      a_wr_cnt[a_oaddr] <= a_wr_cnt[a_oaddr] + 1;
    end
    if (a_done) a_done_cyc <= cyc;
  end

  // ---------------- engine B
  logic b_busy, b_done, b_rd, b_rd_im, b_we;
  logic [0:0] b_addr;
  cplx_t b_data [LB];
  logic [4:0] b_oaddr;
  cplx_t b_odata;
  cplx_t b_out [MN];
  int b_wr_cnt [MN];
  int b_done_cyc;

  cdft_core #(.M(M), .N(N), .LANES(LB)) dut_b (
    .clk, .rst_n, .start, .mode_in, .busy(b_busy), .done(b_done),
    .ib_rd(b_rd), .ib_rd_im(b_rd_im), .ib_addr(b_addr), .ib_data(b_data),
    .ob_we(b_we), .ob_addr(b_oaddr), .ob_data(b_odata)
  );

  always @(posedge clk) begin
    if (b_rd) for (int l = 0; l < LB; l++) begin
      b_data[l].re <= in_re[l];
      if (b_rd_im) b_data[l].im <= in_im[l];
    end
    if (b_we) begin
      b_out[b_oaddr] <= b_odata;
      b_wr_cnt[b_oaddr] <= b_wr_cnt[b_oaddr] + 1;
    end
    if (b_done) b_done_cyc <= cyc;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int absi(longint v);
    return int'((v < 0) ? -v : v);
  endfunction

  task automatic compare(string tag, cplx_t got [MN], rvec_t er, rvec_t ei, int tol);
    for (int i = 0; i < MN; i++) begin
      longint xr, xi;
      real vr, vi;
      vr = er[i] * 65536.0;
      vi = ei[i] * 65536.0;
      xr = (vr > 2147483647.0) ? 64'sd2147483647 : (vr < -2147483648.0) ? -64'sd2147483648 : longint'($floor(vr + 0.5));
      xi = (vi > 2147483647.0) ? 64'sd2147483647 : (vi < -2147483648.0) ? -64'sd2147483648 : longint'($floor(vi + 0.5));
      chk(absi(longint'(got[i].re) - xr) <= tol && absi(longint'(got[i].im) - xi) <= tol,
          $sformatf("%s point %0d: got (%f,%f) exp (%f,%f)", tag, i,
                    from_fix(got[i].re), from_fix(got[i].im), er[i], ei[i]));
    end
  endtask

  task automatic run(mode_e md, string tag, int tol);
    int t0;
    rvec_t r_re, r_im, e_re, e_im;
    r_re = new[MN];
    r_im = new[MN];
    for (int i = 0; i < MN; i++) begin
      r_re[i] = from_fix(in_re[i]);
      r_im[i] = from_fix(in_im[i]);
      a_wr_cnt[i] = 0;
      b_wr_cnt[i] = 0;
    end
    dft2(M, N, md == MODE_IDFT, md == MODE_DFT, r_re, r_im, e_re, e_im);
    start = 1'b1; mode_in = md;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (a_busy || b_busy) @(negedge clk);
    @(negedge clk);  // let the done-cycle capture settle
    chk(a_done_cyc - t0 == MN * CHA + 5, $sformatf("%s A run took %0d cycles", tag, a_done_cyc - t0));
    chk(b_done_cyc - t0 == MN * CHB + 5, $sformatf("%s B run took %0d cycles", tag, b_done_cyc - t0));
    for (int i = 0; i < MN; i++) begin
      chk(a_wr_cnt[i] == 1 && b_wr_cnt[i] == 1, $sformatf("%s point %0d written once", tag, i));
    end
    compare({tag, " A"}, a_out, e_re, e_im, tol);
    compare({tag, " B"}, b_out, e_re, e_im, tol);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mode_in = MODE_DFT;
    for (int l = 0; l < LA; l++) a_data[l] = '0;
    for (int l = 0; l < LB; l++) b_data[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      // DFT of a real image in [-100, 100); garbage imaginary part
      for (int i = 0; i < MN; i++) begin
        in_re[i] = to_fix(real'($urandom_range(0, 20000)) / 100.0 - 100.0);
        in_im[i] = $urandom;
      end
      run(MODE_DFT, "dft", 2 * MN * 100 + 4);
      // IDFT of a complex spectrum in [-100, 100)
      for (int i = 0; i < MN; i++) begin
        in_re[i] = to_fix(real'($urandom_range(0, 20000)) / 100.0 - 100.0);
        in_im[i] = to_fix(real'($urandom_range(0, 20000)) / 100.0 - 100.0);
      end
      run(MODE_IDFT, "idft", 2 * 100 + 4);
    end
    // constant image: DC term 24 * 30000 saturates, all other terms are 0
    for (int i = 0; i < MN; i++) begin
      in_re[i] = to_fix(30000.0);
      in_im[i] = 32'h7fff_ffff;
    end
    run(MODE_DFT, "sat", 2 * MN * 30000 + 4);
    chk(a_out[0].re == 32'sh7fff_ffff && b_out[0].re == 32'sh7fff_ffff, "DC term saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
