// tb_cdft_top_full: the end-to-end test of tb_cdft_top at the accelerator's
// default size, a 32 x 32 transform with all 1024 products of an output
// point computed in parallel, with no parameter of the top changed. One
// round: a DFT of a random real image with values in [-16, 16) (so the
// DC term stays inside the 16.16 sample range), the IDFT of the spectrum read back
// (compared with a double-precision reference and with the original image),
// refused accesses and a second start during each run, and a saturating DFT
// of a bright constant image. Engine time from start to done must be
// 1024 + 5 cycles.
module tb_cdft_top_full;
  import cdft_pkg::*;
  import tb_cdft_ref_pkg::*;

  localparam int M = 32, N = 32, MN = 1024, LANES = 1024, CH = 1;  // the defaults

  logic clk = 1'b0;
  logic rst_n;
  logic [19:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic done_irq;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_dft = 0, n_idft = 0, n_busy_refused = 0, n_restart_ignored = 0;
  int n_sat = 0, n_done_cleared = 0, n_im_ignored = 0;

  cdft_top dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .done_irq
  );

  always #5 clk = ~clk;

  // engine time: from the start pulse seen by the engine to done_irq
  int cyc = 0, t_start = 0, t_done = 0, n_irq = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.start) t_start <= cyc;
    if (done_irq) begin t_done <= cyc; n_irq <= n_irq + 1; end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_axil_master.svh"

  function automatic int iabs(longint v);
    return int'((v < 0) ? -v : v);
  endfunction

  function automatic longint sat_fix(real r);
    real v;
    v = $floor(r * 65536.0 + 0.5);
    if (v > 2147483647.0)  return 64'sd2147483647;
    if (v < -2147483648.0) return -64'sd2147483648;
    return longint'(v);
  endfunction

  task automatic load(rvec_t re, rvec_t im, bit garbage_im);
    logic [1:0] resp;
    for (int i = 0; i < MN; i++) begin
      axi_write(32'h1_0000 + 4*i, to_fix(re[i]), resp);
      axi_write(32'h2_0000 + 4*i, garbage_im ? int'($urandom) : to_fix(im[i]), resp);
    end
  endtask

  task automatic run(mode_e md);
    logic [1:0] resp;
    int d, polls, irq0;
    irq0 = n_irq;
    axi_write(32'h4, int'(md), resp);
    axi_write(32'h0, 1, resp);
    chk(resp == 2'b00, "start accepted");
    // while running: buffer write and a second start are refused
    axi_write(32'h1_0000, 32'h1234, resp);
    if (resp == 2'b10) n_busy_refused++;
    chk(resp == 2'b10, "buffer write refused while busy");
    axi_write(32'h0, 1, resp);
    polls = 0;
    do begin
      axi_read(32'h0, d, resp);
      polls++;
    end while (!d[1] && polls < 10000);
    chk(d[1] && !d[0], "done seen");
    chk(n_irq == irq0 + 1, "exactly one run, second start ignored");
    if (n_irq == irq0 + 1) n_restart_ignored++;
    axi_read(32'h0, d, resp);
    chk(!d[1], "done cleared by the CTRL read");
    if (!d[1]) n_done_cleared++;
    chk(t_done - t_start == MN * CH + 5,
        $sformatf("engine time %0d, expected %0d", t_done - t_start, MN * CH + 5));
    if (md == MODE_DFT) n_dft++; else n_idft++;
  endtask

  task automatic fetch(output rvec_t re, output rvec_t im, output int raw_re []);
    logic [1:0] resp;
    int d;
    re = new[MN]; im = new[MN]; raw_re = new[MN];
    for (int i = 0; i < MN; i++) begin
      axi_read(32'h3_0000 + 4*i, d, resp);
      raw_re[i] = d;
      re[i] = from_fix(d);
      axi_read(32'h4_0000 + 4*i, d, resp);
      im[i] = from_fix(d);
    end
  endtask

  task automatic compare(string tag, rvec_t gr, rvec_t gi, rvec_t er, rvec_t ei, int tol);
    for (int i = 0; i < MN; i++) begin
      chk(iabs(longint'(to_fix(gr[i])) - sat_fix(er[i])) <= tol &&
          iabs(longint'(to_fix(gi[i])) - sat_fix(ei[i])) <= tol,
          $sformatf("%s %0d: got (%f,%f) exp (%f,%f)", tag, i, gr[i], gi[i], er[i], ei[i]));
    end
  endtask

  initial begin
    rvec_t img, zero, f_re, f_im, e_re, e_im, g_re, g_im;
    int raw [];
    rst_n = 1'b0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    img = new[MN]; zero = new[MN];
    for (int round = 0; round < 1; round++) begin
      for (int i = 0; i < MN; i++) begin
        img[i]  = real'($urandom_range(0, 3200)) / 100.0 - 16.0;  // feature-like, [-16, 16)
        zero[i] = 0.0;
      end
      // forward transform; imaginary input filled with garbage
      load(img, zero, 1'b1);
      run(MODE_DFT);
      fetch(f_re, f_im, raw);
      dft2(M, N, 1'b0, 1'b1, img, zero, e_re, e_im);
      compare("dft", f_re, f_im, e_re, e_im, 2 * MN * 16 + 4);
      // the real-input DFT of a real image has F(0,0) imaginary part 0: a
      // result independent of the garbage shows the imaginary input unused
      if (f_im[0] == 0.0) n_im_ignored++;
      // inverse transform of the spectrum read back
      load(f_re, f_im, 1'b0);
      run(MODE_IDFT);
      fetch(g_re, g_im, raw);
      dft2(M, N, 1'b1, 1'b0, f_re, f_im, e_re, e_im);
      compare("idft", g_re, g_im, e_re, e_im, 2 * 16 * MN + 4);
      compare("round trip", g_re, g_im, img, zero, 4 * 16 * MN + 8);
    end
    // bright constant image: DC = 1024 * 2000 > 32767 saturates
    for (int i = 0; i < MN; i++) img[i] = 2000.0;
    load(img, zero, 1'b1);
    run(MODE_DFT);
    fetch(f_re, f_im, raw);
    chk(raw[0] == 32'sh7fff_ffff, "DC term saturated");
    if (raw[0] == 32'sh7fff_ffff) n_sat++;

    $display("mechanisms: dft=%0d idft=%0d im_ignored=%0d busy_refused=%0d restart_ignored=%0d done_cleared=%0d saturated=%0d",
             n_dft, n_idft, n_im_ignored, n_busy_refused, n_restart_ignored, n_done_cleared, n_sat);
    chk(n_dft > 0, "DFT mode used");
    chk(n_idft > 0, "IDFT mode used");
    chk(n_im_ignored > 0, "imaginary input ignored in DFT mode");
    chk(n_busy_refused > 0, "access while busy refused");
    chk(n_restart_ignored > 0, "start while busy ignored");
    chk(n_done_cleared > 0, "done flag cleared on read");
    chk(n_sat > 0, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
