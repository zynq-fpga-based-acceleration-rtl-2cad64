// tb_cdft_cmac: random samples and twiddles in both modes. Expected products
// are the complex products (f_re + j f_im)(cos -/+ j sin) in 64-bit integers,
// with f_im taken as zero in DFT mode (a random f_im is applied to show it is
// ignored). Checks the one-cycle latency and that en low holds the output.
module tb_cdft_cmac;
  import cdft_pkg::*;

  logic clk = 1'b0;
  logic en;
  mode_e mode;
  cplx_t f;
  twiddle_t tw;
  prod_t p_re, p_im;
  int checks = 0, failures = 0;

  cdft_cmac dut (.clk, .en, .mode, .f, .tw, .p_re, .p_im);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint er, longint ei, string what);
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      $display("%s: got (%0d,%0d) exp (%0d,%0d)", what, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    en = 1'b0; mode = MODE_DFT; f = '0; tw = '0;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      longint fr, fi, c, s, er, ei;
      mode = (t % 2) ? MODE_IDFT : MODE_DFT;
      // full-range corners on the first cycles, then random values
      if (t < 4) begin
        f.re = (t < 2) ? 32'sh7fffffff : 32'sh80000000;
        f.im = 32'sh80000000;
        tw.cos_v = 18'sh10000;
        tw.sin_v = (t % 3 == 0) ? -18'sh10000 : 18'sh10000;
      end else begin
        f.re = $urandom;
        f.im = $urandom;
        tw.cos_v = 18'($signed($urandom_range(0, 131072)) - 65536);
        tw.sin_v = 18'($signed($urandom_range(0, 131072)) - 65536);
      end
      fr = longint'(f.re);
      fi = (mode == MODE_IDFT) ? longint'(f.im) : 0;
      c  = longint'(tw.cos_v);
      s  = (mode == MODE_IDFT) ? longint'(tw.sin_v) : -longint'(tw.sin_v);
      er = fr * c - fi * s;
      ei = fr * s + fi * c;
      en = 1'b1;
      @(negedge clk);
      check(er, ei, (mode == MODE_IDFT) ? "idft" : "dft");
      // hold: en low, inputs change, output must not move
      en = 1'b0;
      f.re = $urandom;
      @(negedge clk);
      check(er, ei, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
