// tb_cdft_twiddle_rom: checks every entry of a 6 x 5 twiddle table through
// three ports at once against cos/sin of 2*pi*(a/M + b/N) computed here, and
// the one-cycle read latency.
module tb_cdft_twiddle_rom;
  import cdft_pkg::*;

  localparam int M = 6, N = 5, P = 3;

  logic clk = 1'b0;
  logic en;
  logic [2:0] a [P];
  logic [2:0] b [P];
  twiddle_t tw [P];
  int checks = 0, failures = 0;

  cdft_twiddle_rom #(.M(M), .N(N), .NPORTS(P)) dut (.clk, .en, .a, .b, .tw);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_val(int ia, int ib, bit want_sin);
    real th;
    th = 2.0 * 3.14159265358979323846 * (real'(ia) / M + real'(ib) / N);
    return $rtoi($floor((want_sin ? $sin(th) : $cos(th)) * 65536.0 + 0.5));
  endfunction

  initial begin
    en = 1'b0;
    for (int p = 0; p < P; p++) begin a[p] = '0; b[p] = '0; end
    @(negedge clk);
    for (int k = 0; k < M * N; k++) begin
      int ka [P];
      int kb [P];
      for (int p = 0; p < P; p++) begin
        int idx;
        idx   = (k + p * 7) % (M * N);
        ka[p] = idx / N;
        kb[p] = idx % N;
        a[p]  = 3'(ka[p]);
        b[p]  = 3'(kb[p]);
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      for (int p = 0; p < P; p++) begin
        a[p] = '0; b[p] = '0;   // new addresses must not matter without en
      end
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        int ec, es;
        ec = expect_val(ka[p], kb[p], 1'b0);
        es = expect_val(ka[p], kb[p], 1'b1);
        checks += 2;
        if (int'(tw[p].cos_v) < ec - 1 || int'(tw[p].cos_v) > ec + 1) begin
          failures++;
          $display("cos mismatch a=%0d b=%0d got %0d exp %0d", ka[p], kb[p], tw[p].cos_v, ec);
        end
        if (int'(tw[p].sin_v) < es - 1 || int'(tw[p].sin_v) > es + 1) begin
          failures++;
          $display("sin mismatch a=%0d b=%0d got %0d exp %0d", ka[p], kb[p], tw[p].sin_v, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
