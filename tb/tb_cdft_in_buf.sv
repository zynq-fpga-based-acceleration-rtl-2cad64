// tb_cdft_in_buf: 4 x 4 samples in 4 banks (4 chunks). The host writes
// random real and imaginary words and reads them back; the engine side reads
// each chunk and must see samples c*4 .. c*4+3 in lane order. While the
// engine owns the buffer, host writes must have no effect; with the engine's
// imaginary read disabled the imaginary outputs must hold.
module tb_cdft_in_buf;
  import cdft_pkg::*;

  localparam int M = 4, N = 4, LANES = 4, CH = 4;

  logic clk = 1'b0;
  logic core_sel;
  host_req_t h_req;
  sample_t h_rdata;
  logic c_rd, c_rd_im;
  logic [1:0] c_addr;
  cplx_t c_data [LANES];
  int checks = 0, failures = 0;
  sample_t ref_re [M*N];
  sample_t ref_im [M*N];

  cdft_in_buf #(.M(M), .N(N), .LANES(LANES)) dut (
    .clk, .core_sel, .h_req, .h_rdata, .c_rd, .c_rd_im, .c_addr, .c_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic host_write(int idx, bit im, sample_t d);
    h_req = '{en: 1'b1, we: 1'b1, im: im, addr: 16'(idx), wdata: d};
    @(negedge clk);
    h_req = '0;
  endtask

  task automatic host_read(int idx, bit im, output sample_t d);
    h_req = '{en: 1'b1, we: 1'b0, im: im, addr: 16'(idx), wdata: '0};
    @(negedge clk);
    h_req = '0;
    d = h_rdata;
  endtask

  task automatic core_check(bit with_im, string tag);
    for (int c = 0; c < CH; c++) begin
      cplx_t prev_data [LANES];
      prev_data = c_data;
      c_rd = 1'b1; c_rd_im = with_im; c_addr = 2'(c);
      @(negedge clk);
      c_rd = 1'b0;
      for (int l = 0; l < LANES; l++) begin
        chk(c_data[l].re == ref_re[c*LANES + l], $sformatf("%s re c%0d l%0d", tag, c, l));
        if (with_im)
          chk(c_data[l].im == ref_im[c*LANES + l], $sformatf("%s im c%0d l%0d", tag, c, l));
        else
          chk(c_data[l].im == prev_data[l].im, $sformatf("%s im held c%0d l%0d", tag, c, l));
      end
    end
  endtask

  initial begin
    sample_t d;
    core_sel = 1'b0; h_req = '0; c_rd = 1'b0; c_rd_im = 1'b0; c_addr = '0;
    @(negedge clk);
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < M*N; i++) begin
        ref_re[i] = $urandom;
        ref_im[i] = $urandom;
        host_write(i, 1'b0, ref_re[i]);
        host_write(i, 1'b1, ref_im[i]);
      end
      for (int i = M*N - 1; i >= 0; i--) begin
        host_read(i, 1'b0, d);
        chk(d == ref_re[i], $sformatf("host read re %0d", i));
        host_read(i, 1'b1, d);
        chk(d == ref_im[i], $sformatf("host read im %0d", i));
      end
      core_sel = 1'b1;
      // host writes while the engine owns the buffer are dropped
      for (int i = 0; i < M*N; i += 3) host_write(i, i % 2 == 1, 32'hdead_beef);
      core_check(1'b1, "idft");
      core_check(1'b0, "dft");
      core_sel = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
