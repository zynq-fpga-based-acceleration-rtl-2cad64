// tb_cdft_out_buf: the engine writes random results for a 4 x 6 transform in
// a shuffled order, then the host reads every real and imaginary word back.
// Host writes must not change the buffer, and engine writes while the host
// owns the port (core_sel low) must have no effect.
module tb_cdft_out_buf;
  import cdft_pkg::*;

  localparam int M = 4, N = 6, MN = 24;

  logic clk = 1'b0;
  logic core_sel;
  host_req_t h_req;
  sample_t h_rdata;
  logic c_we;
  logic [4:0] c_addr;
  cplx_t c_data;
  int checks = 0, failures = 0;
  cplx_t ref_q [MN];

  cdft_out_buf #(.M(M), .N(N)) dut (
    .clk, .core_sel, .h_req, .h_rdata, .c_we, .c_addr, .c_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_read(int idx, bit im, output sample_t d);
    h_req = '{en: 1'b1, we: 1'b0, im: im, addr: 16'(idx), wdata: '0};
    @(negedge clk);
    h_req = '0;
    d = h_rdata;
  endtask

  initial begin
    sample_t d;
    core_sel = 1'b0; h_req = '0; c_we = 1'b0; c_addr = '0; c_data = '0;
    @(negedge clk);
    for (int round = 0; round < 3; round++) begin
      core_sel = 1'b1;
      for (int k = 0; k < MN; k++) begin
        int i;
        i = (k * 7 + round) % MN;     // 7 is coprime with 24: a permutation
        ref_q[i].re = $urandom;
        ref_q[i].im = $urandom;
        c_we = 1'b1; c_addr = 5'(i); c_data = ref_q[i];
        @(negedge clk);
      end
      c_we = 1'b0;
      core_sel = 1'b0;
      // writes that must be ignored: host writes, and engine writes while idle
      h_req = '{en: 1'b1, we: 1'b1, im: 1'b0, addr: 16'd3, wdata: 32'h1234_5678};
      @(negedge clk);
      h_req = '0;
      c_we = 1'b1; c_addr = 5'd5; c_data = '{re: 32'h0bad_0bad, im: 32'h0bad_0bad};
      @(negedge clk);
      c_we = 1'b0;
      for (int i = 0; i < MN; i++) begin
        host_read(i, 1'b0, d);
        checks++;
        if (d != ref_q[i].re) begin failures++; $display("re %0d: %h vs %h", i, d, ref_q[i].re); end
        host_read(i, 1'b1, d);
        checks++;
        if (d != ref_q[i].im) begin failures++; $display("im %0d: %h vs %h", i, d, ref_q[i].im); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
