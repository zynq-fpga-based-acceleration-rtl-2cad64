// tb_cdft_ctrl: checks the issued loop sequence of a 2 x 3 transform with 2
// lanes (3 chunks per point): u outer, v middle, chunk inner, one step per
// cycle with no gaps, first/last flags, the mode latched at start, a start
// while busy ignored, and 'done' exactly DRAIN+2 cycles after the last step.
module tb_cdft_ctrl;
  import cdft_pkg::*;

  localparam int M = 2, N = 3, LANES = 2, CH = 3, DRAIN = 3;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  mode_e mode_in, mode;
  logic iss_valid, iss_first, iss_last;
  logic [0:0] iss_u;
  logic [1:0] iss_v;
  logic [1:0] iss_c;
  int checks = 0, failures = 0;

  cdft_ctrl #(.M(M), .N(N), .LANES(LANES), .DRAIN(DRAIN)) dut (
    .clk, .rst_n, .start, .mode_in, .busy, .done, .mode,
    .iss_valid, .iss_first, .iss_last, .iss_u, .iss_v, .iss_c
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(mode_e md);
    int step = 0;
    int last_step_cyc = -1, cyc = 0;
    start = 1'b1; mode_in = md;
    @(negedge clk);
    start = 1'b0; mode_in = (md == MODE_DFT) ? MODE_IDFT : MODE_DFT; // must be ignored
    chk(busy, "busy after start");
    while (!done && cyc < 200) begin
      if (iss_valid) begin
        int eu, ev, ec;
        eu = step / (N * CH);
        ev = (step / CH) % N;
        ec = step % CH;
        chk(int'(iss_u) == eu && int'(iss_v) == ev && int'(iss_c) == ec,
            $sformatf("step %0d order: got u%0d v%0d c%0d", step, iss_u, iss_v, iss_c));
        chk(iss_first == (ec == 0) && iss_last == (ec == CH - 1),
            $sformatf("step %0d flags", step));
        chk(mode == md, "mode latched");
        chk(last_step_cyc == -1 || last_step_cyc == cyc - 1, "no gap between steps");
        last_step_cyc = cyc;
        step++;
        if (step == 5) start = 1'b1;  // start while busy: ignored
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    chk(step == M * N * CH, $sformatf("issued %0d steps, expected %0d", step, M * N * CH));
    chk(cyc - last_step_cyc == DRAIN + 2, $sformatf("done %0d cycles after last step", cyc - last_step_cyc));
    @(negedge clk);
    chk(!done && !busy && !iss_valid, "idle after done");
    repeat (3) @(negedge clk);
    chk(!busy && !iss_valid, "stays idle");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mode_in = MODE_DFT;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && !iss_valid && !done, "idle after reset");
    run(MODE_DFT);
    run(MODE_IDFT);
    run(MODE_DFT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
