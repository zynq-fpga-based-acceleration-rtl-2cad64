// cdft_twiddle_rom: cosine / sine lookup table of the 2-D DFT, with one read
// port per MAC lane.
//
// The accelerator replaces every sin/cos evaluation of the transform with a
// table lookup. The angle of a term is theta = 2*pi*(u*x/M + v*y/N). Because
// both fractions are periodic, the table only needs the M*N distinct angles
// 2*pi*(a/M + b/N) with a = (u*x) mod M and b = (v*y) mod N; entry (a, b)
// holds cos(theta) and sin(theta) rounded to 18-bit fixed point (16 fraction
// bits). This stores the same values as a table indexed by (u, v, x, y), in
// M*N entries instead of (M*N)^2; the folding is this design's choice. The
// table is computed when the design is elaborated, so no data file is needed.
//
// Interface: NPORTS independent read ports. Port p takes (a[p], b[p]) and
// returns the twiddle on tw[p] one clock after a cycle with en high (a
// registered ROM read, as a block-RAM ROM would give). The table is split
// into one copy per port, as many ports as reads are needed per cycle.
module cdft_twiddle_rom
  import cdft_pkg::*;
#(
  parameter int unsigned M      = 32,
  parameter int unsigned N      = 32,
  parameter int unsigned NPORTS = 4,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic [MW-1:0]    a  [NPORTS],
  input  logic [NW-1:0]    b  [NPORTS],
  output twiddle_t         tw [NPORTS]
);

  localparam real PI = 3.14159265358979323846;

  typedef coef_t table_t [M*N];

  function automatic coef_t quant(real v);
    return coef_t'($rtoi($floor(v * real'(1 << COEF_FRAC) + 0.5)));
  endfunction

  // Entry k = a*N + b holds the value at angle 2*pi*(a/M + b/N); sin_tab
  // selects the sine, otherwise the cosine.
  function automatic table_t make_table(bit sin_tab);
    table_t t;
    for (int k = 0; k < int'(M * N); k++) begin
      real th;
      th = 2.0 * PI * (real'(k / int'(N)) / real'(M) + real'(k % int'(N)) / real'(N));
      t[k] = sin_tab ? quant($sin(th)) : quant($cos(th));
    end
    return t;
  endfunction

  localparam table_t COS_LUT = make_table(1'b0);
  localparam table_t SIN_LUT = make_table(1'b1);

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    always_ff @(posedge clk) begin
      if (en) begin
        tw[p].cos_v <= COS_LUT[int'(a[p]) * int'(N) + int'(b[p])];
        tw[p].sin_v <= SIN_LUT[int'(a[p]) * int'(N) + int'(b[p])];
      end
    end
  end

endmodule
