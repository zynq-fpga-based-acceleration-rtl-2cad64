// cdft_sp_ram: single-port synchronous RAM, one read or write per cycle.
//
// A write stores wdata at addr. A read returns the word at addr on rdata one
// clock later; rdata holds its value on cycles without a read. The array is
// written so that FPGA tools map it onto block RAM (or registers when DEPTH
// is 1). Contents are not reset; the buffers above only read words that were
// written first.
module cdft_sp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
