// cdft_axil: AXI4-Lite slave through which the processor drives the CDFT.
//
// The processor copies input samples into the accelerator's buffers, writes
// the mode, sets start, polls until the run is done and copies the results
// back. This slave gives all of that one memory map (32-bit words, byte
// addresses):
//
//   0x0_0000  CTRL  write bit0 = 1: start a run (ignored while busy)
//                   read  bit0 busy, bit1 done (sticky; cleared by a read of
//                         CTRL or by the next start), bit2 idle
//   0x0_0004  MODE  bit0: 0 = DFT, 1 = IDFT (read/write)
//   0x0_0008  SIZE  read only: M in bits 15:0, N in bits 31:16
//   0x1_0000 + 4*i  input  sample i, real part      (i = x*N + y)
//   0x2_0000 + 4*i  input  sample i, imaginary part
//   0x3_0000 + 4*i  output point i, real part       (i = u*N + v), read only
//   0x4_0000 + 4*i  output point i, imaginary part,  read only
//
// A buffer access while the engine runs, a write to the output buffer, an
// index of M*N or above, or an unmapped address completes with SLVERR and has
// no effect. Partial writes (wstrb other than all ones) are written as whole
// words. The register layout, error rule and byte-lane rule are this design's
// choices; the description only gives the start / wait-for-done protocol and
// memory-mapped buffers.
//
// Timing: one transaction at a time. A write is accepted when address and data
// are both valid and answered on B the next cycle; a register read is answered
// the cycle after acceptance, a buffer read one cycle later. Writes win over
// reads when both are pending.
module cdft_axil
  import cdft_pkg::*;
#(
  parameter int unsigned M      = 32,
  parameter int unsigned N      = 32,
  parameter int unsigned ADDR_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // engine control
  output logic              start,
  output mode_e             mode,
  input  logic              busy,
  input  logic              done,
  // buffer access
  output host_req_t         ib_req,
  input  sample_t           ib_rdata,
  output host_req_t         ob_req,
  input  sample_t           ob_rdata
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  typedef enum logic [1:0] { ST_IDLE, ST_BRESP, ST_RWAIT, ST_RDATA } state_e;
  typedef enum logic [2:0] {
    RG_REGS = 3'd0, RG_IN_RE = 3'd1, RG_IN_IM = 3'd2, RG_OUT_RE = 3'd3, RG_OUT_IM = 3'd4
  } region_e;

  typedef struct packed {
    logic        ok;      // address is mapped and the access is allowed
    logic        buf_in;  // input buffer
    logic        buf_out; // output buffer
    logic        im;      // imaginary word
    logic [15:0] index;   // sample index or register number
  } decode_t;

  state_e  state;
  logic    done_flag;
  logic    rd_out;       // pending buffer read is from the output buffer
  decode_t wdec, rdec;
  logic    wr_go, rd_go;

  // Decode one address for a write (is_wr) or a read.
  function automatic decode_t decode(logic [ADDR_W-1:0] addr, logic is_wr, logic eng_busy);
    decode_t d;
    logic [3:0] region;
    region   = 4'(addr >> 16);
    d.index  = 16'(addr[15:2]);
    d.im     = (region == 4'(RG_IN_IM)) || (region == 4'(RG_OUT_IM));
    d.buf_in  = (region == 4'(RG_IN_RE))  || (region == 4'(RG_IN_IM));
    d.buf_out = (region == 4'(RG_OUT_RE)) || (region == 4'(RG_OUT_IM));
    if (region == 4'(RG_REGS)) begin
      d.ok = (d.index < 16'd3) && (!is_wr || d.index < 16'd2);
    end else if (d.buf_in || d.buf_out) begin
      d.ok = !eng_busy && (32'(d.index) < M * N) && !(is_wr && d.buf_out);
    end else begin
      d.ok = 1'b0;
    end
    return d;
  endfunction

  always_comb begin
    wdec  = decode(s_axi_awaddr, 1'b1, busy);
    rdec  = decode(s_axi_araddr, 1'b0, busy);
    wr_go = (state == ST_IDLE) && s_axi_awvalid && s_axi_wvalid;
    rd_go = (state == ST_IDLE) && !wr_go && s_axi_arvalid;
    s_axi_awready = wr_go;
    s_axi_wready  = wr_go;
    s_axi_arready = rd_go;

    ib_req       = '0;
    ob_req       = '0;
    ib_req.wdata = s_axi_wdata;
    if (wr_go && wdec.ok && wdec.buf_in) begin
      ib_req.en   = 1'b1;
      ib_req.we   = 1'b1;
      ib_req.im   = wdec.im;
      ib_req.addr = wdec.index;
    end else if (rd_go && rdec.ok && rdec.buf_in) begin
      ib_req.en   = 1'b1;
      ib_req.im   = rdec.im;
      ib_req.addr = rdec.index;
    end
    if (rd_go && rdec.ok && rdec.buf_out) begin
      ob_req.en   = 1'b1;
      ob_req.im   = rdec.im;
      ob_req.addr = rdec.index;
    end
  end

  logic [31:0] reg_rdata;
  always_comb begin
    unique case (rdec.index[1:0])
      2'd0:    reg_rdata = {29'd0, !busy, done_flag, busy};
      2'd1:    reg_rdata = {31'd0, mode == MODE_IDFT};
      default: reg_rdata = {16'(N), 16'(M)};
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      start        <= 1'b0;
      mode         <= MODE_DFT;
      done_flag    <= 1'b0;
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
      s_axi_rresp  <= RESP_OKAY;
      s_axi_rdata  <= '0;
      rd_out       <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      unique case (state)
        ST_IDLE: begin
          if (wr_go) begin
            s_axi_bresp  <= wdec.ok ? RESP_OKAY : RESP_SLVERR;
            s_axi_bvalid <= 1'b1;
            state        <= ST_BRESP;
            if (wdec.ok && !wdec.buf_in && !wdec.buf_out) begin
              if (wdec.index == 16'd0 && s_axi_wdata[0] && !busy) begin
                start     <= 1'b1;
                done_flag <= 1'b0;
              end
              if (wdec.index == 16'd1) mode <= mode_e'(s_axi_wdata[0]);
            end
          end else if (rd_go) begin
            s_axi_rresp <= rdec.ok ? RESP_OKAY : RESP_SLVERR;
            if (rdec.ok && (rdec.buf_in || rdec.buf_out)) begin
              rd_out <= rdec.buf_out;
              state  <= ST_RWAIT;
            end else begin
              s_axi_rdata  <= rdec.ok ? reg_rdata : '0;
              s_axi_rvalid <= 1'b1;
              state        <= ST_RDATA;
              if (rdec.ok && rdec.index == 16'd0 && !done) done_flag <= 1'b0;
            end
          end
        end
        ST_BRESP: begin
          if (s_axi_bready) begin
            s_axi_bvalid <= 1'b0;
            state        <= ST_IDLE;
          end
        end
        ST_RWAIT: begin
          s_axi_rdata  <= rd_out ? ob_rdata : ib_rdata;
          s_axi_rvalid <= 1'b1;
          state        <= ST_RDATA;
        end
        ST_RDATA: begin
          if (s_axi_rready) begin
            s_axi_rvalid <= 1'b0;
            state        <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // AXI rule: a response stays valid, and unchanged, until it is taken.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
