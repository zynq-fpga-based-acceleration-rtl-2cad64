// cdft_ctrl: start/done controller and loop sequencer of the CDFT engine.
//
// The host starts a run with a one-cycle 'start' pulse, the engine computes,
// and the host waits for 'done'. The controller latches the mode (DFT or
// IDFT) at start and then walks the transform loops as one flattened,
// pipelined loop with an initiation interval of one: every cycle it issues
// one step (u, v, c), where (u, v) is the output frequency point and c the
// chunk of LANES input samples handled in parallel in that cycle. Order is u
// outermost, then v, then c, so the chunks of one output point are issued back
// to back ('first' marks c = 0, 'last' marks the final chunk). After the last
// step it counts DRAIN cycles while the pipeline behind it empties, then
// pulses 'done' for one cycle: done is high DRAIN+2 cycles after the cycle
// of the last step, and busy is already low in that cycle. A start while
// busy is ignored.
//
// Timing: the first step is issued the cycle after 'start'; a run of an
// M x N transform takes M*N*(M*N/LANES) issue cycles plus DRAIN.
module cdft_ctrl
  import cdft_pkg::*;
#(
  parameter int unsigned M     = 32,
  parameter int unsigned N     = 32,
  parameter int unsigned LANES = 4,
  parameter int unsigned DRAIN = 4,
  localparam int unsigned CH = (M * N) / LANES,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  mode_e         mode_in,
  output logic          busy,
  output logic          done,
  output mode_e         mode,
  output logic          iss_valid,
  output logic          iss_first,
  output logic          iss_last,
  output logic [MW-1:0] iss_u,
  output logic [NW-1:0] iss_v,
  output logic [CW-1:0] iss_c
);

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_DRAIN } state_e;

  state_e      state;
  logic [7:0]  drain_cnt;
  logic        c_wrap, v_wrap, u_wrap;

  always_comb begin
    c_wrap    = (iss_c == CW'(CH - 1));
    v_wrap    = (iss_v == NW'(N - 1));
    u_wrap    = (iss_u == MW'(M - 1));
    iss_valid = (state == S_RUN);
    iss_first = iss_valid && (iss_c == '0);
    iss_last  = iss_valid && c_wrap;
    busy      = (state != S_IDLE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      mode      <= MODE_DFT;
      iss_u     <= '0;
      iss_v     <= '0;
      iss_c     <= '0;
      drain_cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode  <= mode_in;
            iss_u <= '0;
            iss_v <= '0;
            iss_c <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (!c_wrap) begin
            iss_c <= iss_c + 1'b1;
          end else begin
            iss_c <= '0;
            if (!v_wrap) begin
              iss_v <= iss_v + 1'b1;
            end else begin
              iss_v <= '0;
              if (!u_wrap) begin
                iss_u <= iss_u + 1'b1;
              end else begin
                iss_u     <= '0;
                drain_cnt <= 8'(DRAIN);
                state     <= S_DRAIN;
              end
            end
          end
        end
        S_DRAIN: begin
          if (drain_cnt == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            drain_cnt <= drain_cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // LANES must split the M*N samples into whole chunks.
  initial assert ((M * N) % LANES == 0)
    else $error("cdft_ctrl: LANES (%0d) must divide M*N (%0d)", LANES, M * N);

  // Steps are only issued while a run is in progress.
  a_issue_busy: assert property (@(posedge clk) disable iff (!rst_n) iss_valid |-> busy);

endmodule
