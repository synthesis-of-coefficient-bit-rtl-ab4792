// fbpa_ctrl -- mode and timing controller for the CBRM and the folded array.
//
// Three states: IDLE (nothing moves), INIT (the CBRM shifts in one
// coefficient bit per cycle) and RUN (the CBRM rotates and the array
// computes).
//   load   in any state starts INIT. INIT lasts exactly K*N cycles, one
//          coefficient bit per cycle, then returns to IDLE with loaded = 1.
//   start  in IDLE with loaded = 1 pulses clear (the array is emptied)
//          and enters RUN in the next cycle.
//   stop   in RUN returns to IDLE; a later start resumes without reload.
// The folding order r (0..N-1) advances once per RUN cycle and is reset
// to 0 when INIT ends, so that it stays aligned with the CBRM rows, which
// also move only in RUN. In RUN:
//   chain_start = (r == 0): the array starts a new output chain,
//   x_take      = chain_start from the second chain after start on: the
//                 input word x[m] is sampled at the (m+1)-th chain start,
//   y_valid     = chain_start from the (K+1)-th chain after start on:
//                 y[m] is presented at the (m+K)-th chain start.
// So after start an input word is taken every N cycles and, L - N cycles
// after the first one, an output appears every N cycles.
//
// Follows the document: the two modes, the K*N-cycle initialization, a
// new input word and a new result every N cycles and the L - N latency.
// This design's own choices: the idle state, the load/start/stop
// handshake and the counters.
module fbpa_ctrl
  import fbpa_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter int unsigned N = 4,
  localparam int unsigned L  = K * N,
  localparam int unsigned TW = $clog2(L + 1),
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CCW = $clog2(K + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          start,
  input  logic          stop,
  output mode_e         mode,
  output logic          loaded,
  output logic          clear,
  output logic [RW-1:0] order,
  output logic          chain_start,
  output logic          x_take,
  output logic          y_valid
);

  logic [TW-1:0]  init_cnt;
  logic [CCW-1:0] chains;   // chains started since start, saturates at K+1

  assign clear       = (mode == MODE_IDLE) && start && loaded && !load;
  assign chain_start = (mode == MODE_RUN) && (order == '0);
  assign x_take      = chain_start && (chains >= CCW'(1));
  assign y_valid     = chain_start && (chains >= CCW'(K));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= MODE_IDLE;
      loaded   <= 1'b0;
      init_cnt <= '0;
      order    <= '0;
      chains   <= '0;
    end else if (load) begin
      mode     <= MODE_INIT;
      loaded   <= 1'b0;
      init_cnt <= '0;
    end else begin
      unique case (mode)
        MODE_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (init_cnt == TW'(L - 1)) begin
            mode   <= MODE_IDLE;
            loaded <= 1'b1;
            order  <= '0;
          end
        end
        MODE_IDLE: begin
          if (clear) begin
            mode   <= MODE_RUN;
            chains <= '0;
          end
        end
        MODE_RUN: begin
          order <= (order == RW'(N - 1)) ? '0 : order + 1'b1;
          if (chain_start && chains != CCW'(K + 1)) chains <= chains + 1'b1;
          if (stop) mode <= MODE_IDLE;
        end
        default: mode <= MODE_IDLE;
      endcase
    end
  end

  // A run needs a complete initialization first.
  a_run_loaded: assert property (@(posedge clk) disable iff (!rst_n)
                                 mode == MODE_RUN |-> loaded)
    else $error("fbpa_ctrl: running without loaded coefficients");

endmodule
