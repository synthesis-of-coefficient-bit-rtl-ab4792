// fbpa_top -- programmable folded bit-plane FIR filter with its
// coefficient bit reordering module.
//
// Computes y[m] = sum_{j=0}^{kc-1} c[j] * x[m-j] on K folding sets with
// folding factor N, for any number of coefficients kc and coefficient
// length mc with kc*mc = K*N (and (kc-1)*mc >= N). Three parts:
//   fbpa_ctrl  modes, folding order and strobes,
//   cbrm       K x N bit array that reorders the serial coefficient bits
//              and feeds one bit per folding set per cycle,
//   fbpa       the ring of K arithmetic sections.
//
// Use:
//   1. Pulse load, then present one coefficient bit per cycle on
//      coef_bit for K*N cycles, starting in the cycle after load: bits of
//      c[kc-1] least significant first, then c[kc-2], ..., c[0]. loaded
//      rises when the last bit has been taken.
//   2. Set mc and kc, pulse start. From then on x_take is high once every
//      N cycles: present x[0], x[1], ... on x_in in those cycles (the
//      first x_take comes N cycles after the first chain start).
//   3. y_out carries y[m] in the cycle y_valid is high, one result every
//      N cycles, L - N cycles after x[m] was taken.
//   stop pauses in IDLE; start resumes with empty history and the same
//   coefficients; load replaces the coefficients.
// All ports are synchronous to the rising edge of clk; rst_n is a
// synchronous active-low reset.
//
// Follows the document: the partition into the folded array and the
// CBRM, the K*N-cycle bit-serial initialization and the run mode.
// This design's own choices: the controller and the port protocol.
module fbpa_top
  import fbpa_pkg::*;
#(
  parameter int unsigned K  = 3,
  parameter int unsigned N  = 4,
  parameter int unsigned XW = 5,
  parameter int unsigned YW = XW + K * N,
  localparam int unsigned CW = $clog2(K * N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          coef_bit,
  input  logic          start,
  input  logic          stop,
  input  logic [CW-1:0] mc,
  input  logic [CW-1:0] kc,
  input  logic [XW-1:0] x_in,
  output logic          loaded,
  output logic          x_take,
  output logic [YW-1:0] y_out,
  output logic          y_valid
);

  mode_e          mode;
  logic           clear;
  logic           chain_start;
  logic [K-1:0]   cbit;

  fbpa_ctrl #(.K(K), .N(N)) u_ctrl (
    .clk, .rst_n, .load, .start, .stop,
    .mode, .loaded, .clear, .order(), .chain_start, .x_take, .y_valid
  );

  cbrm #(.K(K), .N(N)) u_cbrm (
    .clk, .rst_n, .mode, .serial_in(coef_bit), .cbit
  );

  fbpa #(.K(K), .N(N), .XW(XW), .YW(YW)) u_fbpa (
    .clk, .rst_n,
    .run(mode == MODE_RUN), .clear, .chain_start,
    .mc, .kc, .cbit,
    .x_we(x_take), .x_in,
    .y_out
  );

endmodule
