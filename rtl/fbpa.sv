// fbpa -- folded bit-plane FIR array, word-level model.
//
// Computes y[m] = c[0]*x[m] + c[1]*x[m-1] + ... + c[kc-1]*x[m-kc+1] on K
// sections (folding sets S0..S(K-1)) connected in a ring, with folding
// factor N. The unfolded computation has L = K*N = kc*mc operations in a
// row: operation p multiplies an input word by one coefficient bit, bit
// (p mod mc) of coefficient c[kc-1-p/mc], and adds it to a running sum.
// Operation p runs on section p mod K at folding order p mod N.
//
// One output is built by a "chain": a partial sum that starts at S0 at
// folding order 0 and moves one section to the right per cycle, wrapping
// from S(K-1) back to S0, for L cycles. A new chain starts every N cycles,
// so K chains are in flight at once, each on a different section. Each
// section registers, for the chain passing through it:
//   sum_q  the partial sum,
//   xop_q  the weighted input word x*2^i used by the last operation,
//   bi_q   the bit index i of that operation (0..mc-1),
//   xi_q   the history address of the input word in use.
// Per operation the section doubles the incoming weighted word (the x2 on
// the input-data path), or, at the first bit of a coefficient (i = 0),
// loads a fresh input word from the history; it adds the weighted word to
// the sum when the coefficient bit cbit[s] from the CBRM is 1. When a
// chain leaves S(K-1) at the end of folding order N-1 it has completed
// all L operations; at order 0 its sum is the output y and S0 starts a new
// chain from zero.
//
// Interface and timing (all synchronous to clk, active when run = 1):
//   chain_start  1 in every cycle of folding order 0: S0 starts a chain.
//   x_we, x_in   an input word written to the history; in the same cycle
//                it is visible to the sections (write-through).
//   y_out        the completed sum, meaningful in chain_start cycles.
//   clear        (any cycle, run or not) zeroes the sums and the input history and sets the
//                pointers so that the next chain is y[0] and the next
//                stored word is x[0].
// With x[m] written at the (m+1)-th chain start after clear, y[m] appears
// at the (m+K)-th chain start: L - N cycles after x[m] is written, and
// one new output every N cycles.
// mc (coefficient length) and kc (number of coefficients) are run-time
// configuration with kc*mc = K*N; they must not change while running.
// The input history is written every N cycles and read up to
// (kc-1)*mc cycles later, which requires (kc-1)*mc >= N.
//
// Follows the document: the ring of K sections, the sum path and input
// path with their fold-back from the last section to the first, the zero
// injected at order 0, the output at the end of order N-1, a coefficient
// bit per section per cycle, a new input word loaded at multiples of mc,
// and the latency L - N with one output every N cycles. This design's
// own choices: the word-level arithmetic (unsigned, full width, no
// truncation), the input history buffer and the per-chain bit index and
// history address that travel with the chain.
module fbpa
#(
  parameter int unsigned K  = 3,            // folding sets
  parameter int unsigned N  = 4,            // folding factor
  parameter int unsigned XW = 5,            // input word width
  parameter int unsigned YW = XW + K * N,   // sum / output width
  localparam int unsigned L  = K * N,       // operations per output
  localparam int unsigned CW = $clog2(L + 1),
  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          clear,
  input  logic          chain_start,
  input  logic [CW-1:0] mc,
  input  logic [CW-1:0] kc,
  input  logic [K-1:0]  cbit,
  input  logic          x_we,
  input  logic [XW-1:0] x_in,
  output logic [YW-1:0] y_out
);

  // ---------------- input word history (L words) -------------------------
  logic [XW-1:0] hist [L];
  logic [AW-1:0] wp;         // address of the next word written
  logic [AW-1:0] chain_xi;   // address of x[m-kc+1] for the next chain

  function automatic logic [AW-1:0] inc_addr(logic [AW-1:0] a);
    return (a == AW'(L - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < L; i++) hist[i] <= '0;
      wp       <= '0;
      // (1 - kc) mod L: the first chain reads words before x[0] as zero.
      chain_xi <= (kc <= CW'(1)) ? '0 : AW'(L + 1 - kc);
    end else if (run) begin
      if (x_we) begin
        hist[wp] <= x_in;
        wp       <= inc_addr(wp);
      end
      if (chain_start) chain_xi <= inc_addr(chain_xi);
    end
  end

  // ---------------- sections -----------------------------------------------
  logic [YW-1:0] sum_q [K];
  logic [YW-1:0] xop_q [K];
  logic [CW-1:0] bi_q  [K];
  logic [AW-1:0] xi_q  [K];

  logic [YW-1:0] sum_d [K];
  logic [YW-1:0] xop_d [K];
  logic [CW-1:0] bi_d  [K];
  logic [AW-1:0] xi_d  [K];

  for (genvar s = 0; s < K; s++) begin : g_sec
    // the section this one receives from: the ring wraps S(K-1) -> S0
    localparam int PRV = (s == 0) ? K - 1 : s - 1;
    logic [YW-1:0] sum_in;
    logic [XW-1:0] word;

    always_comb begin
      if (s == 0 && chain_start) begin
        // new chain: operation p = 0
        sum_in  = '0;
        bi_d[s] = '0;
        xi_d[s] = chain_xi;
      end else begin
        sum_in = sum_q[PRV];
        if (bi_q[PRV] + 1'b1 >= mc) begin
          // previous coefficient finished: next word, bit 0
          bi_d[s] = '0;
          xi_d[s] = inc_addr(xi_q[PRV]);
        end else begin
          bi_d[s] = bi_q[PRV] + 1'b1;
          xi_d[s] = xi_q[PRV];
        end
      end
      // history read with write-through of the word written this cycle
      word     = (x_we && xi_d[s] == wp) ? x_in : hist[xi_d[s]];
      xop_d[s] = (bi_d[s] == '0) ? YW'(word) : (xop_q[PRV] << 1);
      sum_d[s] = sum_in + (cbit[s] ? xop_d[s] : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int s = 0; s < K; s++) begin
        sum_q[s] <= '0;
        xop_q[s] <= '0;
        bi_q[s]  <= '0;
        xi_q[s]  <= '0;
      end
    end else if (run) begin
      for (int s = 0; s < K; s++) begin
        sum_q[s] <= sum_d[s];
        xop_q[s] <= xop_d[s];
        bi_q[s]  <= bi_d[s];
        xi_q[s]  <= xi_d[s];
      end
    end
  end

  assign y_out = sum_q[K-1];

  // ---------------- configuration rules ------------------------------------
  property p_cfg_product;
    @(posedge clk) disable iff (!rst_n) run |-> (32'(kc) * 32'(mc) == L);
  endproperty
  property p_cfg_history;
    @(posedge clk) disable iff (!rst_n) run |-> ((32'(kc) - 1) * 32'(mc) >= N);
  endproperty
  a_cfg_product: assert property (p_cfg_product)
    else $error("fbpa: kc*mc must equal K*N");
  a_cfg_history: assert property (p_cfg_history)
    else $error("fbpa: (kc-1)*mc must be at least N");

endmodule
