// Self-checking testbench for fbpa (K=3, N=4, 5-bit input words).
//
// The testbench plays the part of the CBRM and the controller: in the
// run cycle with folding order r it drives cbit[s] with bit p of the
// coefficient stream, where p mod K = s and p mod N = r, starts a chain at
// every order 0 and writes x[m] at the (m+1)-th chain start. Results are
// compared at the (m+K)-th chain start with a direct FIR sum
// y[m] = sum_j c[j]*x[m-j] (x before x[0] taken as 0). Every coefficient
// split kc*mc = 12 allowed by (kc-1)*mc >= N is run: (2,6), (3,4), (4,3),
// (6,2), (12,1), with random stalls (run low) in between. For (2,6) the
// weighted input word used by each section along the chain of y[1] is
// checked step by step against the published data-flow example. The distance
// from the write of x[m] to y[m] must be L - N = 8 run cycles.
module tb_fbpa;
  import fbpa_pkg::*;

  localparam int K = 3, N = 4, XW = 5, L = K * N, YW = XW + L;
  localparam int CW = $clog2(L + 1);
  localparam int NOUT = 30;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, run, clear, chain_start, x_we;
  logic [CW-1:0] mc, kc;
  logic [K-1:0]  cbit;
  logic [XW-1:0] x_in;
  logic [YW-1:0] y_out;

  int checks = 0, failures = 0;

  fbpa #(.K(K), .N(N), .XW(XW)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned coef [L];
  int unsigned xs [NOUT + 4];
  logic        stream [L];
  int          xw_time [NOUT + 4];

  function automatic longint ref_y(int m, int nkc);
    longint acc = 0;
    for (int j = 0; j < nkc; j++)
      if (m - j >= 0) acc += longint'(coef[j]) * longint'(xs[m - j]);
    return acc;
  endfunction

  task automatic run_config(int nkc, int nmc);
    int tau, chains, nx, ny;
    // coefficients and stream: bits of c[kc-1] LSB first, ..., c[0]
    for (int j = 0; j < nkc; j++) coef[j] = $urandom_range(0, (1 << nmc) - 1);
    for (int p = 0; p < L; p++) stream[p] = 1'((coef[nkc - 1 - p / nmc] >> (p % nmc)) & 1);
    foreach (xs[i]) xs[i] = $urandom_range(0, (1 << XW) - 1);
    kc = CW'(nkc); mc = CW'(nmc);
    @(negedge clk);
    clear = 1; run = 0;
    @(negedge clk);
    clear = 0;
    tau = 0; chains = 0; nx = 0; ny = 0;
    while (ny < NOUT) begin
      // random stall cycle: nothing may move
      if ($urandom_range(0, 9) == 0) begin
        run = 0; x_we = 0; chain_start = 0; cbit = '1;
        @(negedge clk);
        continue;
      end
      run = 1;
      chain_start = (tau % N == 0);
      for (int s = 0; s < K; s++) cbit[s] = stream[crt_pos(s, tau % N, K, N)];
      x_we = chain_start && chains >= 1;
      x_in = x_we ? XW'(xs[nx]) : XW'($urandom);
      if (x_we) begin xw_time[nx] = tau; nx++; end
      // Worked example (kc=2, mc=6): the chain of y[1] begins when x[0] is
      // written and runs through S0, S1, S2, S0, ... using x[0]*2^d for
      // d = 0..5 (bits of c[1]) and then x[1]*2^(d-6) (bits of c[0]).
      if (nkc == 2 && nx >= 1 && tau - xw_time[0] < L) begin
        automatic int d = tau - xw_time[0];
        automatic int w = (d < nmc) ? xs[0] : xs[1];
        #1;
        check(dut.xop_d[d % K] == YW'(longint'(w) << (d % nmc)),
              $sformatf("data flow of y[1]: step %0d on S%0d", d, d % K));
      end
      if (chain_start && chains >= K) begin
        check(longint'(y_out) == ref_y(ny, nkc),
              $sformatf("kc=%0d mc=%0d y[%0d]=%0d expected %0d", nkc, nmc, ny, y_out, ref_y(ny, nkc)));
        check(tau - xw_time[ny] == L - N,
              $sformatf("latency of y[%0d] = %0d", ny, tau - xw_time[ny]));
        ny++;
      end
      if (chain_start) chains++;
      @(negedge clk);
      tau++;
    end
    run = 0;
  endtask

  initial begin
    rst_n = 0; run = 0; clear = 0; chain_start = 0; x_we = 0; x_in = '0;
    cbit = '0; mc = CW'(6); kc = CW'(2);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_config(2, 6);
    run_config(3, 4);
    run_config(4, 3);
    run_config(6, 2);
    run_config(12, 1);
    run_config(2, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
