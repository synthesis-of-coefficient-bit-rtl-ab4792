// Test helper: drives one fbpa_top of size K x N through every
// coefficient split kc*mc = K*N with (kc-1)*mc >= N. For each split it
// loads random coefficients serially, runs NOUT outputs with random input
// words and compares them with a direct FIR sum, checking the L - N
// latency and the one-result-per-N-cycles rate. Reports its counts on
// its ports and raises done at the end.
module fbpa_top_exerciser #(
  parameter int K = 3,
  parameter int N = 4,
  parameter int XW = 5,
  parameter int NOUT = 25
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   splits,
  output logic done
);
  localparam int L = K * N, YW = XW + L, CW = $clog2(L + 1);

  logic rst_n, load, coef_bit, start, stop;
  logic [CW-1:0] mc, kc;
  logic [XW-1:0] x_in;
  logic loaded, x_take, y_valid;
  logic [YW-1:0] y_out;

  fbpa_top #(.K(K), .N(N), .XW(XW)) dut (.*);

  int unsigned coef [L];
  int unsigned xs [NOUT + 2 * K + 2];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL (K=%0d N=%0d): %s", K, N, what); end
  endtask

  function automatic longint ref_y(int m, int nkc);
    longint acc = 0;
    for (int j = 0; j < nkc; j++)
      if (m - j >= 0) acc += longint'(coef[j]) * longint'(xs[m - j]);
    return acc;
  endfunction

  task automatic one_split(int nkc, int nmc);
    int tau, nx, ny, last_y;
    int xt [NOUT + 2 * K + 2];
    for (int j = 0; j < nkc; j++) coef[j] = $urandom_range(0, (1 << nmc) - 1);
    foreach (xs[i]) xs[i] = $urandom_range(0, (1 << XW) - 1);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int p = 0; p < L; p++) begin
      coef_bit = 1'((coef[nkc - 1 - p / nmc] >> (p % nmc)) & 1);
      @(negedge clk);
    end
    check(loaded, "loaded after K*N cycles");
    kc = CW'(nkc); mc = CW'(nmc);
    start = 1;
    @(negedge clk);
    start = 0;
    tau = 0; nx = 0; ny = 0; last_y = -1;
    while (ny < NOUT) begin
      x_in = x_take ? XW'(xs[nx]) : XW'($urandom);
      if (x_take) begin xt[nx] = tau; nx++; end
      #1;
      if (y_valid) begin
        check(longint'(y_out) == ref_y(ny, nkc),
              $sformatf("kc=%0d mc=%0d y[%0d]=%0d expected %0d", nkc, nmc, ny, y_out, ref_y(ny, nkc)));
        check(tau - xt[ny] == L - N, "latency L - N");
        if (last_y >= 0) check(tau - last_y == N, "one output every N cycles");
        last_y = tau; ny++;
      end
      @(negedge clk);
      tau++;
    end
    stop = 1;
    @(negedge clk);
    stop = 0;
    splits++;
  endtask

  initial begin
    checks = 0; failures = 0; splits = 0; done = 0;
    rst_n = 0; load = 0; coef_bit = 0; start = 0; stop = 0; x_in = '0;
    kc = '0; mc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int nkc = 1; nkc <= L; nkc++)
      if (L % nkc == 0 && (nkc - 1) * (L / nkc) >= N)
        one_split(nkc, L / nkc);
    done = 1;
  end
endmodule
