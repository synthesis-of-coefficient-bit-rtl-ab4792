// End-to-end testbench for fbpa_top at its default size (K=3 folding
// sets, folding factor N=4, 5-bit input words).
//
// For each coefficient split kc*mc = 12 (kc, mc) = (2,6), (3,4), (4,3),
// (6,2), (12,1) the testbench loads random coefficients bit-serially,
// starts the filter, feeds random input words at every x_take and
// compares every y_valid output with y[m] = sum_j c[j]*x[m-j] computed
// here. It also checks the timing: K*N cycles of initialization, one
// input and one output every N cycles, and L - N = 8 cycles from x[m]
// to y[m]. The (2,6) case is the worked example with two 6-bit
// coefficients, where y[0] = c0*x0 and y[1] = c1*x0 + c0*x1.
// Mechanisms counted, each of which must happen at least once:
// initialization, run, reconfiguration to another (kc, mc), stop and
// resume with the same coefficients, reload while running, and a
// coefficient change in mid-chain on a section other than S0.
module tb_fbpa_top;
  import fbpa_pkg::*;

  localparam int K = 3, N = 4, XW = 5, L = K * N, YW = XW + L;
  localparam int CW = $clog2(L + 1);
  localparam int NOUT = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, load, coef_bit, start, stop;
  logic [CW-1:0] mc, kc;
  logic [XW-1:0] x_in;
  logic loaded, x_take, y_valid;
  logic [YW-1:0] y_out;

  int checks = 0, failures = 0;
  int n_init = 0, n_run = 0, n_reconfig = 0, n_resume = 0, n_reload = 0, n_midswitch = 0;

  fbpa_top dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Observed in the array: a section other than S0 loading a new input
  // word in mid-chain (bit index back to 0 at a coefficient boundary).
  always @(posedge clk)
    if (rst_n && dut.u_fbpa.run)
      for (int s = 1; s < K; s++)
        if (dut.u_fbpa.bi_d[s] == '0) n_midswitch++;

  int unsigned coef [L];
  int unsigned xs [NOUT + 8];
  int cur_kc, cur_mc;

  function automatic longint ref_y(int m);
    longint acc = 0;
    for (int j = 0; j < cur_kc; j++)
      if (m - j >= 0) acc += longint'(coef[j]) * longint'(xs[m - j]);
    return acc;
  endfunction

  // Serial load of kc coefficients of mc bits: c[kc-1] first, LSB first.
  task automatic load_coefs(int nkc, int nmc);
    int cyc;
    for (int j = 0; j < nkc; j++) coef[j] = $urandom_range(0, (1 << nmc) - 1);
    if (cur_kc != 0 && (nkc != cur_kc)) n_reconfig++;
    cur_kc = nkc; cur_mc = nmc;
    load = 1;
    @(negedge clk);
    load = 0;
    cyc = 0;
    for (int p = 0; p < L; p++) begin
      coef_bit = 1'((coef[nkc - 1 - p / nmc] >> (p % nmc)) & 1);
      check(!loaded, "not loaded during initialization");
      @(negedge clk);
      cyc++;
    end
    coef_bit = 1'b0;
    check(loaded && cyc == L, "loaded after K*N cycles");
    n_init++;
  endtask

  // Start, feed inputs and check nout outputs.
  task automatic run_outputs(int nout);
    int tau, nx, ny, last_x, last_y;
    int xt [NOUT + 8];
    foreach (xs[i]) xs[i] = $urandom_range(0, (1 << XW) - 1);
    kc = CW'(cur_kc); mc = CW'(cur_mc);
    start = 1;
    @(negedge clk);
    start = 0;
    tau = 0; nx = 0; ny = 0; last_x = -1; last_y = -1;
    while (ny < nout) begin
      if (x_take) begin
        x_in = XW'(xs[nx]);
        if (last_x >= 0) check(tau - last_x == N, "one input every N cycles");
        xt[nx] = tau; last_x = tau; nx++;
      end else begin
        x_in = XW'($urandom);
      end
      #1;
      if (y_valid) begin
        check(longint'(y_out) == ref_y(ny),
              $sformatf("kc=%0d mc=%0d y[%0d]=%0d expected %0d", cur_kc, cur_mc, ny, y_out, ref_y(ny)));
        check(tau - xt[ny] == L - N, $sformatf("latency of y[%0d] is %0d", ny, tau - xt[ny]));
        if (last_y >= 0) check(tau - last_y == N, "one output every N cycles");
        last_y = tau; ny++;
      end
      @(negedge clk);
      tau++;
    end
    n_run++;
  endtask

  task automatic do_stop();
    stop = 1;
    @(negedge clk);
    stop = 0;
    repeat (3) begin
      check(!y_valid && !x_take, "quiet while stopped");
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 0; load = 0; coef_bit = 0; start = 0; stop = 0; x_in = '0;
    mc = CW'(6); kc = CW'(2); cur_kc = 0; cur_mc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    load_coefs(2, 6);
    run_outputs(NOUT);
    do_stop();
    run_outputs(NOUT);          // resume with the same coefficients
    n_resume++;
    do_stop();
    load_coefs(3, 4);
    run_outputs(NOUT);
    do_stop();
    load_coefs(4, 3);
    run_outputs(NOUT);
    do_stop();
    load_coefs(6, 2);
    run_outputs(NOUT);
    do_stop();
    load_coefs(12, 1);
    run_outputs(NOUT);
    // reload while running: no stop first
    load_coefs(2, 6);
    n_reload++;
    run_outputs(NOUT);

    $display("mechanisms: init=%0d run=%0d reconfig=%0d resume=%0d reload_while_running=%0d mid_chain_switch_off_S0=%0d",
             n_init, n_run, n_reconfig, n_resume, n_reload, n_midswitch);
    check(n_init > 0, "initialization happened");
    check(n_run > 0, "run happened");
    check(n_reconfig > 0, "reconfiguration happened");
    check(n_resume > 0, "resume happened");
    check(n_reload > 0, "reload while running happened");
    check(n_midswitch > 0, "mid-chain coefficient switch off S0 happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
