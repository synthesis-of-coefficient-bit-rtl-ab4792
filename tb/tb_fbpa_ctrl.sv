// Self-checking testbench for fbpa_ctrl (K=3, N=4).
//
// Checks that INIT lasts exactly K*N cycles and raises loaded, that start
// is refused before loading, that start pulses clear for one cycle and
// enters RUN, that the folding order counts 0..N-1 and stays aligned with
// the number of RUN cycles across stop/start, that x_take comes at every
// chain start from the second one on and y_valid from the (K+1)-th one on,
// and that load during RUN restarts INIT.
module tb_fbpa_ctrl;
  import fbpa_pkg::*;

  localparam int K = 3, N = 4, L = K * N;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, load, start, stop;
  mode_e mode;
  logic loaded, clear, chain_start, x_take, y_valid;
  logic [1:0] order;

  int checks = 0, failures = 0;

  fbpa_ctrl #(.K(K), .N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int run_cycles;   // RUN cycles since the end of the last INIT

  // Checks the RUN outputs for n cycles; chains counts chain starts
  // since start.
  task automatic run_for(int n, ref int chains);
    for (int i = 0; i < n; i++) begin
      check(mode == MODE_RUN, "in RUN");
      check(order == 2'(run_cycles % N), $sformatf("order %0d after %0d run cycles", order, run_cycles));
      check(chain_start == (run_cycles % N == 0), "chain_start at order 0");
      check(x_take == (run_cycles % N == 0 && chains >= 1), "x_take from second chain");
      check(y_valid == (run_cycles % N == 0 && chains >= K), "y_valid from chain K+1");
      check(!clear, "no clear in RUN");
      if (run_cycles % N == 0) chains++;
      run_cycles++;
      @(negedge clk);
    end
  endtask

  task automatic do_init();
    load = 1;
    @(negedge clk);
    load = 0;
    for (int i = 0; i < L; i++) begin
      check(mode == MODE_INIT && !loaded, $sformatf("INIT cycle %0d", i));
      @(negedge clk);
    end
    check(mode == MODE_IDLE && loaded, "loaded after K*N cycles");
    run_cycles = 0;
  endtask

  task automatic do_start();
    start = 1;
    #1;
    check(clear, "clear with start");
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    int chains;
    rst_n = 0; load = 0; start = 0; stop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(mode == MODE_IDLE && !loaded, "idle after reset");
    // start before load is ignored
    start = 1;
    #1 check(!clear, "no clear before loading");
    @(negedge clk);
    start = 0;
    check(mode == MODE_IDLE, "still idle");

    do_init();
    do_start();
    chains = 0;
    run_for(30, chains);
    // stop in the middle of a period, wait, resume
    stop = 1;
    @(negedge clk);
    stop = 0;
    run_cycles++;   // the stop cycle itself was a RUN cycle
    repeat (3) begin
      check(mode == MODE_IDLE && !chain_start && !x_take && !y_valid, "idle after stop");
      @(negedge clk);
    end
    do_start();
    chains = 0;
    run_for(25, chains);
    // reload while running
    do_init();
    do_start();
    chains = 0;
    run_for(20, chains);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
