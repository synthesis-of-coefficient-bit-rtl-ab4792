// Self-checking testbench for cbrm.
//
// Part 1 (K=3, N=4, two 6-bit coefficients): for each of the 12 stream
// positions a one-hot bit stream is shifted in, then the array is run for
// 2*N cycles. The single 1 must appear on the folding-set output and at the
// run cycle given by the published bit layout after initialization (three
// rows of four bits, written here as stream positions p = 6*(1-coef)+bit).
// Part 2 (K=2, N=5 and K=5, N=3): random streams, compared with the
// modulo rule p mod K = s, p mod N = r computed in the testbench.
// Idle mode must hold the contents.
module tb_cbrm;
  import fbpa_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Published layout: fig6b(s, r) = stream position stored for folding
  // set s and folding order r.
  function automatic int fig6b(int s, int r);
    case (s)
      0: return (r == 0) ? 0 : (r == 1) ? 9 : (r == 2) ? 6  : 3;
      1: return (r == 0) ? 4 : (r == 1) ? 1 : (r == 2) ? 10 : 7;
      default: return (r == 0) ? 8 : (r == 1) ? 5 : (r == 2) ? 2 : 11;
    endcase
  endfunction

  mode_e        mode_a, mode_b, mode_c;
  logic         sin_a, sin_b, sin_c;
  logic [2:0]   cbit_a;
  logic [1:0]   cbit_b;
  logic [4:0]   cbit_c;

  cbrm #(.K(3), .N(4)) dut_a (.clk, .rst_n, .mode(mode_a), .serial_in(sin_a), .cbit(cbit_a));
  cbrm #(.K(2), .N(5)) dut_b (.clk, .rst_n, .mode(mode_b), .serial_in(sin_b), .cbit(cbit_b));
  cbrm #(.K(5), .N(3)) dut_c (.clk, .rst_n, .mode(mode_c), .serial_in(sin_c), .cbit(cbit_c));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic stream_b [10];
    logic stream_c [15];
    logic [2:0] held;

    mode_a = MODE_IDLE; mode_b = MODE_IDLE; mode_c = MODE_IDLE;
    sin_a = 0; sin_b = 0; sin_c = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- Part 1: published layout, one-hot streams ----
    for (int hot = 0; hot < 12; hot++) begin
      // initialization: 12 cycles, one bit per cycle
      for (int t = 0; t < 12; t++) begin
        @(negedge clk);
        mode_a = MODE_INIT;
        sin_a = (t == hot);
      end
      @(negedge clk);
      mode_a = MODE_IDLE;
      // idle: contents must not move
      held = cbit_a;
      @(negedge clk);
      check(cbit_a == held, "idle mode holds");
      // run: 2*N cycles, output checked before each rotation
      mode_a = MODE_RUN;
      for (int r = 0; r < 8; r++) begin
        for (int s = 0; s < 3; s++)
          check(cbit_a[s] == (fig6b(s, r % 4) == hot),
                $sformatf("layout hot=%0d s=%0d r=%0d", hot, s, r));
        @(negedge clk);
      end
      mode_a = MODE_IDLE;
    end

    // ---- Part 2: random streams against the modulo rule ----
    for (int rep = 0; rep < 20; rep++) begin
      foreach (stream_b[i]) stream_b[i] = 1'($urandom);
      foreach (stream_c[i]) stream_c[i] = 1'($urandom);
      for (int t = 0; t < 15; t++) begin
        @(negedge clk);
        mode_b = (t < 10) ? MODE_INIT : MODE_IDLE;
        sin_b  = (t < 10) ? stream_b[t] : 1'b0;
        mode_c = MODE_INIT;
        sin_c  = stream_c[t];
      end
      @(negedge clk);
      mode_b = MODE_RUN;
      mode_c = MODE_RUN;
      for (int r = 0; r < 15; r++) begin
        for (int s = 0; s < 2; s++)
          check(cbit_b[s] == stream_b[crt_pos(s, r % 5, 2, 5)],
                $sformatf("K2N5 rep=%0d s=%0d r=%0d", rep, s, r));
        for (int s = 0; s < 5; s++)
          check(cbit_c[s] == stream_c[crt_pos(s, r % 3, 5, 3)],
                $sformatf("K5N3 rep=%0d s=%0d r=%0d", rep, s, r));
        @(negedge clk);
      end
      mode_b = MODE_IDLE;
      mode_c = MODE_IDLE;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
