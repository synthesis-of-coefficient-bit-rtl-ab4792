// Runs fbpa_top at array sizes other than the default: K=2/N=5,
// K=5/N=2, K=4/N=3 and K=5/N=3 (8-bit words), each through every valid
// coefficient split, and checks that at least one split ran per size.
module tb_fbpa_top_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, s0, c1, f1, s1, c2, f2, s2, c3, f3, s3;
  logic d0, d1, d2, d3;

  fbpa_top_exerciser #(.K(2), .N(5)) u_k2n5 (.clk, .checks(c0), .failures(f0), .splits(s0), .done(d0));
  fbpa_top_exerciser #(.K(5), .N(2)) u_k5n2 (.clk, .checks(c1), .failures(f1), .splits(s1), .done(d1));
  fbpa_top_exerciser #(.K(4), .N(3)) u_k4n3 (.clk, .checks(c2), .failures(f2), .splits(s2), .done(d2));
  fbpa_top_exerciser #(.K(5), .N(3), .XW(8)) u_k5n3 (.clk, .checks(c3), .failures(f3), .splits(s3), .done(d3));

  int checks, failures;

  initial begin
    fork
      begin
        @(posedge clk);
        wait (d0 && d1 && d2 && d3);
        checks = c0 + c1 + c2 + c3 + 4;
        failures = f0 + f1 + f2 + f3 + int'(s0 == 0) + int'(s1 == 0) + int'(s2 == 0) + int'(s3 == 0);
        $display("splits run: K2N5=%0d K5N2=%0d K4N3=%0d K5N3=%0d", s0, s1, s2, s3);
      end
      begin
        repeat (200000) @(posedge clk);
        checks = c0 + c1 + c2 + c3;
        failures = f0 + f1 + f2 + f3 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
