// Shared types and helper functions for the folded bit-plane FIR filter
// and its coefficient bit reordering module (CBRM).
//
// mode_e names the operating modes of the CBRM and the controller:
// the initialization mode, in which coefficient bits are shifted in
// bit-serially and reordered, and the run mode, in which the stored bits
// rotate and feed the folded array. MODE_IDLE (nothing moves) is this
// design's own addition.
//
// crt_pos(s, r, K, N) returns the position p (0 <= p < K*N) of the
// operation that folding set s executes at folding order r, i.e. the p
// with p mod K = s and p mod N = r. It is used only to build reference
// values and assertions; the hardware itself never evaluates it.
package fbpa_pkg;

  typedef enum logic [1:0] {
    MODE_IDLE = 2'd0,
    MODE_INIT = 2'd1,
    MODE_RUN  = 2'd2
  } mode_e;

  function automatic int crt_pos(int s, int r, int K, int N);
    for (int p = 0; p < K * N; p++)
      if ((p % K) == s && (p % N) == r) return p;
    return -1;
  endfunction

  // Greatest common divisor, used to check that K and N are coprime.
  function automatic int gcd(int a, int b);
    int t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

endpackage
