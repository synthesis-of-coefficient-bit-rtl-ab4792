// cbrm -- Coefficient Bit Reordering Module for a folded bit-plane array.
//
// A K x N array of one-bit cells bits[a][b] (row a = 1..K, column b = 1..N,
// column 1 on the right, row 1 at the bottom) stores the K*N coefficient
// bits of a folded FIR filter with K folding sets and folding factor N.
//
// Initialization mode (mode == MODE_INIT, one bit per cycle): the serial
// bit enters cell [1,1] while every stored bit moves one row up and one
// column left, wrapping from row K to row 1 and from column N to column 1.
// The bit entered at cycle t therefore sits, after the K*N-th cycle, in
// row K - (p mod K) and column N - (p mod N), where p = t - 1 is its
// position in the unfolded data-flow graph. Because K and N are coprime
// every bit lands in a cell of its own: the diagonal walk performs the
// modulo (Chinese-remainder) reordering without any address arithmetic.
// Bits must enter least significant bit first, starting with the
// highest-index coefficient c[kc-1], then c[kc-2], ..., c[0]. The number
// of coefficients kc and their length mc only change the meaning of the
// bit stream (kc*mc = K*N); the hardware does not depend on them.
//
// Run mode (mode == MODE_RUN): every row rotates right to left (column b
// takes column b-1, column 1 takes column N). The leftmost cell of row a
// drives cbit[K - a], the coefficient bit for folding set s = K - a. On
// the r-th run cycle after initialization (r counted from 0) cbit[s] holds
// the bit of operation p with p mod K = s and p mod N = r mod N.
//
// Timing: cbit is read straight from the leftmost cells, so it is valid in
// the same cycle as the folding order it belongs to; cells update on the
// rising clock edge. MODE_IDLE holds the contents.
//
// Follows the document: the array size, the diagonal shift path with
// wrap-around, the entry cell, the serial order and the row rotation.
// This design's own choices: edge-triggered flip-flops rather than
// latches, a synchronous active-low reset that clears the array, and the
// idle (hold) mode.
module cbrm
  import fbpa_pkg::*;
#(
  parameter int unsigned K = 3,   // number of folding sets (rows)
  parameter int unsigned N = 4    // folding factor (columns)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  input  logic         serial_in,  // coefficient bit, used in MODE_INIT
  output logic [K-1:0] cbit        // cbit[s]: bit for folding set s
);

  // Indices follow the document's [row, column] numbering from 1.
  logic bits [1:K][1:N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int a = 1; a <= K; a++)
        for (int b = 1; b <= N; b++)
          bits[a][b] <= 1'b0;
    end else begin
      unique case (mode)
        MODE_INIT: begin
          // Diagonal move: [a,b] <- [a-1,b-1], wrapping both indices.
          for (int a = 1; a <= K; a++)
            for (int b = 1; b <= N; b++)
              if (a == 1 && b == 1)
                bits[a][b] <= serial_in;
              else
                bits[a][b] <= bits[(a == 1) ? K : a - 1][(b == 1) ? N : b - 1];
        end
        MODE_RUN: begin
          // Row rotation, right to left: [a,b] <- [a,b-1], [a,1] <- [a,N].
          for (int a = 1; a <= K; a++)
            for (int b = 1; b <= N; b++)
              bits[a][b] <= bits[a][(b == 1) ? N : b - 1];
        end
        default: ;  // MODE_IDLE: hold
      endcase
    end
  end

  always_comb
    for (int s = 0; s < K; s++)
      cbit[s] = bits[K - s][N];

  // The reordering only gives every bit a cell of its own if K and N are
  // coprime.
  if (gcd(K, N) != 1) begin : g_coprime_check
    $error("cbrm: K and N must be coprime");
  end

endmodule
