// tb_v2f_d_book_check - checks one instance of the V2F lookup unit against
// properties any Tunstall codebook must have, computed here independently:
//   * the leaf strings are prefix-free and their Kraft sum is exactly 1
//     (the leaves form a complete binary tree);
//   * bits after each string's length are zero;
//   * Tunstall optimality: no leaf is more probable than the parent of any
//     other leaf (otherwise that leaf would have been split instead);
//   * the expected string length under an i.i.d. source with
//     P(0) = P0_PERMILLE/1000 equals EXP_AVG_MILLI/1000 to within 0.001
//     (reference values from the average-length table of the source study).
// Results are returned through checks / failures once done is high.
module tb_v2f_d_book_check #(
  parameter int N             = 4,
  parameter int P0_PERMILLE   = 830,
  parameter int EXP_AVG_MILLI = 5706
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int ML = v2f_pkg::book_max_len(v2f_pkg::tunstall_book(P0_PERMILLE, N), N);
  localparam int NC = 1 << N;

  logic [N-1:0]    cw;
  logic [ML-1:0]   seq;
  logic [5:0]      len;
  logic [ML-1:0]   s_tab [NC];
  int              l_tab [NC];

  v2f_decoder_d #(.N(N), .P0_PERMILLE(P0_PERMILLE)) dut (.cw, .seq, .len);

  function automatic real leaf_prob(logic [ML-1:0] s, int l);
    real p = 1.0, p0 = real'(P0_PERMILLE) / 1000.0;
    for (int k = 0; k < l; k++) p = p * (s[ML-1-k] ? (1.0 - p0) : p0);
    return p;
  endfunction

  initial begin
    real avg, kraft, pmin_parent, pmax_leaf, pl;
    bit  pre_ok, tail_ok;
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < NC; i++) begin
      cw = N'(i);
      #1;
      s_tab[i] = seq;
      l_tab[i] = int'(len);
    end
    // tails zero, lengths in range
    tail_ok = 1;
    for (int i = 0; i < NC; i++) begin
      if (l_tab[i] < 1 || l_tab[i] > ML) tail_ok = 0;
      else if ((s_tab[i] & ({ML{1'b1}} >> l_tab[i])) != '0) tail_ok = 0;
    end
    checks++; if (!tail_ok) begin failures++; $display("FAIL N=%0d P0=%0d: bad length or tail", N, P0_PERMILLE); end
    // prefix-free
    pre_ok = 1;
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < NC; j++)
        if (i != j && l_tab[i] <= l_tab[j] &&
            ((s_tab[i] ^ s_tab[j]) >> (ML - l_tab[i])) == '0) pre_ok = 0;
    checks++; if (!pre_ok) begin failures++; $display("FAIL N=%0d P0=%0d: not prefix-free", N, P0_PERMILLE); end
    // Kraft sum, average length, optimality
    kraft = 0.0; avg = 0.0; pmin_parent = 2.0; pmax_leaf = 0.0;
    for (int i = 0; i < NC; i++) begin
      pl = leaf_prob(s_tab[i], l_tab[i]);
      kraft += 1.0 / real'(64'd1 << l_tab[i]);
      avg += pl * real'(l_tab[i]);
      if (pl > pmax_leaf) pmax_leaf = pl;
      if (leaf_prob(s_tab[i], l_tab[i] - 1) < pmin_parent) pmin_parent = leaf_prob(s_tab[i], l_tab[i] - 1);
    end
    checks++; if (kraft < 0.999999 || kraft > 1.000001) begin failures++; $display("FAIL N=%0d P0=%0d: Kraft sum %f", N, P0_PERMILLE, kraft); end
    checks++; if (pmax_leaf > pmin_parent + 1e-9) begin failures++; $display("FAIL N=%0d P0=%0d: not a Tunstall tree", N, P0_PERMILLE); end
    checks++;
    if (avg * 1000.0 < real'(EXP_AVG_MILLI) - 1.0 || avg * 1000.0 > real'(EXP_AVG_MILLI) + 1.0) begin
      failures++; $display("FAIL N=%0d P0=%0d: average length %f, expected %0d/1000", N, P0_PERMILLE, avg, EXP_AVG_MILLI);
    end else
      $display("N=%0d P(0)=0.%0d: average string length %.3f bits, N/Ave = %.3f", N, P0_PERMILLE, avg, real'(N) / avg);
    done = 1;
  end
endmodule
