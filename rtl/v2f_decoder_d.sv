// v2f_decoder_d - the per-codeword decoder "D" of the memoryless V2F scheme.
//
// A purely combinational N-bit table lookup: the codeword selects one leaf of
// the Tunstall tree, and the unit returns that leaf's bit string and its
// length. The table is the BOOK parameter, by default the Tunstall codebook
// built during elaboration for a zero-bit probability of P0_PERMILLE/1000
// (0.83, the IA-64 figure) and N = 4 bits, the codeword length found best for
// memoryless coding. Because the codebook of a memoryless code depends only on
// the instruction set, not on the program, it is fixed in logic.
//
// Interface: cw in; seq out with the first decoded bit at seq[MAX_LEN-1] and
// all bits below the sequence's length zero; len out (1..MAX_LEN).
// Timing: combinational, no clock.
module v2f_decoder_d
  import v2f_pkg::*;
#(
  parameter int    N           = 4,
  parameter int    P0_PERMILLE = 830,
  parameter book_t BOOK        = tunstall_book(P0_PERMILLE, N),
  parameter int    MAX_LEN     = book_max_len(BOOK, N)
) (
  input  logic [N-1:0]       cw,
  output logic [MAX_LEN-1:0] seq,
  output logic [LEN_W-1:0]   len
);

  entry_t e;

  always_comb begin
    e   = BOOK[cw];
    len = e.len;
    // left-align the right-aligned table string within MAX_LEN bits
    seq = MAX_LEN'(e.seq << (MAX_LEN - int'(e.len)));
  end

endmodule
