// v2f_pkg - types and the elaboration-time codebook builder shared by the
// variable-to-fixed (V2F) decompressors.
//
// A V2F code maps a variable-length run of program bits onto a fixed N-bit
// codeword. For a memoryless source the optimal such code is a Tunstall
// code: start from a two-leaf tree ("0" and "1"), and repeatedly split the
// most probable leaf into its 0- and 1-children until the tree has 2^N
// leaves. Each leaf then receives one N-bit codeword.
//
// tunstall_book() runs that construction during elaboration, from the
// probability of a zero bit given in thousandths (830 for the IA-64 figure of
// about 83%, 750 for the TMS320C6x figure of about 75%). Probabilities are kept
// as 30-bit fixed-point fractions; when two leaves are equally probable the one
// stored first is split. The Tunstall procedure itself follows the published
// algorithm; the fixed-point width and tie rule are this design's choices.
//
// Codeword assignment is free in a V2F code. This package numbers the leaves
// in descending lexicographic order of their bit strings, so codeword 0 is the
// leaf "1...". For the two-bit example with P(0)=0.8 this yields 00->"1",
// 01->"01", 10->"001", 11->"000". Any other assignment can be supplied to the
// decoders as a book_t parameter instead.
package v2f_pkg;

  // Widest codeword supported by the builder and longest sequence it stores.
  localparam int MAX_N  = 8;
  localparam int SEQ_W  = 32;
  localparam int LEN_W  = 6;
  localparam int BOOK_SZ = 1 << MAX_N;

  // One codebook entry: the decoded bit string right-aligned in seq (its
  // first bit at position len-1) and its length.
  typedef struct packed {
    logic [LEN_W-1:0] len;
    logic [SEQ_W-1:0] seq;
  } entry_t;

  // A whole codebook, indexed by codeword value.
  typedef entry_t [BOOK_SZ-1:0] book_t;

  localparam int  PROB_FRAC = 30;
  localparam longint PROB_ONE = 64'sd1 << PROB_FRAC;

  function automatic book_t tunstall_book(int p0_permille, int n);
    longint prob [BOOK_SZ];
    logic [SEQ_W-1:0] bits [BOOK_SZ];
    int  lens [BOOK_SZ];
    logic [SEQ_W-1:0] key [BOOK_SZ];
    int  order [BOOK_SZ];
    longint p0, p1;
    int  nleaf, tmp;
    logic [MAX_N-1:0] best;
    book_t book;
    p0 = (PROB_ONE * longint'(p0_permille)) / 1000;
    p1 = PROB_ONE - p0;
    for (int i = 0; i < BOOK_SZ; i++) begin
      prob[i] = 0; bits[i] = '0; lens[i] = 0; order[i] = i; key[i] = '0;
    end
    prob[0] = PROB_ONE;
    nleaf = 1;
    while (nleaf < (1 << n)) begin
      best = 0;
      for (int i = 1; i < nleaf; i++)
        if (prob[i] > prob[best]) best = MAX_N'(i);
      // the 1-child is appended, the 0-child replaces its parent
      prob[nleaf] = (prob[best] * p1) >>> PROB_FRAC;
      bits[nleaf] = (bits[best] << 1) | SEQ_W'(1);
      lens[nleaf] = lens[best] + 1;
      prob[best]  = (prob[best] * p0) >>> PROB_FRAC;
      bits[best]  = bits[best] << 1;
      lens[best]  = lens[best] + 1;
      nleaf++;
    end
    // left-aligned strings give the lexicographic order of a prefix-free set
    for (int i = 0; i < nleaf; i++) key[i] = bits[i] << (SEQ_W - lens[i]);
    for (int i = 0; i < nleaf; i++)
      for (int j = i + 1; j < nleaf; j++)
        if (key[order[j]] > key[order[i]]) begin
          tmp = order[i]; order[i] = order[j]; order[j] = tmp;
        end
    for (int i = 0; i < BOOK_SZ; i++) book[i] = '0;
    for (int i = 0; i < nleaf; i++) begin
      book[i].seq = bits[order[i]];
      book[i].len = LEN_W'(lens[order[i]]);
    end
    return book;
  endfunction

  // Longest sequence among the first 2^n entries of a codebook.
  function automatic int book_max_len(book_t book, int n);
    int m = 1;
    for (int i = 0; i < (1 << n); i++)
      if (int'(book[i].len) > m) m = int'(book[i].len);
    return m;
  endfunction

endpackage
