// tb_v2f_util - reference models used by the V2F testbenches.
//
// Contains a behavioural encoder for memoryless V2F code, a random Markov
// source model with its per-state V2F codebooks and a matching encoder, all
// written from the coding rules (walk the code tree from the root, emit the
// leaf's codeword, restart; at the end of a block pad until a leaf is reached;
// pad the compressed block to a whole byte). Bit strings are queues of bits,
// first bit first. Compressed bytes are produced most significant bit first.
package tb_v2f_util;

  typedef bit bitq_t[$];
  typedef byte unsigned byteq_t[$];

  // one codebook entry: string (first bit at position len-1), length, next state
  typedef struct {
    int          len;
    bit [31:0]   seq;
    int          next;
  } tentry_t;

  // does the entry's string match blk from pos (or match what is left of it)?
  function automatic bit entry_matches(tentry_t e, const ref bit blk[$], input int pos);
    for (int k = 0; k < e.len; k++) begin
      if (pos + k >= blk.size()) return 1;   // padding may continue freely
      if (blk[pos + k] != e.seq[e.len - 1 - k]) return 0;
    end
    return 1;
  endfunction

  // append the N bits of codeword cw to a bit queue
  function automatic void put_cw(ref bit cbits[$], input int cw, input int n);
    for (int k = n - 1; k >= 0; k--) cbits.push_back(cw[k]);
  endfunction

  // pack a bit queue into bytes (zero-padded to a byte boundary) and append
  function automatic void pack_bytes(ref byte unsigned mem[$], const ref bit cbits[$]);
    int nb = (cbits.size() + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      byte unsigned v = 0;
      for (int k = 0; k < 8; k++)
        if (b * 8 + k < cbits.size() && cbits[b * 8 + k]) v[7 - k] = 1'b1;
      mem.push_back(v);
    end
  endfunction

  // Encode one block with a Markov V2F code (a memoryless code is the case of
  // a single state whose entries all return to state 0). Returns the number
  // of codewords produced.
  function automatic int encode_block(const ref tentry_t book[][], input int n,
                                      const ref bit blk[$], ref byte unsigned mem[$]);
    bit cbits[$];
    int pos = 0, st = 0, ncw = 0;
    while (pos < blk.size()) begin
      int hit = -1;
      for (int c = 0; c < (1 << n); c++)
        if (hit < 0 && entry_matches(book[st][c], blk, pos)) hit = c;
      if (hit < 0) begin
        $display("encoder: no leaf matches at bit %0d", pos);
        return -1;
      end
      put_cw(cbits, hit, n);
      pos += book[st][hit].len;
      st = book[st][hit].next;
      ncw++;
    end
    pack_bytes(mem, cbits);
    return ncw;
  endfunction

  // A memoryless codebook (one state) from the design's package table.
  function automatic void book_from_pkg(ref tentry_t book[][], input v2f_pkg::book_t b, input int n);
    book = new[1];
    book[0] = new[1 << n];
    for (int c = 0; c < (1 << n); c++) begin
      book[0][c].len  = int'(b[c].len);
      book[0][c].seq  = b[c].seq;
      book[0][c].next = 0;
    end
  endfunction

  // A codebook entry as stored in the Markov codebook RAM:
  // {next_state, len, string left-aligned in seq_w bits}.
  function automatic logic [63:0] pack_entry(tentry_t e, int st_w, int len_w, int seq_w);
    logic [63:0] v;
    v = 64'(e.next);
    v = (v << len_w) | 64'(e.len);
    v = (v << seq_w) | (64'(e.seq) << (seq_w - e.len));
    return v;
  endfunction

  // A random biased bit string: P(0) = p0_permille / 1000.
  function automatic void random_bits(ref bit blk[$], input int nbits, input int p0_permille);
    blk.delete();
    for (int i = 0; i < nbits; i++) blk.push_back(($urandom % 1000) >= p0_permille);
  endfunction

  // A layered Markov source, DEPTH layers of WIDTH nodes as in the published
  // example; state = layer*WIDTH + node, state 0 is the initial state.
  class markov_model;
    int depth, width, nstates, n, seq_w;
    real p0[];
    int  nxt0[], nxt1[];
    tentry_t book[][];

    function new(int depth_i, int width_i, int n_i, int seq_w_i);
      depth = depth_i; width = width_i; n = n_i; seq_w = seq_w_i;
      nstates = depth * width;
      p0 = new[nstates]; nxt0 = new[nstates]; nxt1 = new[nstates];
      for (int s = 0; s < nstates; s++) begin
        int nl = ((s / width) + 1) % depth;
        p0[s]   = real'(50 + ($urandom % 900)) / 1000.0;
        nxt0[s] = nl * width + int'($urandom % width);
        nxt1[s] = nl * width + int'($urandom % width);
      end
      build_books();
    endfunction

    // Tunstall tree per state using the edge probabilities, leaves no longer
    // than seq_w, codewords assigned in a random order.
    function void build_books();
      book = new[nstates];
      for (int s = 0; s < nstates; s++) begin
        real lp[$]; int ll[$]; bit [31:0] lq[$]; int lst[$];
        int perm[$];
        book[s] = new[1 << n];
        lp.push_back(1.0); ll.push_back(0); lq.push_back(0); lst.push_back(s);
        while (lp.size() < (1 << n)) begin
          int b = -1;
          for (int i = 0; i < lp.size(); i++)
            if (ll[i] < seq_w && (b < 0 || lp[i] > lp[b])) b = i;
          begin
            int ms = lst[b];
            lp.push_back(lp[b] * (1.0 - p0[ms])); ll.push_back(ll[b] + 1);
            lq.push_back((lq[b] << 1) | 1); lst.push_back(nxt1[ms]);
            lp[b] = lp[b] * p0[ms]; ll[b] = ll[b] + 1; lq[b] = lq[b] << 1; lst[b] = nxt0[ms];
          end
        end
        for (int i = 0; i < (1 << n); i++) perm.push_back(i);
        perm.shuffle();
        for (int i = 0; i < (1 << n); i++) begin
          book[s][perm[i]].len  = ll[i];
          book[s][perm[i]].seq  = lq[i];
          book[s][perm[i]].next = lst[i];
        end
      end
    endfunction

    // a bit string drawn from the model, starting in the initial state
    function void gen_bits(ref bit blk[$], input int nbits);
      int s = 0;
      blk.delete();
      for (int i = 0; i < nbits; i++) begin
        bit v = (real'($urandom % 100000) / 100000.0) >= p0[s];
        blk.push_back(v);
        s = v ? nxt1[s] : nxt0[s];
      end
    endfunction
  endclass

endpackage
