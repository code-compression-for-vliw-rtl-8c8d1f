// tb_v2f_workload_bus_toggle - instruction-bus toggle study on the Markov
// engine at its default size, with codewords numbered for low toggling.
//
// For each model size (1x1 i.e. a static memoryless code, 2x2, 4x4, 4x8, 4x16
// and 4x32, depth x width, 4-bit codewords) a random layered Markov source
// produces a 32-block program. The program is compressed once with an
// arbitrary numbering of each state's codewords. From the compressed image a
// codeword transition graph is built: codewords in the same 4-bit lane of two
// consecutive 32-bit bus words are joined by an edge weighted by how often
// that happens. A greedy pass then renumbers the codewords: edges are taken
// in order of decreasing weight; for each edge with an unnumbered end, that
// end gets the free codeword of its own codebook nearest in Hamming distance
// to the other end (distance 0 is possible across different codebooks); two
// codewords of the same codebook must differ. Both versions are decompressed
// by the engine in program order, each output word is checked, and the
// toggles on the memory read bus are counted and printed relative to the
// toggles of the uncompressed program on a 32-bit bus.
module tb_v2f_workload_bus_toggle;
  import tb_v2f_util::*;

  localparam int N = 4, NC = 16, MEM_AW = 16, OUT_W = 128, BLOCK_BITS = 256;
  localparam int MK_SEQ_W = 16, ST_W = 9, LEN_W = 5, MK_AW = ST_W + N, MK_EW = ST_W + LEN_W + MK_SEQ_W;
  localparam int NBLK = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ml_req_valid, ml_req_ready, ml_mem_req, ml_mem_rvalid;
  logic              ml_out_valid, ml_out_ready, ml_out_last;
  logic [MEM_AW+1:0] ml_req_addr;
  logic [MEM_AW-1:0] ml_mem_addr;
  logic [31:0]       ml_mem_rdata;
  logic [OUT_W-1:0]  ml_out_data;
  logic              mk_req_valid, mk_req_ready, mk_mem_req, mk_mem_rvalid;
  logic              mk_out_valid, mk_out_ready, mk_out_last;
  logic [MEM_AW+1:0] mk_req_addr;
  logic [MEM_AW-1:0] mk_mem_addr;
  logic [31:0]       mk_mem_rdata;
  logic [OUT_W-1:0]  mk_out_data;
  logic              mk_cb_we;
  logic [MK_AW-1:0]  mk_cb_addr;
  logic [MK_EW-1:0]  mk_cb_wdata;

  v2f_decompression_core dut (.*);
  tb_v2f_mem #(.MEM_W(32), .MEM_AW(MEM_AW), .RAND_LAT(0)) u_mk_mem (
    .clk, .mem_req(mk_mem_req), .mem_addr(mk_mem_addr), .mem_rvalid(mk_mem_rvalid), .mem_rdata(mk_mem_rdata));
  assign ml_mem_rvalid = 1'b0;
  assign ml_mem_rdata  = '0;

  int checks = 0, failures = 0;
  int toggles = 0;
  logic [31:0] last_word = '0;

  always @(posedge clk) if (mk_mem_rvalid) begin
    toggles += $countones(mk_mem_rdata ^ last_word);
    last_word <= mk_mem_rdata;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tentry_t book[][];
  bit      blk[NBLK][$];

  typedef struct { int a; int b; int w; } edge_t;

  // compress the program with `book`, recording the leaf (state*NC+cw) behind
  // each 4-bit nibble of the image, -1 for byte padding
  function automatic void encode_prog(ref byte unsigned img[$], ref int nodes[$], ref int addr[NBLK]);
    img.delete(); nodes.delete();
    for (int b = 0; b < NBLK; b++) begin
      int pos = 0, st = 0, n0;
      addr[b] = img.size();
      n0 = nodes.size();
      while (pos < BLOCK_BITS) begin
        int hit = -1;
        for (int c = 0; c < NC; c++) if (hit < 0 && entry_matches(book[st][c], blk[b], pos)) hit = c;
        nodes.push_back(st * NC + hit);
        pos += book[st][hit].len;
        st = book[st][hit].next;
      end
      if ((nodes.size() - n0) % 2 == 1) nodes.push_back(-1);
      void'(encode_block(book, N, blk[b], img));
    end
  endfunction

  task automatic run_prog(input string name, input int base_toggles);
    byte unsigned img[$];
    int nodes[$];
    int addr[NBLK];
    encode_prog(img, nodes, addr);
    u_mk_mem.clear();
    foreach (img[i]) u_mk_mem.write_byte(i, img[i]);
    for (int s = 0; s < book.size(); s++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        mk_cb_we = 1; mk_cb_addr = MK_AW'(s * NC + c);
        mk_cb_wdata = MK_EW'(pack_entry(book[s][c], ST_W, LEN_W, MK_SEQ_W));
      end
    @(negedge clk);
    mk_cb_we = 0;
    toggles = 0;
    for (int b = 0; b < NBLK; b++) begin
      int w;
      @(negedge clk);
      while (!mk_req_ready) @(negedge clk);
      mk_req_valid = 1; mk_req_addr = (MEM_AW+2)'(addr[b]);
      @(negedge clk);
      mk_req_valid = 0;
      mk_out_ready = 1;
      w = 0;
      while (w < BLOCK_BITS / OUT_W) begin
        @(posedge clk);
        if (mk_out_valid) begin
          logic [OUT_W-1:0] e;
          for (int i = 0; i < OUT_W; i++) e[OUT_W - 1 - i] = blk[b][w * OUT_W + i];
          checks++;
          if (mk_out_data !== e) begin failures++; $display("FAIL %s block %0d word %0d", name, b, w); end
          w++;
        end
        @(negedge clk);
      end
      mk_out_ready = 0;
    end
    $display("  %-26s ratio %.3f  bus toggles %0d (%.2f of uncompressed)", name,
             real'(img.size() * 8) / real'(NBLK * BLOCK_BITS), toggles,
             real'(toggles) / real'(base_toggles));
  endtask

  // greedy renumbering of `book` from the transition graph of its image
  function automatic int greedy_renumber();
    byte unsigned img[$];
    int nodes[$];
    int addr[NBLK];
    int wmap[longint];
    edge_t edges[$];
    int val[], used[][];
    int nst, changed;
    tentry_t nb[][];
    encode_prog(img, nodes, addr);
    nst = book.size();
    for (int k = 0; k + 8 < nodes.size(); k++)
      if (nodes[k] >= 0 && nodes[k + 8] >= 0) begin
        int a = nodes[k], b = nodes[k + 8];
        longint key;
        if (a > b) begin int t = a; a = b; b = t; end
        key = (longint'(a) << 32) | longint'(b);
        if (wmap.exists(key)) wmap[key]++; else wmap[key] = 1;
      end
    foreach (wmap[key]) edges.push_back('{a: int'(key >> 32), b: int'(key & 64'hffffffff), w: wmap[key]});
    edges.rsort(x) with (x.w);
    val = new[nst * NC];
    used = new[nst];
    foreach (val[i]) val[i] = -1;
    foreach (used[s]) begin used[s] = new[NC]; foreach (used[s][c]) used[s][c] = 0; end
    foreach (edges[i]) begin
      int a = edges[i].a, b = edges[i].b;
      if (val[a] >= 0 && val[b] >= 0) continue;
      if (val[a] < 0 && val[b] < 0) begin
        // give `a` the free value that leaves the best partner for `b`
        int best_x = -1, best_d = 99;
        for (int x = 0; x < NC; x++) if (!used[a / NC][x])
          for (int y = 0; y < NC; y++)
            if (!used[b / NC][y] && (a == b || a / NC != b / NC || x != y) &&
                $countones(x ^ y) < best_d) begin best_d = $countones(x ^ y); best_x = x; end
        val[a] = best_x; used[a / NC][best_x] = 1;
        if (a == b) continue;
      end
      if (val[a] < 0) begin int t = a; a = b; b = t; end
      begin
        int best_y = -1, best_d = 99;
        for (int y = 0; y < NC; y++)
          if (!used[b / NC][y] && $countones(val[a] ^ y) < best_d) begin best_d = $countones(val[a] ^ y); best_y = y; end
        val[b] = best_y; used[b / NC][best_y] = 1;
      end
    end
    foreach (val[i]) if (val[i] < 0)
      for (int x = 0; x < NC; x++) if (val[i] < 0 && !used[i / NC][x]) begin val[i] = x; used[i / NC][x] = 1; end
    nb = new[nst];
    changed = 0;
    for (int s = 0; s < nst; s++) begin
      nb[s] = new[NC];
      for (int c = 0; c < NC; c++) begin
        nb[s][val[s * NC + c]] = book[s][c];
        if (val[s * NC + c] != c) changed++;
      end
    end
    // every codebook must still be a permutation
    for (int s = 0; s < nst; s++) for (int c = 0; c < NC; c++) if (!used[s][c]) changed = -1;
    book = nb;
    return changed;
  endfunction

  initial begin
    int depth [6] = '{1, 2, 4, 4, 4, 4};
    int width [6] = '{1, 2, 4, 8, 16, 32};
    ml_req_valid = 0; ml_req_addr = '0; ml_out_ready = 0;
    mk_req_valid = 0; mk_req_addr = '0; mk_out_ready = 0;
    mk_cb_we = 0; mk_cb_addr = '0; mk_cb_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      markov_model mm;
      int base, ch;
      logic [31:0] prev, wd;
      mm = new(depth[m], width[m], N, MK_SEQ_W);
      for (int b = 0; b < NBLK; b++) mm.gen_bits(blk[b], BLOCK_BITS);
      base = 0; prev = '0;
      for (int b = 0; b < NBLK; b++)
        for (int w = 0; w < BLOCK_BITS / 32; w++) begin
          for (int i = 0; i < 32; i++) wd[31 - i] = blk[b][w * 32 + i];
          base += $countones(wd ^ prev);
          prev = wd;
        end
      $display("%0dx%0d model (%0d states): uncompressed bus toggles %0d", depth[m], width[m], mm.nstates, base);
      book = mm.book;
      run_prog("arbitrary numbering", base);
      ch = greedy_renumber();
      checks++;
      if (ch <= 0) begin failures++; $display("FAIL greedy renumbering changed nothing or broke a codebook"); end
      run_prog("greedy numbering", base);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
