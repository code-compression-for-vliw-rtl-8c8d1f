// tb_v2f_decompression_core - whole-design test at the default parameters.
//
// Memoryless side: 256-bit blocks of random bits with P(0) = 0.83 (the IA-64
// figure), compressed with the 4-bit Tunstall code. Markov side: a random
// 128-layer, 4-node Markov model (512 states, the IA-64 model size); its
// per-state codebooks (random codeword assignment, strings of at most 16 bits)
// are loaded through the codebook port, and blocks drawn from the model are
// compressed with them. Both images are stored in separate memories, blocks
// back to back at byte boundaries. Both engines then run at the same time on
// random block orders with random memory latency and output stalls.
//
// Checked: every output word and out_last on both sides; the memoryless
// engine decodes LANES codewords per decode cycle (ceil(C/LANES) cycles per
// block of C codewords); the Markov engine decodes one codeword per clock
// when nothing stalls. Each mechanism must occur at least once: end-of-block
// padding dropped, block start inside a memory word, output stall, random
// access (a block requested after a later one), full-rate Markov decoding.
module tb_v2f_decompression_core;
  import v2f_pkg::*;
  import tb_v2f_util::*;

  localparam int N = 4, LANES = 8, MEM_AW = 16, OUT_W = 128, BLOCK_BITS = 256;
  localparam int MK_STATES = 512, MK_SEQ_W = 16;
  localparam int ST_W = 9, LEN_W = 5, MK_AW = ST_W + N, MK_EW = ST_W + LEN_W + MK_SEQ_W;
  localparam int NBLK = 40;

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

  tb_v2f_mem #(.MEM_W(32), .MEM_AW(MEM_AW), .RAND_LAT(1)) u_ml_mem (
    .clk, .mem_req(ml_mem_req), .mem_addr(ml_mem_addr), .mem_rvalid(ml_mem_rvalid), .mem_rdata(ml_mem_rdata));
  tb_v2f_mem #(.MEM_W(32), .MEM_AW(MEM_AW), .RAND_LAT(1)) u_mk_mem (
    .clk, .mem_req(mk_mem_req), .mem_addr(mk_mem_addr), .mem_rvalid(mk_mem_rvalid), .mem_rdata(mk_mem_rdata));

  int checks = 0, failures = 0;
  int ml_dec = 0, mk_dec = 0, ml_stalls = 0, mk_stalls = 0;
  int n_padded = 0, n_unaligned = 0, n_random = 0, n_fast = 0;

  always @(posedge clk) begin
    if (dut.u_ml.dec_valid && dut.u_ml.dec_ready) ml_dec++;
    if (dut.u_mk.cw_take) mk_dec++;
    if (ml_out_valid && !ml_out_ready) ml_stalls++;
    if (mk_out_valid && !mk_out_ready) mk_stalls++;
  end

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tentry_t     ml_book[][];
  markov_model mm;
  bit ml_blk[NBLK][$], mk_blk[NBLK][$];
  int ml_addr[NBLK], mk_addr[NBLK], ml_ncw[NBLK], mk_ncw[NBLK];

  // did the encoder's last leaf run past the block?
  function automatic bit padded(const ref tentry_t book[][], const ref bit blk[$], input int ncw);
    int pos = 0, st = 0;
    for (int c = 0; c < ncw; c++) begin
      int hit = -1;
      for (int x = 0; x < (1 << N); x++) if (hit < 0 && entry_matches(book[st][x], blk, pos)) hit = x;
      pos += book[st][hit].len;
      st = book[st][hit].next;
    end
    return pos > blk.size();
  endfunction

  // receive one block's words on either side and compare
  task automatic get_block(input bit mk, input int b);
    int w = 0;
    while (w < BLOCK_BITS / OUT_W) begin
      logic v, l;
      logic [OUT_W-1:0] d, e;
      if (mk) mk_out_ready = ($urandom % 4) != 0; else ml_out_ready = ($urandom % 4) != 0;
      @(posedge clk);
      v = mk ? (mk_out_valid && mk_out_ready) : (ml_out_valid && ml_out_ready);
      d = mk ? mk_out_data : ml_out_data;
      l = mk ? mk_out_last : ml_out_last;
      if (v) begin
        for (int i = 0; i < OUT_W; i++) e[OUT_W - 1 - i] = mk ? mk_blk[b][w * OUT_W + i] : ml_blk[b][w * OUT_W + i];
        checks++;
        if (d !== e || l !== (w == BLOCK_BITS / OUT_W - 1)) begin
          failures++;
          $display("FAIL %s block %0d word %0d: got %h expected %h", mk ? "markov" : "memoryless", b, w, d, e);
        end
        w++;
      end
      @(negedge clk);
    end
    if (mk) mk_out_ready = 0; else ml_out_ready = 0;
  endtask

  initial begin
    byte unsigned ml_img[$], mk_img[$];
    int ml_order[$], mk_order[$];
    ml_req_valid = 0; ml_req_addr = '0; ml_out_ready = 0;
    mk_req_valid = 0; mk_req_addr = '0; mk_out_ready = 0;
    mk_cb_we = 0; mk_cb_addr = '0; mk_cb_wdata = '0;
    u_ml_mem.clear();
    u_mk_mem.clear();
    book_from_pkg(ml_book, tunstall_book(830, N), N);
    mm = new(128, 4, N, MK_SEQ_W);
    for (int b = 0; b < NBLK; b++) begin
      random_bits(ml_blk[b], BLOCK_BITS, 830);
      ml_addr[b] = ml_img.size();
      ml_ncw[b] = encode_block(ml_book, N, ml_blk[b], ml_img);
      mm.gen_bits(mk_blk[b], BLOCK_BITS);
      mk_addr[b] = mk_img.size();
      mk_ncw[b] = encode_block(mm.book, N, mk_blk[b], mk_img);
      if (ml_addr[b] % 4 != 0) n_unaligned++;
      if (padded(ml_book, ml_blk[b], ml_ncw[b])) n_padded++;
      if (padded(mm.book, mk_blk[b], mk_ncw[b])) n_padded++;
    end
    foreach (ml_img[i]) u_ml_mem.write_byte(i, ml_img[i]);
    foreach (mk_img[i]) u_mk_mem.write_byte(i, mk_img[i]);
    $display("memoryless: %0d bytes for %0d blocks, ratio %.3f", ml_img.size(), NBLK,
             real'(ml_img.size() * 8) / real'(NBLK * BLOCK_BITS));
    $display("markov:     %0d bytes for %0d blocks, ratio %.3f", mk_img.size(), NBLK,
             real'(mk_img.size() * 8) / real'(NBLK * BLOCK_BITS));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < MK_STATES; s++)
      for (int c = 0; c < (1 << N); c++) begin
        @(negedge clk);
        mk_cb_we = 1; mk_cb_addr = MK_AW'(s * (1 << N) + c);
        mk_cb_wdata = MK_EW'(pack_entry(mm.book[s][c], ST_W, LEN_W, MK_SEQ_W));
      end
    @(negedge clk);
    mk_cb_we = 0;
    for (int b = 0; b < NBLK; b++) begin ml_order.push_back(b); mk_order.push_back(b); end
    ml_order.shuffle();
    mk_order.shuffle();
    for (int k = 1; k < NBLK; k++) if (ml_order[k] < ml_order[k - 1]) n_random++;
    fork
      begin : ml_side
        foreach (ml_order[k]) begin
          int b, d0;
          b = ml_order[k];
          @(negedge clk);
          while (!ml_req_ready) @(negedge clk);
          d0 = ml_dec;
          ml_req_valid = 1; ml_req_addr = (MEM_AW+2)'(ml_addr[b]);
          @(negedge clk);
          ml_req_valid = 0;
          get_block(0, b);
          checks++;
          if (ml_dec - d0 != (ml_ncw[b] + LANES - 1) / LANES) begin
            failures++;
            $display("FAIL memoryless block %0d: %0d decode cycles for %0d codewords", b, ml_dec - d0, ml_ncw[b]);
          end
        end
      end
      begin : mk_side
        foreach (mk_order[k]) begin
          int b;
          b = mk_order[k];
          @(negedge clk);
          while (!mk_req_ready) @(negedge clk);
          mk_req_valid = 1; mk_req_addr = (MEM_AW+2)'(mk_addr[b]);
          @(negedge clk);
          mk_req_valid = 0;
          if (k % 4 == 0) begin
            // no stalls: one codeword per clock from the first to the last
            int c0, c1, d0, cyc, w;
            u_mk_mem.rand_lat = 0;
            mk_out_ready = 1;
            c0 = -1; c1 = 0; cyc = 0; w = 0; d0 = mk_dec;
            while (w < BLOCK_BITS / OUT_W) begin
              @(posedge clk);
              cyc++;
              if (dut.u_mk.cw_take) begin if (c0 < 0) c0 = cyc; c1 = cyc; end
              if (mk_out_valid) begin
                logic [OUT_W-1:0] e;
                for (int i = 0; i < OUT_W; i++) e[OUT_W - 1 - i] = mk_blk[b][w * OUT_W + i];
                checks++;
                if (mk_out_data !== e) begin failures++; $display("FAIL markov block %0d word %0d", b, w); end
                w++;
              end
              @(negedge clk);
            end
            mk_out_ready = 0;
            u_mk_mem.rand_lat = 1;
            checks++;
            if (c1 - c0 + 1 != mk_dec - d0 || mk_dec - d0 < mk_ncw[b]) begin
              failures++; $display("FAIL markov rate: %0d codewords over %0d cycles", mk_dec - d0, c1 - c0 + 1);
            end
            n_fast++;
          end else
            get_block(1, b);
        end
      end
    join
    $display("padded blocks %0d, unaligned starts %0d, random-order requests %0d",
             n_padded, n_unaligned, n_random);
    $display("stalls: memoryless %0d markov %0d; full-rate markov blocks %0d", ml_stalls, mk_stalls, n_fast);
    $display("decode cycles: memoryless %0d (%0d codewords/cycle), markov codewords %0d", ml_dec, LANES, mk_dec);
    checks++; if (n_padded == 0)    begin failures++; $display("FAIL no padded block"); end
    checks++; if (n_unaligned == 0) begin failures++; $display("FAIL no unaligned start"); end
    checks++; if (n_random == 0)    begin failures++; $display("FAIL no random access"); end
    checks++; if (ml_stalls == 0 || mk_stalls == 0) begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_fast == 0)      begin failures++; $display("FAIL no full-rate markov block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
