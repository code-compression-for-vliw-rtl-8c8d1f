// tb_v2f_ml_run - one end-to-end run of the memoryless V2F engine, used by
// tb_v2f_memoryless_engine with different lane counts and codebooks.
//
// Random program blocks (256 bits, P(0) = P0_PERMILLE/1000) are
// compressed by the reference encoder with the same Tunstall codebook,
// padded to whole bytes and stored back to back, so blocks start at every
// byte offset within a memory word. The blocks are then requested in random
// order (random access), the memory answers with random latency and the
// output is stalled at random. Checked: every output word, out_last, and the
// decode rate: a block of C codewords must take exactly ceil(C/LANES)
// decode cycles (LANES codewords per clock). Counted and required: blocks
// whose last leaf needed padding, blocks starting off a word boundary, and
// output stalls. The measured compression ratio (compressed over original
// bits) is also held against N / L, L being the code's expected string length
// for the source; it must lie between 0.9 and 1.1 times that value, plus
// 0.03 for the byte padding of each block.
module tb_v2f_ml_run #(
  parameter int LANES = 8,
  parameter int N = 4,
  parameter int P0_PERMILLE = 830
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import v2f_pkg::*;
  import tb_v2f_util::*;

  localparam int OUT_W = 128, BLOCK_BITS = 256, MEM_AW = 16;
  localparam int NBLK = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              req_valid, req_ready;
  logic [MEM_AW+1:0] req_addr;
  logic              mem_req, mem_rvalid;
  logic [MEM_AW-1:0] mem_addr;
  logic [31:0]       mem_rdata;
  logic              out_valid, out_ready, out_last;
  logic [OUT_W-1:0]  out_data;

  v2f_memoryless_engine #(.LANES(LANES), .N(N), .P0_PERMILLE(P0_PERMILLE)) dut (.*);
  tb_v2f_mem #(.MEM_W(32), .MEM_AW(MEM_AW), .RAND_LAT(1)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_rvalid, .mem_rdata);

  int n_padded = 0, n_unaligned = 0, n_stalls = 0, dec_cycles = 0;

  always @(posedge clk) begin
    if (dut.dec_valid && dut.dec_ready) dec_cycles++;
    if (out_valid && !out_ready) n_stalls++;
  end

  tentry_t book[][];
  bit      blocks[NBLK][$];
  int      addr[NBLK], ncw[NBLK];

  initial begin
    byte unsigned img[$];
    int order[$];
    int total_c;
    real ratio, exp_ratio, avg_len, pl;
    checks = 0; failures = 0; done = 0;
    req_valid = 0; req_addr = '0; out_ready = 0;
    u_mem.clear();
    book_from_pkg(book, tunstall_book(P0_PERMILLE, N), N);
    for (int b = 0; b < NBLK; b++) begin
      random_bits(blocks[b], BLOCK_BITS, P0_PERMILLE);
      addr[b] = img.size();
      ncw[b] = encode_block(book, N, blocks[b], img);
      if (addr[b] % 4 != 0) n_unaligned++;
    end
    total_c = img.size();
    foreach (img[i]) u_mem.write_byte(i, img[i]);
    // expected string length of the code: sum over leaves of P(leaf) * length
    avg_len = 0.0;
    for (int x = 0; x < (1 << N); x++) begin
      pl = 1.0;
      for (int k = 0; k < book[0][x].len; k++)
        pl = pl * (book[0][x].seq[k] ? 1.0 - P0_PERMILLE / 1000.0 : P0_PERMILLE / 1000.0);
      avg_len += pl * book[0][x].len;
    end
    ratio = real'(total_c * 8) / real'(NBLK * BLOCK_BITS);
    exp_ratio = N / avg_len;
    $display("LANES=%0d N=%0d P(0)=0.%0d:", LANES, N, P0_PERMILLE);
    $display("compressed %0d blocks of %0d bits into %0d bytes: ratio %.3f (N/L = %.3f, L = %.3f)",
             NBLK, BLOCK_BITS, total_c, ratio, exp_ratio, avg_len);
    checks++;
    if (ratio < 0.9 * exp_ratio || ratio > 1.1 * exp_ratio + 0.03) begin
      failures++;
      $display("FAIL compression ratio %.3f far from %.3f", ratio, exp_ratio);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) order.push_back(b);
    order.shuffle();
    foreach (order[k]) begin
      int b, w, d0;
      b = order[k];
      d0 = dec_cycles;
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req_valid = 1; req_addr = (MEM_AW+2)'(addr[b]);
      @(negedge clk);
      req_valid = 0;
      w = 0;
      while (w < BLOCK_BITS / OUT_W) begin
        out_ready = ($urandom % 4) != 0;
        @(posedge clk);
        if (out_valid && out_ready) begin
          logic [OUT_W-1:0] e;
          for (int i = 0; i < OUT_W; i++) e[OUT_W - 1 - i] = blocks[b][w * OUT_W + i];
          checks++;
          if (out_data !== e || out_last !== (w == BLOCK_BITS / OUT_W - 1)) begin
            failures++;
            $display("FAIL block %0d word %0d: got %h expected %h last=%b", b, w, out_data, e, out_last);
          end
          w++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++;
      if (dec_cycles - d0 != (ncw[b] + LANES - 1) / LANES) begin
        failures++;
        $display("FAIL block %0d: %0d decode cycles for %0d codewords", b, dec_cycles - d0, ncw[b]);
      end
    end
    // count blocks whose last codeword carried padding bits
    for (int b = 0; b < NBLK; b++) begin
      int pos = 0, st = 0;
      for (int c = 0; c < ncw[b]; c++) begin
        int hit = -1;
        for (int x = 0; x < (1 << N); x++) if (hit < 0 && entry_matches(book[0][x], blocks[b], pos)) hit = x;
        pos += book[0][hit].len;
      end
      if (pos > BLOCK_BITS) n_padded++;
    end
    $display("padded blocks %0d, unaligned starts %0d, output stalls %0d, decode cycles %0d",
             n_padded, n_unaligned, n_stalls, dec_cycles);
    checks++; if (n_padded == 0)    begin failures++; $display("FAIL no padded block seen"); end
    checks++; if (n_unaligned == 0) begin failures++; $display("FAIL no unaligned block start"); end
    checks++; if (n_stalls == 0)    begin failures++; $display("FAIL no output stall"); end
    done = 1;
  end
endmodule
