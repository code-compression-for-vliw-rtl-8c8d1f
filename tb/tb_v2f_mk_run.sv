// tb_v2f_mk_run - one end-to-end run of the Markov V2F engine, used by
// tb_v2f_workload_markov_width with different model sizes and codeword widths.
//
// A random layered Markov model of DEPTH layers of WIDTH nodes gets a
// Tunstall codebook per state (N-bit codewords, strings of at most 16 bits,
// codewords in random order), which is loaded into an engine elaborated with
// STATES = DEPTH * WIDTH. Random 256-bit blocks drawn from the model are
// compressed by the reference encoder, byte-padded, stored back to back and
// requested in random order, with random memory latency and output stalls on
// two blocks of three. Checked: every output word and out_last, and on the
// other blocks (one-cycle memory, no stalls) one codeword decoded per clock.
// Padded blocks, unaligned starts and output stalls are counted and required.
// The compression ratio (compressed over original bits) is printed.
module tb_v2f_mk_run #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 4,
  parameter int N     = 4
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import tb_v2f_util::*;

  localparam int STATES = DEPTH * WIDTH, SEQ_W = 16, OUT_W = 128, BLOCK_BITS = 256, MEM_AW = 16;
  localparam int ST_W = $clog2(STATES), LEN_W = 5, CB_AW = ST_W + N, CB_EW = ST_W + LEN_W + SEQ_W;
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
  logic              cb_we;
  logic [CB_AW-1:0]  cb_addr;
  logic [CB_EW-1:0]  cb_wdata;

  v2f_markov_engine #(.STATES(STATES), .N(N), .SEQ_W(SEQ_W)) dut (.*);
  tb_v2f_mem #(.MEM_W(32), .MEM_AW(MEM_AW), .RAND_LAT(1)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_rvalid, .mem_rdata);

  int n_fast = 0, n_padded = 0, n_unaligned = 0, n_stalls = 0, n_dec = 0;

  always @(posedge clk) begin
    if (out_valid && !out_ready) n_stalls++;
    if (dut.cw_take) n_dec++;
  end

  markov_model mm;
  bit blocks[NBLK][$];
  int addr[NBLK], ncw[NBLK];

  initial begin
    byte unsigned img[$];
    int order[$];
    checks = 0; failures = 0; done = 0;
    req_valid = 0; req_addr = '0; out_ready = 0; cb_we = 0; cb_addr = '0; cb_wdata = '0;
    u_mem.clear();
    mm = new(DEPTH, WIDTH, N, SEQ_W);
    for (int b = 0; b < NBLK; b++) begin
      int pos, st;
      mm.gen_bits(blocks[b], BLOCK_BITS);
      addr[b] = img.size();
      ncw[b] = encode_block(mm.book, N, blocks[b], img);
      if (addr[b] % 4 != 0) n_unaligned++;
      // replay the encoder's walk to see whether the last leaf was padded
      pos = 0; st = 0;
      for (int c = 0; c < ncw[b]; c++) begin
        int hit;
        hit = -1;
        for (int x = 0; x < (1 << N); x++) if (hit < 0 && entry_matches(mm.book[st][x], blocks[b], pos)) hit = x;
        pos += mm.book[st][hit].len;
        st = mm.book[st][hit].next;
      end
      if (pos > BLOCK_BITS) n_padded++;
    end
    foreach (img[i]) u_mem.write_byte(i, img[i]);
    $display("%0dx%0d model, N=%0d: compressed %0d blocks into %0d bytes: ratio %.3f",
             DEPTH, WIDTH, N, NBLK, img.size(),
             real'(img.size() * 8) / real'(NBLK * BLOCK_BITS));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < STATES; s++)
      for (int c = 0; c < (1 << N); c++) begin
        @(negedge clk);
        cb_we = 1; cb_addr = CB_AW'(s * (1 << N) + c);
        cb_wdata = CB_EW'(pack_entry(mm.book[s][c], ST_W, LEN_W, SEQ_W));
      end
    @(negedge clk);
    cb_we = 0;
    for (int b = 0; b < NBLK; b++) order.push_back(b);
    order.shuffle();
    foreach (order[k]) begin
      int b, w, d0, c0, c1, cyc;
      bit fast;
      b = order[k];
      fast = (k % 3 == 0);
      u_mem.rand_lat = !fast;
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req_valid = 1; req_addr = (MEM_AW+2)'(addr[b]);
      @(negedge clk);
      req_valid = 0;
      w = 0; d0 = n_dec; c0 = -1; c1 = 0; cyc = 0;
      while (w < BLOCK_BITS / OUT_W) begin
        out_ready = fast || ($urandom % 4) != 0;
        @(posedge clk);
        cyc++;
        if (dut.cw_take && c0 < 0) c0 = cyc;
        if (dut.cw_take) c1 = cyc;
        if (out_valid && out_ready) begin
          logic [OUT_W-1:0] e;
          for (int i = 0; i < OUT_W; i++) e[OUT_W - 1 - i] = blocks[b][w * OUT_W + i];
          checks++;
          if (out_data !== e || out_last !== (w == BLOCK_BITS / OUT_W - 1)) begin
            failures++;
            $display("FAIL block %0d word %0d: got %h expected %h", b, w, out_data, e);
          end
          w++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++;
      if (n_dec - d0 < ncw[b]) begin
        failures++; $display("FAIL block %0d: %0d codewords decoded, %0d needed", b, n_dec - d0, ncw[b]);
      end
      if (fast) begin
        checks++;
        if (c1 - c0 + 1 != n_dec - d0) begin
          failures++; $display("FAIL rate: %0d codewords over %0d cycles", n_dec - d0, c1 - c0 + 1);
        end
        n_fast++;
      end
    end
    $display("padded blocks %0d, unaligned starts %0d, output stalls %0d, codewords %0d",
             n_padded, n_unaligned, n_stalls, n_dec);
    checks++; if (n_padded == 0)    begin failures++; $display("FAIL no padded block seen"); end
    checks++; if (n_unaligned == 0) begin failures++; $display("FAIL no unaligned block start"); end
    checks++; if (n_fast == 0)      begin failures++; $display("FAIL rate never checked"); end
    checks++; if (n_stalls == 0)    begin failures++; $display("FAIL no output stall"); end
    done = 1;
  end
endmodule
