// tb_v2f_workload_tms - TMS320C6x-style workloads on the default design.
//
// The default memoryless engine holds the IA-64 codebook (P(0) = 0.83). Code
// for the TMS320C6x (P(0) = 0.75) is handled here by the Markov engine at its
// default size:
//   1. the 4-bit Tunstall code for P(0) = 0.75 loaded as a one-state Markov
//      model (every entry returns to state 0);
//   2. a random 32-layer, 4-node Markov model (128 states, the size used for
//      TMS320C6x code) with 4-bit codewords.
// For each, random 256-bit blocks from the source are compressed, stored and
// decompressed in random order; every output word is checked, and the size
// ratio compressed/original is printed.
module tb_v2f_workload_tms;
  import v2f_pkg::*;
  import tb_v2f_util::*;

  localparam int N = 4, MEM_AW = 16, OUT_W = 128, BLOCK_BITS = 256;
  localparam int MK_SEQ_W = 16, ST_W = 9, LEN_W = 5, MK_AW = ST_W + N, MK_EW = ST_W + LEN_W + MK_SEQ_W;
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
  tb_v2f_mem #(.MEM_W(32), .MEM_AW(MEM_AW), .RAND_LAT(1)) u_mk_mem (
    .clk, .mem_req(mk_mem_req), .mem_addr(mk_mem_addr), .mem_rvalid(mk_mem_rvalid), .mem_rdata(mk_mem_rdata));

  assign ml_mem_rvalid = 1'b0;
  assign ml_mem_rdata  = '0;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tentry_t     book[][];
  markov_model mm;

  task automatic run(string name);
    bit blk[NBLK][$];
    int addr[NBLK];
    byte unsigned img[$];
    int order[$];
    u_mk_mem.clear();
    for (int b = 0; b < NBLK; b++) begin
      if (mm == null) random_bits(blk[b], BLOCK_BITS, 750);
      else mm.gen_bits(blk[b], BLOCK_BITS);
      addr[b] = img.size();
      void'(encode_block(book, N, blk[b], img));
    end
    foreach (img[i]) u_mk_mem.write_byte(i, img[i]);
    $display("%s: %0d states, ratio %.3f", name, book.size(),
             real'(img.size() * 8) / real'(NBLK * BLOCK_BITS));
    for (int s = 0; s < book.size(); s++)
      for (int c = 0; c < (1 << N); c++) begin
        @(negedge clk);
        mk_cb_we = 1; mk_cb_addr = MK_AW'(s * (1 << N) + c);
        mk_cb_wdata = MK_EW'(pack_entry(book[s][c], ST_W, LEN_W, MK_SEQ_W));
      end
    @(negedge clk);
    mk_cb_we = 0;
    for (int b = 0; b < NBLK; b++) order.push_back(b);
    order.shuffle();
    foreach (order[k]) begin
      int b, w;
      b = order[k];
      @(negedge clk);
      while (!mk_req_ready) @(negedge clk);
      mk_req_valid = 1; mk_req_addr = (MEM_AW+2)'(addr[b]);
      @(negedge clk);
      mk_req_valid = 0;
      w = 0;
      while (w < BLOCK_BITS / OUT_W) begin
        mk_out_ready = ($urandom % 4) != 0;
        @(posedge clk);
        if (mk_out_valid && mk_out_ready) begin
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
  endtask

  initial begin
    ml_req_valid = 0; ml_req_addr = '0; ml_out_ready = 0;
    mk_req_valid = 0; mk_req_addr = '0; mk_out_ready = 0;
    mk_cb_we = 0; mk_cb_addr = '0; mk_cb_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    mm = null;
    book_from_pkg(book, tunstall_book(750, N), N);
    run("TMS320C6x memoryless 4-bit code as a one-state model");
    mm = new(32, 4, N, MK_SEQ_W);
    book = mm.book;
    run("TMS320C6x-size 32x4 Markov model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
