// tb_v2f_markov_decoder - self-checking testbench of the sequential Markov
// V2F decoder, with 2-bit codewords and a 4x4 layered Markov model.
//
// State 0's codebook is the published example (1 <- 00 then state 6,
// 01 <- 01 then 10, 001 <- 10 then 14, 000 <- 11 then 12); the other states
// get Tunstall codebooks of a random model with codewords assigned in random
// order. Random blocks drawn from the model are encoded by the reference
// encoder and their codewords fed to the decoder, which restarts at state 0
// for each block. Checked: the decoded strings, joined, reproduce the block
// (the last string may run past it: padding); the first codeword 11 of a
// block decodes to 000 and the second then uses state 12's codebook; with the
// output never stalled, one codeword is decoded per clock. Output stalls are
// counted and required.
module tb_v2f_markov_decoder;
  import tb_v2f_util::*;
  localparam int STATES = 16, N = 2, SEQ_W = 16;
  localparam int ST_W = 4, LEN_W = 5, AW = ST_W + N, EW = ST_W + LEN_W + SEQ_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic             start, flush, cw_valid, cw_take, out_valid, out_ready, cb_we;
  logic [N-1:0]     cw;
  logic [SEQ_W-1:0] out_seq;
  logic [LEN_W-1:0] out_len;
  logic [AW-1:0]    cb_addr;
  logic [EW-1:0]    cb_wdata;
  v2f_markov_decoder #(.STATES(STATES), .N(N), .SEQ_W(SEQ_W)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, fig_hits = 0;
  markov_model mm;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; flush = 0; cw_valid = 0; cw = '0; out_ready = 0; cb_we = 0; cb_addr = '0; cb_wdata = '0;
    mm = new(4, 4, N, SEQ_W);
    mm.book[0][0] = '{len: 1, seq: 32'b1,   next: 6};
    mm.book[0][1] = '{len: 2, seq: 32'b01,  next: 10};
    mm.book[0][2] = '{len: 3, seq: 32'b001, next: 14};
    mm.book[0][3] = '{len: 3, seq: 32'b000, next: 12};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < STATES; s++)
      for (int c = 0; c < (1 << N); c++) begin
        @(negedge clk);
        cb_we = 1; cb_addr = AW'(s * (1 << N) + c);
        cb_wdata = EW'(pack_entry(mm.book[s][c], ST_W, LEN_W, SEQ_W));
      end
    @(negedge clk);
    cb_we = 0;
    for (int t = 0; t < 200; t++) begin
      bit blk[$], cbits[$], got[$];
      byte unsigned img[$];
      int ncw, sent, recv, t0, t1;
      bit full_rate;
      full_rate = (t % 4 == 0);
      mm.gen_bits(blk, 64);
      if (t % 8 == 1) begin blk[0] = 0; blk[1] = 0; blk[2] = 0; end  // force "000" first
      img.delete();
      ncw = encode_block(mm.book, N, blk, img);
      cbits.delete();
      foreach (img[i]) for (int k = 7; k >= 0; k--) cbits.push_back(img[i][k]);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      sent = 0; recv = 0; got.delete(); t0 = -1; t1 = 0;
      for (int cyc = 0; recv < ncw; cyc++) begin
        cw_valid = (sent < ncw) && (full_rate || ($urandom % 4 != 0));
        cw = {cbits[sent * N], cbits[sent * N + 1]};
        out_ready = full_rate || ($urandom % 3 != 0);
        #1;
        if (out_valid && !out_ready) stalls++;
        if (out_valid && out_ready) begin
          for (int k = 0; k < int'(out_len); k++) got.push_back(out_seq[SEQ_W - 1 - k]);
          if (recv == 0 && blk[0] == 0 && blk[1] == 0 && blk[2] == 0) begin
            checks++;
            if (out_len != 3 || out_seq[SEQ_W-1 -: 3] != 3'b000) begin failures++; $display("FAIL 11 from state 0"); end
            fig_hits++;
          end
          recv++;
          t1 = cyc;
        end
        if (cw_take) begin
          if (t0 < 0) t0 = cyc;
          sent++;
        end
        @(negedge clk);
      end
      cw_valid = 0;
      checks++;
      if (got.size() < blk.size()) begin failures++; $display("FAIL block %0d short", t); end
      else begin
        bit ok = 1;
        for (int i = 0; i < blk.size(); i++) if (got[i] != blk[i]) ok = 0;
        if (!ok) begin failures++; $display("FAIL block %0d decoded wrongly", t); end
      end
      if (full_rate) begin
        checks++;
        if (t1 - t0 != ncw) begin failures++; $display("FAIL rate: %0d codewords in %0d cycles", ncw, t1 - t0); end
      end
    end
    $display("figure example hits %0d, output stalls %0d", fig_hits, stalls);
    checks++; if (fig_hits == 0 || stalls == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
