// v2f_stream_fetch - reads one compressed block from memory as a bit stream.
//
// Compressed blocks are padded to whole bytes so that every block starts on a
// byte boundary and can be fetched on its own (random access at block
// granularity). This unit is given the block's byte address, reads the memory
// word by word from there, drops the bytes of the first word that precede the
// block, and keeps the bits in a left-aligned shift buffer. The decoder sees
// the next WIN_W bits (win) and how many are valid (avail), and each cycle
// tells how many it takes (consume, at most avail). Reads are issued
// whenever the buffer has room for the data already in flight plus one more
// word, with at most MAX_PEND reads outstanding, so a memory with one cycle of
// latency keeps a WIN_W = MEM_W consumer busy every cycle.
//
// The fetcher does not know where the block ends: it keeps reading until stop
// and the decoder discards what follows the block. Words arriving after stop
// are dropped; idle reports that no read is outstanding, so a new block may be
// started without old data mixing in.
//
// Bit order (this design's choice): byte 0 of a memory word is bits
// [MEM_W-1 -: 8] and the stream is read most significant bit first.
// Memory port (this design's choice): mem_req with mem_addr is a one-cycle
// read command; the memory answers each command, in order and after any
// latency, with one mem_rvalid cycle carrying mem_rdata.
module v2f_stream_fetch #(
  parameter int MEM_W    = 32,
  parameter int MEM_AW   = 16,
  parameter int WIN_W    = 32,
  parameter int MAX_PEND = 2,
  parameter int BUF_W    = WIN_W + MAX_PEND * MEM_W,
  parameter int BYTE_AW  = $clog2(MEM_W / 8),
  parameter int CNT_W    = $clog2(BUF_W + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [MEM_AW+BYTE_AW-1:0] start_addr,
  input  logic                      stop,
  output logic                      mem_req,
  output logic [MEM_AW-1:0]         mem_addr,
  input  logic                      mem_rvalid,
  input  logic [MEM_W-1:0]          mem_rdata,
  output logic [WIN_W-1:0]          win,
  output logic [CNT_W-1:0]          avail,
  input  logic [CNT_W-1:0]          consume,
  output logic                      idle
);

  localparam int PEND_W = $clog2(MAX_PEND + 1);

  logic [BUF_W-1:0]   buf_q;
  logic [CNT_W-1:0]   cnt_q;
  logic [PEND_W-1:0]  pend_q;     // reads in flight
  logic [PEND_W-1:0]  live_q;     // of those, reads whose data is wanted
  logic               active_q;
  logic               first_q;    // next wanted word is the block's first
  logic [BYTE_AW-1:0] skip_q;     // bytes to drop from the first word
  logic [MEM_AW-1:0]  addr_q;

  logic [CNT_W+1:0] room_need;
  assign room_need = (CNT_W+2)'(cnt_q) + (CNT_W+2)'(live_q) * (CNT_W+2)'(MEM_W)
                   + (CNT_W+2)'(MEM_W);
  assign mem_req   = active_q && !stop && !start &&
                     (int'(pend_q) < MAX_PEND) && (room_need <= (CNT_W+2)'(BUF_W));
  assign mem_addr  = addr_q;
  assign win       = buf_q[BUF_W-1 -: WIN_W];
  assign avail     = cnt_q;
  assign idle      = (pend_q == '0);

  // incoming word, left-aligned in a buffer-wide vector, first bytes dropped
  logic             take_word;
  logic [BUF_W-1:0] word_wide;
  logic [CNT_W-1:0] word_bits;
  logic [CNT_W-1:0] cnt_after;
  always_comb begin
    take_word = mem_rvalid && (live_q != '0);
    word_wide = '0;
    word_wide[BUF_W-1 -: MEM_W] = mem_rdata << (first_q ? 8 * int'(skip_q) : 0);
    word_bits = CNT_W'(MEM_W) - (first_q ? CNT_W'(8 * int'(skip_q)) : '0);
    cnt_after = cnt_q - consume;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q    <= '0;
      cnt_q    <= '0;
      pend_q   <= '0;
      live_q   <= '0;
      active_q <= 1'b0;
      first_q  <= 1'b0;
      skip_q   <= '0;
      addr_q   <= '0;
    end else begin
      pend_q <= pend_q + PEND_W'(mem_req) - PEND_W'(mem_rvalid);
      if (start) begin
        buf_q    <= '0;
        cnt_q    <= '0;
        active_q <= 1'b1;
        first_q  <= 1'b1;
        skip_q   <= start_addr[BYTE_AW-1:0];
        addr_q   <= start_addr[MEM_AW+BYTE_AW-1:BYTE_AW];
        live_q   <= '0;
      end else begin
        if (stop) active_q <= 1'b0;
        if (mem_req) addr_q <= addr_q + 1'b1;
        // data of reads issued before stop is no longer wanted
        if (stop)
          live_q <= '0;
        else
          live_q <= live_q + PEND_W'(mem_req) - PEND_W'(take_word);
        if (take_word && !stop) begin
          buf_q   <= (buf_q << consume) | (word_wide >> cnt_after);
          cnt_q   <= cnt_after + word_bits;
          first_q <= 1'b0;
        end else begin
          buf_q <= buf_q << consume;
          cnt_q <= cnt_after;
        end
      end
    end
  end

  // the consumer may not take more than is there
  assert property (@(posedge clk) disable iff (!rst_n) consume <= cnt_q)
    else $error("v2f_stream_fetch: consume exceeds avail");

  // a new block may only start once the old reads have all come back
  assert property (@(posedge clk) disable iff (!rst_n) start |-> idle)
    else $error("v2f_stream_fetch: start with reads in flight");

endmodule
