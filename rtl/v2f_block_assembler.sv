// v2f_block_assembler - packs decoded bit strings into fixed-width words and
// cuts the block off at its known size.
//
// The decoders return strings of varying length. This unit appends them to a
// left-aligned accumulator and hands out OUT_W-bit words (valid/ready) as soon
// as OUT_W bits are collected. The compressor extends the last leaf of a block
// with padding bits so that the tree walk ends on a leaf; because the size of
// an uncompressed block is known in advance, the decompressor simply keeps the
// first BLOCK_BITS bits and discards everything after them. Here that is done
// by clamping each accepted string to the bits still missing from the block.
//
// Interface: start opens a block (it must not arrive while busy). in_valid /
// in_ready / in_bits / in_len accept one string per cycle, first bit at the
// MSB of in_bits, bits below in_len ignored. out_valid / out_ready / out_data /
// out_last deliver BLOCK_BITS/OUT_W words, out_last on the final one. busy is
// high from start until the last word is taken. in_ready depends on out_ready
// in the same cycle (a word leaving frees room). BLOCK_BITS must be a multiple
// of OUT_W. The word width and handshakes are this design's choices.
module v2f_block_assembler #(
  parameter int IN_W       = 96,
  parameter int OUT_W      = 128,
  parameter int BLOCK_BITS = 256,
  parameter int ACC_W      = OUT_W + IN_W,
  parameter int ICNT_W     = $clog2(IN_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_bits,
  input  logic [ICNT_W-1:0] in_len,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data,
  output logic              out_last,
  output logic              busy
);

  localparam int WORDS  = BLOCK_BITS / OUT_W;
  localparam int CNT_W  = $clog2(ACC_W + 1);
  localparam int GOT_W  = $clog2(BLOCK_BITS + 1);
  localparam int WCNT_W = $clog2(WORDS + 1);

  logic [ACC_W-1:0]  acc_q;
  logic [CNT_W-1:0]  cnt_q;
  logic [GOT_W-1:0]  got_q;
  logic [WCNT_W-1:0] sent_q;
  logic              busy_q;

  logic              emit, accept;
  logic [CNT_W-1:0]  cnt1;
  logic [ACC_W-1:0]  acc1;
  logic [GOT_W-1:0]  need;
  logic [ICNT_W-1:0] take;
  logic [IN_W-1:0]   in_masked;
  logic [ACC_W-1:0]  in_wide;

  assign busy      = busy_q;
  assign out_valid = busy_q && (cnt_q >= CNT_W'(OUT_W));
  assign out_data  = acc_q[ACC_W-1 -: OUT_W];
  assign out_last  = (sent_q == WCNT_W'(WORDS - 1));

  always_comb begin
    emit     = out_valid && out_ready;
    cnt1     = emit ? cnt_q - CNT_W'(OUT_W) : cnt_q;
    acc1     = emit ? acc_q << OUT_W : acc_q;
    need     = GOT_W'(BLOCK_BITS) - got_q;
    in_ready = busy_q && (need != '0) && (cnt1 <= CNT_W'(ACC_W - IN_W));
    accept   = in_valid && in_ready;
    take     = (GOT_W'(in_len) > need) ? ICNT_W'(need) : in_len;
    in_masked = in_bits & ~({IN_W{1'b1}} >> take);
    in_wide  = '0;
    in_wide[ACC_W-1 -: IN_W] = in_masked;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q  <= '0;
      cnt_q  <= '0;
      got_q  <= '0;
      sent_q <= '0;
      busy_q <= 1'b0;
    end else if (start) begin
      acc_q  <= '0;
      cnt_q  <= '0;
      got_q  <= '0;
      sent_q <= '0;
      busy_q <= 1'b1;
    end else begin
      if (accept) begin
        acc_q <= acc1 | (in_wide >> cnt1);
        cnt_q <= cnt1 + CNT_W'(take);
        got_q <= got_q + GOT_W'(take);
      end else begin
        acc_q <= acc1;
        cnt_q <= cnt1;
      end
      if (emit) begin
        sent_q <= sent_q + 1'b1;
        if (out_last) busy_q <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy_q)
    else $error("v2f_block_assembler: start while a block is open");

endmodule
