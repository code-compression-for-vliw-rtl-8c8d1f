// v2f_memoryless_engine - block decompressor for memoryless (Tunstall) V2F code.
//
// A request names the byte address of one compressed block. The engine
// fetches the block's bits (v2f_stream_fetch), decodes LANES codewords per
// clock in the parallel decoder (v2f_parallel_decoder, LANES lookup units
// "D"), and packs the result into OUT_W-bit words (v2f_block_assembler) until
// the BLOCK_BITS bits of the uncompressed block have been produced; the end of
// block padding and whatever follows the block in memory are discarded.
// Decoding of a chunk happens in the cycle the fetch buffer holds LANES*N bits
// and the assembler has room, so the decode rate is LANES codewords per clock.
//
// Interface: req_valid / req_ready / req_addr (byte address) start a block;
// req_ready is high only when the previous block is fully delivered and no
// memory read is outstanding. mem_* is the compressed-memory read port
// described in v2f_stream_fetch. out_* delivers the block's words in order,
// first bits of the block in the MSBs of the first word.
// The decode rate follows the published parallel scheme; the block size,
// widths, lane count and handshakes are this design's choices.
module v2f_memoryless_engine
  import v2f_pkg::*;
#(
  parameter int    LANES       = 8,
  parameter int    N           = 4,
  parameter int    P0_PERMILLE = 830,
  parameter book_t BOOK        = tunstall_book(P0_PERMILLE, N),
  parameter int    MEM_W       = 32,
  parameter int    MEM_AW      = 16,
  parameter int    OUT_W       = 128,
  parameter int    BLOCK_BITS  = 256,
  parameter int    BYTE_AW     = $clog2(MEM_W / 8)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_valid,
  output logic                      req_ready,
  input  logic [MEM_AW+BYTE_AW-1:0] req_addr,
  output logic                      mem_req,
  output logic [MEM_AW-1:0]         mem_addr,
  input  logic                      mem_rvalid,
  input  logic [MEM_W-1:0]          mem_rdata,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [OUT_W-1:0]          out_data,
  output logic                      out_last
);

  localparam int MAX_LEN = book_max_len(BOOK, N);
  localparam int CHUNK   = LANES * N;
  localparam int DEC_W   = LANES * MAX_LEN;
  localparam int DCNT_W  = $clog2(DEC_W + 1);
  localparam int BUF_W   = CHUNK + 2 * MEM_W;
  localparam int FCNT_W  = $clog2(BUF_W + 1);

  logic              start, asm_busy, fetch_idle;
  logic [CHUNK-1:0]  win;
  logic [FCNT_W-1:0] avail, consume;
  logic [DEC_W-1:0]  dec_bits;
  logic [DCNT_W-1:0] dec_len;
  logic              dec_valid, dec_ready;

  assign req_ready = !asm_busy && fetch_idle;
  assign start     = req_valid && req_ready;
  assign dec_valid = asm_busy && (avail >= FCNT_W'(CHUNK));
  assign consume   = (dec_valid && dec_ready) ? FCNT_W'(CHUNK) : '0;

  v2f_stream_fetch #(
    .MEM_W(MEM_W), .MEM_AW(MEM_AW), .WIN_W(CHUNK), .MAX_PEND(2), .BUF_W(BUF_W)
  ) u_fetch (
    .clk, .rst_n, .start, .start_addr(req_addr), .stop(!asm_busy),
    .mem_req, .mem_addr, .mem_rvalid, .mem_rdata,
    .win, .avail, .consume, .idle(fetch_idle)
  );

  v2f_parallel_decoder #(
    .LANES(LANES), .N(N), .P0_PERMILLE(P0_PERMILLE), .BOOK(BOOK), .MAX_LEN(MAX_LEN)
  ) u_dec (
    .chunk(win), .bits(dec_bits), .len(dec_len)
  );

  v2f_block_assembler #(
    .IN_W(DEC_W), .OUT_W(OUT_W), .BLOCK_BITS(BLOCK_BITS)
  ) u_asm (
    .clk, .rst_n, .start,
    .in_valid(dec_valid), .in_ready(dec_ready), .in_bits(dec_bits), .in_len(dec_len),
    .out_valid, .out_ready, .out_data, .out_last, .busy(asm_busy)
  );

endmodule
