// v2f_markov_engine - block decompressor for Markov V2F code.
//
// A request names the byte address of one compressed block. The engine
// fetches the block's bits (v2f_stream_fetch), decodes one N-bit codeword per
// clock in the sequential Markov decoder (v2f_markov_decoder), starting from
// the model's initial state, and packs the strings into OUT_W-bit words
// (v2f_block_assembler) until the BLOCK_BITS bits of the uncompressed block
// are out; the padding after the block's last leaf is discarded.
//
// Interface: as v2f_memoryless_engine (req_*, mem_*, out_*), plus the
// codebook load port cb_we / cb_addr / cb_wdata of v2f_markov_decoder, to be
// used while no block is in progress.
// The sequential decoding and codebook RAM follow the published Markov
// scheme; rate, widths and handshakes are this design's choices.
module v2f_markov_engine #(
  parameter int STATES     = 512,
  parameter int N          = 4,
  parameter int SEQ_W      = 16,
  parameter int MEM_W      = 32,
  parameter int MEM_AW     = 16,
  parameter int OUT_W      = 128,
  parameter int BLOCK_BITS = 256,
  parameter int BYTE_AW    = $clog2(MEM_W / 8),
  parameter int ST_W       = $clog2(STATES),
  parameter int LEN_W      = $clog2(SEQ_W + 1),
  parameter int CB_AW      = ST_W + N,
  parameter int CB_EW      = ST_W + LEN_W + SEQ_W
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
  output logic                      out_last,
  input  logic                      cb_we,
  input  logic [CB_AW-1:0]          cb_addr,
  input  logic [CB_EW-1:0]          cb_wdata
);

  localparam int BUF_W  = N + 2 * MEM_W;
  localparam int FCNT_W = $clog2(BUF_W + 1);

  logic              start, asm_busy, fetch_idle;
  logic [N-1:0]      win;
  logic [FCNT_W-1:0] avail, consume;
  logic              cw_valid, cw_take;
  logic              dec_valid, dec_ready;
  logic [SEQ_W-1:0]  dec_seq;
  logic [LEN_W-1:0]  dec_len;

  assign req_ready = !asm_busy && fetch_idle;
  assign start     = req_valid && req_ready;
  assign cw_valid  = asm_busy && (avail >= FCNT_W'(N));
  assign consume   = cw_take ? FCNT_W'(N) : '0;

  v2f_stream_fetch #(
    .MEM_W(MEM_W), .MEM_AW(MEM_AW), .WIN_W(N), .MAX_PEND(2), .BUF_W(BUF_W)
  ) u_fetch (
    .clk, .rst_n, .start, .start_addr(req_addr), .stop(!asm_busy),
    .mem_req, .mem_addr, .mem_rvalid, .mem_rdata,
    .win, .avail, .consume, .idle(fetch_idle)
  );

  v2f_markov_decoder #(
    .STATES(STATES), .N(N), .SEQ_W(SEQ_W), .INIT_STATE(0)
  ) u_dec (
    .clk, .rst_n, .start, .flush(!asm_busy),
    .cw_valid, .cw(win), .cw_take,
    .out_valid(dec_valid), .out_ready(dec_ready), .out_seq(dec_seq), .out_len(dec_len),
    .cb_we, .cb_addr, .cb_wdata
  );

  v2f_block_assembler #(
    .IN_W(SEQ_W), .OUT_W(OUT_W), .BLOCK_BITS(BLOCK_BITS)
  ) u_asm (
    .clk, .rst_n, .start,
    .in_valid(dec_valid), .in_ready(dec_ready), .in_bits(dec_seq), .in_len(dec_len),
    .out_valid, .out_ready, .out_data, .out_last, .busy(asm_busy)
  );

endmodule
