// v2f_decompression_core - instruction decompression core for V2F-compressed
// code, placed between the compressed program memory and the processor's
// instruction bus or cache refill path.
//
// Two decompression schemes are provided side by side, each a complete
// engine with its own block request port, compressed-memory read port and
// word output port:
//   ml_*  memoryless V2F: a fixed Tunstall codebook for the instruction set
//         (zero-bit probability P0_PERMILLE/1000), decoded LANES codewords per
//         clock by parallel lookup units;
//   mk_*  Markov V2F: per-state codebooks in a loadable RAM of MK_STATES
//         states, decoded one codeword per clock.
// Both take the byte address of a compressed block and return the
// BLOCK_BITS-bit uncompressed block as BLOCK_BITS/OUT_W words. The defaults
// are 4-bit codewords, the IA-64 zero probability of 0.83 and a 512-state
// (128 deep, 4 wide) Markov model; memory width, output width, block size and
// lane count are this design's choices. See the engines for timing.
module v2f_decompression_core #(
  parameter int N           = 4,
  parameter int P0_PERMILLE = 830,
  parameter int LANES       = 8,
  parameter int MK_STATES   = 512,
  parameter int MK_SEQ_W    = 16,
  parameter int MEM_W       = 32,
  parameter int MEM_AW      = 16,
  parameter int OUT_W       = 128,
  parameter int BLOCK_BITS  = 256,
  parameter int BYTE_AW     = $clog2(MEM_W / 8),
  parameter int MK_ST_W     = $clog2(MK_STATES),
  parameter int MK_LEN_W    = $clog2(MK_SEQ_W + 1),
  parameter int MK_AW       = MK_ST_W + N,
  parameter int MK_EW       = MK_ST_W + MK_LEN_W + MK_SEQ_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // memoryless engine
  input  logic                      ml_req_valid,
  output logic                      ml_req_ready,
  input  logic [MEM_AW+BYTE_AW-1:0] ml_req_addr,
  output logic                      ml_mem_req,
  output logic [MEM_AW-1:0]         ml_mem_addr,
  input  logic                      ml_mem_rvalid,
  input  logic [MEM_W-1:0]          ml_mem_rdata,
  output logic                      ml_out_valid,
  input  logic                      ml_out_ready,
  output logic [OUT_W-1:0]          ml_out_data,
  output logic                      ml_out_last,
  // Markov engine
  input  logic                      mk_req_valid,
  output logic                      mk_req_ready,
  input  logic [MEM_AW+BYTE_AW-1:0] mk_req_addr,
  output logic                      mk_mem_req,
  output logic [MEM_AW-1:0]         mk_mem_addr,
  input  logic                      mk_mem_rvalid,
  input  logic [MEM_W-1:0]          mk_mem_rdata,
  output logic                      mk_out_valid,
  input  logic                      mk_out_ready,
  output logic [OUT_W-1:0]          mk_out_data,
  output logic                      mk_out_last,
  input  logic                      mk_cb_we,
  input  logic [MK_AW-1:0]          mk_cb_addr,
  input  logic [MK_EW-1:0]          mk_cb_wdata
);

  v2f_memoryless_engine #(
    .LANES(LANES), .N(N), .P0_PERMILLE(P0_PERMILLE), .MEM_W(MEM_W), .MEM_AW(MEM_AW),
    .OUT_W(OUT_W), .BLOCK_BITS(BLOCK_BITS)
  ) u_ml (
    .clk, .rst_n,
    .req_valid(ml_req_valid), .req_ready(ml_req_ready), .req_addr(ml_req_addr),
    .mem_req(ml_mem_req), .mem_addr(ml_mem_addr),
    .mem_rvalid(ml_mem_rvalid), .mem_rdata(ml_mem_rdata),
    .out_valid(ml_out_valid), .out_ready(ml_out_ready),
    .out_data(ml_out_data), .out_last(ml_out_last)
  );

  v2f_markov_engine #(
    .STATES(MK_STATES), .N(N), .SEQ_W(MK_SEQ_W), .MEM_W(MEM_W), .MEM_AW(MEM_AW),
    .OUT_W(OUT_W), .BLOCK_BITS(BLOCK_BITS)
  ) u_mk (
    .clk, .rst_n,
    .req_valid(mk_req_valid), .req_ready(mk_req_ready), .req_addr(mk_req_addr),
    .mem_req(mk_mem_req), .mem_addr(mk_mem_addr),
    .mem_rvalid(mk_mem_rvalid), .mem_rdata(mk_mem_rdata),
    .out_valid(mk_out_valid), .out_ready(mk_out_ready),
    .out_data(mk_out_data), .out_last(mk_out_last),
    .cb_we(mk_cb_we), .cb_addr(mk_cb_addr), .cb_wdata(mk_cb_wdata)
  );

endmodule
