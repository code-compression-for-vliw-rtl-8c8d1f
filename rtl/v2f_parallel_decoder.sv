// v2f_parallel_decoder - LANES memoryless V2F decoders working side by side.
//
// Because every codeword has the same length N and a memoryless code has no
// state, the compressed stream can be cut into N-bit chunks and every chunk
// decoded at the same time. This unit holds LANES copies of the lookup unit
// "D" (v2f_decoder_d), one per chunk of its input word, as in the published
// parallel decoder. The variable-length outputs are then joined in stream
// order: lane i's string is shifted right by the sum of the lengths of lanes
// 0..i-1 and the shifted strings are ORed. The joining network is this
// design's own (the published scheme only shows the decoders).
//
// Interface: chunk holds LANES codewords, the first one in the top N bits.
// bits returns the joined strings with the first decoded bit at the MSB and
// zeros after the last valid bit; len is the number of valid bits.
// Timing: combinational; LANES codewords are decoded per use.
module v2f_parallel_decoder
  import v2f_pkg::*;
#(
  parameter int    LANES       = 8,
  parameter int    N           = 4,
  parameter int    P0_PERMILLE = 830,
  parameter book_t BOOK        = tunstall_book(P0_PERMILLE, N),
  parameter int    MAX_LEN     = book_max_len(BOOK, N),
  parameter int    OUT_W       = LANES * MAX_LEN,
  parameter int    CNT_W       = $clog2(OUT_W + 1)
) (
  input  logic [LANES*N-1:0] chunk,
  output logic [OUT_W-1:0]   bits,
  output logic [CNT_W-1:0]   len
);

  logic [MAX_LEN-1:0] seq  [LANES];
  logic [LEN_W-1:0]   slen [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    v2f_decoder_d #(
      .N(N), .P0_PERMILLE(P0_PERMILLE), .BOOK(BOOK), .MAX_LEN(MAX_LEN)
    ) u_d (
      .cw (chunk[(LANES-1-i)*N +: N]),
      .seq(seq[i]),
      .len(slen[i])
    );
  end

  always_comb begin
    logic [CNT_W-1:0] off;
    logic [OUT_W-1:0] wide;
    bits = '0;
    off  = '0;
    for (int i = 0; i < LANES; i++) begin
      wide = '0;
      wide[OUT_W-1 -: MAX_LEN] = seq[i];
      bits = bits | (wide >> off);
      off  = off + CNT_W'(slen[i]);
    end
    len = off;
  end

endmodule
