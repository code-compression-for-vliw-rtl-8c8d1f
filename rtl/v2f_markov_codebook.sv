// v2f_markov_codebook - codebook memory of the Markov V2F decoder.
//
// A Markov V2F code has one Tunstall-style codebook per Markov state, each
// with 2^N entries. This RAM holds all of them: the entry for codeword cw of
// state s is at address {s, cw} and holds the bit string that codeword stands
// for (left-aligned, first bit at the MSB, SEQ_W bits), its length, and the
// state whose codebook decodes the next codeword. The codebooks depend on the
// program, so they are loaded through the write port rather than fixed in
// logic (a ROM would serve equally well for a fixed program).
//
// Interface: we / waddr / wdata write one entry; re / raddr read one entry,
// which appears on rdata the next clock and is held while re is low.
// Entry layout {next_state, len, seq}: this design's choice.
module v2f_markov_codebook #(
  parameter int STATES = 512,
  parameter int N      = 4,
  parameter int SEQ_W  = 16,
  parameter int ST_W   = $clog2(STATES),
  parameter int LEN_W  = $clog2(SEQ_W + 1),
  parameter int AW     = ST_W + N,
  parameter int EW     = ST_W + LEN_W + SEQ_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [EW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [EW-1:0] rdata
);

  logic [EW-1:0] mem [STATES << N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
