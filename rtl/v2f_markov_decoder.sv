// v2f_markov_decoder - sequential decoder for Markov V2F code.
//
// With a Markov model every codeword is decoded with the codebook of the
// state reached by the previous one, so codewords cannot be decoded in
// parallel. The match logic here forms the codebook address {state, cw}; the
// entry read back gives the bit string and the next state, which becomes the
// state part of the next address. At the start of every block the state
// returns to INIT_STATE, the model's initial state, so any block can be
// decoded on its own.
//
// Pipelining (this design's choice): the codebook RAM is read synchronously
// and its output register is the decoder's output stage. The next state is
// taken straight from the RAM output into the next read address, so one
// codeword is decoded per clock while out_ready stays high.
//
// Interface: start (one cycle, decoder empty) begins a block. cw_valid / cw
// offer the next codeword; cw_take says it was used this cycle. out_valid /
// out_ready / out_seq / out_len carry one decoded string (first bit at the
// MSB). cb_we / cb_addr / cb_wdata load the codebook ({next_state, len, seq}
// entries at address {state, codeword}); loading while decoding is not
// supported. flush drops a string still waiting at the output.
module v2f_markov_decoder #(
  parameter int STATES     = 512,
  parameter int N          = 4,
  parameter int SEQ_W      = 16,
  parameter int INIT_STATE = 0,
  parameter int ST_W       = $clog2(STATES),
  parameter int LEN_W      = $clog2(SEQ_W + 1),
  parameter int AW         = ST_W + N,
  parameter int EW         = ST_W + LEN_W + SEQ_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             flush,
  input  logic             cw_valid,
  input  logic [N-1:0]     cw,
  output logic             cw_take,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [SEQ_W-1:0] out_seq,
  output logic [LEN_W-1:0] out_len,
  input  logic             cb_we,
  input  logic [AW-1:0]    cb_addr,
  input  logic [EW-1:0]    cb_wdata
);

  logic [ST_W-1:0] state_q;
  logic            out_valid_q;
  logic [EW-1:0]   rdata;
  logic [ST_W-1:0] next_state, cur_state;

  assign next_state = rdata[EW-1 -: ST_W];
  assign out_len    = rdata[SEQ_W +: LEN_W];
  assign out_seq    = rdata[SEQ_W-1:0];
  assign out_valid  = out_valid_q;

  // the state for the codeword now being offered
  assign cur_state = out_valid_q ? next_state : state_q;
  assign cw_take   = cw_valid && !start && !flush && (!out_valid_q || out_ready);

  v2f_markov_codebook #(
    .STATES(STATES), .N(N), .SEQ_W(SEQ_W)
  ) u_cb (
    .clk, .we(cb_we), .waddr(cb_addr), .wdata(cb_wdata),
    .re(cw_take), .raddr({cur_state, cw}), .rdata
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= ST_W'(INIT_STATE);
      out_valid_q <= 1'b0;
    end else if (start || flush) begin
      state_q     <= ST_W'(INIT_STATE);
      out_valid_q <= 1'b0;
    end else begin
      if (out_valid_q && out_ready) state_q <= next_state;
      if (cw_take)
        out_valid_q <= 1'b1;
      else if (out_ready)
        out_valid_q <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(cb_we && cw_take))
    else $error("v2f_markov_decoder: codebook written while decoding");

endmodule
