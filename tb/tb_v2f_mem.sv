// tb_v2f_mem - behavioural model of the compressed program memory.
//
// A word array with a pipelined read port: each one-cycle mem_req is
// answered, in order, by one mem_rvalid cycle. When RAND_LAT is set the
// answer is delayed by a random 0..3 extra cycles (the order is kept; the
// testbench may switch this at run time through rand_lat);
// otherwise every read takes one cycle. Words are loaded by the testbench
// through write_byte(), byte 0 of a word in its top 8 bits.
module tb_v2f_mem #(
  parameter int MEM_W    = 32,
  parameter int MEM_AW   = 16,
  parameter bit RAND_LAT = 1
) (
  input  logic              clk,
  input  logic              mem_req,
  input  logic [MEM_AW-1:0] mem_addr,
  output logic              mem_rvalid,
  output logic [MEM_W-1:0]  mem_rdata
);
  localparam int BPW = MEM_W / 8;
  logic [MEM_W-1:0] mem [1 << MEM_AW];
  logic [MEM_AW-1:0] q[$];
  int   wait_cnt = 0;
  int   reads = 0;
  bit   rand_lat = RAND_LAT;   // may be changed by the testbench at run time

  function automatic void clear();
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = '0;
  endfunction

  function automatic void write_byte(int addr, byte unsigned v);
    int w = addr / BPW, b = addr % BPW;
    mem[w][MEM_W - 1 - 8 * b -: 8] = v;
  endfunction

  initial begin
    mem_rvalid = 0;
    mem_rdata  = '0;
  end

  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (q.size() > 0) begin
      if (wait_cnt > 0) wait_cnt--;
      else begin
        mem_rvalid <= 1'b1;
        mem_rdata  <= mem[q.pop_front()];
        wait_cnt   = rand_lat ? int'($urandom % 4 == 0) * int'($urandom % 4) : 0;
      end
    end
    if (mem_req) begin
      q.push_back(mem_addr);
      reads++;
    end
  end
endmodule
