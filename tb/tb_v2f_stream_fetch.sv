// tb_v2f_stream_fetch - self-checking testbench of the compressed-stream
// fetcher. Memory holds random bytes. For many random byte start addresses
// the consumer takes a random number of bits each cycle (never more than
// avail) and every bit taken is compared with the memory's byte stream from
// the start address, most significant bit first. Between blocks the test
// raises stop and waits for idle, as the engines do; words still in flight
// at stop must not leak into the next block. The memory has random latency.
module tb_v2f_stream_fetch;
  localparam int MEM_W = 32, MEM_AW = 10, WIN_W = 32, BUF_W = WIN_W + 2 * MEM_W;
  localparam int CNT_W = $clog2(BUF_W + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, stop, mem_req, mem_rvalid, idle;
  logic [MEM_AW+1:0] start_addr;
  logic [MEM_AW-1:0] mem_addr;
  logic [MEM_W-1:0]  mem_rdata;
  logic [WIN_W-1:0]  win;
  logic [CNT_W-1:0]  avail, consume;

  v2f_stream_fetch #(.MEM_W(MEM_W), .MEM_AW(MEM_AW), .WIN_W(WIN_W)) dut (.*);
  tb_v2f_mem #(.MEM_W(MEM_W), .MEM_AW(MEM_AW), .RAND_LAT(1)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0, full_rate = 0;
  byte unsigned bytes [1 << (MEM_AW + 2)];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; stop = 1; start_addr = '0; consume = '0;
    u_mem.clear();
    foreach (bytes[i]) begin
      bytes[i] = 8'($urandom);
      u_mem.write_byte(i, bytes[i]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int sa, pos, target;
      sa = int'($urandom % ((1 << (MEM_AW + 2)) - 200));
      target = 200 + int'($urandom % 600);
      @(negedge clk);
      while (!idle) @(negedge clk);
      start = 1; stop = 0; start_addr = (MEM_AW+2)'(sa);
      @(negedge clk);
      start = 0;
      pos = 0;
      while (pos < target) begin
        int take, lim;
        lim = (int'(avail) < WIN_W) ? int'(avail) : WIN_W;
        take = (t % 2 == 0) ? lim : int'($urandom % (lim + 1));
        if (lim == WIN_W && take == WIN_W) full_rate++;
        consume = CNT_W'(take);
        for (int k = 0; k < take; k++) begin
          int bi, bb;
          bi = sa + (pos + k) / 8;
          bb = 7 - (pos + k) % 8;
          checks++;
          if (win[WIN_W - 1 - k] !== bytes[bi][bb]) begin
            failures++;
            if (failures < 10) $display("FAIL start %0d bit %0d", sa, pos + k);
          end
        end
        pos += take;
        @(negedge clk);
      end
      consume = '0;
      stop = 1;
    end
    $display("full-rate cycles (WIN_W bits taken): %0d", full_rate);
    checks++; if (full_rate == 0) begin failures++; $display("FAIL never ran at full rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
