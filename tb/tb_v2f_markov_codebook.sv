// tb_v2f_markov_codebook - self-checking testbench of the codebook RAM.
// Fills the whole RAM with random entries, then reads random addresses:
// data must appear one clock after re and stay unchanged while re is low,
// even when the read address moves and other entries are rewritten.
module tb_v2f_markov_codebook;
  localparam int STATES = 32, N = 4, SEQ_W = 16;
  localparam int AW = $clog2(STATES) + N, EW = $clog2(STATES) + $clog2(SEQ_W + 1) + SEQ_W;

  logic clk = 0;
  always #5 clk = ~clk;
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  logic [EW-1:0] wdata, rdata;
  v2f_markov_codebook #(.STATES(STATES), .N(N), .SEQ_W(SEQ_W)) dut (.*);

  logic [EW-1:0] model [1 << AW];
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = EW'({$urandom, $urandom});
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [EW-1:0] held;
      int a;
      a = int'($urandom % (1 << AW));
      re = 1; raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
      held = rdata;
      re = 0; raddr = AW'($urandom);
      we = 1; waddr = AW'($urandom); wdata = EW'({$urandom, $urandom});
      model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL read data not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
