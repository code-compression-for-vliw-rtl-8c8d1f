// tb_v2f_block_assembler - self-checking testbench of the word packer.
//
// Strings of random length 1..IN_W are offered with random gaps; the bits
// below each string's length are random garbage that must be ignored. The
// expected block is the first BLOCK_BITS bits of the concatenated strings;
// everything after that (the end-of-block padding) must be dropped and
// in_ready must fall once the block is full. The output is stalled at random.
// Checked: each word, out_last, busy, and that the last string is cut short
// (truncation counted and required).
module tb_v2f_block_assembler;
  localparam int IN_W = 96, OUT_W = 128, BLOCK_BITS = 256;
  localparam int ICNT_W = $clog2(IN_W + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, in_valid, in_ready, out_valid, out_ready, out_last, busy;
  logic [IN_W-1:0]   in_bits;
  logic [ICNT_W-1:0] in_len;
  logic [OUT_W-1:0]  out_data;

  v2f_block_assembler #(.IN_W(IN_W), .OUT_W(OUT_W), .BLOCK_BITS(BLOCK_BITS)) dut (.*);

  int checks = 0, failures = 0, truncated = 0, stalls = 0;
  bit stream[$];
  int words = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect and check output words
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      logic [OUT_W-1:0] e;
      for (int i = 0; i < OUT_W; i++) e[OUT_W - 1 - i] = stream[words * OUT_W + i];
      checks++;
      if (out_data !== e || out_last !== (words == BLOCK_BITS / OUT_W - 1)) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", words, out_data, e);
      end
      words++;
    end
  end

  initial begin
    start = 0; in_valid = 0; in_bits = '0; in_len = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int pushed;
      @(negedge clk);
      stream.delete();
      words = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      pushed = 0;
      while (busy) begin
        int l;
        out_ready = ($urandom % 3) != 0;
        in_valid = ($urandom % 4) != 0;
        l = 1 + int'($urandom % IN_W);
        for (int k = 0; k < IN_W; k++) in_bits[k] = 1'($urandom);
        in_len = ICNT_W'(l);
        #1;
        checks++;
        if (pushed >= BLOCK_BITS && in_ready) begin
          failures++; $display("FAIL in_ready high after the block filled");
        end
        if (in_valid && in_ready) begin
          for (int k = 0; k < l; k++) stream.push_back(in_bits[IN_W - 1 - k]);
          if (pushed < BLOCK_BITS && pushed + l > BLOCK_BITS) truncated++;
          pushed += l;
        end
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (words != BLOCK_BITS / OUT_W) begin
        failures++; $display("FAIL block %0d: %0d words", t, words);
      end
    end
    $display("truncated last strings %0d, output stalls %0d", truncated, stalls);
    checks++; if (truncated == 0) begin failures++; $display("FAIL no truncation"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
