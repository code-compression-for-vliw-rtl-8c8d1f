// tb_v2f_parallel_decoder - self-checking testbench of the parallel decoder.
//
// Instance A: four lanes of 2-bit codewords with the worked-example code
// (P(0) = 0.8: 00->1, 01->01, 10->001, 11->000), written out here by hand;
// every one of the 256 possible input words is checked.
// Instance B: the default configuration (8 lanes, 4-bit IA-64 code); random
// chunks are checked against strings joined bit by bit from the codebook
// table. Both instances decode all lanes in a single evaluation.
module tb_v2f_parallel_decoder;
  import v2f_pkg::*;
  int checks = 0, failures = 0;

  // instance A
  logic [7:0]  chunk_a;
  logic [11:0] bits_a;
  logic [3:0]  len_a;
  v2f_parallel_decoder #(.LANES(4), .N(2), .P0_PERMILLE(800)) u_a (
    .chunk(chunk_a), .bits(bits_a), .len(len_a));

  // instance B
  localparam book_t BK = tunstall_book(830, 4);
  localparam int    ML = book_max_len(BK, 4);
  logic [31:0]   chunk_b;
  logic [8*ML-1:0] bits_b;
  logic [$clog2(8*ML+1)-1:0] len_b;
  v2f_parallel_decoder u_b (.chunk(chunk_b), .bits(bits_b), .len(len_b));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string fig_str [4];
    fig_str = '{"1", "01", "001", "000"};
    for (int v = 0; v < 256; v++) begin
      string s;
      logic [11:0] e;
      s = "";
      e = '0;
      chunk_a = 8'(v);
      #1;
      for (int l = 0; l < 4; l++) s = {s, fig_str[(v >> (6 - 2 * l)) & 3]};
      for (int k = 0; k < s.len(); k++) e[11 - k] = (s[k] == "1");
      checks++;
      if (int'(len_a) != s.len() || bits_a !== e) begin
        failures++;
        $display("FAIL A chunk=%b: got %b/%0d expected %s", chunk_a, bits_a, len_a, s);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      logic [8*ML-1:0] e;
      int pos;
      e = '0;
      pos = 0;
      chunk_b = $urandom;
      #1;
      for (int l = 0; l < 8; l++) begin
        int cw;
        cw = int'(chunk_b[31 - 4 * l -: 4]);
        for (int k = int'(BK[cw].len) - 1; k >= 0; k--) begin
          e[8 * ML - 1 - pos] = BK[cw].seq[k];
          pos++;
        end
      end
      checks++;
      if (int'(len_b) != pos || bits_b !== e) begin
        failures++;
        if (failures < 10) $display("FAIL B chunk=%h: len %0d expected %0d", chunk_b, len_b, pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
