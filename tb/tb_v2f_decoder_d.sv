// tb_v2f_decoder_d - self-checking testbench of the V2F lookup unit "D".
//
// 1. The two-bit code for P(0) = 0.8 must be exactly the worked example
//    1 <- 00, 01 <- 01, 001 <- 10, 000 <- 11.
// 2. For N = 2..6 and P(0) = 0.83 (IA-64) and 0.75 (TMS320C6x), the
//    generated codebooks must be complete, prefix-free Tunstall trees whose
//    expected string length matches the reference table
//    (IA-64: 2.519 4.286 5.706 7.186 8.777; C6x: 2.312 3.538 4.752 5.998 7.223).
module tb_v2f_decoder_d;
  int checks = 0, failures = 0;

  logic [1:0] cw2;
  logic [2:0] seq2;
  logic [5:0] len2;
  v2f_decoder_d #(.N(2), .P0_PERMILLE(800)) u_fig (.cw(cw2), .seq(seq2), .len(len2));

  localparam int NB = 10;
  localparam int NS   [NB] = '{2, 3, 4, 5, 6, 2, 3, 4, 5, 6};
  localparam int PS   [NB] = '{830, 830, 830, 830, 830, 750, 750, 750, 750, 750};
  localparam int AVGS [NB] = '{2519, 4286, 5706, 7186, 8777, 2312, 3538, 4752, 5998, 7223};
  int   c [NB];
  int   f [NB];
  logic d [NB];
  for (genvar g = 0; g < NB; g++) begin : g_book
    tb_v2f_d_book_check #(.N(NS[g]), .P0_PERMILLE(PS[g]), .EXP_AVG_MILLI(AVGS[g]))
      u_chk (.checks(c[g]), .failures(f[g]), .done(d[g]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_seq [4];
    int         exp_len [4];
    exp_seq = '{3'b100, 3'b010, 3'b001, 3'b000};
    exp_len = '{1, 2, 3, 3};
    for (int i = 0; i < 4; i++) begin
      cw2 = 2'(i);
      #1;
      checks++;
      if (seq2 !== exp_seq[i] || int'(len2) != exp_len[i]) begin
        failures++;
        $display("FAIL P0=0.8 N=2 cw=%0d: got %b/%0d expected %b/%0d", i, seq2, len2, exp_seq[i], exp_len[i]);
      end
    end
    #100;
    for (int g = 0; g < NB; g++) begin
      checks++;
      if (!d[g]) begin failures++; $display("FAIL checker %0d did not finish", g); end
      checks += c[g];
      failures += f[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
