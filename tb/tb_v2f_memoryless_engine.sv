// tb_v2f_memoryless_engine - self-checking testbench of the memoryless V2F
// engine. Two runs (see tb_v2f_ml_run): the default engine (8 lanes, 4-bit
// IA-64 code, P(0) = 0.83) and a 4-lane engine, as drawn in the published
// parallel decoder, with the TMS320C6x code (P(0) = 0.75). Each run checks
// every output word, the decode rate of LANES codewords per cycle, and that
// padding, unaligned block starts and output stalls all occurred.
module tb_v2f_memoryless_engine;
  int   c [2];
  int   f [2];
  logic d [2];
  int   checks = 0, failures = 0;

  tb_v2f_ml_run #(.LANES(8), .P0_PERMILLE(830)) u_ia64 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_v2f_ml_run #(.LANES(4), .P0_PERMILLE(750)) u_c6x  (.checks(c[1]), .failures(f[1]), .done(d[1]));

  initial begin : watchdog
    #10000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end

  initial begin
    #1;  // the runs clear done at time 0
    wait (d[0] === 1'b1 && d[1] === 1'b1);
    checks = c[0] + c[1];
    failures = f[0] + f[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
