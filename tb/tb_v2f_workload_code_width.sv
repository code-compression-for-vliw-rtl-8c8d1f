// tb_v2f_workload_code_width - the memoryless engine with every codeword
// width evaluated for the two processors: N = 2, 3, 5 and 6 bits, each with
// the IA-64 code (P(0) = 0.83) and the TMS320C6x code (P(0) = 0.75). N = 4 is
// covered by tb_v2f_memoryless_engine. Each of the eight engines is
// elaborated with its own N and Tunstall codebook and run by tb_v2f_ml_run:
// random access to 60 compressed blocks, every output word checked, the decode
// rate of 8 codewords per cycle, and the compression ratio held against N / L.
// The eight ratios are printed. The engines are elaborated side by side, so
// the runs interleave in the log.
module tb_v2f_workload_code_width;
  localparam int NRUN = 8;
  int   c [NRUN];
  int   f [NRUN];
  logic d [NRUN];
  int   checks = 0, failures = 0;

  tb_v2f_ml_run #(.LANES(8), .N(2), .P0_PERMILLE(830)) u_ia64_2 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_v2f_ml_run #(.LANES(8), .N(3), .P0_PERMILLE(830)) u_ia64_3 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  tb_v2f_ml_run #(.LANES(8), .N(5), .P0_PERMILLE(830)) u_ia64_5 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  tb_v2f_ml_run #(.LANES(8), .N(6), .P0_PERMILLE(830)) u_ia64_6 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  tb_v2f_ml_run #(.LANES(8), .N(2), .P0_PERMILLE(750)) u_c6x_2  (.checks(c[4]), .failures(f[4]), .done(d[4]));
  tb_v2f_ml_run #(.LANES(8), .N(3), .P0_PERMILLE(750)) u_c6x_3  (.checks(c[5]), .failures(f[5]), .done(d[5]));
  tb_v2f_ml_run #(.LANES(8), .N(5), .P0_PERMILLE(750)) u_c6x_5  (.checks(c[6]), .failures(f[6]), .done(d[6]));
  tb_v2f_ml_run #(.LANES(8), .N(6), .P0_PERMILLE(750)) u_c6x_6  (.checks(c[7]), .failures(f[7]), .done(d[7]));

  function automatic bit all_done();
    for (int i = 0; i < NRUN; i++) if (d[i] !== 1'b1) return 0;
    return 1;
  endfunction

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NRUN; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin : watchdog
    #20000000;
    total();
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;  // the runs clear done at time 0
    while (!all_done()) #1000;
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
