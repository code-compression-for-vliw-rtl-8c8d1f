// tb_v2f_workload_markov_width - the Markov engine with the model sizes and
// codeword widths evaluated for the two processors: a 32x4 model (the
// TMS320C6x case) and a 128x4 model (the IA-64 case), each with 2- and 3-bit
// codewords, and the largest model of the bus-toggle study, 32x32 (1024
// states) with 4-bit codewords, which is twice the default state count.
// Other N = 4 cases are covered by tb_v2f_workload_tms and
// tb_v2f_decompression_core. Each of the five engines is elaborated with its
// own N and state count and run by tb_v2f_mk_run on a random model of that
// shape: random access to 60 compressed blocks, every output word checked, one
// codeword per clock when nothing stalls. The engines run side by side, so
// their reports interleave in the log.
module tb_v2f_workload_markov_width;
  localparam int NRUN = 5;
  int   c [NRUN];
  int   f [NRUN];
  logic d [NRUN];
  int   checks = 0, failures = 0;

  tb_v2f_mk_run #(.DEPTH(32),  .WIDTH(4), .N(2)) u_c6x_2  (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_v2f_mk_run #(.DEPTH(32),  .WIDTH(4), .N(3)) u_c6x_3  (.checks(c[1]), .failures(f[1]), .done(d[1]));
  tb_v2f_mk_run #(.DEPTH(128), .WIDTH(4), .N(2)) u_ia64_2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  tb_v2f_mk_run #(.DEPTH(128), .WIDTH(4), .N(3)) u_ia64_3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  tb_v2f_mk_run #(.DEPTH(32),  .WIDTH(32), .N(4)) u_32x32 (.checks(c[4]), .failures(f[4]), .done(d[4]));

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
