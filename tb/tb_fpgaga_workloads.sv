// tb_fpgaga_workloads: the engine on each evaluated workload, side by side.
//
// Five engines run at once, each with the hardware parameters of its case:
//   f(x) = x + 5                    N=4,  F=5,  optimum 20
//   f(x) = 2x^3 - 45x^2 + 300x      N=4,  F=11, optimum 1125
//   5-cell partition                N=5,  F=3,  optimum 3
//   10-cell partition               N=10, F=3,  optimum 4
//   15-cell partition               N=15, F=4,  optimum 7
// (f(x) = 2x at the default size is tb_fpgaga_top.) Every engine uses 16
// members, 16 generations, seed AAAA, mutation 1/512, crossover 511/512 and
// an initial population with the case's documented initial sum of fitness
// (187, 8965, 19, 22, 28). The harness checks each run; the summary line
// adds them up.
module tb_fpgaga_workloads;
  import ga_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int K = 5;
  logic [K-1:0] fin;
  int chk [K];
  int fail [K];
  int cyc [K];

  ga_tb_engine #(.FUNC(FUNC_XPLUS5),    .N(4),  .F(5),  .OPT(20),   .INIT_SEED(83),  .NAME("f(x)=x+5"))
    e0 (.clk, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]));
  ga_tb_engine #(.FUNC(FUNC_CUBIC),     .N(4),  .F(11), .OPT(1125), .INIT_SEED(286), .NAME("cubic"))
    e1 (.clk, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]));
  ga_tb_engine #(.FUNC(FUNC_PARTITION), .N(5),  .F(3),  .OPT(3),    .INIT_SEED(4),   .NAME("partition-5"))
    e2 (.clk, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]));
  ga_tb_engine #(.FUNC(FUNC_PARTITION), .N(10), .F(3),  .OPT(4),    .INIT_SEED(62),  .NAME("partition-10"))
    e3 (.clk, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]));
  ga_tb_engine #(.FUNC(FUNC_PARTITION), .N(15), .F(4),  .OPT(7),    .INIT_SEED(687), .NAME("partition-15"))
    e4 (.clk, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]), .cycles(cyc[4]));

  initial begin
    int c, f;
    wait (&fin);
    c = 0; f = 0;
    for (int i = 0; i < K; i++) begin c += chk[i]; f += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (400000) @(posedge clk);
    c = 0; f = 1;
    for (int i = 0; i < K; i++) begin c += chk[i]; f += fail[i]; end
    $display("watchdog: not every run finished (%b)", fin);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
