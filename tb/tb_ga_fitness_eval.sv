// tb_ga_fitness_eval: checks every fitness function over its whole domain.
//
// Instances for f(x) = 2x, x + 5 and 2x^3 - 45x^2 + 300x (x = 0..15) and
// for the 5-cell partition (all 32 strings) are compared with values the
// testbench works out itself; the arithmetic functions must answer one
// cycle after start. The known maxima 30, 20 and 1125 are checked too.
module tb_ga_fitness_eval;
  import ga_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, st;
  logic [3:0] x;
  logic [4:0] xp;
  logic d0, d1, d2, d3;
  logic [4:0] y0, y1;
  logic [10:0] y2;
  logic [2:0] y3;
  int checks = 0, failures = 0;

  ga_fitness_eval #(.FUNC(FUNC_2X),        .N(4), .F(5))  u0 (.clk, .rst_n, .start(st), .x(x),  .done(d0), .fit(y0));
  ga_fitness_eval #(.FUNC(FUNC_XPLUS5),    .N(4), .F(5))  u1 (.clk, .rst_n, .start(st), .x(x),  .done(d1), .fit(y1));
  ga_fitness_eval #(.FUNC(FUNC_CUBIC),     .N(4), .F(11)) u2 (.clk, .rst_n, .start(st), .x(x),  .done(d2), .fit(y2));
  ga_fitness_eval #(.FUNC(FUNC_PARTITION), .N(5), .F(3))  u3 (.clk, .rst_n, .start(st), .x(xp), .done(d3), .fit(y3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // 5-cell netlist: nets {1,2,3,4} {2,3} {1,4} {1,5}
  function automatic int part5(input logic [4:0] p);
    int cut, z;
    logic [4:0] nets [4] = '{5'b01111, 5'b00110, 5'b01001, 5'b10001};
    cut = 0;
    foreach (nets[j]) if (((p & nets[j]) != 0) && ((~p & nets[j]) != 0)) cut++;
    z = 5 - $countones(p);
    return (z >= 2 && z <= 3) ? 4 - cut : 1;
  endfunction

  initial begin
    int mx0, mx1, mx2;
    rst_n = 0; st = 0; x = 0; xp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mx0 = 0; mx1 = 0; mx2 = 0;
    for (int i = 0; i < 16; i++) begin
      int e2;
      @(negedge clk); x = 4'(i); st = 1;
      @(negedge clk); st = 0;
      check(d0 && d1 && d2, "one-cycle evaluation");
      e2 = 2*i*i*i - 45*i*i + 300*i;
      check(int'(y0) == 2*i, $sformatf("2x at %0d gave %0d", i, y0));
      check(int'(y1) == i + 5, $sformatf("x+5 at %0d gave %0d", i, y1));
      check(int'(y2) == e2, $sformatf("cubic at %0d gave %0d, expected %0d", i, y2, e2));
      if (int'(y0) > mx0) mx0 = int'(y0);
      if (int'(y1) > mx1) mx1 = int'(y1);
      if (int'(y2) > mx2) mx2 = int'(y2);
    end
    check(mx0 == 30 && mx1 == 20 && mx2 == 1125, "maxima 30, 20, 1125");
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); xp = 5'(i); st = 1;
      @(negedge clk); st = 0;
      while (!d3) @(negedge clk);
      check(int'(y3) == part5(5'(i)), $sformatf("partition %b gave %0d, expected %0d", i[4:0], y3, part5(5'(i))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
