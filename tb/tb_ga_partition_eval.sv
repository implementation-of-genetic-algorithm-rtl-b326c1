// tb_ga_partition_eval: checks the two-way partition evaluator.
//
// Three evaluators (5, 10 and 15 cells) are compared with a reference model
// that holds the nets as lists of cell numbers: all 32 and all 1024
// partitions of the small netlists and 3000 random ones of the large one.
// Fitness, cut count, balance flag and the latency are
// checked (done 2*nets + 2 cycles after the start cycle), plus the initial and final arrangements of the three example
// netlists (cut counts 4 -> 1, 6 -> 2, 9 -> 2).
module tb_ga_partition_eval;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic        s5, s10, s15;
  logic [4:0]  p5;
  logic [9:0]  p10;
  logic [14:0] p15;
  logic        d5, d10, d15, b5, b10, b15;
  logic [2:0]  f5, c5, f10, c10;
  logic [3:0]  f15, c15;

  ga_partition_eval #(.C(5),  .F(3)) u5  (.clk, .rst_n, .start(s5),  .p_in(p5),  .done(d5),  .fit(f5),  .fcut(c5),  .balanced(b5));
  ga_partition_eval #(.C(10), .F(3)) u10 (.clk, .rst_n, .start(s10), .p_in(p10), .done(d10), .fit(f10), .fcut(c10), .balanced(b10));
  ga_partition_eval #(.C(15), .F(4)) u15 (.clk, .rst_n, .start(s15), .p_in(p15), .done(d15), .fit(f15), .fcut(c15), .balanced(b15));

  typedef int net_list_t [9][16];
  function automatic net_list_t nets_table(input int n);
    net_list_t t;
    t = '{default: '{default: 0}};
    if (n == 5) begin
      t[0][0:3] = '{1,2,3,4};  t[1][0:1] = '{2,3};  t[2][0:1] = '{1,4};  t[3][0:1] = '{1,5};
    end else if (n == 10) begin
      t[0][0:9] = '{1,2,3,4,5,6,7,8,9,10};
      t[1][0:1] = '{5,6};  t[2][0:1] = '{4,7};  t[3][0:1] = '{3,8};
      t[4][0:1] = '{2,9};  t[5][0:1] = '{1,10};
    end else begin
      t[0][0:12] = '{1,3,5,6,7,8,9,10,11,12,13,14,15};
      t[1][0:1] = '{7,8};  t[2][0:1] = '{6,9};  t[3][0:1] = '{5,10};  t[4][0:1] = '{4,11};
      t[5][0:1] = '{3,12}; t[6][0:1] = '{2,13}; t[7][0:1] = '{1,14}; t[8][0:1] = '{1,15};
    end
    return t;
  endfunction
  function automatic int nnets(input int n); return (n == 5) ? 4 : (n == 10) ? 6 : 9; endfunction
  function automatic int cut_of(input int n, input logic [14:0] p);
    net_list_t t; int cut;
    t = nets_table(n); cut = 0;
    for (int j = 0; j < nnets(n); j++) begin
      bit a, b; a = 0; b = 0;
      for (int k = 0; k < 16; k++) if (t[j][k] != 0) begin if (p[t[j][k]-1]) b = 1; else a = 1; end
      if (a && b) cut++;
    end
    return cut;
  endfunction
  function automatic bit bal_of(input int n, input logic [14:0] p);
    int z; z = n - $countones(p & 15'((1 << n) - 1));
    return (z * 10 >= 4 * n) && (z * 10 <= 6 * n);
  endfunction
  function automatic logic [14:0] cells_b(input int cells [$]);
    logic [14:0] p; p = '0;
    foreach (cells[i]) p[cells[i]-1] = 1'b1;
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n, input logic [14:0] p, input int exp_cut = -1);
    int lat, cut, fexp, fgot, cgot;
    bit bgot;
    @(negedge clk);
    case (n) 5: begin p5 = p[4:0]; s5 = 1; end 10: begin p10 = p[9:0]; s10 = 1; end default: begin p15 = p; s15 = 1; end endcase
    @(negedge clk);
    s5 = 0; s10 = 0; s15 = 0;
    lat = 1;
    while (!((n == 5) ? d5 : (n == 10) ? d10 : d15)) begin @(negedge clk); lat++; end
    fgot = (n == 5) ? int'(f5) : (n == 10) ? int'(f10) : int'(f15);
    cgot = (n == 5) ? int'(c5) : (n == 10) ? int'(c10) : int'(c15);
    bgot = (n == 5) ? b5 : (n == 10) ? b10 : b15;
    cut  = cut_of(n, p);
    fexp = bal_of(n, p) ? nnets(n) - cut : 1;
    check(lat == 2 * nnets(n) + 2, $sformatf("latency %0d for %0d cells", lat, n));
    check(cgot == cut, $sformatf("%0d cells p=%h cut %0d expected %0d", n, p, cgot, cut));
    check(bgot == bal_of(n, p), "balance flag");
    check(fgot == fexp, $sformatf("%0d cells p=%h fitness %0d expected %0d", n, p, fgot, fexp));
    if (exp_cut >= 0) check(cgot == exp_cut, $sformatf("example arrangement cut %0d, drawn %0d", cgot, exp_cut));
  endtask

  initial begin
    rst_n = 0; s5 = 0; s10 = 0; s15 = 0; p5 = '0; p10 = '0; p15 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // example arrangements: cells listed are those of block B
    run(5,  cells_b('{3,4,5}), 4);
    run(5,  cells_b('{1,4,5}), 1);
    run(10, cells_b('{6,7,8,9,10}), 6);
    run(10, cells_b('{3,4,7,1,10}), 2);
    run(15, cells_b('{8,9,10,11,12,13,14,15}), 9);
    run(15, cells_b('{1,3,7,8,9,12,14,15}), 2);
    for (int i = 0; i < 32; i++)   run(5, 15'(i));
    for (int i = 0; i < 1024; i++) run(10, 15'(i));
    for (int i = 0; i < 3000; i++) run(15, 15'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
