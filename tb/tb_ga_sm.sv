// tb_ga_sm: checks roulette selection.
//
// A stream of 16 members with known fitness is offered over and over. For
// every pair the testbench fixes the random number u and works out on its
// own which members must be picked: running sum of fitness, from where the
// stream stands, until it exceeds (S*u) >> 4, or the 16th member. It also
// checks that a new sum takes effect, and counts that selections with small
// and large thresholds both happen.
module tb_ga_sm;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, run, sum_load, in_valid, in_ready, out_valid, out_ready;
  logic [8:0] sum_in;
  logic [3:0] rnd_sel, in_member, out_a, out_b;
  logic [4:0] in_fit;
  int checks = 0, failures = 0;

  ga_sm dut (.clk, .rst_n, .run, .sum_load, .sum_in, .rnd_sel, .in_valid, .in_ready,
             .in_member, .in_fit, .out_valid, .out_ready, .out_a, .out_b);

  int fit_of [16];
  int pos = 0;          // stream position of the next member offered
  int model_pos = 0;    // stream position in the model
  int sum_now;

  assign in_member = 4'(pos);
  assign in_fit    = 5'(fit_of[pos]);

  always @(posedge clk) if (in_valid && in_ready) pos <= (pos + 1) % 16;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int pick(input int u);
    int t, acc, seen, m;
    t = (sum_now * u) >> 4;
    acc = 0; seen = 0;
    forever begin
      m = model_pos;
      model_pos = (model_pos + 1) % 16;
      if (acc + fit_of[m] > t || seen == 15) return m;
      acc += fit_of[m];
      seen++;
    end
  endfunction

  initial begin
    int ea, eb, tot, low_t, high_t;
    rst_n = 0; run = 0; sum_load = 0; sum_in = 0; rnd_sel = 0; in_valid = 0; out_ready = 0;
    tot = 0;
    for (int i = 0; i < 16; i++) begin fit_of[i] = (i * 7 + 3) % 31; tot += fit_of[i]; end
    low_t = 0; high_t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; run = 1;
    @(negedge clk); sum_load = 1; sum_in = 9'(tot); sum_now = tot;
    @(negedge clk); sum_load = 0; in_valid = 1;
    for (int k = 0; k < 60; k++) begin
      int u;
      u = $urandom_range(15);
      rnd_sel = 4'(u);
      ea = pick(u);
      eb = pick(u);
      if (u < 4) low_t++;
      if (u > 11) high_t++;
      wait (out_valid);
      @(negedge clk);
      check(int'(out_a) == ea && int'(out_b) == eb, $sformatf("pair %0d: got %0d %0d expected %0d %0d", k, out_a, out_b, ea, eb));
      out_ready = 1;
      // after pair 29 a smaller sum arrives while the pair is taken
      if (k == 29) begin sum_load = 1; sum_in = 9'(tot / 2); sum_now = tot / 2; end
      @(negedge clk);
      out_ready = 0;
      sum_load = 0;
    end
    check(low_t > 0 && high_t > 0, "low and high thresholds both used");
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
