// tb_ga_rng: checks the cellular-automaton random number generator.
//
// After start the RNG must request its seed; once the seed (AAAA) is given
// the state must equal it and then follow the testbench's own model of the
// null-boundary rule 90/150 automaton (cells 0, 4, 5, 6 on rule 150) step by
// step. The state must come back to the seed after exactly 2^16 - 1 steps
// and not before, the output slices must be the documented fields, a zero
// seed must be replaced by 1, and dropping run must clear ready.
module tb_ga_rng;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, run, seed_req, seed_ack, ready;
  logic [15:0] seed_data, state;
  logic [8:0] rnd_a, rnd_b;
  logic [1:0] rnd_x;
  logic [3:0] rnd_sel;
  int checks = 0, failures = 0;

  ga_rng dut (.clk, .rst_n, .start, .run, .seed_req, .seed_ack, .seed_data,
              .ready, .state, .rnd_a, .rnd_b, .rnd_x, .rnd_sel);

  function automatic logic [15:0] model_step(input logic [15:0] s);
    logic [15:0] o;
    for (int i = 0; i < 16; i++) begin
      bit l, r, self150;
      l = (i == 15) ? 1'b0 : s[i+1];
      r = (i == 0)  ? 1'b0 : s[i-1];
      self150 = (i == 0 || i == 4 || i == 5 || i == 6);
      o[i] = l ^ r ^ (self150 & s[i]);
    end
    return o;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic seed(input logic [15:0] v);
    @(negedge clk); run = 1; start = 1;
    @(negedge clk); start = 0;
    check(seed_req && !ready, "seed requested after start");
    @(negedge clk); seed_ack = 1; seed_data = v;
    @(negedge clk); seed_ack = 0;
    check(ready && !seed_req, "ready after seed");
  endtask

  initial begin
    logic [15:0] m;
    int period;
    rst_n = 0; start = 0; run = 0; seed_ack = 0; seed_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed(16'hAAAA);
    m = 16'hAAAA;
    // the seed is shown in the cycle after the ack edge, then one step per cycle
    check(state == 16'hAAAA, $sformatf("state after seed %h", state));
    for (int i = 0; i < 300; i++) begin
      check(rnd_a == state[8:0] && rnd_b == state[15:7] && rnd_x == state[9:8] && rnd_sel == state[7:4], "output fields");
      @(negedge clk);
      m = model_step(m);
      check(state == m, $sformatf("step %0d state %h model %h", i, state, m));
    end
    period = 300;
    while (state != 16'hAAAA && period < 70000) begin @(negedge clk); period++; end
    check(period == 65535, $sformatf("period %0d", period));
    @(negedge clk); run = 0;
    @(negedge clk);
    check(!ready, "ready drops with run");
    seed(16'h0000);
    check(state == 16'h0001, "zero seed replaced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
