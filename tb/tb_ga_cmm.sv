// tb_ga_cmm: checks crossover and mutation.
//
// A parameter model answers the two probability requests. For every pair
// the testbench holds the random numbers a, b and x constant while the
// module works, so the expected children follow directly: crossover when
// a < pc at point k = x mod 4 (the k low bits exchanged), then every bit of
// child 0 flipped when a < pm and of child 1 when b < pm. Three phases use
// (pm, pc) = (0, 511), (511, 511) and random values, and the counts of
// crossovers, no-crossovers and mutations must all be non-zero. The time
// from taking a pair to offering the children is N + 1 cycles.
module tb_ga_cmm;
  import ga_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, run, par_req, par_ack, rng_ready, in_valid, in_ready, out_valid, out_ready, ev_cross;
  logic [1:0] ev_mut, rnd_x;
  logic [2:0] par_code;
  logic [15:0] par_data;
  logic [8:0] rnd_a, rnd_b;
  logic [3:0] in_a, in_b, out_c0, out_c1;
  int checks = 0, failures = 0;
  int pm, pc;

  ga_cmm dut (.clk, .rst_n, .start, .run, .par_req, .par_code, .par_ack, .par_data,
              .rng_ready, .rnd_a, .rnd_b, .rnd_x, .in_valid, .in_ready, .in_a, .in_b,
              .out_valid, .out_ready, .out_c0, .out_c1, .ev_cross, .ev_mut);

  always @(posedge clk) begin
    par_ack <= 1'b0;
    if (par_req && !par_ack) begin
      par_ack  <= 1'b1;
      par_data <= (par_code == PAR_PMUT) ? 16'(pm) : (par_code == PAR_PCROSS) ? 16'(pc) : 16'hFFFF;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int n_x, n_nox, n_mut;

  task automatic one_pair();
    logic [3:0] a, b, e0, e1, mask;
    int k, lat;
    a = 4'($urandom); b = 4'($urandom);
    rnd_a = 9'($urandom); rnd_b = 9'($urandom); rnd_x = 2'($urandom);
    k = int'(rnd_x);
    mask = 4'((1 << k) - 1);
    e0 = a; e1 = b;
    if (int'(rnd_a) < pc) begin e0 = (a & ~mask) | (b & mask); e1 = (b & ~mask) | (a & mask); n_x++; end
    else n_nox++;
    if (int'(rnd_a) < pm) begin e0 = ~e0; n_mut++; end
    if (int'(rnd_b) < pm) begin e1 = ~e1; n_mut++; end
    while (!in_ready) @(negedge clk);
    in_a = a; in_b = b; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    check(lat == 4 + 1, $sformatf("latency %0d", lat));
    check(out_c0 == e0 && out_c1 == e1, $sformatf("a=%h b=%h ra=%0d rb=%0d x=%0d: got %h %h expected %h %h",
          a, b, rnd_a, rnd_b, rnd_x, out_c0, out_c1, e0, e1));
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  task automatic phase(input int m, input int c, input int pairs);
    pm = m; pc = c;
    @(negedge clk); run = 0;
    @(negedge clk); run = 1; start = 1;
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < pairs; i++) one_pair();
  endtask

  initial begin
    rst_n = 0; start = 0; run = 0; rng_ready = 1; in_valid = 0; out_ready = 0;
    in_a = 0; in_b = 0; rnd_a = 0; rnd_b = 0; rnd_x = 0; par_data = 0; par_ack = 0;
    n_x = 0; n_nox = 0; n_mut = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase(0, 511, 40);
    phase(511, 511, 20);
    phase(200, 300, 100);
    check(n_x > 0 && n_nox > 0 && n_mut > 0, "crossover, no crossover and mutation all happened");
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
