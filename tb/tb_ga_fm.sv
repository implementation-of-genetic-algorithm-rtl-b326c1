// tb_ga_fm: checks the fitness module with f(x) = 2x.
//
// A parameter model gives initial sum 77, 5 members (an odd size, so one
// pair straddles two generations) and 3 generations. Pairs of random
// members arrive from a crossover/mutation model; writes are acked after
// random delays. The testbench checks the initial sum handed to selection,
// every write (slot index, member, fitness 2x), every generation sum, the
// gen_done pulses, gen_count, and a single finished pulse after exactly
// 15 writes, after which nothing more is taken or written.
module tb_ga_fm;
  import ga_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, run, par_req, par_ack, in_valid, in_ready, wr_req, wr_ack;
  logic sum_load, gen_done, finished;
  logic [2:0] par_code;
  logic [15:0] par_data, wr_data;
  logic [3:0] in_c0, in_c1, wr_idx, gen_count;
  logic [8:0] sum_out;
  int checks = 0, failures = 0;

  ga_fm dut (.clk, .rst_n, .start, .run, .par_req, .par_code, .par_ack, .par_data,
             .in_valid, .in_ready, .in_c0, .in_c1, .wr_req, .wr_idx, .wr_data, .wr_ack,
             .sum_load, .sum_out, .gen_done, .finished, .gen_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    par_ack <= 1'b0;
    if (par_req && !par_ack) begin
      par_ack  <= 1'b1;
      par_data <= (par_code == PAR_INITSUM) ? 16'd77 : (par_code == PAR_POPLAST) ? 16'd4 :
                  (par_code == PAR_GENLAST) ? 16'd2 : 16'hFFFF;
    end
  end

  // write acks after random delays
  int dly;
  always @(posedge clk) begin
    wr_ack <= 1'b0;
    if (wr_req && !wr_ack) begin
      if (dly == 0) begin wr_ack <= 1'b1; dly <= $urandom_range(3); end
      else dly <= dly - 1;
    end
  end

  // children source: queue of members offered in order
  logic [3:0] sent [$];
  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      sent.push_back(in_c0);
      sent.push_back(in_c1);
      in_c0 <= 4'($urandom); in_c1 <= 4'($urandom);
    end
  end

  int writes = 0, slot = 0, gsum = 0, n_gen_done = 0, n_fin = 0, n_sum = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_req && wr_ack) begin
      logic [3:0] m;
      m = sent.pop_front();
      check(int'(wr_idx) == slot, $sformatf("write %0d to slot %0d, expected %0d", writes, wr_idx, slot));
      check(wr_data[3:0] == m && int'(wr_data[8:4]) == 2 * int'(m),
            $sformatf("write %0d data %h, member %h", writes, wr_data, m));
      gsum += 2 * int'(m);
      writes++;
      slot = (slot == 4) ? 0 : slot + 1;
      if (slot == 0) begin
        check(gen_done == (writes != 15) && finished == (writes == 15), "end of generation signalled");
      end else begin
        check(!gen_done && !finished, "no early generation end");
      end
    end
    if (gen_done) n_gen_done++;
    if (finished) n_fin++;
    if (sum_load) begin
      if (n_sum == 0) check(sum_out == 9'd77, "initial sum to selection");
      else begin
        check(int'(sum_out) == gsum, $sformatf("generation sum %0d expected %0d", sum_out, gsum));
      end
      n_sum++;
    end
    if (sum_load && n_sum > 0) gsum = 0;
  end

  initial begin
    rst_n = 0; start = 0; run = 0; in_valid = 0; in_c0 = 4'd3; in_c1 = 4'd12; dly = 0;
    par_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); run = 1; start = 1;
    @(negedge clk); start = 0; in_valid = 1;
    wait (n_fin == 1);
    repeat (40) @(negedge clk);
    check(writes == 15, $sformatf("%0d writes", writes));
    check(n_gen_done == 2 && n_fin == 1, "two generation ends and one finish");
    check(n_sum == 3, "initial sum and two generation sums");
    check(gen_count == 4'd2, "generation count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
