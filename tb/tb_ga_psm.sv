// tb_ga_psm: checks the population sequencer.
//
// A MIC model answers the population-size request (6 members) and the
// member reads after random delays, with a word made from the index. A
// consumer takes members with a random ready. The members must come out as
// index 0..5, 0..5, ... with the right member and fitness, and each read
// must ask for the next index.
module tb_ga_psm;
  import ga_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, run, par_req, par_ack, rd_req, rd_ack, out_valid, out_ready;
  logic [2:0] par_code;
  logic [15:0] par_data, rd_data;
  logic [3:0] rd_idx, out_member;
  logic [4:0] out_fit;
  int checks = 0, failures = 0;

  ga_psm dut (.clk, .rst_n, .start, .run, .par_req, .par_code, .par_ack, .par_data,
              .rd_req, .rd_idx, .rd_ack, .rd_data, .out_valid, .out_ready, .out_member, .out_fit);

  function automatic logic [15:0] word(input int idx);
    return 16'({5'(3 * idx + 1), 4'(15 - idx)});
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // MIC model
  int wait_cnt;
  always @(posedge clk) begin
    par_ack <= 1'b0;
    rd_ack  <= 1'b0;
    if (par_req && !par_ack) begin
      check(par_code == PAR_POPLAST, "asks for population size");
      par_ack <= 1'b1; par_data <= 16'd5;
    end else if (rd_req && !rd_ack) begin
      if (wait_cnt == 0) begin
        rd_ack <= 1'b1; rd_data <= word(int'(rd_idx));
        wait_cnt <= $urandom_range(3);
      end else wait_cnt <= wait_cnt - 1;
    end
  end

  int expect_idx = 0, seen = 0;
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      check(out_member == word(expect_idx)[3:0] && out_fit == word(expect_idx)[8:4],
            $sformatf("member %0d: got %h/%h", expect_idx, out_member, out_fit));
      expect_idx <= (expect_idx == 5) ? 0 : expect_idx + 1;
      seen <= seen + 1;
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  initial begin
    rst_n = 0; start = 0; run = 0; wait_cnt = 0; par_ack = 0; rd_ack = 0; par_data = 0; rd_data = 0;
    out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); run = 1; start = 1;
    @(negedge clk); start = 0;
    wait (seen == 40);
    check(1'b1, "40 members passed");
    @(negedge clk); run = 0;
    @(negedge clk);
    check(!out_valid && !rd_req, "stops with run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
