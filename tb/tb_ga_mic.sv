// tb_ga_mic: checks the memory interface and control unit.
//
// A testbench memory array stands behind the MIC. The testbench loads it
// through the front-end port, starts a run with go and checks: the start
// pulse and run; that one request is served per cycle, acked one cycle
// after its grant, in the order write, read, parameter clients 0..3 when
// all arrive together; the read data and the address map (parameters,
// bank pop_bank for reads, the other bank for writes); the bank swap on
// gen_done; shut-down on fm_finished (run low, done high, final bank
// named); done falling after go; and front-end access after the run.
module tb_ga_mic;
  import ga_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, go, done, pop_bank, fe_we, start, run, fm_gen_done, fm_finished;
  logic [5:0] fe_addr, mem_addr;
  logic [15:0] fe_wdata, fe_rdata, rd_data, wr_data, mem_wdata, mem_rdata;
  logic [3:0] par_req, par_ack;
  logic [3:0][2:0] par_code;
  logic rd_req, rd_ack, wr_req, wr_ack, mem_we;
  logic [3:0] rd_idx, wr_idx;
  logic [15:0] mem [64];
  int checks = 0, failures = 0;

  ga_mic dut (.clk, .rst_n, .go, .done, .pop_bank, .fe_we, .fe_addr, .fe_wdata, .fe_rdata,
              .start, .run, .fm_gen_done, .fm_finished, .par_req, .par_code, .par_ack,
              .rd_req, .rd_idx, .rd_ack, .rd_data, .wr_req, .wr_idx, .wr_data, .wr_ack,
              .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  always_ff @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;
  assign mem_rdata = mem[mem_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // record the order in which acks arrive
  string order;
  always @(posedge clk) begin
    if (wr_ack) order = {order, "W"};
    if (rd_ack) order = {order, "R"};
    for (int i = 0; i < 4; i++) if (par_ack[i]) order = {order, $sformatf("%0d", i)};
  end

  // clients drop their request in the cycle after their ack
  logic [15:0] got_rd, got_par [4];
  always @(posedge clk) begin
    if (rd_ack) begin rd_req <= 1'b0; got_rd <= rd_data; end
    if (wr_ack) wr_req <= 1'b0;
    for (int i = 0; i < 4; i++) if (par_ack[i]) begin par_req[i] <= 1'b0; got_par[i] <= rd_data; end
  end

  initial begin
    rst_n = 0; go = 0; fe_we = 0; fe_addr = 0; fe_wdata = 0; fm_gen_done = 0; fm_finished = 0;
    par_req = 0; par_code = '0; rd_req = 0; rd_idx = 0; wr_req = 0; wr_idx = 0; wr_data = 0;
    order = "";
    repeat (2) @(negedge clk);
    rst_n = 1;
    // front end loads parameters 0..5 and bank 0
    for (int a = 0; a < 6; a++) begin
      @(negedge clk); fe_we = 1; fe_addr = 6'(a); fe_wdata = 16'(16'h1000 + a);
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); fe_we = 1; fe_addr = 6'(32 + i); fe_wdata = 16'(16'h2000 + i);
    end
    @(negedge clk); fe_we = 0; fe_addr = 6'd33;
    #1 check(fe_rdata == 16'h2001, "front-end read");
    check(!run && !done, "idle before go");
    go = 1;
    @(negedge clk);
    check(start && run, "start pulse and run");
    @(negedge clk);
    check(!start && run, "start is one cycle");
    // all six requests at once
    order = "";
    wr_req = 1; wr_idx = 4'd3; wr_data = 16'hBEEF;
    rd_req = 1; rd_idx = 4'd7;
    par_req = 4'b1111;
    par_code[0] = PAR_SEED; par_code[1] = PAR_PMUT; par_code[2] = PAR_GENLAST; par_code[3] = PAR_POPLAST;
    repeat (9) @(negedge clk);
    check(order == "WR0123", $sformatf("service order %s", order));
    check(got_rd == 16'h2007, $sformatf("read from bank 0 gave %h", got_rd));
    check(got_par[0] == 16'h1000 && got_par[1] == 16'h1001 && got_par[2] == 16'h1005 && got_par[3] == 16'h1004,
          "parameter data");
    check(mem[48 + 3] == 16'hBEEF, "write went to bank 1");
    // one ack per request, never two
    order = "";
    @(negedge clk); rd_req = 1; rd_idx = 4'd2;
    repeat (4) @(negedge clk);
    check(order == "R", $sformatf("single service, got %s", order));
    // bank swap
    @(negedge clk); fm_gen_done = 1;
    @(negedge clk); fm_gen_done = 0;
    check(pop_bank == 1'b1, "bank swapped");
    rd_req = 1; rd_idx = 4'd3;
    wr_req = 1; wr_idx = 4'd9; wr_data = 16'hCAFE;
    repeat (4) @(negedge clk);
    check(got_rd == 16'hBEEF, "read now from bank 1");
    check(mem[32 + 9] == 16'hCAFE, "write now to bank 0");
    // shut-down
    @(negedge clk); fm_finished = 1;
    @(negedge clk); fm_finished = 0;
    check(done && !run, "done and run low after finish");
    check(pop_bank == 1'b0, "final bank named");
    fe_addr = 6'd41;
    #1 check(fe_rdata == 16'hCAFE, "front end reads the result");
    @(negedge clk); go = 0;
    @(negedge clk);
    check(!done, "done falls after go");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
