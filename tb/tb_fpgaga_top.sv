// tb_fpgaga_top: end-to-end run of the GA engine at its default size.
//
// The engine maximises f(x) = 2x over 4-bit x with 16 members, 16
// generations, mutation probability 1/512 and crossover probability
// 511/512, from seed AAAA, and an initial population whose sum of fitness
// is 102, the figure of the reference run. ga_tb_harness acts as the front end and checks
// every write, every sum, the final population, the optimum (30) and that
// every mechanism of the engine occurred. A watchdog ends the run.
module tb_fpgaga_top;
  import ga_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, go, done, pop_bank, fe_we;
  logic [3:0]  gen_count;
  logic [5:0]  fe_addr;
  logic [15:0] fe_wdata, fe_rdata;
  logic finished;
  int checks, failures, cycles;

  fpgaga_top dut (
    .clk, .rst_n, .go, .done, .pop_bank, .gen_count,
    .fe_we, .fe_addr, .fe_wdata, .fe_rdata
  );

  ga_tb_harness #(.FUNC(FUNC_2X), .N(4), .F(5), .M(16), .POP(16), .GENS(16),
                  .VALW(16), .ADDRW(6), .OPT(30), .INIT_SEED(50052), .NAME("f(x)=2x")) h (
    .clk, .rst_n, .go, .done, .pop_bank, .fe_we, .fe_addr, .fe_wdata, .fe_rdata,
    .obs_wr(dut.wr_req && dut.wr_ack), .obs_wr_data(dut.wr_data),
    .obs_sum_load(dut.sum_load), .obs_sum(16'(dut.sum_val)),
    .obs_gen_done(dut.fm_gen_done), .obs_cross(dut.ev_cross), .obs_mut(dut.ev_mut),
    .obs_par_ack(dut.par_ack),
    .obs_reqs({dut.wr_req && !dut.wr_ack, dut.rd_req && !dut.rd_ack, dut.par_req & ~dut.par_ack}),
    .obs_busy({dut.psm_ready,
               dut.run && !dut.sm_ready && !dut.cmm_valid && !dut.u_cmm.par_req,
               dut.u_fm.ev_wait}),
    .finished, .checks, .failures, .cycles
  );

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
