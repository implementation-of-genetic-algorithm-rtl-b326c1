// ga_tb_engine: one GA engine in a given configuration with its front-end
// model and checker (ga_tb_harness), for the workload testbench.
module ga_tb_engine
  import ga_pkg::*;
#(
  parameter func_e       FUNC = FUNC_2X,
  parameter int unsigned N    = 4,
  parameter int unsigned F    = 5,
  parameter int unsigned OPT  = 30,
  parameter int unsigned INIT_SEED = 1,
  parameter string       NAME = "f(x)=2x"
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int unsigned MEMBW = N + F;
  localparam int unsigned VALW  = (MEMBW > 16) ? MEMBW : 16;

  logic rst_n, go, done, pop_bank, fe_we;
  logic [3:0]      gen_count;
  logic [5:0]      fe_addr;
  logic [VALW-1:0] fe_wdata, fe_rdata;

  fpgaga_top #(.P(9), .N(N), .F(F), .R(4), .CASIZE(16), .M(16), .MAXNUMGENS(10), .FUNC(FUNC)) dut (
    .clk, .rst_n, .go, .done, .pop_bank, .gen_count,
    .fe_we, .fe_addr, .fe_wdata, .fe_rdata
  );

  ga_tb_harness #(.FUNC(FUNC), .N(N), .F(F), .M(16), .POP(16), .GENS(16),
                  .VALW(VALW), .ADDRW(6), .OPT(OPT), .INIT_SEED(INIT_SEED), .NAME(NAME)) h (
    .clk, .rst_n, .go, .done, .pop_bank, .fe_we, .fe_addr, .fe_wdata, .fe_rdata,
    .obs_wr(dut.wr_req && dut.wr_ack), .obs_wr_data(dut.wr_data),
    .obs_sum_load(dut.sum_load), .obs_sum(VALW'(dut.sum_val)),
    .obs_gen_done(dut.fm_gen_done), .obs_cross(dut.ev_cross), .obs_mut(dut.ev_mut),
    .obs_par_ack(dut.par_ack),
    .obs_reqs({dut.wr_req && !dut.wr_ack, dut.rd_req && !dut.rd_ack, dut.par_req & ~dut.par_ack}),
    .obs_busy({dut.psm_ready,
               dut.run && !dut.sm_ready && !dut.cmm_valid && !dut.u_cmm.par_req,
               dut.u_fm.ev_wait}),
    .finished, .checks, .failures, .cycles
  );
endmodule
