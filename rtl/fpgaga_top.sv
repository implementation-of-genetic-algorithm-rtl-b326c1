// fpgaga_top: a general-purpose genetic-algorithm engine (FPGAGA).
//
// Seven modules form a coarse-grained pipeline that runs one simple genetic
// algorithm (roulette selection, crossover, mutation, generational
// replacement) without a processor:
//   RNG  cellular-automaton random numbers          (ga_rng)
//   MEM  shared memory: parameters and population    (ga_memory)
//   MIC  memory interface and control, go/done       (ga_mic)
//   PSM  population sequencer                        (ga_psm)
//   SM   selection of parent pairs                   (ga_sm)
//   CMM  crossover and mutation                      (ga_cmm)
//   FM   fitness evaluation and generation count     (ga_fm)
// Members flow PSM -> SM -> CMM -> FM -> MIC -> MEM -> PSM; the FM sends the
// sum of fitness back to the SM. Once started, every module runs on its own
// and the stages overlap.
//
// Use: with `go` low, the front end writes the parameters and the initial
// population (with its fitness) through fe_we/fe_addr/fe_wdata and may read
// back on fe_rdata, which shows the word at fe_addr. A high `go` starts a
// run; `done` rises when the last generation is written and stays high until
// `go` is taken low. The final population is then in bank `pop_bank`. See
// ga_mic for the address map and ga_pkg for the parameter codes.
//
// Parameters are the hardware parameters of the design: P (width of the
// probabilities and of the decision random numbers), N (member width),
// F (fitness width), R (selection precision), CASIZE (automaton size),
// M (largest population), MAXNUMGENS (sizes the generation register) and
// FUNC (the fitness function). The defaults are the first simple-function
// configuration, f(x) = 2x. All other widths are derived from them as the
// design derives them; the address width is this design's own.
module fpgaga_top
  import ga_pkg::*;
#(
  parameter int unsigned P          = 9,
  parameter int unsigned N          = 4,
  parameter int unsigned F          = 5,
  parameter int unsigned R          = 4,
  parameter int unsigned CASIZE     = 16,
  parameter int unsigned M          = 16,
  parameter int unsigned MAXNUMGENS = 10,
  parameter func_e       FUNC       = FUNC_2X,
  localparam int unsigned LOGN      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned LOGM      = $clog2(M),
  localparam int unsigned LOGMAXNG  = $clog2(MAXNUMGENS),
  localparam int unsigned MEMBW     = N + F,
  localparam int unsigned SUMW      = LOGM + F,
  localparam int unsigned MAXOF_LOGMF_LOGMAXNG = (SUMW > LOGMAXNG) ? SUMW : LOGMAXNG,
  localparam int unsigned VALW0     = (CASIZE > P) ? CASIZE : P,
  localparam int unsigned VALW1     = (MEMBW > MAXOF_LOGMF_LOGMAXNG) ? MEMBW : MAXOF_LOGMF_LOGMAXNG,
  localparam int unsigned VALW      = (VALW0 > VALW1) ? VALW0 : VALW1,
  localparam int unsigned ADDRW     = LOGM + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  output logic                done,
  output logic                pop_bank,
  output logic [LOGMAXNG-1:0] gen_count,
  input  logic                fe_we,
  input  logic [ADDRW-1:0]    fe_addr,
  input  logic [VALW-1:0]     fe_wdata,
  output logic [VALW-1:0]     fe_rdata
);

  localparam int unsigned PC = 4;  // parameter clients: RNG, CMM, FM, PSM

  logic start, run;
  logic fm_gen_done, fm_finished;
  logic [PC-1:0] par_req, par_ack;
  logic [PC-1:0][LOGNUMPARAM-1:0] par_code;
  logic rd_req, rd_ack, wr_req, wr_ack;
  logic [LOGM-1:0] rd_idx, wr_idx;
  logic [VALW-1:0] rd_data, wr_data;
  logic mem_we;
  logic [ADDRW-1:0] mem_addr;
  logic [VALW-1:0] mem_wdata, mem_rdata;

  // RNG outputs
  logic rng_ready;
  logic [CASIZE-1:0] rng_state;
  logic [P-1:0] rnd_a, rnd_b;
  logic [LOGN-1:0] rnd_x;
  logic [R-1:0] rnd_sel;

  // pipeline channels
  logic psm_valid, psm_ready;
  logic [N-1:0] psm_member;
  logic [F-1:0] psm_fit;
  logic sm_valid, sm_ready;
  logic [N-1:0] sm_a, sm_b;
  logic cmm_valid, cmm_ready;
  logic [N-1:0] cmm_c0, cmm_c1;
  logic ev_cross;
  logic [1:0] ev_mut;
  logic sum_load;
  logic [SUMW-1:0] sum_val;

  ga_memory #(.ADDRW(ADDRW), .VALW(VALW)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  ga_mic #(.LOGM(LOGM), .VALW(VALW), .PC(PC)) u_mic (
    .clk, .rst_n, .go, .done, .pop_bank,
    .fe_we, .fe_addr, .fe_wdata, .fe_rdata,
    .start, .run, .fm_gen_done, .fm_finished,
    .par_req, .par_code, .par_ack,
    .rd_req, .rd_idx, .rd_ack, .rd_data,
    .wr_req, .wr_idx, .wr_data, .wr_ack,
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  ga_rng #(.CASIZE(CASIZE), .P(P), .R(R), .LOGN(LOGN), .VALW(VALW)) u_rng (
    .clk, .rst_n, .start, .run,
    .seed_req(par_req[0]), .seed_ack(par_ack[0]), .seed_data(rd_data),
    .ready(rng_ready), .state(rng_state),
    .rnd_a, .rnd_b, .rnd_x, .rnd_sel
  );
  assign par_code[0] = PAR_SEED;

  ga_psm #(.N(N), .F(F), .LOGM(LOGM), .VALW(VALW)) u_psm (
    .clk, .rst_n, .start, .run,
    .par_req(par_req[3]), .par_code(par_code[3]), .par_ack(par_ack[3]), .par_data(rd_data),
    .rd_req, .rd_idx, .rd_ack, .rd_data,
    .out_valid(psm_valid), .out_ready(psm_ready), .out_member(psm_member), .out_fit(psm_fit)
  );

  ga_sm #(.N(N), .F(F), .R(R), .M(M), .SUMW(SUMW)) u_sm (
    .clk, .rst_n, .run,
    .sum_load, .sum_in(sum_val), .rnd_sel,
    .in_valid(psm_valid), .in_ready(psm_ready), .in_member(psm_member), .in_fit(psm_fit),
    .out_valid(sm_valid), .out_ready(sm_ready), .out_a(sm_a), .out_b(sm_b)
  );

  ga_cmm #(.N(N), .P(P), .LOGN(LOGN), .VALW(VALW)) u_cmm (
    .clk, .rst_n, .start, .run,
    .par_req(par_req[1]), .par_code(par_code[1]), .par_ack(par_ack[1]), .par_data(rd_data),
    .rng_ready, .rnd_a, .rnd_b, .rnd_x,
    .in_valid(sm_valid), .in_ready(sm_ready), .in_a(sm_a), .in_b(sm_b),
    .out_valid(cmm_valid), .out_ready(cmm_ready), .out_c0(cmm_c0), .out_c1(cmm_c1),
    .ev_cross, .ev_mut
  );

  ga_fm #(.FUNC(FUNC), .N(N), .F(F), .LOGM(LOGM), .LOGMAXNG(LOGMAXNG), .VALW(VALW)) u_fm (
    .clk, .rst_n, .start, .run,
    .par_req(par_req[2]), .par_code(par_code[2]), .par_ack(par_ack[2]), .par_data(rd_data),
    .in_valid(cmm_valid), .in_ready(cmm_ready), .in_c0(cmm_c0), .in_c1(cmm_c1),
    .wr_req, .wr_idx, .wr_data, .wr_ack,
    .sum_load, .sum_out(sum_val),
    .gen_done(fm_gen_done), .finished(fm_finished), .gen_count
  );

endmodule
