// ga_tb_harness: front-end model and checker for one GA engine instance.
//
// Plays the front end: resets the engine, builds a pseudo-random initial
// population, computes its fitness with its own reference model, writes the
// parameters and the population into the shared memory, reads a few words
// back, raises go and waits for done. While the engine runs it checks every
// member the fitness module writes (its fitness against the reference
// model) and every sum handed to the selection module (against its own sum
// of what was written), keeps the best and mean fitness of each generation,
// and counts how often each mechanism happens: crossover, mutation, bank
// swap, parameter request, memory arbitration conflict, overlap of the
// pipeline stages, and (for partitions) the balance penalty. A mechanism
// that never happens counts as a failure. At the end it reads the final
// population back, checks it, and checks that the best member found has the
// known optimum of the fitness function.
module ga_tb_harness
  import ga_pkg::*;
#(
  parameter func_e       FUNC   = FUNC_2X,
  parameter int unsigned N      = 4,
  parameter int unsigned F      = 5,
  parameter int unsigned M      = 16,
  parameter int unsigned POP    = 16,
  parameter int unsigned GENS   = 16,
  parameter int unsigned VALW   = 16,
  parameter int unsigned ADDRW  = 6,
  parameter int unsigned OPT    = 30,      // known optimum fitness
  parameter int unsigned INIT_SEED = 1,    // seed of the population generator
  parameter string       NAME   = "f(x)=2x"
) (
  input  logic             clk,
  output logic             rst_n,
  output logic             go,
  input  logic             done,
  input  logic             pop_bank,
  output logic             fe_we,
  output logic [ADDRW-1:0] fe_addr,
  output logic [VALW-1:0]  fe_wdata,
  input  logic [VALW-1:0]  fe_rdata,
  // observation of engine internals
  input  logic             obs_wr,        // member write acknowledged
  input  logic [VALW-1:0]  obs_wr_data,
  input  logic             obs_sum_load,
  input  logic [VALW-1:0]  obs_sum,
  input  logic             obs_gen_done,
  input  logic             obs_cross,
  input  logic [1:0]       obs_mut,
  input  logic [3:0]       obs_par_ack,
  input  logic [5:0]       obs_reqs,      // pending memory requests
  input  logic [2:0]       obs_busy,      // SM, CMM, FM working at once
  output logic             finished,
  output int               checks,
  output int               failures,
  output int               cycles
);

  localparam int unsigned LOGM = $clog2(M);

  int n_cross, n_mut, n_swap, n_par, n_conflict, n_overlap, n_penalty, n_writes;
  int gen, gen_sum, gen_max, best, sum_seen, init_sum;
  int written_fit [];
  logic [N-1:0] pop0 [POP];

  // ---- reference model -------------------------------------------------
  // nets as lists of cell numbers (1-based), one string of cells per net
  // nets as lists of cell numbers (1-based), 0 ends a list
  typedef int net_list_t [9][16];
  function automatic net_list_t nets_table();
    net_list_t t;
    t = '{default: '{default: 0}};
    if (N == 5) begin
      t[0][0:3] = '{1,2,3,4};  t[1][0:1] = '{2,3};  t[2][0:1] = '{1,4};  t[3][0:1] = '{1,5};
    end else if (N == 10) begin
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

  function automatic int cut_count(input logic [N-1:0] p);
    net_list_t t;
    int cut;
    t = nets_table();
    cut = 0;
    for (int j = 0; j < nets_of(); j++) begin
      bit in_a, in_b;
      in_a = 0; in_b = 0;
      for (int k = 0; k < 16; k++)
        if (t[j][k] != 0) begin
          if (p[t[j][k]-1]) in_b = 1; else in_a = 1;
        end
      if (in_a && in_b) cut++;
    end
    return cut;
  endfunction

  function automatic int nets_of();
    return (N == 5) ? 4 : (N == 10) ? 6 : 9;
  endfunction

  function automatic bit balanced(input logic [N-1:0] p);
    int zeros;
    zeros = N - $countones(p);
    // block A holds between 40% and 60% of the cells
    return (zeros * 10 >= 4 * N) && (zeros * 10 <= 6 * N);
  endfunction

  function automatic int ref_fit(input logic [N-1:0] x);
    int v;
    v = int'(x);
    case (FUNC)
      FUNC_2X:     return 2 * v;
      FUNC_XPLUS5: return v + 5;
      FUNC_CUBIC:  return 2*v*v*v - 45*v*v + 300*v;
      default:     return balanced(x) ? nets_of() - cut_count(x) : 1;
    endcase
  endfunction

  function automatic logic [ADDRW-1:0] par_addr(input param_code_e code);
    return ADDRW'(code);
  endfunction
  function automatic logic [ADDRW-1:0] pop_addr(input bit bank, input int idx);
    return ADDRW'((1 << (LOGM + 1)) | (int'(bank) << LOGM) | idx);
  endfunction

  // front-end accesses change the inputs at the falling edge
  task automatic fe_write(input logic [ADDRW-1:0] a, input logic [VALW-1:0] d);
    @(negedge clk);
    fe_we = 1'b1; fe_addr = a; fe_wdata = d;
    @(negedge clk);
    fe_we = 1'b0;
  endtask

  task automatic fe_read(input logic [ADDRW-1:0] a, output logic [VALW-1:0] d);
    @(negedge clk);
    fe_addr = a;
    @(posedge clk);
    d = fe_rdata;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%s] FAIL: %s", NAME, what);
    end
  endtask

  // ---- monitors ----------------------------------------------------------
  always @(posedge clk) begin
    if (rst_n && go && !done) begin
      cycles++;
      if (obs_cross) n_cross++;
      n_mut += int'(obs_mut[0]) + int'(obs_mut[1]);
      if (obs_gen_done) n_swap++;
      n_par += $countones(obs_par_ack);
      if ($countones(obs_reqs) > 1) n_conflict++;
      if ($countones(obs_busy) > 1) n_overlap++;
      if (obs_wr) begin
        logic [N-1:0] mem_x;
        int f_hw, f_ref;
        mem_x = obs_wr_data[N-1:0];
        f_hw  = int'(obs_wr_data[N +: F]);
        f_ref = ref_fit(mem_x);
        check(f_hw == f_ref, $sformatf("member %0h written with fitness %0d, expected %0d", mem_x, f_hw, f_ref));
        if (FUNC == FUNC_PARTITION && !balanced(mem_x)) n_penalty++;
        gen_sum += f_hw;
        if (f_hw > gen_max) gen_max = f_hw;
        if (f_hw > best) best = f_hw;
        n_writes++;
        if (n_writes % POP == 0) begin
          gen++;
          $display("[%s] generation %0d: max %0d mean %0.4f", NAME, gen, gen_max, real'(gen_sum) / POP);
          sum_seen = gen_sum;
          gen_sum = 0;
          gen_max = 0;
        end
      end
      if (obs_sum_load && n_writes > 0) begin
        check(int'(obs_sum) == sum_seen, $sformatf("sum to selection %0d, expected %0d", obs_sum, sum_seen));
      end else if (obs_sum_load) begin
        check(int'(obs_sum) == init_sum, "initial sum handed to selection");
      end
    end
  end

  // ---- stimulus ----------------------------------------------------------
  initial begin
    logic [VALW-1:0] d;
    int unsigned lfsr;
    int final_sum, final_max;
    checks = 0; failures = 0; cycles = 0; finished = 0;
    n_cross = 0; n_mut = 0; n_swap = 0; n_par = 0; n_conflict = 0; n_overlap = 0;
    n_penalty = 0; n_writes = 0; gen = 0; gen_sum = 0; gen_max = 0; best = 0; sum_seen = 0;
    rst_n = 0; go = 0; fe_we = 0; fe_addr = '0; fe_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // initial population from a 32-bit xorshift generator
    lfsr = INIT_SEED;
    init_sum = 0;
    for (int i = 0; i < int'(POP); i++) begin
      lfsr ^= lfsr << 13; lfsr ^= lfsr >> 17; lfsr ^= lfsr << 5;
      pop0[i] = N'(lfsr >> 7);
      init_sum += ref_fit(pop0[i]);
    end
    $display("[%s] initial sum of fitness %0d", NAME, init_sum);

    fe_write(par_addr(PAR_SEED),    VALW'(16'hAAAA));
    fe_write(par_addr(PAR_PMUT),    VALW'(1));       // 1/512  = 0.00195
    fe_write(par_addr(PAR_PCROSS),  VALW'(511));     // 511/512 = 0.998
    fe_write(par_addr(PAR_INITSUM), VALW'(init_sum));
    fe_write(par_addr(PAR_POPLAST), VALW'(POP - 1));
    fe_write(par_addr(PAR_GENLAST), VALW'(GENS - 1));
    for (int i = 0; i < int'(POP); i++)
      fe_write(pop_addr(0, i), VALW'({F'(ref_fit(pop0[i])), pop0[i]}));

    fe_read(par_addr(PAR_SEED), d);
    check(d == VALW'(16'hAAAA), "seed read back");
    fe_read(pop_addr(0, POP - 1), d);
    check(d[N-1:0] == pop0[POP-1], "last member read back");

    @(negedge clk);
    go = 1;
    wait (done);
    @(posedge clk);
    check(gen == int'(GENS), $sformatf("generations written %0d", gen));
    check(n_writes == int'(GENS * POP), "member writes");

    // final population
    final_sum = 0; final_max = 0;
    for (int i = 0; i < int'(POP); i++) begin
      int f;
      fe_read(pop_addr(pop_bank, i), d);
      f = int'(d[N +: F]);
      check(f == ref_fit(d[N-1:0]), "final member fitness");
      final_sum += f;
      if (f > final_max) final_max = f;
    end
    check(final_sum == sum_seen, "final population sum");
    $display("[%s] final population: max %0d mean %0.4f, best seen %0d, %0d cycles",
             NAME, final_max, real'(final_sum) / POP, best, cycles);
    check(best == int'(OPT), $sformatf("best fitness %0d, optimum %0d", best, OPT));

    // mechanisms
    $display("[%s] crossovers %0d, mutated bits %0d, bank swaps %0d, parameter reads %0d, arbitration conflicts %0d, overlap cycles %0d, penalised members %0d",
             NAME, n_cross, n_mut, n_swap, n_par, n_conflict, n_overlap, n_penalty);
    check(n_cross > 0, "crossover happened");
    check(n_mut > 0, "mutation happened");
    check(n_swap == int'(GENS) - 1, "bank swaps");
    check(n_par == 7, "parameter reads");
    check(n_conflict > 0, "arbitration conflict happened");
    check(n_overlap > 0, "pipeline stages overlapped");
    if (FUNC == FUNC_PARTITION) check(n_penalty > 0, "balance penalty happened");

    @(negedge clk);
    go = 0;
    repeat (2) @(posedge clk);
    check(!done, "done drops after go");
    finished = 1;
  end

endmodule
