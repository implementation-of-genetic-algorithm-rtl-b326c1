// ga_mic: Memory Interface and Control unit (MIC) of the GA engine.
//
// The MIC is the engine's only link to the outside world and its controller
// during start-up and shut-down. While idle it hands the shared memory to the
// front end, which loads the parameters and the initial population. A high
// `go` starts a run: the MIC pulses `start` and raises `run`, after which the
// other modules work on their own and reach the memory only through the MIC.
// When the fitness module reports `fm_finished`, the MIC drops `run` (which
// stops every module) and raises `done` until `go` is taken low.
//
// Memory service: one request per cycle is granted to the single memory
// port, in fixed priority: the fitness module's write, then the population
// sequencer's read, then the parameter requests (PC clients, client 0
// first). A grant is answered one cycle later by a one-cycle ack; read data
// is on `rd_data` in the ack cycle. A client keeps its request up until its
// ack, and a request whose ack is in flight is not granted twice.
//
// Address map (ADDRW = LOGM + 2 bits):
//   {1'b0, code}       user-controlled parameter `code` (see ga_pkg)
//   {1'b1, bank, idx}  population member idx of bank 0 or 1, stored as
//                      {fitness, member} in the low MEMBW bits.
// The sequencer reads bank `pop_bank`, the fitness module writes the other
// one, and `fm_gen_done` swaps them at the end of each generation; after
// `done`, `pop_bank` names the bank with the final population.
// The MIC's role and its go/done and start/shut-down protocol follow the
// design; the arbitration, the address map and the two banks are this
// design's own choices.
module ga_mic
  import ga_pkg::*;
#(
  parameter int unsigned LOGM  = 4,
  parameter int unsigned VALW  = 16,
  parameter int unsigned PC    = 4,
  localparam int unsigned ADDRW = LOGM + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // front end
  input  logic                   go,
  output logic                   done,
  output logic                   pop_bank,
  input  logic                   fe_we,
  input  logic [ADDRW-1:0]       fe_addr,
  input  logic [VALW-1:0]        fe_wdata,
  output logic [VALW-1:0]        fe_rdata,
  // module control
  output logic                   start,
  output logic                   run,
  input  logic                   fm_gen_done,
  input  logic                   fm_finished,
  // parameter requests
  input  logic [PC-1:0]          par_req,
  input  logic [PC-1:0][LOGNUMPARAM-1:0] par_code,
  output logic [PC-1:0]          par_ack,
  // population read (sequencer)
  input  logic                   rd_req,
  input  logic [LOGM-1:0]        rd_idx,
  output logic                   rd_ack,
  output logic [VALW-1:0]        rd_data,
  // population write (fitness module)
  input  logic                   wr_req,
  input  logic [LOGM-1:0]        wr_idx,
  input  logic [VALW-1:0]        wr_data,
  output logic                   wr_ack,
  // shared memory port
  output logic                   mem_we,
  output logic [ADDRW-1:0]       mem_addr,
  output logic [VALW-1:0]        mem_wdata,
  input  logic [VALW-1:0]        mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_DONE} mic_state_e;
  mic_state_e st;

  logic          g_wr, g_rd;
  logic [PC-1:0] g_par;
  logic [ADDRW-1:0] run_addr;

  // fixed-priority grant, skipping requests whose ack is already on its way
  always_comb begin
    g_wr  = 1'b0;
    g_rd  = 1'b0;
    g_par = '0;
    run_addr = '0;
    if (st == S_RUN) begin
      if (wr_req && !wr_ack) begin
        g_wr = 1'b1;
        run_addr = {1'b1, ~pop_bank, wr_idx};
      end else if (rd_req && !rd_ack) begin
        g_rd = 1'b1;
        run_addr = {1'b1, pop_bank, rd_idx};
      end else begin
        for (int i = PC - 1; i >= 0; i--) begin
          if (par_req[i] && !par_ack[i]) begin
            g_par    = '0;
            g_par[i] = 1'b1;
            run_addr = {1'b0, (LOGM+1)'(par_code[i])};
          end
        end
      end
    end
  end

  always_comb begin
    if (st == S_IDLE || st == S_DONE) begin
      mem_we    = fe_we;
      mem_addr  = fe_addr;
      mem_wdata = fe_wdata;
    end else begin
      mem_we    = g_wr;
      mem_addr  = run_addr;
      mem_wdata = wr_data;
    end
  end
  assign fe_rdata = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      start    <= 1'b0;
      run      <= 1'b0;
      done     <= 1'b0;
      pop_bank <= 1'b0;
      wr_ack   <= 1'b0;
      rd_ack   <= 1'b0;
      par_ack  <= '0;
      rd_data  <= '0;
    end else begin
      start   <= 1'b0;
      wr_ack  <= g_wr;
      rd_ack  <= g_rd;
      par_ack <= g_par;
      if (g_rd || (g_par != '0)) rd_data <= mem_rdata;
      case (st)
        S_IDLE: if (go) begin
          st       <= S_START;
          start    <= 1'b1;
          run      <= 1'b1;
          done     <= 1'b0;
          pop_bank <= 1'b0;
        end
        S_START: st <= S_RUN;
        S_RUN: begin
          if (fm_gen_done || fm_finished) pop_bank <= ~pop_bank;
          if (fm_finished) begin
            st   <= S_DONE;
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
        S_DONE: if (!go) begin
          st   <= S_IDLE;
          done <= 1'b0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a client keeps its request until acknowledged
  property p_hold(logic req, logic ack);
    @(posedge clk) disable iff (!rst_n || !run) (req && !ack) |=> req;
  endproperty
  a_wr_hold: assert property (p_hold(wr_req, wr_ack));
  a_rd_hold: assert property (p_hold(rd_req, rd_ack));

endmodule
