// ga_fm: Fitness Module (FM).
//
// At start-up the FM reads the initial sum of fitness, the population size
// and the number of generations from the parameters, and hands the initial
// sum to the selection module. It then takes each pair of children from the
// crossover/mutation module, evaluates them one after the other
// (ga_fitness_eval) and writes each one with its fitness, {fitness, member},
// into the next free slot of the new population through the MIC. It adds up
// the fitness of the members it writes. When the write of the last member of
// a generation is acknowledged it pulses `gen_done` (the MIC then swaps the
// population banks in the same edge) and hands the new sum to the selection
// module. After the last generation it pulses `finished` instead and stops.
// If the population size is odd, the second child of the last pair opens
// the next generation.
// What the FM does (evaluate, write via the MIC, keep the sum for selection,
// count generations, end the run) follows the design; the order of the
// steps and the handshakes are this design's choices.
// gen_done and finished are combinational on wr_ack; sum_load is registered.
module ga_fm
  import ga_pkg::*;
#(
  parameter func_e       FUNC     = FUNC_2X,
  parameter int unsigned N        = 4,
  parameter int unsigned F        = 5,
  parameter int unsigned LOGM     = 4,
  parameter int unsigned LOGMAXNG = 4,
  parameter int unsigned VALW     = 16,
  localparam int unsigned SUMW    = LOGM + F
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            run,
  // parameter requests
  output logic            par_req,
  output logic [LOGNUMPARAM-1:0] par_code,
  input  logic            par_ack,
  input  logic [VALW-1:0] par_data,
  // children from the crossover/mutation module
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [N-1:0]    in_c0,
  input  logic [N-1:0]    in_c1,
  // member write through the MIC
  output logic            wr_req,
  output logic [LOGM-1:0] wr_idx,
  output logic [VALW-1:0] wr_data,
  input  logic            wr_ack,
  // sum of fitness to the selection module
  output logic            sum_load,
  output logic [SUMW-1:0] sum_out,
  // status to the MIC
  output logic            gen_done,
  output logic            finished,
  output logic [LOGMAXNG-1:0] gen_count
);

  typedef enum logic [3:0] {
    S_IDLE, S_PSUM, S_PPOP, S_PGEN, S_WAIT, S_EV0, S_EV1, S_WR0, S_WR1, S_HALT
  } fm_state_e;
  fm_state_e st;

  logic [N-1:0]    c0, c1;
  logic [F-1:0]    fit0, fit1;
  logic [LOGM-1:0] poplast;
  logic [LOGMAXNG-1:0] genlast;
  logic [SUMW-1:0] sum_acc;
  logic            ev_start, ev_done;
  logic [N-1:0]    ev_x;
  logic [F-1:0]    ev_fit;
  logic            ev_wait;    // evaluation of the current child started
  logic [F-1:0]    wfit;
  logic            last_slot;

  ga_fitness_eval #(.FUNC(FUNC), .N(N), .F(F)) u_eval (
    .clk, .rst_n, .start(ev_start), .x(ev_x), .done(ev_done), .fit(ev_fit)
  );

  assign par_req  = (st == S_PSUM) || (st == S_PPOP) || (st == S_PGEN);
  assign par_code = (st == S_PSUM) ? PAR_INITSUM : (st == S_PPOP) ? PAR_POPLAST : PAR_GENLAST;
  assign in_ready = (st == S_WAIT);
  assign ev_x     = (st == S_EV1) ? c1 : c0;
  assign ev_start = ((st == S_EV0) || (st == S_EV1)) && !ev_wait;

  assign wr_req   = (st == S_WR0) || (st == S_WR1);
  assign wfit     = (st == S_WR1) ? fit1 : fit0;
  assign wr_data  = VALW'({wfit, (st == S_WR1) ? c1 : c0});
  assign last_slot = (wr_idx == poplast);
  assign gen_done = wr_req && wr_ack && last_slot && (gen_count != genlast);
  assign finished = wr_req && wr_ack && last_slot && (gen_count == genlast);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      c0        <= '0;
      c1        <= '0;
      fit0      <= '0;
      fit1      <= '0;
      poplast   <= '0;
      genlast   <= '0;
      sum_acc   <= '0;
      sum_load  <= 1'b0;
      sum_out   <= '0;
      wr_idx    <= '0;
      gen_count <= '0;
      ev_wait   <= 1'b0;
    end else begin
      sum_load <= 1'b0;
      if (!run) begin
        st      <= S_IDLE;
        ev_wait <= 1'b0;
      end else begin
        case (st)
          S_IDLE: if (start) begin
            st        <= S_PSUM;
            wr_idx    <= '0;
            gen_count <= '0;
            sum_acc   <= '0;
          end
          S_PSUM: if (par_ack) begin
            sum_out  <= par_data[SUMW-1:0];
            sum_load <= 1'b1;
            st       <= S_PPOP;
          end
          S_PPOP: if (par_ack) begin poplast <= par_data[LOGM-1:0];     st <= S_PGEN; end
          S_PGEN: if (par_ack) begin genlast <= par_data[LOGMAXNG-1:0]; st <= S_WAIT; end
          S_WAIT: if (in_valid) begin
            c0 <= in_c0;
            c1 <= in_c1;
            st <= S_EV0;
          end
          S_EV0: begin
            ev_wait <= 1'b1;
            if (ev_wait && ev_done) begin fit0 <= ev_fit; ev_wait <= 1'b0; st <= S_EV1; end
          end
          S_EV1: begin
            ev_wait <= 1'b1;
            if (ev_wait && ev_done) begin fit1 <= ev_fit; ev_wait <= 1'b0; st <= S_WR0; end
          end
          S_WR0, S_WR1: if (wr_ack) begin
            if (last_slot) begin
              wr_idx   <= '0;
              sum_acc  <= '0;
              sum_out  <= sum_acc + SUMW'(wfit);
              if (gen_count == genlast) begin
                st <= S_HALT;
              end else begin
                sum_load  <= 1'b1;
                gen_count <= gen_count + 1'b1;
                st        <= (st == S_WR0) ? S_WR1 : S_WAIT;
              end
            end else begin
              wr_idx  <= wr_idx + 1'b1;
              sum_acc <= sum_acc + SUMW'(wfit);
              st      <= (st == S_WR0) ? S_WR1 : S_WAIT;
            end
          end
          S_HALT: ;
          default: st <= S_IDLE;
        endcase
      end
    end
  end

endmodule
