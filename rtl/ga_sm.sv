// ga_sm: Selection Module (SM), fitness-proportional (roulette) selection.
//
// For each parent the SM draws an R-bit random number u and sets the
// threshold T = (S * u) >> R, a random fraction of the population's sum of
// fitness S scaled down with R bits of precision. It then takes members from
// the population sequencer and adds up their fitness; the member whose
// fitness carries the running sum above T is selected. Two selections make a
// pair, which is offered to the crossover/mutation module; the SM then
// clears itself and starts the next pair. S is loaded from the fitness
// module (`sum_load`): the initial sum at start-up and the new sum after each
// generation; a load takes effect from the next selection on.
// If M members pass without the sum exceeding T (only possible when S is
// zero or stale), the member at hand is selected so that the pipeline never
// stalls; this guard is this design's addition.
// Pair-wise selection, the sum from the fitness module and the precision r
// follow the design; the threshold formula is this design's reading of it.
module ga_sm #(
  parameter int unsigned N    = 4,
  parameter int unsigned F    = 5,
  parameter int unsigned R    = 4,
  parameter int unsigned M    = 16,
  parameter int unsigned SUMW = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  // sum of fitness from the fitness module
  input  logic            sum_load,
  input  logic [SUMW-1:0] sum_in,
  // random number
  input  logic [R-1:0]    rnd_sel,
  // members from the sequencer
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [N-1:0]    in_member,
  input  logic [F-1:0]    in_fit,
  // selected pair to the crossover/mutation module
  output logic            out_valid,
  input  logic            out_ready,
  output logic [N-1:0]    out_a,
  output logic [N-1:0]    out_b
);

  typedef enum logic [1:0] {S_WAIT, S_THRESH, S_ACCUM, S_OFFER} sm_state_e;
  sm_state_e st;

  logic [SUMW-1:0]  sum_q;
  logic [SUMW-1:0]  thresh;
  logic [SUMW:0]    acc;
  logic [SUMW:0]    acc_nxt;
  logic             second;       // selecting the second parent
  logic [$clog2(M+1)-1:0] seen;
  logic             pick;
  logic [SUMW+R-1:0] prod;

  assign prod     = sum_q * rnd_sel;
  assign acc_nxt  = acc + (SUMW+1)'(in_fit);
  assign pick     = (acc_nxt > (SUMW+1)'(thresh)) || (seen == ($clog2(M+1))'(M - 1));
  assign in_ready = (st == S_ACCUM);
  assign out_valid = (st == S_OFFER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_WAIT;
      sum_q  <= '0;
      thresh <= '0;
      acc    <= '0;
      second <= 1'b0;
      seen   <= '0;
      out_a  <= '0;
      out_b  <= '0;
    end else if (!run) begin
      st     <= S_WAIT;
      second <= 1'b0;
    end else begin
      if (sum_load) sum_q <= sum_in;
      case (st)
        S_WAIT: if (sum_load) st <= S_THRESH;
        S_THRESH: begin
          thresh <= prod[R +: SUMW];
          acc    <= '0;
          seen   <= '0;
          st     <= S_ACCUM;
        end
        S_ACCUM: if (in_valid) begin
          if (pick) begin
            if (second) begin
              out_b  <= in_member;
              second <= 1'b0;
              st     <= S_OFFER;
            end else begin
              out_a  <= in_member;
              second <= 1'b1;
              st     <= S_THRESH;
            end
          end else begin
            acc  <= acc_nxt;
            seen <= seen + 1'b1;
          end
        end
        S_OFFER: if (out_ready) st <= S_THRESH;
        default: st <= S_WAIT;
      endcase
    end
  end

  a_pair_stable: assert property (@(posedge clk) disable iff (!rst_n || !run)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_a) && $stable(out_b)));

endmodule
