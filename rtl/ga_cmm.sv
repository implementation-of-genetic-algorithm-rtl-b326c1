// ga_cmm: Crossover/Mutation Module (CMM).
//
// After `start` the CMM reads the mutation and the crossover probability
// (P-bit fractions of 2^P) from the parameters. For each pair {a, b} from the
// selection module it then:
//   1. draws a P-bit number; if it is below the crossover probability, it
//      makes a single-point crossover at point k: the k low bits of the two
//      members are exchanged. k is the LOGN-bit random number brought into
//      0..N-1 by one conditional subtraction of N (LOGN bits hold less than
//      2N), so the cut always falls on a bit boundary of the member;
//   2. walks the N bit positions, one per cycle, and flips bit i of each
//      child when that child's own P-bit random number is below the
//      mutation probability;
//   3. offers the two children to the fitness module (valid/ready).
// The children are offered N + 1 cycles after the pair is taken. The decisions from the RNG,
// the p-bit probabilities and the log2(n)-bit crossover point follow the
// design; single-point crossover, the bit-serial mutation and the mapping of
// k are this design's choices. ev_cross and ev_mut pulse when a crossover is
// made and when a bit is flipped.
module ga_cmm
  import ga_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned P    = 9,
  parameter int unsigned LOGN = 2,
  parameter int unsigned VALW = 16
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
  // random numbers
  input  logic            rng_ready,
  input  logic [P-1:0]    rnd_a,
  input  logic [P-1:0]    rnd_b,
  input  logic [LOGN-1:0] rnd_x,
  // selected pair in
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [N-1:0]    in_a,
  input  logic [N-1:0]    in_b,
  // children out
  output logic            out_valid,
  input  logic            out_ready,
  output logic [N-1:0]    out_c0,
  output logic [N-1:0]    out_c1,
  // events
  output logic            ev_cross,
  output logic [1:0]      ev_mut
);

  typedef enum logic [2:0] {S_IDLE, S_PMUT, S_PCROSS, S_WAIT, S_CROSS, S_MUT, S_OFFER} cmm_state_e;
  cmm_state_e st;

  logic [P-1:0] pmut, pcross;
  logic [N-1:0] c0, c1;
  logic [$clog2(N)-1:0] bitpos;
  logic [LOGN:0] k;
  logic [N-1:0]  lowmask;

  assign k        = ((LOGN+1)'(rnd_x) >= (LOGN+1)'(N)) ? (LOGN+1)'(rnd_x) - (LOGN+1)'(N) : (LOGN+1)'(rnd_x);
  assign lowmask  = N'((1 << k) - 1);
  assign par_req  = (st == S_PMUT) || (st == S_PCROSS);
  assign par_code = (st == S_PCROSS) ? PAR_PCROSS : PAR_PMUT;
  assign in_ready = (st == S_WAIT) && rng_ready;
  assign out_valid = (st == S_OFFER);
  assign out_c0   = c0;
  assign out_c1   = c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      pmut     <= '0;
      pcross   <= '0;
      c0       <= '0;
      c1       <= '0;
      bitpos   <= '0;
      ev_cross <= 1'b0;
      ev_mut   <= '0;
    end else begin
      ev_cross <= 1'b0;
      ev_mut   <= '0;
      if (!run) begin
        st <= S_IDLE;
      end else begin
        case (st)
          S_IDLE:   if (start) st <= S_PMUT;
          S_PMUT:   if (par_ack) begin pmut   <= par_data[P-1:0]; st <= S_PCROSS; end
          S_PCROSS: if (par_ack) begin pcross <= par_data[P-1:0]; st <= S_WAIT;   end
          S_WAIT: if (in_valid && in_ready) begin
            c0 <= in_a;
            c1 <= in_b;
            st <= S_CROSS;
          end
          S_CROSS: begin
            if (rnd_a < pcross) begin
              c0 <= (c0 & ~lowmask) | (c1 & lowmask);
              c1 <= (c1 & ~lowmask) | (c0 & lowmask);
              ev_cross <= 1'b1;
            end
            bitpos <= '0;
            st     <= S_MUT;
          end
          S_MUT: begin
            if (rnd_a < pmut) begin c0[bitpos] <= ~c0[bitpos]; ev_mut[0] <= 1'b1; end
            if (rnd_b < pmut) begin c1[bitpos] <= ~c1[bitpos]; ev_mut[1] <= 1'b1; end
            if (32'(bitpos) == N - 1) st <= S_OFFER;
            else bitpos <= bitpos + 1'b1;
          end
          S_OFFER: if (out_ready) st <= S_WAIT;
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  a_children_stable: assert property (@(posedge clk) disable iff (!rst_n || !run)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_c0) && $stable(out_c1)));

endmodule
