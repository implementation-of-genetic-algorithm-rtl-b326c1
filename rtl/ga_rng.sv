// ga_rng: pseudo-random number generator (RNG) of the GA engine.
//
// A one-dimensional cellular automaton of CASIZE cells advances one step per
// clock while the engine runs. Each cell takes the XOR of its two neighbours
// (rule 90), and the cells marked in RULE150 also XOR in their own value
// (rule 150); the ends see a constant 0 (null boundary). The default rule
// vector 16'h0071 gives the 16-cell automaton the maximal period 2^16 - 1.
// The automaton and its size (casize) follow the design; the 90/150 rule,
// the rule vector and the way the state is cut into numbers are this
// design's own choices.
//
// Start-up: after `start` the RNG asks the memory interface for the seed
// parameter (seed_req/seed_ack) and loads it; from then on it steps every
// cycle. An all-zero seed would lock the automaton, so it is replaced by 1.
//
// Outputs, all slices of the current state, valid while `ready` is high:
//   rnd_a, rnd_b : P-bit numbers for the crossover/mutation decisions (CMM)
//   rnd_x        : LOGN-bit number for the crossover point (CMM)
//   rnd_sel      : R-bit number for scaling the selection threshold (SM)
module ga_rng #(
  parameter int unsigned CASIZE  = 16,
  parameter int unsigned P       = 9,
  parameter int unsigned R       = 4,
  parameter int unsigned LOGN    = 2,
  parameter int unsigned VALW    = 16,
  parameter logic [CASIZE-1:0] RULE150 = CASIZE'(16'h0071)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,     // one-cycle pulse from the MIC
  input  logic              run,       // high while the engine runs
  // parameter request to the MIC
  output logic              seed_req,
  input  logic              seed_ack,
  input  logic [VALW-1:0]   seed_data,
  // random numbers
  output logic              ready,
  output logic [CASIZE-1:0] state,
  output logic [P-1:0]      rnd_a,
  output logic [P-1:0]      rnd_b,
  output logic [LOGN-1:0]   rnd_x,
  output logic [R-1:0]      rnd_sel
);

  logic [CASIZE-1:0] nxt;
  logic [CASIZE-1:0] seed_v;

  always_comb begin
    for (int i = 0; i < int'(CASIZE); i++) begin
      logic l, r;
      l = (i < int'(CASIZE) - 1) ? state[i+1] : 1'b0;
      r = (i > 0) ? state[i-1] : 1'b0;
      nxt[i] = l ^ r ^ (RULE150[i] & state[i]);
    end
  end

  assign seed_v = (seed_data[CASIZE-1:0] == '0) ? CASIZE'(1) : seed_data[CASIZE-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= CASIZE'(1);
      seed_req <= 1'b0;
      ready    <= 1'b0;
    end else if (!run) begin
      seed_req <= 1'b0;
      ready    <= 1'b0;
    end else if (start) begin
      seed_req <= 1'b1;
      ready    <= 1'b0;
    end else if (seed_req && seed_ack) begin
      seed_req <= 1'b0;
      state    <= seed_v;
      ready    <= 1'b1;
    end else if (ready) begin
      state    <= nxt;
    end
  end

  // Slices of the state. rnd_b is taken from the other end of the register
  // so that the two decisions of one cycle use different cells.
  assign rnd_a   = state[P-1:0];
  assign rnd_b   = state[CASIZE-1 -: P];
  assign rnd_x   = state[(CASIZE/2) +: LOGN];
  assign rnd_sel = state[(CASIZE/2) - R +: R];

  initial begin
    assert (P <= CASIZE && R <= CASIZE/2 && LOGN <= CASIZE/2 && CASIZE <= VALW)
      else $error("ga_rng: random fields do not fit the automaton");
  end

endmodule
