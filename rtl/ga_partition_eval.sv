// ga_partition_eval: fitness of a two-way circuit partition.
//
// A partition of C cells is a C-bit string P; bit i set puts cell i+1 in
// block B, clear in block A. Each net j is a C-bit mask N_j of the cells on
// it (the example netlists are in ga_pkg). For each net the circuit walks a
// one-bit counter v over 0 and 1. For each v, C comparators test P_i == v,
// each result is ANDed with bit i of N_j and the results are ORed: the net
// has a cell in block v. That bit is added into a one-bit accumulator; after
// both values the accumulator is 0 exactly when the net has cells in both
// blocks, and the cut count Fcut goes up by one. When all nets are done,
// F_P = FMAX - Fcut. Then the zeros of P (cells in block A) are counted: if
// their number lies in [MINZ, MAXZ] the fitness is F_P, otherwise the
// partition is punished with fitness 1.
// Timing: `start` loads P; `done` pulses 2*NUM_NETS + 2 cycles later with
// `fit`, `fcut` and `balanced` valid until the next start.
// The comparator/AND/OR/accumulator structure, Eq. (1) and the penalty
// value 1 follow the design; the 40%-60% window is this design's reading of
// the prescribed partition size.
module ga_partition_eval
  import ga_pkg::*;
#(
  parameter int unsigned C        = 5,
  parameter int unsigned F        = 3,
  parameter int unsigned NUM_NETS = num_nets(C),
  parameter int unsigned FMAX     = fmax_of(C),
  parameter int unsigned MINZ     = min_zeros(C),
  parameter int unsigned MAXZ     = max_zeros(C)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [C-1:0] p_in,
  output logic         done,
  output logic [F-1:0] fit,
  output logic [F-1:0] fcut,
  output logic         balanced
);

  localparam int unsigned JW = (NUM_NETS > 1) ? $clog2(NUM_NETS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_NETS, S_FINAL} pe_state_e;
  pe_state_e st;

  logic [C-1:0]  p_q;
  logic [JW-1:0] j;
  logic          v;      // one-bit counter: block under test
  logic          acc;    // one-bit accumulator
  logic [C-1:0]  nj;
  logic          in_blk;
  logic [$clog2(C+1)-1:0] zeros;
  logic [F-1:0]  f_p;

  always_comb begin
    logic [MAXC-1:0] m;
    m  = net_mask(C, 32'(j));
    nj = m[C-1:0];
  end

  // comparators, AND gates and OR gate
  assign in_blk = |((p_q ~^ {C{v}}) & nj);

  always_comb begin
    zeros = '0;
    for (int i = 0; i < int'(C); i++) zeros += {{($clog2(C+1)-1){1'b0}}, ~p_q[i]};
  end
  assign f_p = F'(FMAX) - fcut;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      p_q      <= '0;
      j        <= '0;
      v        <= 1'b0;
      acc      <= 1'b0;
      fcut     <= '0;
      fit      <= '0;
      balanced <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: ;
        S_NETS: begin
          if (!v) begin
            acc <= in_blk;
            v   <= 1'b1;
          end else begin
            if ((acc ^ in_blk) == 1'b0) fcut <= fcut + 1'b1;
            acc <= 1'b0;
            v   <= 1'b0;
            if (32'(j) == NUM_NETS - 1) st <= S_FINAL;
            else j <= j + 1'b1;
          end
        end
        S_FINAL: begin
          balanced <= (32'(zeros) >= MINZ) && (32'(zeros) <= MAXZ);
          fit      <= ((32'(zeros) >= MINZ) && (32'(zeros) <= MAXZ)) ? f_p : F'(1);
          done     <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      if (start) begin
        p_q  <= p_in;
        j    <= '0;
        v    <= 1'b0;
        acc  <= 1'b0;
        fcut <= '0;
        st   <= S_NETS;
      end
    end
  end

  initial begin
    assert (FMAX < 2**F) else $error("ga_partition_eval: Fmax does not fit F bits");
  end

endmodule
