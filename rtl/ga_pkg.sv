// ga_pkg: types, constants and small functions shared by the GA engine.
//
// Parameter codes: the user-controlled parameters live in the first words of
// the shared memory, one per word, at the code listed in param_code_e. The
// set of parameters (seed, mutation and crossover probability, initial sum of
// fitness, population size, number of generations) follows the user-parameter
// tables of the design; their order and numbering are this design's choice.
// Population size and number of generations are stored as "value - 1" so that
// 16 members and 16 generations fit the log2-wide registers.
//
// Fitness functions: func_e selects what the fitness module evaluates. The
// three arithmetic functions are the simple test functions; FUNC_PARTITION is
// the two-way circuit-partitioning cost. The three netlists (5, 10 and 15
// cells) are the example arrangements; cell k of a drawing is bit k-1 of a
// partition string, and a 1 bit places the cell in block B.
package ga_pkg;

  typedef enum logic [2:0] {
    PAR_SEED     = 3'd0,   // cellular-automaton seed (casize bits)
    PAR_PMUT     = 3'd1,   // mutation probability, p-bit fraction of 2^p
    PAR_PCROSS   = 3'd2,   // crossover probability, p-bit fraction of 2^p
    PAR_INITSUM  = 3'd3,   // sum of fitness of the initial population
    PAR_POPLAST  = 3'd4,   // population size - 1
    PAR_GENLAST  = 3'd5    // number of generations - 1
  } param_code_e;

  localparam int unsigned NUMPARAM    = 6;
  localparam int unsigned LOGNUMPARAM = $clog2(NUMPARAM);

  typedef enum logic [1:0] {
    FUNC_2X        = 2'd0,  // f(x) = 2x
    FUNC_XPLUS5    = 2'd1,  // f(x) = x + 5
    FUNC_CUBIC     = 2'd2,  // f(x) = 2x^3 - 45x^2 + 300x
    FUNC_PARTITION = 2'd3   // Fmax - cut count, 1 when unbalanced
  } func_e;

  localparam int unsigned MAXC = 15;  // largest netlist, in cells

  // Number of nets of the example netlist with c cells.
  function automatic int unsigned num_nets(input int unsigned c);
    case (c)
      5:       return 4;
      10:      return 6;
      15:      return 9;
      default: return 1;
    endcase
  endfunction

  // Fmax of equation (1): the cut count of the initial arrangement, which
  // for all three netlists equals their number of nets.
  function automatic int unsigned fmax_of(input int unsigned c);
    return num_nets(c);
  endfunction

  // Balance window: the number of cells in block A must lie between 40% and
  // 60% of all cells, rounded inwards.
  function automatic int unsigned min_zeros(input int unsigned c);
    return (4 * c + 9) / 10;
  endfunction
  function automatic int unsigned max_zeros(input int unsigned c);
    return (6 * c) / 10;
  endfunction

  // Net mask N_j of the example netlist with c cells: bit i is 1 when cell
  // i+1 is on net j.
  function automatic logic [MAXC-1:0] net_mask(input int unsigned c, input int unsigned j);
    logic [MAXC-1:0] m;
    m = '0;
    if (c == 5) begin
      case (j)
        0: m = 15'b000_0000_0000_1111;  // cells 1 2 3 4
        1: m = 15'b000_0000_0000_0110;  // cells 2 3
        2: m = 15'b000_0000_0000_1001;  // cells 1 4
        3: m = 15'b000_0000_0001_0001;  // cells 1 5
        default: m = '0;
      endcase
    end else if (c == 10) begin
      case (j)
        0: m = 15'b000_0011_1111_1111;  // all ten cells
        1: m = 15'b000_0000_0011_0000;  // cells 5 6
        2: m = 15'b000_0000_0100_1000;  // cells 4 7
        3: m = 15'b000_0000_1000_0100;  // cells 3 8
        4: m = 15'b000_0001_0000_0010;  // cells 2 9
        5: m = 15'b000_0010_0000_0001;  // cells 1 10
        default: m = '0;
      endcase
    end else if (c == 15) begin
      case (j)
        0: m = 15'b111_1111_1111_0101;  // all cells but 2 and 4
        1: m = 15'b000_0000_1100_0000;  // cells 7 8
        2: m = 15'b000_0001_0010_0000;  // cells 6 9
        3: m = 15'b000_0010_0001_0000;  // cells 5 10
        4: m = 15'b000_0100_0000_1000;  // cells 4 11
        5: m = 15'b000_1000_0000_0100;  // cells 3 12
        6: m = 15'b001_0000_0000_0010;  // cells 2 13
        7: m = 15'b010_0000_0000_0001;  // cells 1 14
        8: m = 15'b100_0000_0000_0001;  // cells 1 15
        default: m = '0;
      endcase
    end
    return m;
  endfunction

endpackage
