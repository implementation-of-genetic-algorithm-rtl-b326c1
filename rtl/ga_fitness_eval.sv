// ga_fitness_eval: the evaluation step of the fitness module.
//
// FUNC selects the function being maximised over the N-bit member x:
//   FUNC_2X        f(x) = 2x
//   FUNC_XPLUS5    f(x) = x + 5
//   FUNC_CUBIC     f(x) = 2x^3 - 45x^2 + 300x
//   FUNC_PARTITION Fmax - cut count of partition x (ga_partition_eval)
// The arithmetic functions are computed combinationally and registered, so
// `done` pulses one cycle after `start`, whatever the function: evaluation
// takes a single clock cycle, as the design states. A partition takes
// 2 * (number of nets) + 2 cycles. The arithmetic result is clamped to
// 0 .. 2^F - 1 (for 0 <= x <= 15 all three functions are non-negative and
// fit the fitness widths used with them, so the clamp never acts there).
module ga_fitness_eval
  import ga_pkg::*;
#(
  parameter func_e       FUNC = FUNC_2X,
  parameter int unsigned N    = 4,
  parameter int unsigned F    = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  output logic         done,
  output logic [F-1:0] fit
);

  if (FUNC == FUNC_PARTITION) begin : g_part
    logic [F-1:0] fcut;
    logic         balanced;
    ga_partition_eval #(.C(N), .F(F)) u_part (
      .clk, .rst_n, .start, .p_in(x), .done, .fit, .fcut, .balanced
    );
  end else begin : g_arith
    logic signed [47:0] xv, val;
    always_comb begin
      xv = 48'(x);
      case (FUNC)
        FUNC_2X:     val = 2 * xv;
        FUNC_XPLUS5: val = xv + 5;
        default:     val = 2 * xv * xv * xv - 45 * xv * xv + 300 * xv;
      endcase
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        done <= 1'b0;
        fit  <= '0;
      end else begin
        done <= start;
        if (start) begin
          if (val < 0)                       fit <= '0;
          else if (val > 48'(2**F - 1))      fit <= '1;
          else                               fit <= F'(val);
        end
      end
    end
  end

endmodule
