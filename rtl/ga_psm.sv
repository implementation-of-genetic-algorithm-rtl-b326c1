// ga_psm: Population Sequencer Module (PSM).
//
// The PSM feeds the selection module. After `start` it reads the population
// size from the parameters, then walks the current population from index 0
// to the last member and round again, for as long as the engine runs. Each
// member is read through the MIC (rd_req/rd_idx, answered by rd_ack with the
// memory word) and offered to the selection module on a valid/ready channel
// as {member, fitness}. One member is held at a time. Cycling through the
// population and handing members to the selection module follows the design;
// the handshakes and the single-entry buffer are this design's choices.
module ga_psm
  import ga_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned F    = 5,
  parameter int unsigned LOGM = 4,
  parameter int unsigned VALW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            run,
  // parameter request (population size - 1)
  output logic            par_req,
  output logic [LOGNUMPARAM-1:0] par_code,
  input  logic            par_ack,
  input  logic [VALW-1:0] par_data,
  // member read through the MIC
  output logic            rd_req,
  output logic [LOGM-1:0] rd_idx,
  input  logic            rd_ack,
  input  logic [VALW-1:0] rd_data,
  // to the selection module
  output logic            out_valid,
  input  logic            out_ready,
  output logic [N-1:0]    out_member,
  output logic [F-1:0]    out_fit
);

  typedef enum logic [1:0] {S_IDLE, S_PARAM, S_FETCH, S_OFFER} psm_state_e;
  psm_state_e st;
  logic [LOGM-1:0] last;

  assign par_code  = PAR_POPLAST;
  assign par_req   = (st == S_PARAM);
  assign rd_req    = (st == S_FETCH);
  assign out_valid = (st == S_OFFER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      last       <= '0;
      rd_idx     <= '0;
      out_member <= '0;
      out_fit    <= '0;
    end else if (!run) begin
      st <= S_IDLE;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          st     <= S_PARAM;
          rd_idx <= '0;
        end
        S_PARAM: if (par_ack) begin
          last <= par_data[LOGM-1:0];
          st   <= S_FETCH;
        end
        S_FETCH: if (rd_ack) begin
          out_member <= rd_data[N-1:0];
          out_fit    <= rd_data[N +: F];
          st         <= S_OFFER;
        end
        S_OFFER: if (out_ready) begin
          rd_idx <= (rd_idx == last) ? '0 : rd_idx + 1'b1;
          st     <= S_FETCH;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_offer_stable: assert property (@(posedge clk) disable iff (!rst_n || !run)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_member) && $stable(out_fit)));

endmodule
