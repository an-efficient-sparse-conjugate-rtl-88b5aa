// register_file: the shared scalar register file of the CG processor.  It
// holds alpha, rs_old, rs_new and beta = rs_new/rs_old and broadcasts one of
// them to every PE.
//
// Control per cycle: bsel (2 bits) chooses the broadcast scalar; we (2 bits)
// selects the update: none, alpha <- SPE quotient, rs_new <- SPE sum, or
// beta <- SPE quotient together with rs_old <- rs_new (lines 11 and 12 of the
// CG iteration in one step).  The broadcast output is registered: the value
// chosen by bsel in cycle t is on bcast in cycle t+1, when the PEs use it.
// All registers reset to +0.  The 2+2 control bits follow the architecture;
// the code assignment and the combined beta/rs_old update are this design's
// choice.
module register_file
  import cg_pkg::*;
(
  input  logic     clk,
  input  logic     en,     // clock enable: registers hold when low
  input  logic     rst,
  input  rf_bsel_e bsel,
  input  rf_we_e   we,
  input  f32_t     spe_sum,
  input  f32_t     spe_quot,
  output f32_t     bcast,
  output f32_t     alpha,
  output f32_t     beta,
  output f32_t     rs_old,
  output f32_t     rs_new
);
  always_ff @(posedge clk) begin
    if (rst) begin
      alpha  <= '0;
      beta   <= '0;
      rs_old <= '0;
      rs_new <= '0;
      bcast  <= '0;
    end else if (en) begin
      unique case (we)
        RF_W_ALPHA: alpha  <= spe_quot;
        RF_W_RSNEW: rs_new <= spe_sum;
        RF_W_BETA: begin
          beta   <= spe_quot;
          rs_old <= rs_new;
        end
        default: ;
      endcase
      unique case (bsel)
        RF_B_ALPHA: bcast <= alpha;
        RF_B_RSOLD: bcast <= rs_old;
        RF_B_BETA:  bcast <= beta;
        RF_B_RSNEW: bcast <= rs_new;
      endcase
    end
  end
endmodule
