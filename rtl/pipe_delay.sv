// pipe_delay: a W-bit shift register of D stages (D = 0 is a plain wire).
// Used to give the arithmetic units their specified latency and to carry
// control tags alongside data through the PE and adder-tree pipelines.
// Stages advance only when en is high (the processor-wide clock enable).
// Stages are not reset; callers that need a clean valid bit reset it
// separately with pipe_delay_v.
module pipe_delay #(
  parameter int unsigned W = 32,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      if (en) begin
        sr[0] <= d;
        for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[D-1];
  end
endmodule
