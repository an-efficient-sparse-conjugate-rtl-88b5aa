// pipe_delay_v: a 1-bit shift register of D stages with synchronous reset,
// used for the valid/tag bits that travel beside data in pipe_delay; it
// advances only when en is high.
module pipe_delay_v #(
  parameter int unsigned D = 1
) (
  input  logic clk,
  input  logic en,
  input  logic rst,
  input  logic d,
  output logic q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else if (D == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (rst)     q <= 1'b0;
      else if (en) q <= d;
    end
  end else begin : g_regs
    logic [D-1:0] sr;
    always_ff @(posedge clk) begin
      if (rst)     sr <= '0;
      else if (en) sr <= {sr[D-2:0], d};
    end
    assign q = sr[D-1];
  end
endmodule
