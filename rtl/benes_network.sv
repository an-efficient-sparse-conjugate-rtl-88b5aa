// benes_network: N-input Benes permutation network that carries the N words
// read from the vector-memory banks to the N processing elements.
//
// The network is built recursively, as in the architecture: an input column
// of N/2 2x2 switches, two N/2-input Benes networks (upper and lower), and an
// output column of N/2 switches; the 2-input network is a single switch.
// Input switch s takes inputs 2s and 2s+1 and feeds input s of the upper
// (switch output 0) and lower (output 1) sub-network; output switch s takes
// output s of the upper and lower sub-networks and drives outputs 2s, 2s+1.
// Any permutation can be set up; with every control bit at 0 the network is
// the identity.  The network has (2*log2(N)-1) columns of N/2 switches.
//
// Control: ctrl holds one bit per switch, column by column
// (ctrl[c*N/2 + j] is switch j of column c, counted from input to output and
// from top to bottom); inside a column the switches of the upper sub-network
// come before those of the lower one.  The bits are computed off-line by the
// host (the routing of a permutation is not done in hardware), so the
// network is purely combinational: data and control must be presented in the
// same cycle.  The bit count (N/2)(2 log2 N - 1) is slightly below the
// N log2 N given for B_PN in the control-bit budget; this design uses the
// exact count of its switches.
//
// Lint note: Verilator's lint reports up_out and lo_out as undriven.  They
// are driven by the output ports of the two recursive sub-network instances;
// the report comes from the self-instantiation, and the testbench confirms
// that every output carries the routed input.
module benes_network #(
  parameter int unsigned N = 128,
  parameter int unsigned W = 32,
  localparam int unsigned NSW = (2 * $clog2(N) - 1) * (N / 2)
) (
  input  logic [NSW-1:0] ctrl,
  input  logic [W-1:0]   din  [N],
  output logic [W-1:0]   dout [N]
);
  if (N == 2) begin : g_base
    benes_switch #(.W(W)) u_sw (
      .sel(ctrl[0]), .in0(din[0]), .in1(din[1]), .out0(dout[0]), .out1(dout[1])
    );
  end else begin : g_rec
    localparam int unsigned H    = N / 2;
    localparam int unsigned SNSW = (2 * $clog2(H) - 1) * (H / 2);
    localparam int unsigned SCOL = 2 * $clog2(H) - 1;  // columns of a sub-network
    logic [W-1:0]    up_in  [H];
    logic [W-1:0]    lo_in  [H];
    logic [W-1:0]    up_out [H];
    logic [W-1:0]    lo_out [H];
    logic [SNSW-1:0] up_ctrl, lo_ctrl;

    // split the inner columns of ctrl between the two sub-networks
    always_comb begin
      for (int c = 0; c < int'(SCOL); c++) begin
        for (int j = 0; j < int'(H / 2); j++) begin
          up_ctrl[c*(H/2) + j] = ctrl[(c+1)*H + j];
          lo_ctrl[c*(H/2) + j] = ctrl[(c+1)*H + H/2 + j];
        end
      end
    end

    for (genvar s = 0; s < int'(H); s++) begin : g_col
      benes_switch #(.W(W)) u_in (
        .sel(ctrl[s]), .in0(din[2*s]), .in1(din[2*s+1]),
        .out0(up_in[s]), .out1(lo_in[s])
      );
      benes_switch #(.W(W)) u_out (
        .sel(ctrl[NSW - H + s]), .in0(up_out[s]), .in1(lo_out[s]),
        .out0(dout[2*s]), .out1(dout[2*s+1])
      );
    end

    benes_network #(.N(H), .W(W)) u_up (.ctrl(up_ctrl), .din(up_in), .dout(up_out));
    benes_network #(.N(H), .W(W)) u_lo (.ctrl(lo_ctrl), .din(lo_in), .dout(lo_out));
  end
endmodule
