// adder_tree: pipelined binary tree of floating point adders that sums the N
// products the PEs emit in a cycle during a dot product (p'Ap or r'r).
// log2(N) levels of fp_add, each of latency LAT, so one sum of N products
// leaves the tree per cycle, log2(N)*LAT cycles after the products entered;
// in_valid travels beside the data.  The stream of per-cycle sums is then
// reduced to one scalar by the special processing element.  Where and that
// partial sums are reduced by a tree follows the architecture; the plain
// binary organisation is this design's choice.
module adder_tree
  import cg_pkg::*;
#(
  parameter int unsigned N   = NPE_DEF,
  parameter int unsigned LAT = ADD_LAT,
  localparam int unsigned L  = $clog2(N)
) (
  input  logic clk,
  input  logic en,       // clock enable: the tree holds when low
  input  logic rst,
  input  logic in_valid,
  input  f32_t din [N],
  output logic out_valid,
  output f32_t sum
);
  // node storage: level l holds N >> l values
  f32_t lvl  [L+1][N];
  logic vld  [L+1];

  assign vld[0] = in_valid;
  for (genvar i = 0; i < int'(N); i++) begin : g_in
    assign lvl[0][i] = din[i];
  end

  for (genvar l = 0; l < int'(L); l++) begin : g_lvl
    for (genvar i = 0; i < int'(N >> (l + 1)); i++) begin : g_node
      logic v;
      fp_add #(.LAT(LAT)) u_add (
        .clk, .en, .rst, .in_valid(vld[l]), .a(lvl[l][2*i]), .b(lvl[l][2*i+1]), .sub(1'b0),
        .out_valid(v), .y(lvl[l+1][i])
      );
      if (i == 0) begin : g_v
        assign vld[l+1] = v;
      end
    end
    for (genvar i = int'(N >> (l + 1)); i < int'(N); i++) begin : g_pad
      assign lvl[l+1][i] = '0;
    end
  end

  assign out_valid = vld[L];
  assign sum       = lvl[L][0];
endmodule
