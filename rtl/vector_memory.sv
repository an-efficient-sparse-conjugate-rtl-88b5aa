// vector_memory: the shared, banked vector memory that holds the search
// direction p for the sparse matrix-vector product.
//
// There are NPE banks of DEPTH words.  Every cycle each bank reads the word
// at its own address (rd_addr[j], from the per-cycle control word); the data
// appear one cycle later on rd_data[j] (synchronous read, as in block RAM)
// and go on to the permutation network.
//
// Writes refresh p after each iteration.  Write addresses are sequential and
// come from a counter state machine, not from the control word: a local
// index wa runs 0 .. cfg_rows-1 and a duplicate number d runs
// 0 .. cfg_ndup-1.  In a write cycle bank j stores lane (j - d) mod NPE at
// address d*cfg_rows + wa when wr_en[j] (one write-enable bit per bank) is
// set.  Duplicate d is therefore a copy of p rotated by d banks, so a PE's
// element can be found in several banks (vector duplication).  The
// counters advance on every cycle in which any wr_en bit is set and wrap
// after cfg_rows*cfg_ndup writes, ready for the next iteration.
// The bank count, depth, per-bank read addresses and write-enable bits and
// the rotated duplicates follow the architecture; the exact counter scheme
// is this design's choice.
module vector_memory
  import cg_pkg::*;
#(
  parameter int unsigned NPE   = NPE_DEF,
  parameter int unsigned DEPTH = VB_DEPTH,
  parameter int unsigned W     = DW,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned LW   = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic          clk,
  input  logic          en,        // clock enable: reads, writes and counters hold when low
  input  logic          rst,
  input  logic [AW-1:0] cfg_rows,   // words of p per bank per duplicate
  input  logic [LW:0]   cfg_ndup,   // number of duplicates (>= 1)
  input  logic [AW-1:0] rd_addr [NPE],
  output logic [W-1:0]  rd_data [NPE],
  input  logic          wr_en   [NPE],
  input  logic [W-1:0]  wr_data [NPE]
);
  logic [AW-1:0] wa, wbase;
  logic [LW:0]   dup;
  logic          any_we;

  always_comb begin
    any_we = 1'b0;
    for (int j = 0; j < int'(NPE); j++) any_we |= wr_en[j];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wa    <= '0;
      wbase <= '0;
      dup   <= '0;
    end else if (en && any_we) begin
      if (wa == cfg_rows - 1'b1) begin
        wa <= '0;
        if (dup == cfg_ndup - 1'b1) begin
          dup   <= '0;
          wbase <= '0;
        end else begin
          dup   <= dup + 1'b1;
          wbase <= wbase + cfg_rows;
        end
      end else begin
        wa <= wa + 1'b1;
      end
    end
  end

  for (genvar j = 0; j < int'(NPE); j++) begin : g_bank
    logic [W-1:0] mem [DEPTH];
    logic [LW-1:0] lane;
    assign lane = LW'(j) - LW'(dup);  // rotation by the duplicate number
    always_ff @(posedge clk) begin
      if (en && wr_en[j]) mem[wbase + wa] <= wr_data[lane];
      if (en)             rd_data[j] <= mem[rd_addr[j]];
    end
  end
endmodule
