// tb_vector_memory: self-checking testbench for vector_memory (8 banks of 32
// words).  Two iterations of "copy p with 3 rotated duplicates" are written
// through the sequential write counters, with some write enables masked; a
// reference model of the banks predicts every word.  Random reads of all
// banks are checked one cycle after their addresses (the read latency).
module tb_vector_memory;
  localparam int NPE = 8, DEPTH = 32, AW = $clog2(DEPTH), LW = $clog2(NPE);
  localparam int ROWS = 4, NDUP = 3;
  logic clk = 0, rst = 1;
  logic [AW-1:0] rd_addr [NPE];
  logic [31:0]   rd_data [NPE];
  logic          wr_en   [NPE];
  logic [31:0]   wr_data [NPE];
  logic [31:0]   model   [NPE][DEPTH];
  int checks = 0, failures = 0;

  vector_memory #(.NPE(NPE), .DEPTH(DEPTH)) dut (
    .clk, .en(1'b1), .rst, .cfg_rows(AW'(ROWS)), .cfg_ndup((LW+1)'(NDUP)), .rd_addr, .rd_data, .wr_en, .wr_data
  );

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NPE; j++) begin
      wr_en[j] = 0; wr_data[j] = 0; rd_addr[j] = 0;
      for (int a = 0; a < DEPTH; a++) model[j][a] = 0;
    end
    // initialise the banks through the write port (one full pass, all enabled)
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int it = 0; it < 3; it++) begin
      for (int d = 0; d < NDUP; d++) begin
        for (int w = 0; w < ROWS; w++) begin
          logic [31:0] v [NPE];
          for (int k = 0; k < NPE; k++) v[k] = $urandom;
          for (int j = 0; j < NPE; j++) begin
            wr_en[j]   = (it == 0) ? 1'b1 : ($urandom_range(3, 0) != 0);
            wr_data[j] = v[j];
          end
          for (int j = 0; j < NPE; j++)
            if (wr_en[j]) model[j][d*ROWS + w] = v[(j - d + NPE) % NPE];
          @(posedge clk);
          #1;
        end
      end
      for (int j = 0; j < NPE; j++) wr_en[j] = 0;
      // read back at random addresses
      for (int r = 0; r < 40; r++) begin
        for (int j = 0; j < NPE; j++) rd_addr[j] = AW'($urandom_range(ROWS*NDUP - 1, 0));
        @(posedge clk);
        #1;
        for (int j = 0; j < NPE; j++) begin
          checks++;
          if (rd_data[j] !== model[j][rd_addr[j]]) begin
            failures++;
            if (failures < 5) $display("bank %0d addr %0d: %h expected %h", j, rd_addr[j], rd_data[j], model[j][rd_addr[j]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
