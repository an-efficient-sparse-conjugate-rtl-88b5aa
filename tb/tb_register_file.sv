// tb_register_file: self-checking testbench for register_file.  It walks the
// register updates of one CG iteration (rs_new, beta with rs_old <- rs_new,
// alpha), checks every register after each update and checks that each
// broadcast selection appears on bcast one cycle after it is requested.
module tb_register_file;
  import cg_pkg::*;
  logic clk = 0, rst = 1;
  rf_bsel_e bsel;
  rf_we_e   we;
  f32_t spe_sum, spe_quot, bcast, alpha, beta, rs_old, rs_new;
  f32_t m_alpha, m_beta, m_rsold, m_rsnew;
  int checks = 0, failures = 0;

  register_file dut (.clk, .en(1'b1), .rst, .bsel, .we, .spe_sum, .spe_quot, .bcast, .alpha, .beta, .rs_old, .rs_new);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(f32_t got, f32_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    bsel = RF_B_ALPHA; we = RF_W_NONE; spe_sum = 0; spe_quot = 0;
    m_alpha = 0; m_beta = 0; m_rsold = 0; m_rsnew = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 200; i++) begin
      rf_we_e w;
      rf_bsel_e b;
      w = rf_we_e'($urandom_range(3, 0));
      b = rf_bsel_e'($urandom_range(3, 0));
      @(negedge clk);
      we = w; bsel = b; spe_sum = $urandom; spe_quot = $urandom;
      @(posedge clk);
      // model: broadcast uses the register values before this edge
      #1;
      case (b)
        RF_B_ALPHA: chk(bcast, m_alpha, "bcast alpha");
        RF_B_RSOLD: chk(bcast, m_rsold, "bcast rs_old");
        RF_B_BETA:  chk(bcast, m_beta,  "bcast beta");
        RF_B_RSNEW: chk(bcast, m_rsnew, "bcast rs_new");
      endcase
      case (w)
        RF_W_ALPHA: m_alpha = spe_quot;
        RF_W_RSNEW: m_rsnew = spe_sum;
        RF_W_BETA:  begin m_beta = spe_quot; m_rsold = m_rsnew; end
        default: ;
      endcase
      chk(alpha, m_alpha, "alpha");
      chk(beta, m_beta, "beta");
      chk(rs_old, m_rsold, "rs_old");
      chk(rs_new, m_rsnew, "rs_new");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
