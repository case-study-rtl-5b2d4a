// tb_ss_priv_enable: exhaustive check of the per-privilege shadow-stack enable.
// All privilege modes against all four combinations of menvcfg.SSE and
// senvcfg.SSE; the expected value is written out as a truth table.
module tb_ss_priv_enable;
  import zicfiss_pkg::*;

  priv_lvl_e priv;
  logic      m_sse, s_sse, active;
  int        checks = 0, failures = 0;

  ss_priv_enable dut (
    .priv_lvl_i    (priv),
    .menvcfg_sse_i (m_sse),
    .senvcfg_sse_i (s_sse),
    .sse_active_o  (active)
  );

  // expected[priv index][m][s]: index 0 = U, 1 = S, 2 = M
  localparam logic [3:0] EXP_U = 4'b1000;  // bit {m,s}: only m=1,s=1
  localparam logic [3:0] EXP_S = 4'b1100;  // m=1
  localparam logic [3:0] EXP_M = 4'b0000;

  initial begin
    priv_lvl_e levels [3] = '{PRIV_U, PRIV_S, PRIV_M};
    logic [3:0] exp_tab [3] = '{EXP_U, EXP_S, EXP_M};
    for (int p = 0; p < 3; p++) begin
      for (int c = 0; c < 4; c++) begin
        priv  = levels[p];
        m_sse = c[1];
        s_sse = c[0];
        #1;
        checks++;
        if (active !== exp_tab[p][c]) begin
          failures++;
          $display("FAIL priv=%0d m=%0b s=%0b active=%0b", p, m_sse, s_sse, active);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
