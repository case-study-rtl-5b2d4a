// tb_ss_csr: directed test of ssp, menvcfg.SSE and senvcfg.SSE.
// Walks through reset values, machine-mode initialisation of ssp, the
// per-privilege access rules (illegal-instruction where forbidden, and no
// state change then), set/clear/read CSR operations, senvcfg.SSE reading as
// zero while menvcfg.SSE is clear, writes held back without commit, the ssp
// update path from the controller, and addresses that are not this block's.
module tb_ss_csr;
  import zicfiss_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0;
  priv_lvl_e       priv;
  logic            valid, commit, hit, ssp_we;
  logic [11:0]     addr;
  csr_op_e         op;
  logic [XLEN-1:0] wdata, rdata, ssp_wdata, ssp;
  exception_t      ex;
  logic            m_sse, s_sse;
  int              checks = 0, failures = 0;

  ss_csr dut (
    .clk_i(clk), .rst_ni(rst_n), .priv_lvl_i(priv),
    .csr_valid_i(valid), .csr_addr_i(addr), .csr_op_i(op), .csr_wdata_i(wdata),
    .csr_commit_i(commit), .csr_hit_o(hit), .csr_rdata_o(rdata), .csr_ex_o(ex),
    .ssp_we_i(ssp_we), .ssp_wdata_i(ssp_wdata),
    .ssp_o(ssp), .menvcfg_sse_o(m_sse), .senvcfg_sse_o(s_sse)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [XLEN-1:0] got, input logic [XLEN-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // One CSR instruction at commit; checks hit, exception and old value.
  task automatic access(input priv_lvl_e p, input logic [11:0] a, input csr_op_e o,
                        input logic [XLEN-1:0] d, input logic do_commit,
                        input logic exp_ill, input logic [XLEN-1:0] exp_old);
    @(negedge clk);
    priv = p; valid = 1'b1; addr = a; op = o; wdata = d; commit = do_commit;
    #1;
    check($sformatf("hit %h", a), 64'(hit), 64'(1));
    check($sformatf("ex.valid %h priv %0d", a, p), 64'(ex.valid), 64'(exp_ill));
    if (exp_ill) check("ex.cause", ex.cause, CAUSE_ILLEGAL_INSTR);
    else         check($sformatf("old value %h", a), rdata, exp_old);
    @(negedge clk);
    valid = 1'b0; commit = 1'b0;
  endtask

  localparam logic [XLEN-1:0] SSE = 64'h8;

  initial begin
    priv = PRIV_M; valid = 1'b0; commit = 1'b0; addr = '0; op = CSR_READ;
    wdata = '0; ssp_we = 1'b0; ssp_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset ssp", ssp, 0);
    check("reset m_sse", 64'(m_sse), 0);
    check("reset s_sse", 64'(s_sse), 0);
    // Machine mode initialises ssp; always allowed.
    access(PRIV_M, CSR_SSP, CSR_WRITE, 64'h0000_0000_8000_1000, 1, 0, 0);
    check("ssp after M write", ssp, 64'h8000_1000);
    // Supervisor and user may not touch ssp while menvcfg.SSE is clear.
    access(PRIV_S, CSR_SSP, CSR_WRITE, 64'h1234, 1, 1, 0);
    access(PRIV_U, CSR_SSP, CSR_READ, 0, 1, 1, 0);
    check("ssp unchanged", ssp, 64'h8000_1000);
    // senvcfg is supervisor's, but its SSE is read-only zero here.
    access(PRIV_S, CSR_SENVCFG, CSR_SET, SSE, 1, 0, 0);
    check("s_sse stays 0", 64'(s_sse), 0);
    access(PRIV_U, CSR_SENVCFG, CSR_READ, 0, 1, 1, 0);
    access(PRIV_S, CSR_MENVCFG, CSR_SET, SSE, 1, 1, 0);
    check("m_sse stays 0", 64'(m_sse), 0);
    // Machine mode enables supervisor use.
    access(PRIV_M, CSR_MENVCFG, CSR_SET, SSE, 1, 0, 0);
    check("m_sse", 64'(m_sse), 1);
    access(PRIV_M, CSR_MENVCFG, CSR_READ, 0, 1, 0, SSE);
    access(PRIV_S, CSR_SSP, CSR_READ, 0, 1, 0, 64'h8000_1000);
    access(PRIV_U, CSR_SSP, CSR_READ, 0, 1, 1, 0);
    // Supervisor enables user use.
    access(PRIV_S, CSR_SENVCFG, CSR_SET, SSE | 64'h1, 1, 0, 0);
    check("s_sse", 64'(s_sse), 1);
    access(PRIV_S, CSR_SENVCFG, CSR_READ, 0, 1, 0, SSE);
    access(PRIV_U, CSR_SSP, CSR_CLEAR, 64'h1000, 1, 0, 64'h8000_1000);
    check("ssp after U clear", ssp, 64'h8000_0000);
    access(PRIV_U, CSR_SSP, CSR_SET, 64'h0ff8, 1, 0, 64'h8000_0000);
    check("ssp after U set", ssp, 64'h8000_0ff8);
    // Without commit nothing changes.
    access(PRIV_M, CSR_SSP, CSR_WRITE, 64'hdead, 0, 0, 64'h8000_0ff8);
    check("ssp without commit", ssp, 64'h8000_0ff8);
    // Controller update path.
    @(negedge clk);
    ssp_we = 1'b1; ssp_wdata = 64'h8000_0ff0;
    @(negedge clk);
    ssp_we = 1'b0;
    check("ssp from controller", ssp, 64'h8000_0ff0);
    // Machine mode turns the extension off: senvcfg.SSE reads zero again.
    access(PRIV_M, CSR_MENVCFG, CSR_CLEAR, SSE, 1, 0, SSE);
    check("m_sse off", 64'(m_sse), 0);
    check("s_sse off", 64'(s_sse), 0);
    access(PRIV_S, CSR_SENVCFG, CSR_READ, 0, 1, 0, 0);
    access(PRIV_U, CSR_SSP, CSR_READ, 0, 1, 1, 0);
    // Re-enabling menvcfg does not bring back the old senvcfg.SSE.
    access(PRIV_M, CSR_MENVCFG, CSR_WRITE, SSE, 1, 0, 0);
    check("s_sse stays cleared", 64'(s_sse), 0);
    // An address that is not this block's.
    @(negedge clk);
    valid = 1'b1; addr = 12'h300; op = CSR_READ; priv = PRIV_U; #1;
    check("no hit", 64'(hit), 0);
    check("no exception", 64'(ex.valid), 0);
    valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
