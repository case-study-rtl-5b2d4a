// tb_cfi_program: application-level workload for the shadow-stack unit.
//
// Models instrumented user programs running on the host core. Each program
// is a random walk of calls and returns (up to 200 frames deep). A call
// stores its return address in a frame on the ordinary software stack, a
// plain array here that any store could overwrite, and executes SSPUSH x1.
// A return reloads x1 from that frame and executes SSPOPCHK x1 before
// jumping. Machine mode gives each program its own ssp and enables
// supervisor use; supervisor mode enables user use; the program runs in
// user mode.
//
// In every other program an "attack" overwrites the saved return address of
// a random live frame at a random moment. The unit must raise a software-check
// exception (cause 18, tval 3) exactly when that frame returns, and at no
// other time; the trap handler then ends the program. Clean programs must
// finish without any exception and leave ssp back at its initial value. The
// testbench also confirms that every protected call/return pair costs two
// shadow-stack instructions.
module tb_cfi_program;
  import zicfiss_pkg::*;

  localparam int unsigned MAX_DEPTH = 200;
  localparam int unsigned PROGRAMS  = 40;
  localparam int unsigned STEPS     = 600;

  logic            clk = 1'b0, rst_n = 1'b0;
  priv_lvl_e       priv;
  logic [31:0]     instr;
  ss_dec_t         dec;
  logic            c_valid, csr_valid, ack, flush, hit, active;
  ss_op_e          c_op;
  logic [XLEN-1:0] c_operand, csr_wdata, csr_rdata, ssp;
  logic [11:0]     csr_addr;
  csr_op_e         csr_op;
  exception_t      ex;
  int              checks = 0, failures = 0;

  zicfiss_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .priv_lvl_i(priv),
    .dec_instr_i(instr), .dec_o(dec),
    .commit_valid_i(c_valid), .commit_op_i(c_op), .commit_operand_i(c_operand),
    .csr_valid_i(csr_valid), .csr_addr_i(csr_addr), .csr_op_i(csr_op), .csr_wdata_i(csr_wdata),
    .csr_hit_o(hit), .csr_rdata_o(csr_rdata),
    .commit_ack_i(ack), .flush_i(flush), .ex_o(ex),
    .sse_active_o(active), .ssp_o(ssp)
  );

  always #5 clk = ~clk;

  localparam logic [31:0] SSPUSH_X1   = 32'hCE104073;
  localparam logic [31:0] SSPOPCHK_X1 = 32'hCDC0C073;

  logic [XLEN-1:0] sw_stack [MAX_DEPTH];   // saved return addresses
  logic [XLEN-1:0] x1;
  int              depth;
  int              n_calls, n_rets, n_ss_instr, n_detected, n_clean, n_attacked;

  task automatic check(input string what, input logic [XLEN-1:0] got, input logic [XLEN-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic csr(input logic [11:0] a, input csr_op_e o, input logic [XLEN-1:0] d);
    @(negedge clk);
    csr_valid = 1'b1; csr_addr = a; csr_op = o; csr_wdata = d;
    #1;
    check("csr access allowed", 64'(ex.valid), 0);
    ack = !ex.valid;
    @(posedge clk); #1;
    csr_valid = 1'b0; ack = 1'b0;
  endtask

  // Execute one shadow-stack instruction with operand x1; returns the
  // exception record seen at commit.
  task automatic ss_instr(input logic [31:0] w, output exception_t e);
    @(negedge clk);
    instr = w;
    #1;
    c_valid = dec.is_ss; c_op = dec.op; c_operand = x1;
    #1;
    e = ex;
    ack = !ex.valid;
    @(posedge clk); #1;
    c_valid = 1'b0; ack = 1'b0;
    if (dec.is_ss) n_ss_instr++;   // recognised by the decoder
  endtask

  initial begin
    exception_t e;
    logic [XLEN-1:0] base;
    priv = PRIV_M; instr = '0; c_valid = 1'b0; c_op = SS_NONE; c_operand = '0;
    csr_valid = 1'b0; csr_addr = '0; csr_op = CSR_READ; csr_wdata = '0; ack = 1'b0; flush = 1'b0;
    {n_calls, n_rets, n_ss_instr, n_detected, n_clean, n_attacked} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int p = 0; p < PROGRAMS; p++) begin
      bit attack, attacked, trapped;
      int attack_step, victim;
      // System software: fresh ssp per program, enables per context.
      base = 64'h0000_0000_9000_0000 + XLEN'(p) * 64'h1_0000;
      @(negedge clk); priv = PRIV_M;
      csr(CSR_SSP, CSR_WRITE, base);
      csr(CSR_MENVCFG, CSR_SET, 64'h8);
      @(negedge clk); priv = PRIV_S;
      csr(CSR_SENVCFG, CSR_SET, 64'h8);
      @(negedge clk); priv = PRIV_U;
      check("user shadow stack active", 64'(active), 1);

      attack = p[0];
      attack_step = int'($urandom_range(STEPS - 100, 50));
      attacked = 1'b0; trapped = 1'b0; victim = -1;
      depth = 0;
      for (int s = 0; s < STEPS + MAX_DEPTH && !trapped; s++) begin
        bit do_call;
        if (attack && !attacked && s >= attack_step && depth > 0) begin
          victim = int'($urandom_range(depth - 1));
          sw_stack[victim] = sw_stack[victim] ^ 64'h40;   // overwrite a saved ra
          attacked = 1'b1;
        end
        if (s >= STEPS) do_call = 1'b0;                    // unwind at the end
        else if (depth == 0) do_call = 1'b1;
        else if (depth == MAX_DEPTH) do_call = 1'b0;
        else do_call = ($urandom_range(99) < 55);
        if (do_call) begin
          x1 = 64'h0001_0000 + XLEN'($urandom_range(32'hFFFF)) * 4;   // jal sets ra
          sw_stack[depth] = x1;                                       // prologue save
          ss_instr(SSPUSH_X1, e);
          check("call raises nothing", 64'(e.valid), 0);
          depth++;
          n_calls++;
        end else if (depth > 0) begin
          depth--;
          x1 = sw_stack[depth];                                       // epilogue load
          ss_instr(SSPOPCHK_X1, e);
          if (attacked && depth == victim) begin
            check("attack detected", 64'(e.valid), 1);
            check("cause", e.cause, CAUSE_SOFTWARE_CHECK);
            check("tval", e.tval, SWCHECK_SHADOW_STACK);
            if (e.valid) n_detected++;
            trapped = 1'b1;                                           // fatal: end program
          end else begin
            check("clean return", 64'(e.valid), 0);
            n_rets++;
          end
        end
        if (depth == 0 && s >= STEPS) break;
      end
      if (attack) begin
        n_attacked++;
        check("attacked program trapped", 64'(trapped), 1);
      end else begin
        n_clean++;
        check("ssp restored", ssp, base);
      end
    end

    $display("programs clean=%0d attacked=%0d detected=%0d calls=%0d returns=%0d ss_instructions=%0d",
             n_clean, n_attacked, n_detected, n_calls, n_rets, n_ss_instr);
    // Two shadow-stack instructions per protected pair; the trapped returns
    // are the pairs that never completed.
    check("two instructions per call/return pair", 64'(n_ss_instr), 64'(n_calls) + 64'(n_rets) + 64'(n_detected));
    check("every attack detected", 64'(n_detected), 64'(n_attacked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
