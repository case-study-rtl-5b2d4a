// tb_zicfiss_unit: end-to-end test of the shadow-stack unit at its default
// size (256 entries of 64 bits).
//
// The testbench plays the host core: it feeds instruction words to the
// decoder, keeps the link registers x1 and x5, presents each decoded
// shadow-stack instruction or CSR instruction at commit, retires it unless
// an exception is reported, and switches privilege mode the way trap entry
// and return would. A reference model written here from the architectural
// rules (enables per mode, CSR access rules, push/pop/check, misaligned ssp,
// retire-only updates) predicts every exception, CSR read value and ssp.
//
// The program follows a bare-metal suite: shadow-stack instructions in
// machine mode and before enablement are no-ops; machine mode initialises ssp
// and enables supervisor mode; supervisor mode enables user mode; calls and
// returns nest to the full depth of 256 and unwind; a corrupted return
// address raises a software-check exception; forbidden CSR accesses raise
// illegal-instruction; a misaligned ssp faults; flushed instructions leave no
// trace; x5 works as alternate link register; nesting past 256 wraps onto
// the oldest entry. A random phase then mixes all of these. Every mechanism
// is counted and must have occurred.
module tb_zicfiss_unit;
  import zicfiss_pkg::*;

  localparam int unsigned DEPTH = 256;   // the unit's default depth

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

  // Instruction words (Zicfiss encodings).
  localparam logic [31:0] SSPUSH_X1   = 32'hCE104073;
  localparam logic [31:0] SSPUSH_X5   = 32'hCE504073;
  localparam logic [31:0] SSPOPCHK_X1 = 32'hCDC0C073;
  localparam logic [31:0] SSPOPCHK_X5 = 32'hCDC2C073;
  localparam logic [XLEN-1:0] SSE     = 64'h8;
  localparam logic [XLEN-1:0] BASE    = 64'h0000_0000_8001_0000;

  // ---------------- reference model ----------------
  logic            m_sse, s_sse;
  logic [XLEN-1:0] m_ssp;
  logic [XLEN-1:0] m_mem [logic [XLEN-1:0]];   // by entry address modulo the window
  logic [XLEN-1:0] xreg [32];

  // counters of mechanisms
  int n_push, n_pop, n_mismatch, n_disabled, n_illegal, n_misalign, n_flush;
  int n_priv, n_x5, n_wrap, n_full_depth, n_csr_ok;

  function automatic logic model_active();
    case (priv)
      PRIV_S:  return m_sse;
      PRIV_U:  return m_sse && s_sse;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic [XLEN-1:0] slot(input logic [XLEN-1:0] a);
    return (a >> 3) % DEPTH;
  endfunction

  task automatic check(input string what, input logic [XLEN-1:0] got, input logic [XLEN-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic set_priv(input priv_lvl_e p);
    @(negedge clk);
    if (p != priv) n_priv++;
    priv = p;
  endtask

  // One shadow-stack instruction from decode to commit. Returns the
  // exception cause (0 when none).
  task automatic run_ss(input logic [31:0] w, input logic do_flush, output logic [XLEN-1:0] cause);
    ss_op_e          exp_op;
    logic [4:0]      exp_rs;
    logic            exp_ex, act;
    logic [XLEN-1:0] exp_cause, exp_tval, addr, val;
    @(negedge clk);
    instr = w;
    #1;
    exp_op = (w == SSPUSH_X1 || w == SSPUSH_X5) ? SS_PUSH : SS_POPCHK;
    exp_rs = (w == SSPUSH_X1 || w == SSPOPCHK_X1) ? 5'd1 : 5'd5;
    check("decode is_ss", 64'(dec.is_ss), 64'(1));
    check("decode op", 64'(dec.op), 64'(exp_op));
    check("decode rs", 64'(dec.rs_idx), 64'(exp_rs));
    if (exp_rs == 5'd5) n_x5++;
    // carried to commit
    val = xreg[dec.rs_idx];
    c_valid = 1'b1; c_op = dec.op; c_operand = val;
    #1;
    act = model_active();
    check("sse_active", 64'(active), 64'(act));
    exp_ex = 1'b0; exp_cause = '0; exp_tval = '0;
    addr = (exp_op == SS_PUSH) ? m_ssp - 8 : m_ssp;
    if (act) begin
      if (m_ssp[2:0] != 3'd0) begin
        exp_ex = 1'b1;
        exp_cause = (exp_op == SS_PUSH) ? CAUSE_STORE_ACCESS : CAUSE_LOAD_ACCESS;
        exp_tval = addr;
      end else if (exp_op == SS_POPCHK && (!m_mem.exists(slot(addr)) || m_mem[slot(addr)] != val)) begin
        exp_ex = 1'b1; exp_cause = CAUSE_SOFTWARE_CHECK; exp_tval = SWCHECK_SHADOW_STACK;
      end
    end else begin
      n_disabled++;
    end
    check("ex.valid", 64'(ex.valid), 64'(exp_ex));
    if (exp_ex) begin
      check("ex.cause", ex.cause, exp_cause);
      check("ex.tval", ex.tval, exp_tval);
      if (exp_cause == CAUSE_SOFTWARE_CHECK) n_mismatch++; else n_misalign++;
    end
    ack = !ex.valid; flush = do_flush;
    @(posedge clk); #1;
    c_valid = 1'b0; ack = 1'b0; flush = 1'b0;
    if (act && !exp_ex && !do_flush) begin
      if (exp_op == SS_PUSH) begin
        m_mem[slot(addr)] = val; m_ssp = addr; n_push++;
      end else begin
        m_ssp = m_ssp + 8; n_pop++;
      end
    end
    if (do_flush) n_flush++;
    check("ssp", ssp, m_ssp);
    cause = exp_ex ? exp_cause : '0;
  endtask

  // One CSR instruction at commit.
  task automatic run_csr(input logic [11:0] a, input csr_op_e o, input logic [XLEN-1:0] d,
                         output logic illegal, output logic [XLEN-1:0] old);
    logic            ok;
    logic [XLEN-1:0] oldv, newv;
    @(negedge clk);
    csr_valid = 1'b1; csr_addr = a; csr_op = o; csr_wdata = d;
    #1;
    case (a)
      CSR_SSP:     begin ok = (priv == PRIV_M) || (priv == PRIV_S && m_sse) || (priv == PRIV_U && m_sse && s_sse); oldv = m_ssp; end
      CSR_SENVCFG: begin ok = (priv != PRIV_U); oldv = (m_sse && s_sse) ? SSE : 64'h0; end
      default:     begin ok = (priv == PRIV_M); oldv = m_sse ? SSE : 64'h0; end
    endcase
    check("csr hit", 64'(hit), 64'(1));
    check("csr illegal", 64'(ex.valid), 64'(!ok));
    if (!ok) check("csr cause", ex.cause, CAUSE_ILLEGAL_INSTR);
    else     check("csr old value", csr_rdata, oldv);
    ack = !ex.valid;
    @(posedge clk); #1;
    csr_valid = 1'b0; ack = 1'b0;
    if (ok) begin
      n_csr_ok++;
      case (o)
        CSR_WRITE: newv = d;
        CSR_SET:   newv = oldv | d;
        CSR_CLEAR: newv = oldv & ~d;
        default:   newv = oldv;
      endcase
      if (o != CSR_READ) case (a)
        CSR_SSP:     m_ssp = newv;
        CSR_SENVCFG: s_sse = newv[3] && m_sse;
        default:     begin m_sse = newv[3]; if (!newv[3]) s_sse = 1'b0; end
      endcase
    end else n_illegal++;
    check("ssp after csr", ssp, m_ssp);
    illegal = !ok; old = oldv;
  endtask

  // A call: new return address into x1 (or x5), then SSPUSH.
  task automatic call(input bit use_x5, input logic [XLEN-1:0] ra);
    logic [XLEN-1:0] c;
    xreg[use_x5 ? 5 : 1] = ra;
    run_ss(use_x5 ? SSPUSH_X5 : SSPUSH_X1, 1'b0, c);
  endtask

  task automatic ret(input bit use_x5, input logic [XLEN-1:0] ra, output logic [XLEN-1:0] c);
    xreg[use_x5 ? 5 : 1] = ra;
    run_ss(use_x5 ? SSPOPCHK_X5 : SSPOPCHK_X1, 1'b0, c);
  endtask

  logic [XLEN-1:0] ras [$];   // return addresses the program expects to return to

  initial begin
    logic            ill;
    logic [XLEN-1:0] old, c, keep;
    priv = PRIV_M; instr = '0; c_valid = 1'b0; c_op = SS_NONE; c_operand = '0;
    csr_valid = 1'b0; csr_addr = '0; csr_op = CSR_READ; csr_wdata = '0; ack = 1'b0; flush = 1'b0;
    m_sse = 1'b0; s_sse = 1'b0; m_ssp = '0;
    foreach (xreg[i]) xreg[i] = '0;
    {n_push, n_pop, n_mismatch, n_disabled, n_illegal, n_misalign, n_flush} = '0;
    {n_priv, n_x5, n_wrap, n_full_depth, n_csr_ok} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. Extension off: push and pop are no-ops in every mode.
    call(0, 64'h1000); ret(0, 64'h2000, c);
    check("no-op in M", c, 0);
    set_priv(PRIV_S); call(0, 64'h1000);
    run_csr(CSR_SSP, CSR_READ, 0, ill, old);           // illegal in S
    set_priv(PRIV_U); call(1, 64'h1004);

    // 2. Machine mode initialises ssp and enables supervisor mode.
    set_priv(PRIV_M);
    run_csr(CSR_SSP, CSR_WRITE, BASE, ill, old);
    call(0, 64'h1000);                                  // still a no-op in M
    run_csr(CSR_MENVCFG, CSR_SET, SSE, ill, old);

    // 3. Supervisor calls and returns.
    set_priv(PRIV_S);
    call(0, 64'h8000_0100); call(0, 64'h8000_0200); call(1, 64'h8000_0300);
    ret(1, 64'h8000_0300, c); ret(0, 64'h8000_0200, c); ret(0, 64'h8000_0100, c);
    check("S returns clean", c, 0);
    check("ssp back at base", ssp, BASE);
    run_csr(CSR_MENVCFG, CSR_READ, 0, ill, old);        // illegal in S
    set_priv(PRIV_U);
    call(0, 64'h4000);                                  // U not yet enabled: no-op
    run_csr(CSR_SSP, CSR_READ, 0, ill, old);            // illegal in U
    set_priv(PRIV_S);
    run_csr(CSR_SENVCFG, CSR_SET, SSE, ill, old);

    // 4. User mode: nesting to the full depth and back.
    set_priv(PRIV_U);
    for (int i = 0; i < DEPTH; i++) begin
      logic [XLEN-1:0] ra;
      ra = {$urandom(), $urandom()};
      ras.push_back(ra);
      call(i % 7 == 3, ra);
    end
    check("ssp at full depth", ssp, BASE - DEPTH * 8);
    for (int i = DEPTH - 1; i >= 0; i--) ret(i % 7 == 3, ras.pop_back(), c);
    if (ssp == BASE) n_full_depth++;
    check("ssp unwound", ssp, BASE);

    // 5. Corrupted return address: software-check, then the handler (M)
    //    treats it as fatal and resets ssp.
    call(0, 64'h5000); call(0, 64'h6000);
    ret(0, 64'h6666, c);
    check("mismatch cause", c, CAUSE_SOFTWARE_CHECK);
    set_priv(PRIV_M);
    run_csr(CSR_SSP, CSR_WRITE, BASE, ill, old);
    set_priv(PRIV_U);

    // 6. Killed instructions change nothing.
    call(0, 64'h7000);
    xreg[1] = 64'h7100; run_ss(SSPUSH_X1, 1'b1, c);
    xreg[1] = 64'h7000; run_ss(SSPOPCHK_X1, 1'b1, c);
    ret(0, 64'h7000, c);
    check("after flushes", c, 0);

    // 7. User-mode ssp access while enabled; misaligned ssp.
    run_csr(CSR_SSP, CSR_READ, 0, ill, old);
    check("U reads ssp", old, BASE);
    run_csr(CSR_SSP, CSR_SET, 64'h4, ill, old);
    call(0, 64'h9000);
    ret(0, 64'h9000, c);
    check("misaligned pop cause", c, CAUSE_LOAD_ACCESS);
    run_csr(CSR_SSP, CSR_CLEAR, 64'h4, ill, old);
    set_priv(PRIV_S);
    run_csr(CSR_SENVCFG, CSR_CLEAR, SSE, ill, old);
    set_priv(PRIV_U);
    run_csr(CSR_SSP, CSR_READ, 0, ill, old);            // illegal again
    call(0, 64'hA000);                                  // no-op again
    set_priv(PRIV_S);
    run_csr(CSR_SENVCFG, CSR_SET, SSE, ill, old);

    // 8. Nesting one past the depth overwrites the oldest entry.
    set_priv(PRIV_U);
    for (int i = 0; i <= DEPTH; i++) begin
      ras.push_back(64'h10_0000 + XLEN'(i) * 4);
      call(0, ras[$]);
    end
    for (int i = DEPTH; i >= 1; i--) ret(0, ras.pop_back(), c);
    check("inner returns clean", c, 0);
    ret(0, ras.pop_back(), c);
    check("outermost return overwritten", c, CAUSE_SOFTWARE_CHECK);
    if (c == CAUSE_SOFTWARE_CHECK) n_wrap++;
    set_priv(PRIV_M);
    run_csr(CSR_SSP, CSR_WRITE, BASE, ill, old);

    // 9. Random mix across modes.
    for (int n = 0; n < 3000; n++) begin
      int k;
      k = int'($urandom_range(99));
      if (k < 5) begin
        priv_lvl_e p;
        p = priv_lvl_e'(k % 3 == 0 ? PRIV_M : (k % 3 == 1 ? PRIV_S : PRIV_U));
        set_priv(p);
      end else if (k < 40) begin
        logic [XLEN-1:0] ra;
        ra = {$urandom(), $urandom()};
        if (ras.size() < DEPTH - 1) begin
          xreg[k[0] ? 5 : 1] = ra;
          run_ss(k[0] ? SSPUSH_X5 : SSPUSH_X1, k % 9 == 0, c);
          if (k % 9 != 0 && model_active() && c == 0) ras.push_back(ra);
        end
      end else if (k < 75) begin
        if (ras.size() > 0) begin
          keep = ras[$];
          if (k % 11 == 0) keep = keep ^ 64'h10;       // corrupted
          xreg[k[0] ? 5 : 1] = keep;
          run_ss(k[0] ? SSPOPCHK_X5 : SSPOPCHK_X1, k % 13 == 0, c);
          if (k % 13 != 0 && model_active() && c == 0) void'(ras.pop_back());
        end
      end else if (k < 85) begin
        run_csr(k[0] ? CSR_SENVCFG : CSR_MENVCFG, k[1] ? CSR_SET : CSR_READ, SSE, ill, old);
      end else begin
        run_csr(CSR_SSP, CSR_READ, 0, ill, old);
      end
      // Resynchronise the program's list with the architectural stack when
      // a mode switch or disable leaves it behind.
      while (ras.size() > (BASE - m_ssp) / 8 && m_ssp <= BASE) void'(ras.pop_back());
    end

    $display("push=%0d pop=%0d mismatch=%0d disabled=%0d illegal_csr=%0d misaligned=%0d flush=%0d",
             n_push, n_pop, n_mismatch, n_disabled, n_illegal, n_misalign, n_flush);
    $display("priv_switch=%0d x5=%0d wrap=%0d full_depth=%0d csr_ok=%0d",
             n_priv, n_x5, n_wrap, n_full_depth, n_csr_ok);
    checks++;
    if (n_push == 0 || n_pop == 0 || n_mismatch == 0 || n_disabled == 0 || n_illegal == 0 ||
        n_misalign == 0 || n_flush == 0 || n_priv == 0 || n_x5 == 0 || n_wrap == 0 ||
        n_full_depth == 0 || n_csr_ok == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
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
