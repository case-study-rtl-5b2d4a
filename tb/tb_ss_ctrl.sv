// tb_ss_ctrl: random call/return traffic through the commit-stage controller.
// The testbench holds ssp itself (the role of the CSR block) and keeps a
// reference shadow stack: a list of pushed return addresses and the ssp they
// imply. Each cycle one instruction sits at the head of commit and is one of:
// a call (SSPUSH), a matching return (SSPOPCHK), a corrupted return (must
// raise software-check 18 / tval 3 and change nothing), an instruction that
// is flushed or not yet acknowledged (must change nothing), one issued while
// the shadow stack is inactive (a no-op), or one with a misaligned ssp
// (access fault). The exception, the ssp update and, through later returns,
// the stored values are compared with the reference. Each kind is counted
// and must occur.
module tb_ss_ctrl;
  import zicfiss_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            valid, commit, flush, active;
  ss_op_e          op;
  logic [XLEN-1:0] operand, ssp, ssp_wdata;
  logic            ssp_we;
  exception_t      ex;
  int              checks = 0, failures = 0;

  ss_ctrl #(.SS_DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .op_i(op), .operand_i(operand),
    .commit_i(commit), .flush_i(flush), .sse_active_i(active), .ssp_i(ssp),
    .ex_o(ex), .ssp_we_o(ssp_we), .ssp_wdata_o(ssp_wdata)
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ssp_we) ssp <= ssp_wdata;

  localparam logic [XLEN-1:0] BASE = 64'h0000_0000_8000_2000;
  logic [XLEN-1:0] stack [$];   // reference: return addresses, newest last
  int n_push, n_pop, n_mismatch, n_flush, n_noack, n_inactive, n_misalign;

  task automatic check(input string what, input logic [XLEN-1:0] got, input logic [XLEN-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Present one instruction; check its exception now and its effect after
  // the edge.
  task automatic step(input ss_op_e o, input logic [XLEN-1:0] val, input logic act,
                      input logic ack, input logic fl,
                      input logic exp_ex, input logic [XLEN-1:0] exp_cause,
                      input logic [XLEN-1:0] exp_tval, input logic [XLEN-1:0] exp_ssp);
    @(negedge clk);
    valid = 1'b1; op = o; operand = val; active = act;
    #1;
    check("ex.valid", 64'(ex.valid), 64'(exp_ex));
    if (exp_ex) begin
      check("ex.cause", ex.cause, exp_cause);
      check("ex.tval", ex.tval, exp_tval);
    end
    commit = ack && !ex.valid; flush = fl;   // as the commit stage would
    @(posedge clk); #1;
    valid = 1'b0; commit = 1'b0; flush = 1'b0;
    check("ssp", ssp, exp_ssp);
  endtask

  function automatic logic [XLEN-1:0] ref_ssp();
    return BASE - XLEN'(stack.size() * 8);
  endfunction

  initial begin
    valid = 1'b0; commit = 1'b0; flush = 1'b0; active = 1'b1; op = SS_NONE; operand = '0;
    ssp = BASE;
    {n_push, n_pop, n_mismatch, n_flush, n_noack, n_inactive, n_misalign} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int kind;
      logic [XLEN-1:0] ra;
      ra = {32'h0, $urandom()} & ~64'h1;
      kind = int'($urandom_range(99));
      if (stack.size() == 0 && kind >= 45 && kind < 75) kind = 0;
      if (stack.size() >= DEPTH - 1 && kind < 45) kind = 50;
      if (kind < 45) begin                      // call
        stack.push_back(ra);
        step(SS_PUSH, ra, 1, 1, 0, 0, 0, 0, ref_ssp());
        n_push++;
      end else if (kind < 70) begin             // matching return
        ra = stack.pop_back();
        step(SS_POPCHK, ra, 1, 1, 0, 0, 0, 0, ref_ssp());
        n_pop++;
      end else if (kind < 75) begin             // corrupted return
        ra = stack[$] ^ (64'h1 << $urandom_range(63));
        step(SS_POPCHK, ra, 1, 1, 0, 1, CAUSE_SOFTWARE_CHECK, SWCHECK_SHADOW_STACK, ref_ssp());
        n_mismatch++;
      end else if (kind < 82) begin             // killed before retiring
        if (kind[0]) step(SS_PUSH, ra, 1, 1, 1, 0, 0, 0, ref_ssp());
        else if (stack.size() > 0) step(SS_POPCHK, stack[$], 1, 1, 1, 0, 0, 0, ref_ssp());
        n_flush++;
      end else if (kind < 87) begin             // not acknowledged this cycle
        step(SS_PUSH, ra, 1, 0, 0, 0, 0, 0, ref_ssp());
        n_noack++;
      end else if (kind < 94) begin             // shadow stack inactive
        step(kind[0] ? SS_PUSH : SS_POPCHK, ra, 0, 1, 0, 0, 0, 0, ref_ssp());
        n_inactive++;
      end else begin                            // misaligned ssp
        logic [XLEN-1:0] good;
        good = ssp;
        @(negedge clk); ssp = good | 64'h4;
        if (kind[0]) step(SS_PUSH, ra, 1, 1, 0, 1, CAUSE_STORE_ACCESS, (good | 64'h4) - 8, good | 64'h4);
        else         step(SS_POPCHK, ra, 1, 1, 0, 1, CAUSE_LOAD_ACCESS, good | 64'h4, good | 64'h4);
        @(negedge clk); ssp = good;
        n_misalign++;
      end
    end
    // Unwind: every remaining entry must still be intact.
    while (stack.size() > 0) begin
      logic [XLEN-1:0] ra;
      ra = stack.pop_back();
      step(SS_POPCHK, ra, 1, 1, 0, 0, 0, 0, ref_ssp());
      n_pop++;
    end
    $display("push=%0d pop=%0d mismatch=%0d flush=%0d noack=%0d inactive=%0d misalign=%0d",
             n_push, n_pop, n_mismatch, n_flush, n_noack, n_inactive, n_misalign);
    if (n_push == 0 || n_pop == 0 || n_mismatch == 0 || n_flush == 0 || n_noack == 0 ||
        n_inactive == 0 || n_misalign == 0) begin
      failures++;
      $display("FAIL a kind of operation never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
