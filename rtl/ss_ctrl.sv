// ss_ctrl: commit-stage shadow-stack controller.
//
// Sits beside the commit stage. When the instruction at the head of commit is
// a shadow-stack instruction (valid_i, op_i) and the shadow stack is active
// in the current privilege mode (sse_active_i), the controller works out its
// effect in the same cycle:
//   SSPUSH   - the entry below ssp (ssp - 8) receives the link register
//              value operand_i, and ssp becomes ssp - 8;
//   SSPOPCHK - the entry at ssp is read and compared with operand_i; on a
//              mismatch a software-check exception (cause 18, tval 3) is
//              raised, otherwise ssp becomes ssp + 8.
// An ssp that is not 8-byte aligned makes SSPUSH raise a store/AMO
// access fault and SSPOPCHK a load access fault, with the address as tval.
// The exception goes to the commit stage through ex_o, which then traps
// instead of retiring. Nothing is changed until the instruction retires
// (commit_i high, flush_i low, no exception): an instruction that is killed
// by a flush, a misprediction or an exception leaves both ssp and the stack
// untouched, so speculative calls and returns never reach the shadow stack.
// The memory write and the ssp update (ssp_we_o/ssp_wdata_o, applied by the
// CSR block) land on the retiring clock edge. With sse_active_i low both
// instructions retire as no-ops.
// The stack entries live in an internal memory of SS_DEPTH 64-bit words
// indexed by ssp bits [3 +: log2(SS_DEPTH)]: ssp moves in a window of
// SS_DEPTH*8 bytes and deeper nesting wraps around and overwrites the oldest
// entries. Commit-time update, kill handling, the software-check exception,
// the internal memory and its 256 x 64 size follow the source document; the
// indexing, the wrap-around, the access-fault causes and the single-cycle
// timing are this design's choices.
module ss_ctrl
  import zicfiss_pkg::*;
#(
  parameter int unsigned SS_DEPTH = 256
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // head of commit
  input  logic            valid_i,
  input  ss_op_e          op_i,
  input  logic [XLEN-1:0] operand_i,
  input  logic            commit_i,
  input  logic            flush_i,
  // state
  input  logic            sse_active_i,
  input  logic [XLEN-1:0] ssp_i,
  // results
  output exception_t      ex_o,
  output logic            ssp_we_o,
  output logic [XLEN-1:0] ssp_wdata_o
);

  localparam int unsigned AW = $clog2(SS_DEPTH);

  logic            active, misaligned, mismatch, retire;
  logic [XLEN-1:0] push_addr, pop_addr;
  logic [XLEN-1:0] rdata;
  logic [AW-1:0]   raddr, waddr;

  assign active     = valid_i && sse_active_i && (op_i != SS_NONE);
  assign misaligned = |ssp_i[SS_ALIGN_BITS-1:0];
  assign push_addr  = ssp_i - XLEN'(SS_ENTRY_BYTES);
  assign pop_addr   = ssp_i;
  assign raddr      = pop_addr[SS_ALIGN_BITS +: AW];
  assign waddr      = push_addr[SS_ALIGN_BITS +: AW];
  assign mismatch   = (rdata != operand_i);

  ss_mem #(.DEPTH(SS_DEPTH), .WIDTH(XLEN)) u_mem (
    .clk_i   (clk_i),
    .raddr_i (raddr),
    .rdata_o (rdata),
    .we_i    (retire && (op_i == SS_PUSH)),
    .waddr_i (waddr),
    .wdata_i (operand_i)
  );

  always_comb begin
    ex_o = '0;
    if (active) begin
      if (misaligned) begin
        ex_o.valid = 1'b1;
        ex_o.cause = (op_i == SS_PUSH) ? CAUSE_STORE_ACCESS : CAUSE_LOAD_ACCESS;
        ex_o.tval  = (op_i == SS_PUSH) ? push_addr : pop_addr;
      end else if (op_i == SS_POPCHK && mismatch) begin
        ex_o.valid = 1'b1;
        ex_o.cause = CAUSE_SOFTWARE_CHECK;
        ex_o.tval  = SWCHECK_SHADOW_STACK;
      end
    end
  end

  assign retire      = active && commit_i && !flush_i && !ex_o.valid;
  assign ssp_we_o    = retire;
  assign ssp_wdata_o = (op_i == SS_PUSH) ? push_addr : ssp_i + XLEN'(SS_ENTRY_BYTES);

  // The memory is indexed by ssp modulo its size.
  if (SS_DEPTH != (1 << AW)) begin : g_depth_check
    $error("SS_DEPTH must be a power of two");
  end

  // The commit stage must take the exception instead of retiring.
  a_no_retire_on_ex: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                      !(commit_i && !flush_i && ex_o.valid));

endmodule
