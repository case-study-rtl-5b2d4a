// zicfiss_unit: Zicfiss shadow-stack support for a 64-bit application-class core.
//
// Backward-edge control-flow integrity: every call pushes the return address
// onto a shadow stack that ordinary stores cannot reach, and every return
// checks the link register against the copy popped from it. A mismatch means
// the return address was corrupted and raises a software-check exception.
//
// This block is what the host core gains:
//   - ss_decoder     marks SSPUSH / SSPOPCHK in decode and names x1 or x5;
//   - ss_priv_enable decides, per privilege mode, whether they are active;
//   - ss_csr         holds ssp, menvcfg.SSE and senvcfg.SSE and checks CSR
//                    accesses against the privilege mode;
//   - ss_ctrl        applies push and pop/check at commit, backed by an
//                    internal SS_DEPTH x 64-bit memory.
// Interface. Decode side: dec_instr_i in, dec_o out (combinational). Commit
// side: the head instruction is either a shadow-stack instruction
// (commit_valid_i with commit_op_i and the link-register value
// commit_operand_i) or a CSR instruction (csr_valid_i, csr_addr_i, csr_op_i,
// csr_wdata_i; csr_hit_o tells whether the address belongs here,
// csr_rdata_o is its old value). ex_o reports the exception of the head
// instruction in the same cycle. commit_ack_i is the core's retire signal
// and flush_i its kill; state changes on the clock edge where the
// instruction retires without exception and without flush, never earlier.
// One instruction is handled per cycle. Reset (active-low, asynchronous)
// turns the extension off and clears ssp.
// The structure - commit-stage controller, internal memory, privilege-gated
// enables, software-check on mismatch - follows the source document; the
// port list and single-cycle commit handshake are this design's own.
module zicfiss_unit
  import zicfiss_pkg::*;
#(
  parameter int unsigned SS_DEPTH = 256
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  priv_lvl_e       priv_lvl_i,
  // decode
  input  logic [31:0]     dec_instr_i,
  output ss_dec_t         dec_o,
  // commit: shadow-stack instruction
  input  logic            commit_valid_i,
  input  ss_op_e          commit_op_i,
  input  logic [XLEN-1:0] commit_operand_i,
  // commit: CSR instruction
  input  logic            csr_valid_i,
  input  logic [11:0]     csr_addr_i,
  input  csr_op_e         csr_op_i,
  input  logic [XLEN-1:0] csr_wdata_i,
  output logic            csr_hit_o,
  output logic [XLEN-1:0] csr_rdata_o,
  // commit control
  input  logic            commit_ack_i,
  input  logic            flush_i,
  output exception_t      ex_o,
  // status
  output logic            sse_active_o,
  output logic [XLEN-1:0] ssp_o
);

  logic            menvcfg_sse, senvcfg_sse, sse_active;
  logic [XLEN-1:0] ssp;
  logic            ssp_we;
  logic [XLEN-1:0] ssp_wdata;
  exception_t      ss_ex, csr_ex;
  logic            csr_commit;

  ss_decoder u_dec (
    .instr_i (dec_instr_i),
    .dec_o   (dec_o)
  );

  ss_priv_enable u_en (
    .priv_lvl_i    (priv_lvl_i),
    .menvcfg_sse_i (menvcfg_sse),
    .senvcfg_sse_i (senvcfg_sse),
    .sse_active_o  (sse_active)
  );

  assign csr_commit = commit_ack_i && !flush_i;

  ss_csr u_csr (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .priv_lvl_i    (priv_lvl_i),
    .csr_valid_i   (csr_valid_i),
    .csr_addr_i    (csr_addr_i),
    .csr_op_i      (csr_op_i),
    .csr_wdata_i   (csr_wdata_i),
    .csr_commit_i  (csr_commit),
    .csr_hit_o     (csr_hit_o),
    .csr_rdata_o   (csr_rdata_o),
    .csr_ex_o      (csr_ex),
    .ssp_we_i      (ssp_we),
    .ssp_wdata_i   (ssp_wdata),
    .ssp_o         (ssp),
    .menvcfg_sse_o (menvcfg_sse),
    .senvcfg_sse_o (senvcfg_sse)
  );

  ss_ctrl #(.SS_DEPTH(SS_DEPTH)) u_ctrl (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .valid_i      (commit_valid_i),
    .op_i         (commit_op_i),
    .operand_i    (commit_operand_i),
    .commit_i     (commit_ack_i),
    .flush_i      (flush_i),
    .sse_active_i (sse_active),
    .ssp_i        (ssp),
    .ex_o         (ss_ex),
    .ssp_we_o     (ssp_we),
    .ssp_wdata_o  (ssp_wdata)
  );

  assign ex_o         = ss_ex.valid ? ss_ex : csr_ex;
  assign sse_active_o = sse_active;
  assign ssp_o        = ssp;

  a_one_instr: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                !(commit_valid_i && csr_valid_i));

endmodule
