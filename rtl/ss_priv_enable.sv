// ss_priv_enable: privilege-aware activation of the shadow stack.
//
// Shadow-stack instructions take effect only in a privilege mode whose
// enable is set. Supervisor mode is enabled by menvcfg.SSE, user mode by
// senvcfg.SSE (which the CSR block already forces to zero while
// menvcfg.SSE is clear, so user mode needs both). Machine mode never uses
// the shadow stack. When the output is low, SSPUSH and SSPOPCHK retire as
// no-ops, which keeps ordinary code running when the extension is off.
// Purely combinational. That user mode is gated by senvcfg.SSE written from
// supervisor mode follows the source document; the machine-mode rule and
// the absence of virtualised modes follow the Zicfiss specification.
module ss_priv_enable
  import zicfiss_pkg::*;
(
  input  priv_lvl_e priv_lvl_i,
  input  logic      menvcfg_sse_i,
  input  logic      senvcfg_sse_i,
  output logic      sse_active_o
);

  always_comb begin
    unique case (priv_lvl_i)
      PRIV_S:  sse_active_o = menvcfg_sse_i;
      PRIV_U:  sse_active_o = menvcfg_sse_i & senvcfg_sse_i;
      default: sse_active_o = 1'b0;  // machine mode (and the reserved code)
    endcase
  end

endmodule
