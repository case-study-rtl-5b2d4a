// ss_csr: the architectural state of the shadow stack and its CSR access rules.
//
// Holds the shadow stack pointer ssp (CSR 0x011), menvcfg.SSE (CSR 0x30A,
// bit 3) and senvcfg.SSE (CSR 0x10A, bit 3). A CSR instruction at the head of
// commit presents csr_valid_i with address, operation and operand; the block
// answers in the same cycle with csr_hit_o (the address is one of its three),
// the old value csr_rdata_o and csr_ex_o. The write takes effect on the clock
// edge where csr_commit_i is high and no exception is raised.
// Access rules (illegal-instruction exception, tval 0, otherwise):
//   ssp     - machine mode always; supervisor mode if menvcfg.SSE;
//             user mode if menvcfg.SSE and senvcfg.SSE
//   senvcfg - supervisor or machine mode
//   menvcfg - machine mode only
// senvcfg.SSE reads as zero and has no effect while menvcfg.SSE is clear.
// Only the SSE bits live here: other envcfg bits read as zero and are left
// to the host core's CSR file. The shadow-stack controller updates ssp on a
// retiring SSPUSH/SSPOPCHK through ssp_we_i; a CSR write and such an update
// never coincide because only one instruction commits per cycle.
// Everything resets to zero (extension off). The existence of ssp, the SSE
// enables and per-privilege access rules follow the source document; the
// exact rules follow the Zicfiss specification, and tval 0, the reset values
// and the SSE-only storage are this design's choices.
module ss_csr
  import zicfiss_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  priv_lvl_e       priv_lvl_i,
  // CSR access from commit
  input  logic            csr_valid_i,
  input  logic [11:0]     csr_addr_i,
  input  csr_op_e         csr_op_i,
  input  logic [XLEN-1:0] csr_wdata_i,
  input  logic            csr_commit_i,
  output logic            csr_hit_o,
  output logic [XLEN-1:0] csr_rdata_o,
  output exception_t      csr_ex_o,
  // ssp update from the shadow-stack controller
  input  logic            ssp_we_i,
  input  logic [XLEN-1:0] ssp_wdata_i,
  // state
  output logic [XLEN-1:0] ssp_o,
  output logic            menvcfg_sse_o,
  output logic            senvcfg_sse_o
);

  logic [XLEN-1:0] ssp_q;
  logic            menvcfg_sse_q, senvcfg_sse_q;
  logic            senvcfg_sse_eff;
  logic            allowed;
  logic [XLEN-1:0] new_val;
  logic            do_write;

  assign senvcfg_sse_eff = senvcfg_sse_q & menvcfg_sse_q;

  always_comb begin
    csr_hit_o   = 1'b1;
    csr_rdata_o = '0;
    allowed     = 1'b0;
    unique case (csr_addr_i)
      CSR_SSP: begin
        csr_rdata_o = ssp_q;
        unique case (priv_lvl_i)
          PRIV_M:  allowed = 1'b1;
          PRIV_S:  allowed = menvcfg_sse_q;
          PRIV_U:  allowed = menvcfg_sse_q & senvcfg_sse_eff;
          default: allowed = 1'b0;
        endcase
      end
      CSR_SENVCFG: begin
        csr_rdata_o[ENVCFG_SSE_BIT] = senvcfg_sse_eff;
        allowed = (priv_lvl_i == PRIV_S) || (priv_lvl_i == PRIV_M);
      end
      CSR_MENVCFG: begin
        csr_rdata_o[ENVCFG_SSE_BIT] = menvcfg_sse_q;
        allowed = (priv_lvl_i == PRIV_M);
      end
      default: csr_hit_o = 1'b0;
    endcase
  end

  always_comb begin
    unique case (csr_op_i)
      CSR_WRITE: new_val = csr_wdata_i;
      CSR_SET:   new_val = csr_rdata_o | csr_wdata_i;
      CSR_CLEAR: new_val = csr_rdata_o & ~csr_wdata_i;
      default:   new_val = csr_rdata_o;
    endcase
  end

  always_comb begin
    csr_ex_o = '0;
    if (csr_valid_i && csr_hit_o && !allowed) begin
      csr_ex_o.valid = 1'b1;
      csr_ex_o.cause = CAUSE_ILLEGAL_INSTR;
    end
  end

  assign do_write = csr_valid_i && csr_hit_o && allowed && csr_commit_i && (csr_op_i != CSR_READ);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ssp_q         <= '0;
      menvcfg_sse_q <= 1'b0;
      senvcfg_sse_q <= 1'b0;
    end else if (do_write) begin
      unique case (csr_addr_i)
        CSR_SSP:     ssp_q         <= new_val;
        CSR_SENVCFG: senvcfg_sse_q <= new_val[ENVCFG_SSE_BIT] & menvcfg_sse_q;
        CSR_MENVCFG: begin
          menvcfg_sse_q <= new_val[ENVCFG_SSE_BIT];
          if (!new_val[ENVCFG_SSE_BIT]) senvcfg_sse_q <= 1'b0;
        end
        default: ;
      endcase
    end else if (ssp_we_i) begin
      ssp_q <= ssp_wdata_i;
    end
  end

  assign ssp_o         = ssp_q;
  assign menvcfg_sse_o = menvcfg_sse_q;
  assign senvcfg_sse_o = senvcfg_sse_eff;

  // One instruction commits per cycle: a CSR write and a shadow-stack update
  // of ssp cannot arrive together.
  a_one_writer: assert property (@(posedge clk_i) disable iff (!rst_ni) !(do_write && ssp_we_i));

endmodule
