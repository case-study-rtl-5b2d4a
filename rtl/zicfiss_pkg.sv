// zicfiss_pkg: types and constants shared by the Zicfiss shadow-stack logic.
//
// Holds the privilege-level encoding, the shadow-stack operation and CSR
// operation enums, the exception record handed to the commit stage, the CSR
// addresses and bit positions, and the exception causes. XLEN is 64, the
// width of the host core and of one shadow-stack entry. The CSR addresses,
// the SSE bit position (bit 3 of menvcfg/senvcfg), the cause codes and the
// software-check tval value 3 are those of the RISC-V privileged and Zicfiss
// specifications; which cause is used for a misaligned ssp is this design's
// choice (see ss_ctrl).
package zicfiss_pkg;

  localparam int unsigned XLEN = 64;
  // Bytes per shadow-stack entry and the ssp bits that must be zero.
  localparam int unsigned SS_ENTRY_BYTES = XLEN / 8;
  localparam int unsigned SS_ALIGN_BITS  = $clog2(SS_ENTRY_BYTES);

  typedef enum logic [1:0] {
    PRIV_U = 2'b00,
    PRIV_S = 2'b01,
    PRIV_M = 2'b11
  } priv_lvl_e;

  typedef enum logic [1:0] {
    SS_NONE   = 2'd0,
    SS_PUSH   = 2'd1,
    SS_POPCHK = 2'd2
  } ss_op_e;

  // CSR instruction flavour as seen at commit (immediate forms are resolved
  // to a write value by the pipeline before they get here).
  typedef enum logic [1:0] {
    CSR_READ  = 2'd0,
    CSR_WRITE = 2'd1,
    CSR_SET   = 2'd2,
    CSR_CLEAR = 2'd3
  } csr_op_e;

  // Result of decoding one instruction word.
  typedef struct packed {
    logic       is_ss;   // word is SSPUSH or SSPOPCHK
    ss_op_e     op;
    logic [4:0] rs_idx;  // x1 or x5: the link register checked or pushed
  } ss_dec_t;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] cause;
    logic [XLEN-1:0] tval;
  } exception_t;

  // CSR addresses.
  localparam logic [11:0] CSR_SSP     = 12'h011;
  localparam logic [11:0] CSR_SENVCFG = 12'h10A;
  localparam logic [11:0] CSR_MENVCFG = 12'h30A;
  // Position of the shadow-stack enable in menvcfg and senvcfg.
  localparam int unsigned ENVCFG_SSE_BIT = 3;

  // Exception causes and the software-check code for a shadow-stack fault.
  localparam logic [XLEN-1:0] CAUSE_ILLEGAL_INSTR   = 64'd2;
  localparam logic [XLEN-1:0] CAUSE_LOAD_ACCESS     = 64'd5;
  localparam logic [XLEN-1:0] CAUSE_STORE_ACCESS    = 64'd7;
  localparam logic [XLEN-1:0] CAUSE_SOFTWARE_CHECK  = 64'd18;
  localparam logic [XLEN-1:0] SWCHECK_SHADOW_STACK  = 64'd3;

  // Instruction encodings (32-bit forms). SSPUSH is MOP.RR.7 with rs2 = x1/x5,
  // SSPOPCHK is MOP.R.28 with rs1 = x1/x5; both have rd = x0.
  localparam logic [6:0] OPC_SYSTEM        = 7'b1110011;
  localparam logic [2:0] F3_MOP            = 3'b100;
  localparam logic [6:0] F7_SSPUSH         = 7'b1100111;
  localparam logic [11:0] F12_SSPOPCHK     = 12'hCDC;


endpackage
