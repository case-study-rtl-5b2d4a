// ss_decoder: recognises the Zicfiss shadow-stack instructions.
//
// A compiler inserts one SSPUSH on every call (saving the link register) and
// one SSPOPCHK on every return (checking it). Both are encoded in the
// may-be-operation (MOP) space of the SYSTEM opcode with rd = x0:
//   SSPUSH   = 1100111 rs2 00000 100 00000 1110011, rs2 in {x1, x5}
//   SSPOPCHK = 110011011100 rs1 100 00000 1110011,   rs1 in {x1, x5}
// Any other MOP word is not a shadow-stack instruction and is left to the
// host decoder. The output names the register whose value the pipeline must
// carry to commit. Purely combinational. The two instructions come from the
// source document; their encodings from the Zicfiss specification. Only the
// 32-bit forms are decoded: compressed forms are expected to be expanded by
// the host core first.
module ss_decoder
  import zicfiss_pkg::*;
(
  input  logic [31:0] instr_i,
  output ss_dec_t     dec_o
);

  logic [4:0] rs1, rs2, rd;
  logic       is_mop_sys;

  assign rs1 = instr_i[19:15];
  assign rs2 = instr_i[24:20];
  assign rd  = instr_i[11:7];
  assign is_mop_sys = (instr_i[6:0] == OPC_SYSTEM) && (instr_i[14:12] == F3_MOP) && (rd == 5'd0);

  function automatic logic is_link(input logic [4:0] r);
    return (r == 5'd1) || (r == 5'd5);
  endfunction

  always_comb begin
    dec_o = '{is_ss: 1'b0, op: SS_NONE, rs_idx: 5'd0};
    if (is_mop_sys && instr_i[31:25] == F7_SSPUSH && rs1 == 5'd0 && is_link(rs2)) begin
      dec_o = '{is_ss: 1'b1, op: SS_PUSH, rs_idx: rs2};
    end else if (is_mop_sys && instr_i[31:20] == F12_SSPOPCHK && is_link(rs1)) begin
      dec_o = '{is_ss: 1'b1, op: SS_POPCHK, rs_idx: rs1};
    end
  end

endmodule
