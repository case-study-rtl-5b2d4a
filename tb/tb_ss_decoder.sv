// tb_ss_decoder: checks recognition of SSPUSH / SSPOPCHK instruction words.
// Fixed words: sspush x1 (0xCE104073), sspush x5 (0xCE504073), sspopchk x1
// (0xCDC0C073), sspopchk x5 (0xCDC2C073), plus near misses that must not
// match: other link registers, non-zero rd (ssrdp), non-zero rs1 in sspush,
// wrong funct3 and opcode, and ordinary instructions. Then random words,
// which are compared with a field-by-field reference.
module tb_ss_decoder;
  import zicfiss_pkg::*;

  logic [31:0] instr;
  ss_dec_t     dec;
  int          checks = 0, failures = 0;

  ss_decoder dut (.instr_i(instr), .dec_o(dec));

  task automatic expect_dec(input logic [31:0] w, input logic is_ss, input ss_op_e op, input logic [4:0] rs);
    instr = w;
    #1;
    checks++;
    if (dec.is_ss !== is_ss || (is_ss && (dec.op !== op || dec.rs_idx !== rs)) || (!is_ss && dec.op !== SS_NONE)) begin
      failures++;
      $display("FAIL instr=%08h got is_ss=%0b op=%0d rs=%0d", w, dec.is_ss, dec.op, dec.rs_idx);
    end
  endtask

  initial begin
    expect_dec(32'hCE104073, 1'b1, SS_PUSH,   5'd1);
    expect_dec(32'hCE504073, 1'b1, SS_PUSH,   5'd5);
    expect_dec(32'hCDC0C073, 1'b1, SS_POPCHK, 5'd1);
    expect_dec(32'hCDC2C073, 1'b1, SS_POPCHK, 5'd5);
    expect_dec(32'hCE204073, 1'b0, SS_NONE, 5'd0);  // sspush x2
    expect_dec(32'hCDC14073, 1'b0, SS_NONE, 5'd0);  // popchk x2
    expect_dec(32'hCDC040F3, 1'b0, SS_NONE, 5'd0);  // ssrdp x1
    expect_dec(32'hCDC0C0F3, 1'b0, SS_NONE, 5'd0);  // rd != 0
    expect_dec(32'hCE10C073, 1'b0, SS_NONE, 5'd0);  // sspush with rs1 = x1
    expect_dec(32'hCE100073, 1'b0, SS_NONE, 5'd0);  // funct3 000
    expect_dec(32'hCE104033, 1'b0, SS_NONE, 5'd0);  // OP opcode
    expect_dec(32'h00008067, 1'b0, SS_NONE, 5'd0);  // ret
    expect_dec(32'h00000073, 1'b0, SS_NONE, 5'd0);  // ecall
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] w;
      logic        sys, push, pop;
      w = $urandom();
      // Bias a quarter of the words towards the MOP space.
      if (i % 4 == 0) w = {w[31:15], 3'b100, 5'd0, 7'b1110011};
      sys  = (w[6:0] == 7'h73) && (w[14:12] == 3'd4) && (w[11:7] == 5'd0);
      push = sys && (w[31:25] == 7'h67) && (w[19:15] == 5'd0) && (w[24:20] == 5'd1 || w[24:20] == 5'd5);
      pop  = sys && (w[31:20] == 12'hCDC) && (w[19:15] == 5'd1 || w[19:15] == 5'd5);
      expect_dec(w, push | pop, push ? SS_PUSH : (pop ? SS_POPCHK : SS_NONE), push ? w[24:20] : w[19:15]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
