// ss_mem: the internal storage behind the shadow stack.
//
// DEPTH words of WIDTH bits (256 x 64 by default, the configuration whose
// area the source document reports) held in flip-flops, with one
// combinational read port, used by SSPOPCHK to compare in the commit cycle,
// and one write port, used by SSPUSH when it retires. The write happens on
// the rising clock edge. Words are not reset: a word is only read after a
// push has written it. Size and "internal memory" follow the document;
// flip-flop storage and the port arrangement are this design's choice.
module ss_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i
);

  logic [WIDTH-1:0] mem_q [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem_q[waddr_i] <= wdata_i;
  end

  assign rdata_o = mem_q[raddr_i];

endmodule
