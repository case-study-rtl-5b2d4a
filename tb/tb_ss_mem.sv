// tb_ss_mem: fills every word of the 256 x 64 shadow-stack memory with a
// value derived from its index, reads each back, then runs random writes and
// reads against a reference array, including clock edges with the write
// enable low that must not disturb the addressed word. Reads are combinational; a write is seen
// after the next rising edge, which is also checked (old value before it).
module tb_ss_mem;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned WIDTH = 64;

  logic                     clk = 1'b0;
  logic [$clog2(DEPTH)-1:0] raddr, waddr;
  logic [WIDTH-1:0]         rdata, wdata;
  logic                     we;
  logic [WIDTH-1:0]         ref_mem [DEPTH];
  int                       checks = 0, failures = 0;

  ss_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk_i(clk), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata)
  );

  always #5 clk = ~clk;

  task automatic check_read(input int a);
    raddr = a[$clog2(DEPTH)-1:0];
    #1;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("FAIL addr=%0d got=%h exp=%h", a, rdata, ref_mem[a]);
    end
  endtask

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = i[$clog2(DEPTH)-1:0];
      wdata = {32'hA5A50000 | 32'(i), 32'(i) * 32'h9E3779B9};
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < DEPTH; i++) check_read(i);
    for (int n = 0; n < 1000; n++) begin
      int a;
      @(negedge clk);
      a = int'($urandom_range(DEPTH - 1));
      we = 1'b1; waddr = a[$clog2(DEPTH)-1:0]; wdata = {$urandom(), $urandom()};
      check_read(a);  // still the old word before the edge
      @(posedge clk); #1;
      ref_mem[a] = wdata;
      we = 1'b0;
      check_read(int'($urandom_range(DEPTH - 1)));
      check_read(a);
      // With the write enable low, a clock edge must change nothing even
      // though address and data are driven.
      @(negedge clk);
      waddr = a[$clog2(DEPTH)-1:0]; wdata = ~ref_mem[a];
      @(posedge clk); #1;
      check_read(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
