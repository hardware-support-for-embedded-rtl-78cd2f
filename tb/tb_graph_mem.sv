// Test of graph_mem at its default depth (65,536 entries): writes random entries at random
// addresses, including the first and last, and reads them back with one cycle of latency.
module tb_graph_mem;
  import hwmon_pkg::*;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned N      = 512;

  logic clk = 0;
  always #5 clk = ~clk;

  logic               we;
  logic [ADDR_W-1:0]  waddr, raddr;
  logic [ENTRY_W-1:0] wdata, rdata;
  logic [ADDR_W-1:0]  addrs [N];
  logic [ENTRY_W-1:0] datas [N];

  graph_mem dut (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr),
                 .rdata_o(rdata));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < int'(N); i++) begin
      addrs[i] = (i == 0) ? '0 : (i == 1) ? '1 : ADDR_W'(i * 127 + 3);  // distinct
      datas[i] = {4'($urandom), $urandom};
      @(negedge clk);
      we = 1; waddr = addrs[i]; wdata = datas[i];
    end
    @(negedge clk);
    we = 0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      @(negedge clk);
      raddr = addrs[i];
      @(negedge clk);
      check(rdata == datas[i], $sformatf("entry %h: %h vs %h", addrs[i], rdata, datas[i]));
    end
    // read during write of another address keeps the old read data
    @(negedge clk);
    raddr = addrs[5]; we = 1; waddr = addrs[6]; wdata = ~datas[6];
    @(negedge clk);
    we = 0;
    check(rdata == datas[5], "read while writing elsewhere");
    raddr = addrs[6];
    @(negedge clk);
    check(rdata == ~datas[6], "overwritten entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
