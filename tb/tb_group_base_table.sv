// Test of group_base_table: reset contents, writes of the three bases printed for the
// prototype (0x0000, 0x0005, 0x001b), random writes, and both read ports.
module tb_group_base_table;
  import hwmon_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic               we;
  logic [GROUP_W-1:0] waddr, raddr;
  logic [PTR_W-1:0]   wdata, rdata, isr_base;
  logic [PTR_W-1:0]   model [NUM_GROUPS];

  group_base_table dut (.clk(clk), .rst_n(rst_n), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                        .raddr_i(raddr), .rdata_o(rdata), .isr_base_o(isr_base));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int g, input logic [PTR_W-1:0] d);
    @(negedge clk);
    we = 1; waddr = GROUP_W'(g); wdata = d;
    @(negedge clk);
    we = 0;
    model[g] = d;
  endtask

  task automatic read_all();
    for (int g = 0; g < NUM_GROUPS; g++) begin
      raddr = GROUP_W'(g);
      #1;
      check(rdata == model[g], $sformatf("group %0d: %h vs %h", g, rdata, model[g]));
    end
    check(isr_base == model[0], "ISR group base");
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NUM_GROUPS; g++) model[g] = '0;
    read_all();
    wr(0, 16'h0000); wr(1, 16'h0005); wr(2, 16'h001b);
    read_all();
    for (int n = 0; n < 100; n++) wr(int'($urandom_range(NUM_GROUPS - 1)), PTR_W'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
