// Test of cpu_if: command decoding for CREATE, SWITCH and DELETE, waitrequest held until
// the controller accepts, the interrupt-disable register, and the status read-back.
module tb_cpu_if;
  import hwmon_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [1:0]  address;
  logic        write, read, waitrequest;
  logic [31:0] writedata, readdata;
  logic        cmd_valid, cmd_ready, irq_disable;
  cmd_op_e     cmd_op;
  logic [5:0]  cmd_pid, cur_pid;
  logic [3:0]  cmd_gid;
  logic        done, armed, in_os, recovery, reset_req;

  cpu_if dut (.clk(clk), .rst_n(rst_n), .address_i(address), .write_i(write),
    .writedata_i(writedata), .read_i(read), .readdata_o(readdata), .waitrequest_o(waitrequest),
    .cmd_valid_o(cmd_valid), .cmd_op_o(cmd_op), .cmd_pid_o(cmd_pid), .cmd_gid_o(cmd_gid),
    .cmd_ready_i(cmd_ready), .irq_disable_o(irq_disable), .done_i(done), .armed_i(armed),
    .in_os_i(in_os), .recovery_i(recovery), .reset_req_i(reset_req), .cur_pid_i(cur_pid));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Issue a command write; the controller accepts it after 'delay' cycles.
  task automatic cmd(input logic [1:0] a, input logic [31:0] d, input int delay,
                     input cmd_op_e op, input logic [5:0] pid, input logic [3:0] gid);
    @(negedge clk);
    address = a; writedata = d; write = 1; cmd_ready = 0;
    for (int i = 0; i < delay; i++) begin
      #1;
      check(cmd_valid && waitrequest, "write held while not accepted");
      check(cmd_op == op && cmd_pid == pid && cmd_gid == gid, "command fields");
      @(negedge clk);
    end
    cmd_ready = 1;
    #1;
    check(cmd_valid && !waitrequest, "write released on accept");
    check(cmd_op == op && cmd_pid == pid && cmd_gid == gid, "command fields at accept");
    @(negedge clk);
    write = 0; cmd_ready = 0;
  endtask

  initial begin
    address = '0; write = 0; read = 0; writedata = '0; cmd_ready = 0;
    done = 1; armed = 0; in_os = 0; recovery = 0; reset_req = 0; cur_pid = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!irq_disable, "interrupts enabled after reset");
    cmd(2'd0, {20'd0, 4'd7, 8'd12}, 3, CMD_CREATE, 6'd12, 4'd7);
    cmd(2'd1, 32'd33, 0, CMD_SWITCH, 6'd33, 4'd0);
    cmd(2'd2, 32'd5, 2, CMD_DELETE, 6'd5, 4'd0);
    // status register
    @(negedge clk);
    address = 2'd3; writedata = 32'd1; write = 1;
    #1;
    check(!cmd_valid && !waitrequest, "status write is not a command");
    @(negedge clk);
    write = 0;
    check(irq_disable, "interrupt disable set");
    for (int n = 0; n < 20; n++) begin
      logic [5:0] f;
      f = 6'($urandom);
      {reset_req, recovery, armed, in_os, done} = f[4:0];
      cur_pid = 6'($urandom);
      address = 2'd3; read = 1;
      #1;
      check(readdata == {16'd0, 2'd0, cur_pid, 2'd0, reset_req, recovery, armed, in_os, done, 1'b1},
            "status read");
      @(negedge clk);
    end
    read = 0;
    address = 2'd3; writedata = 32'd0; write = 1;
    @(negedge clk);
    write = 0;
    check(!irq_disable, "interrupt disable cleared");
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
