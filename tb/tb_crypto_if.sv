// Test of crypto_if: two-word graph entry writes, group base and slot table writes, and the
// read-back of the monitor's load request. Only one write port may fire per bus write.
module tb_crypto_if;
  import hwmon_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [19:0]        address;
  logic               write, read;
  logic [31:0]        writedata, readdata;
  logic               gm_we, gb_we, slot_we, slot_wres, load_req;
  logic [15:0]        gm_waddr, slot_wbase;
  logic [ENTRY_W-1:0] gm_wdata;
  logic [GROUP_W-1:0] gb_waddr;
  logic [PTR_W-1:0]   gb_wdata;
  logic [3:0]         slot_wgid, load_gid;

  crypto_if dut (.clk(clk), .rst_n(rst_n), .address_i(address), .write_i(write),
    .writedata_i(writedata), .read_i(read), .readdata_o(readdata), .gm_we_o(gm_we),
    .gm_waddr_o(gm_waddr), .gm_wdata_o(gm_wdata), .gb_we_o(gb_we), .gb_waddr_o(gb_waddr),
    .gb_wdata_o(gb_wdata), .slot_we_o(slot_we), .slot_wgid_o(slot_wgid),
    .slot_wres_o(slot_wres), .slot_wbase_o(slot_wbase), .load_req_i(load_req),
    .load_gid_i(load_gid));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    #1;
  endtask

  initial begin
    address = '0; write = 0; read = 0; writedata = '0; load_req = 0; load_gid = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [35:0] e;
      logic [15:0] a;
      e = {4'($urandom), $urandom};
      a = 16'($urandom);
      wr(20'h80020, {28'd0, e[35:32]});
      check(!gm_we && !gb_we && !slot_we, "high-bits write touches no table");
      wr({4'h0, a}, e[31:0]);
      check(gm_we && !gb_we && !slot_we, "entry write enables graph memory only");
      check(gm_waddr == a && gm_wdata == e, "entry address and data");
    end
    wr(20'h80002, 32'h0000_001b);
    check(gb_we && !gm_we && !slot_we && gb_waddr == 4'd2 && gb_wdata == 16'h001b, "group base");
    wr(20'h80013, 32'h8000_2000);
    check(slot_we && !gm_we && !gb_we && slot_wgid == 4'd3 && slot_wres && slot_wbase == 16'h2000,
          "slot row");
    wr(20'h80015, 32'h0000_0000);
    check(slot_we && !slot_wres, "slot row not resident");
    @(negedge clk);
    write = 0;
    load_req = 1; load_gid = 4'd9; address = 20'h80030; read = 1;
    #1;
    check(readdata == 32'h8000_0009, "load request read");
    load_req = 0;
    #1;
    check(readdata == 32'h0000_0009, "no load request");
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
