// Test of addr_path: random advance, override and slot loads against a model of the two
// registers; checks the registered pointer and slot and the look-ahead read address.
module tb_addr_path;
  import hwmon_pkg::*;

  localparam int unsigned ADDR_W = 16;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic              adv, ovr, slot_we;
  logic [PTR_W-1:0]  seq_ptr, ovr_ptr, ptr;
  logic [ADDR_W-1:0] slot_in, slot, rd_addr;
  logic [PTR_W-1:0]  m_ptr;
  logic [ADDR_W-1:0] m_slot;

  addr_path #(.ADDR_W(ADDR_W)) dut (.clk(clk), .rst_n(rst_n), .adv_i(adv), .seq_ptr_i(seq_ptr),
    .ovr_i(ovr), .ovr_ptr_i(ovr_ptr), .slot_we_i(slot_we), .slot_i(slot_in), .ptr_o(ptr),
    .slot_o(slot), .rd_addr_o(rd_addr));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    adv = 0; ovr = 0; slot_we = 0; seq_ptr = '0; ovr_ptr = '0; slot_in = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_ptr = '0; m_slot = '0;
    for (int n = 0; n < 2000; n++) begin
      logic [PTR_W-1:0]  np;
      logic [ADDR_W-1:0] ns;
      @(negedge clk);
      check(ptr == m_ptr && slot == m_slot, "registers");
      adv = $urandom_range(1); ovr = ($urandom_range(3) == 0); slot_we = ($urandom_range(3) == 0);
      seq_ptr = PTR_W'($urandom); ovr_ptr = PTR_W'($urandom); slot_in = ADDR_W'($urandom);
      np = ovr ? ovr_ptr : (adv ? seq_ptr : m_ptr);
      ns = slot_we ? slot_in : m_slot;
      #1;
      check(rd_addr == ADDR_W'(ns + np), "read address");
      @(posedge clk);
      m_ptr = np; m_slot = ns;
    end
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
