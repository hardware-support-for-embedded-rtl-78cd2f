// Test of seq_logic: random graph entries and ranks; the test supplies the group base
// table and computes successor, call flag and call target itself.
module tb_seq_logic;
  import hwmon_pkg::*;

  graph_entry_t       entry;
  logic [HASH_W-1:0]  rank;
  logic [GROUP_W-1:0] group_sel;
  logic [PTR_W-1:0]   group_base, next_ptr, call_ptr;
  logic               is_call;
  logic [PTR_W-1:0]   table_v [NUM_GROUPS];

  seq_logic dut (.entry_i(entry), .rank_i(rank), .group_sel_o(group_sel),
                 .group_base_i(group_base), .next_ptr_o(next_ptr), .is_call_o(is_call),
                 .call_ptr_o(call_ptr));

  assign group_base = table_v[group_sel];

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int g = 0; g < NUM_GROUPS; g++) table_v[g] = PTR_W'($urandom);
    for (int n = 0; n < 2000; n++) begin
      entry.accept     = ONEHOT_W'($urandom);
      entry.next_ptr   = PTR_W'($urandom);
      entry.call_group = ($urandom_range(3) == 0) ? GROUP_W'($urandom) : '0;
      rank             = HASH_W'($urandom);
      #1;
      check(next_ptr == PTR_W'((int'(entry.next_ptr) + int'(rank)) % 65536), "successor");
      check(is_call == (entry.call_group != 0), "call flag");
      check(group_sel == entry.call_group, "group select");
      check(call_ptr == table_v[entry.call_group], "call target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
