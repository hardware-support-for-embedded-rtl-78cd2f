// Test of bookkeeping: random writes to the slot table and the task table against a model,
// reads of every row through all read ports, and the cleared state after reset.
module tb_bookkeeping;
  import hwmon_pkg::*;

  localparam int unsigned ADDR_W = 16, NUM_GIDS = 16, NUM_PIDS = 64, OS_GID = 0;
  localparam int unsigned GID_W = 4, PID_W = 6;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic              slot_we, slot_wres, slot_rres, os_res;
  logic [GID_W-1:0]  slot_wgid, slot_rgid;
  logic [ADDR_W-1:0] slot_wbase, slot_rbase, os_base;
  logic              task_we, task_wvalid, task_win_os, task_rvalid, task_rin_os;
  logic [PID_W-1:0]  task_wpid, task_rpid;
  logic [GID_W-1:0]  task_wgid, task_rgid;
  logic [PTR_W-1:0]  task_wuptr, task_woptr, task_ruptr, task_roptr;

  bookkeeping dut (.clk(clk), .rst_n(rst_n),
    .slot_we_i(slot_we), .slot_wgid_i(slot_wgid), .slot_wres_i(slot_wres),
    .slot_wbase_i(slot_wbase), .slot_rgid_i(slot_rgid), .slot_rres_o(slot_rres),
    .slot_rbase_o(slot_rbase), .os_res_o(os_res), .os_base_o(os_base),
    .task_we_i(task_we), .task_wpid_i(task_wpid), .task_wvalid_i(task_wvalid),
    .task_wgid_i(task_wgid), .task_wuptr_i(task_wuptr), .task_win_os_i(task_win_os),
    .task_woptr_i(task_woptr), .task_rpid_i(task_rpid), .task_rvalid_o(task_rvalid),
    .task_rgid_o(task_rgid), .task_ruptr_o(task_ruptr), .task_rin_os_o(task_rin_os),
    .task_roptr_o(task_roptr));

  logic [ADDR_W:0]          m_slot [NUM_GIDS];   // {resident, base}
  logic [1+GID_W+PTR_W*2:0] m_task [NUM_PIDS];   // {valid, gid, uptr, in_os, optr}

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_all();
    for (int g = 0; g < int'(NUM_GIDS); g++) begin
      slot_rgid = GID_W'(g);
      #1;
      check({slot_rres, slot_rbase} == m_slot[g], $sformatf("slot row %0d", g));
    end
    check({os_res, os_base} == m_slot[OS_GID], "OS slot port");
    for (int p = 0; p < int'(NUM_PIDS); p++) begin
      task_rpid = PID_W'(p);
      #1;
      check({task_rvalid, task_rgid, task_ruptr, task_rin_os, task_roptr} == m_task[p],
            $sformatf("task row %0d", p));
    end
  endtask

  initial begin
    slot_we = 0; task_we = 0; slot_rgid = '0; task_rpid = '0;
    slot_wgid = '0; slot_wres = 0; slot_wbase = '0;
    task_wpid = '0; task_wvalid = 0; task_wgid = '0; task_wuptr = '0; task_win_os = 0;
    task_woptr = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < int'(NUM_GIDS); g++) m_slot[g] = '0;
    for (int p = 0; p < int'(NUM_PIDS); p++) m_task[p] = '0;
    read_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      slot_we = $urandom_range(1); slot_wgid = GID_W'($urandom); slot_wres = $urandom_range(1);
      slot_wbase = ADDR_W'($urandom);
      task_we = $urandom_range(1); task_wpid = PID_W'($urandom); task_wvalid = $urandom_range(1);
      task_wgid = GID_W'($urandom); task_wuptr = PTR_W'($urandom);
      task_win_os = $urandom_range(1); task_woptr = PTR_W'($urandom);
      @(posedge clk);
      if (slot_we) m_slot[slot_wgid] = {slot_wres, slot_wbase};
      if (task_we) m_task[task_wpid] = {task_wvalid, task_wgid, task_wuptr, task_win_os, task_woptr};
    end
    @(negedge clk);
    slot_we = 0; task_we = 0;
    read_all();
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
