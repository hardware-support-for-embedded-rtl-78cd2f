// Test of monitor_ctrl with real bookkeeping tables around it. The test plays the
// comparison logic (match, call, successor) and the processor, and checks: task creation
// with and without a resident graph (load request, Done low), scheduler, interrupt and
// system-call switches (what is loaded into the address pointer and slot, and that Done is
// low for exactly CTX_SWITCH_CYCLES cycles), resuming OS code interrupted inside a system
// call, the recovery interrupt for an application violation, the reset request (length
// RESET_CYCLES) for an OS violation and for switching to an unknown PID, and IRQs ignored
// while disabled.
module tb_monitor_ctrl;
  import hwmon_pkg::*;

  localparam int unsigned ADDR_W = 16, GID_W = 4, PID_W = 6;
  localparam int unsigned SW = 12, RST = 16;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic              instr_valid, irq, irq_disable, ready, reset_req, recovery;
  logic              cmd_valid, cmd_ready;
  cmd_op_e           cmd_op;
  logic [PID_W-1:0]  cmd_pid, task_wpid, task_rpid, cur_pid;
  logic [GID_W-1:0]  cmd_gid, slot_rgid, task_wgid, task_rgid, load_gid;
  logic              match, is_call;
  logic [PTR_W-1:0]  next_ptr, call_ptr, isr_ptr, ovr_ptr;
  logic              slot_rres, os_res, task_we, task_wvalid, task_win_os, task_rvalid;
  logic              task_rin_os;
  logic [ADDR_W-1:0] slot_rbase, os_base, slot_o;
  logic [PTR_W-1:0]  task_wuptr, task_woptr, task_ruptr, task_roptr;
  logic              adv, ovr, slot_we, load_req, armed, in_os;
  logic              ev_irq, ev_call, ev_sched, ev_load;
  logic              bk_slot_we, bk_slot_wres;
  logic [GID_W-1:0]  bk_slot_wgid;
  logic [ADDR_W-1:0] bk_slot_wbase;

  monitor_ctrl dut (.clk(clk), .rst_n(rst_n), .instr_valid_i(instr_valid), .irq_i(irq),
    .irq_disable_i(irq_disable), .ready_o(ready), .reset_req_o(reset_req),
    .recovery_o(recovery), .cmd_valid_i(cmd_valid), .cmd_op_i(cmd_op), .cmd_pid_i(cmd_pid),
    .cmd_gid_i(cmd_gid), .cmd_ready_o(cmd_ready), .match_i(match), .is_call_i(is_call),
    .next_ptr_i(next_ptr), .call_ptr_i(call_ptr), .isr_ptr_i(isr_ptr),
    .slot_rgid_o(slot_rgid), .slot_rres_i(slot_rres), .slot_rbase_i(slot_rbase),
    .os_res_i(os_res), .os_base_i(os_base), .task_we_o(task_we), .task_wpid_o(task_wpid),
    .task_wvalid_o(task_wvalid), .task_wgid_o(task_wgid), .task_wuptr_o(task_wuptr),
    .task_win_os_o(task_win_os), .task_woptr_o(task_woptr), .task_rpid_o(task_rpid),
    .task_rvalid_i(task_rvalid), .task_rgid_i(task_rgid), .task_ruptr_i(task_ruptr),
    .task_rin_os_i(task_rin_os), .task_roptr_i(task_roptr), .adv_o(adv), .ovr_o(ovr),
    .ovr_ptr_o(ovr_ptr), .slot_we_o(slot_we), .slot_o(slot_o), .load_req_o(load_req),
    .load_gid_o(load_gid), .armed_o(armed), .in_os_o(in_os), .cur_pid_o(cur_pid),
    .ev_irq_o(ev_irq), .ev_call_o(ev_call), .ev_sched_o(ev_sched), .ev_load_o(ev_load));

  bookkeeping u_bk (.clk(clk), .rst_n(rst_n),
    .slot_we_i(bk_slot_we), .slot_wgid_i(bk_slot_wgid), .slot_wres_i(bk_slot_wres),
    .slot_wbase_i(bk_slot_wbase), .slot_rgid_i(slot_rgid), .slot_rres_o(slot_rres),
    .slot_rbase_o(slot_rbase), .os_res_o(os_res), .os_base_o(os_base),
    .task_we_i(task_we), .task_wpid_i(task_wpid), .task_wvalid_i(task_wvalid),
    .task_wgid_i(task_wgid), .task_wuptr_i(task_wuptr), .task_win_os_i(task_win_os),
    .task_woptr_i(task_woptr), .task_rpid_i(task_rpid), .task_rvalid_o(task_rvalid),
    .task_rgid_o(task_rgid), .task_ruptr_o(task_ruptr), .task_rin_os_o(task_rin_os),
    .task_roptr_o(task_roptr));

  int checks = 0, failures = 0;
  int low_cycles;
  logic [PTR_W-1:0]  last_ptr;
  logic [ADDR_W-1:0] last_slot;
  int n_ovr;

  always @(posedge clk) begin
    if (ovr) begin last_ptr <= ovr_ptr; n_ovr <= n_ovr + 1; end
    if (slot_we) last_slot <= slot_o;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  task automatic slot_row(input int gid, input bit res, input int base);
    @(negedge clk);
    bk_slot_we = 1; bk_slot_wgid = GID_W'(gid); bk_slot_wres = res; bk_slot_wbase = ADDR_W'(base);
    @(negedge clk);
    bk_slot_we = 0;
  endtask

  // Count the cycles Done stays low, starting with the cycle after the current edge.
  task automatic count_low();
    low_cycles = 0;
    @(negedge clk);
    while (!ready && low_cycles < 200) begin low_cycles++; @(negedge clk); end
  endtask

  task automatic command(input cmd_op_e op, input int pid, input int gid);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_pid = PID_W'(pid); cmd_gid = GID_W'(gid);
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    cmd_valid = 0;
  endtask

  // One reported instruction, accepted at the next edge where Done is high.
  task automatic instr(input bit m, input bit call, input int nxt, input int cptr);
    @(negedge clk);
    instr_valid = 1; match = m; is_call = call; next_ptr = PTR_W'(nxt); call_ptr = PTR_W'(cptr);
    #1;
    while (!ready) begin @(negedge clk); #1; end
    if (m) check(adv, "matched instruction advances the pointer");
    @(posedge clk);
    #1;
    instr_valid = 0; match = 1; is_call = 0;
  endtask

  task automatic expect_switch(input int ptr, input int slot, input string what);
    count_low();
    check(low_cycles == int'(SW), $sformatf("%s: Done low %0d cycles", what, low_cycles));
    check(last_ptr == PTR_W'(ptr), $sformatf("%s: pointer %h, expected %h", what, last_ptr, ptr));
    check(last_slot == ADDR_W'(slot), $sformatf("%s: slot %h, expected %h", what, last_slot, slot));
  endtask

  task automatic expect_reset(input string what);
    int len, wait_n;
    wait_n = 0;
    @(negedge clk);
    while (!reset_req && wait_n < 2) begin wait_n++; @(negedge clk); end
    check(reset_req && !recovery, what);
    len = 0;
    while (reset_req && len < 100) begin len++; @(negedge clk); end
    check(len == int'(RST), $sformatf("%s: reset held %0d cycles", what, len));
    check(!armed && ready, "disarmed after reset request");
  endtask

  initial begin
    instr_valid = 0; irq = 0; irq_disable = 0; cmd_valid = 0; cmd_op = CMD_CREATE;
    cmd_pid = '0; cmd_gid = '0; match = 1; is_call = 0; next_ptr = '0; call_ptr = '0;
    isr_ptr = 16'h0007; bk_slot_we = 0; bk_slot_wgid = '0; bk_slot_wres = 0;
    bk_slot_wbase = '0; n_ovr = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(ready && !armed && !reset_req && !recovery, "after reset: Done high, disarmed");

    slot_row(0, 1, 'h100);
    slot_row(1, 1, 'h400);

    // task 3 on resident graph 1, task 4 on graph 2 that must be loaded first
    command(CMD_CREATE, 3, 1);
    check(ready && !load_req, "resident graph: no load");
    command(CMD_CREATE, 4, 2);
    #1;
    check(!ready && load_req && load_gid == 4'd2, "load request for GID 2, Done low");
    repeat (3) @(negedge clk);
    check(!ready && load_req, "still waiting for the graph");
    slot_row(2, 1, 'h800);
    @(negedge clk);
    check(ready && !load_req, "graph resident: Done back");

    // scheduler starts task 3
    command(CMD_SWITCH, 3, 0);
    expect_switch(0, 'h400, "scheduler switch to task 3");
    check(armed && !in_os && cur_pid == 6'd3, "monitoring task 3");
    instr(1, 0, 'h21, 0);
    instr(1, 0, 'h22, 0);

    // interrupt: pending until the next matched instruction, then switch to the ISR
    @(negedge clk); irq = 1;
    repeat (3) @(negedge clk);
    check(ready, "no switch before the next instruction");
    instr(1, 0, 'h30, 0);
    expect_switch('h7, 'h100, "interrupt switch");
    check(in_os, "monitoring OS graph");
    irq = 0;
    instr(1, 0, 'h8, 0);
    command(CMD_SWITCH, 3, 0);
    expect_switch('h30, 'h400, "resume task 3 after ISR");

    // system call, then return through the scheduler
    instr(1, 1, 'h41, 'h55);
    expect_switch('h55, 'h100, "system call switch");
    instr(1, 0, 'h56, 0);
    // interrupt inside the system call
    @(negedge clk); irq = 1;
    instr(1, 0, 'h57, 0);
    expect_switch('h7, 'h100, "interrupt inside system call");
    irq = 0;
    command(CMD_SWITCH, 4, 0);
    expect_switch(0, 'h800, "switch to task 4");
    command(CMD_SWITCH, 3, 0);
    expect_switch('h57, 'h100, "resume system call of task 3");
    check(in_os, "task 3 resumed in OS code");
    command(CMD_SWITCH, 3, 0);
    expect_switch('h41, 'h400, "system call returns to task 3");
    check(!in_os, "task 3 back in its own graph");

    // interrupts disabled: no switch
    irq_disable = 1;
    @(negedge clk); irq = 1;
    instr(1, 0, 'h42, 0);
    instr(1, 0, 'h43, 0);
    #1;
    check(ready, "IRQ ignored while disabled");
    irq = 0; irq_disable = 0;

    // application violation: recovery interrupt until the OS acts
    instr(0, 0, 0, 0);
    #1;
    check(recovery && !reset_req && !armed, "recovery interrupt");
    repeat (5) @(negedge clk);
    check(recovery, "recovery interrupt held");
    command(CMD_DELETE, 3, 0);
    #1;
    check(!recovery && !armed, "recovery cleared by the OS");

    // switch to the deleted task: treated as an OS fault
    command(CMD_SWITCH, 3, 0);
    expect_reset("reset request on unknown PID");

    // OS violation inside the ISR
    command(CMD_SWITCH, 4, 0);
    expect_switch(0, 'h800, "switch to task 4 again");
    @(negedge clk); irq = 1;
    instr(1, 0, 'h3, 0);
    count_low();
    irq = 0;
    instr(0, 0, 0, 0);
    expect_reset("reset request on ISR violation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
