// End-to-end test of the hardware monitor at its default parameters, with graphs of the
// sizes of the prototype's workload: an OS graph of 23,625 entries and four application
// graphs of 11,563, 7,823, 9,055 and 9,116 entries (61,182 entries in all). The graph
// contents are random, built by the test itself, since only the sizes are known.
//
// A behavioural processor model executes random walks through these graphs, reports each
// instruction's hash, and follows the operating-system protocol: it announces four tasks, is
// interrupted, makes system calls, and lets a round-robin scheduler resume tasks. The graphs
// are written through the co-processor bus like a secure loader would, the last application
// graph only on the monitor's request. The test checks that legal execution never raises an
// alarm, that the accepted-hash output matches the graph, that every interrupt costs exactly
// 6 stall cycles for a processor with a 6-cycle interrupt entry, that an illegal hash in an
// application raises the recovery interrupt and one in the interrupt service routine raises
// the reset request for RESET_CYCLES cycles, and that IRQ strobes are ignored while
// disabled. Each mechanism must occur at least once. The interrupt-service-routine attack
// mirrors the prototype's demonstration: the first ISR instruction accepts only hash 11
// (one-hot 16'h0800) and the overwritten instruction reports hash 3 (16'h0008).
//
// OS graph layout: group 0 (ISR) at entries 0x0000..0x0004, group 1 at 0x0005..0x001a,
// group 2 at 0x001b..0x003a, group 3 from 0x003b to the end. Slots follow one another from
// address 0 in the order OS, GID 1 .. GID 4.
module tb_hw_monitor;
  import hwmon_pkg::*;

  localparam int unsigned NAPP       = 4;
  localparam int unsigned OS_SIZE    = 23625;   // entries of the OS graph
  localparam int unsigned MAX_APP    = 11563;   // largest benchmark graph
  localparam int unsigned IRQ_ENTRY  = 6;    // processor's own interrupt entry cycles
  localparam int unsigned STALL_EXP  = 6;    // extra cycles the monitor adds per interrupt
  localparam int unsigned RESET_LEN  = 16;
  localparam int unsigned ROUNDS     = 20000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                instruction_valid;
  logic [HASH_W-1:0]   instruction_hash;
  logic                interrupt_req;
  logic                monitor_ready_flag, reset_flag, interrupt_flag;
  logic [ONEHOT_W-1:0] instruction_hash_onehot, accepted_hash_one_hot;
  logic [1:0]          cpu_address;
  logic                cpu_write, cpu_read, cpu_waitrequest;
  logic [31:0]         cpu_writedata, cpu_readdata;
  logic [19:0]         cp_address;
  logic                cp_write, cp_read;
  logic [31:0]         cp_writedata, cp_readdata;
  logic                ev_irq_switch, ev_call_switch, ev_sched_switch, ev_graph_load;

  hw_monitor dut (.clk(clk), .reset_reset_n(rst_n), .*);

  int checks = 0, failures = 0;
  int n_irq = 0, n_call = 0, n_sched = 0, n_load = 0, n_stall = 0, n_recovery = 0;
  int n_reset = 0, n_irq_ignored = 0, n_branch = 0, n_irq_in_call = 0;

  always @(posedge clk) begin
    if (ev_irq_switch)   n_irq++;
    if (ev_call_switch)  n_call++;
    if (ev_sched_switch) n_sched++;
    if (ev_graph_load)   n_load++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- graphs (the test's own copy) ----------------
  graph_entry_t os_g  [OS_SIZE];
  graph_entry_t app_g [NAPP+1][MAX_APP];
  int unsigned  app_size [NAPP+1] = '{0, 11563, 7823, 9055, 9116};
  int unsigned  grp_lo [4] = '{0, 5, 27, 59};
  int unsigned  grp_hi [4] = '{5, 27, 59, OS_SIZE};
  int unsigned  slot_base [NAPP+1];

  function automatic logic [ONEHOT_W-1:0] rand_mask();
    logic [ONEHOT_W-1:0] m;
    int n;
    m = '0;
    n = 1 + int'($urandom_range(2));
    while ($countones(m) < n) m[$urandom_range(ONEHOT_W-1)] = 1'b1;
    return m;
  endfunction

  function automatic graph_entry_t rand_entry(int unsigned lo, int unsigned hi, int unsigned rel0,
                                              bit allow_call);
    graph_entry_t e;
    e.accept     = rand_mask();
    e.next_ptr   = PTR_W'(lo - rel0 + $urandom_range(hi - lo - $countones(e.accept)));
    e.call_group = (allow_call && $urandom_range(11) == 0) ? GROUP_W'(1 + $urandom_range(2)) : '0;
    return e;
  endfunction

  // successor of entry e for hash h: next_ptr + number of accepted hashes below h
  function automatic int unsigned succ(graph_entry_t e, logic [HASH_W-1:0] h);
    int unsigned r = 0;
    for (int i = 0; i < int'(h); i++) if (e.accept[i]) r++;
    return int'(e.next_ptr) + r;
  endfunction

  function automatic logic [HASH_W-1:0] pick_hash(graph_entry_t e);
    int unsigned k, seen;
    k = $urandom_range($countones(e.accept) - 1);
    seen = 0;
    for (int i = 0; i < ONEHOT_W; i++) if (e.accept[i]) begin
      if (seen == k) return HASH_W'(i);
      seen++;
    end
    return '0;
  endfunction

  function automatic logic [HASH_W-1:0] bad_hash(graph_entry_t e);
    for (int i = 0; i < ONEHOT_W; i++) if (!e.accept[i]) return HASH_W'(i);
    return '0;
  endfunction

  // ---------------- bus drivers ----------------
  task automatic cp_wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk);
    cp_address = a; cp_writedata = d; cp_write = 1'b1;
    @(negedge clk);
    cp_write = 1'b0;
  endtask

  task automatic load_entry(input int unsigned addr, input graph_entry_t e);
    logic [ENTRY_W-1:0] w;
    w = e;
    cp_wr(20'h80020, 32'(w[ENTRY_W-1:32]));
    cp_wr(20'(addr), w[31:0]);
  endtask

  task automatic cpu_wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    instruction_valid = 1'b0;
    cpu_address = a; cpu_writedata = d; cpu_write = 1'b1;
    #1;
    while (cpu_waitrequest) begin
      @(negedge clk); #1;
    end
    @(negedge clk);
    cpu_write = 1'b0;
  endtask

  // Report one instruction; hold it while Done is low. Returns after the accepting edge.
  task automatic exec(input logic [HASH_W-1:0] h, input logic [ONEHOT_W-1:0] exp_mask,
                      output int stalls);
    stalls = 0;
    @(negedge clk);
    instruction_valid = 1'b1;
    instruction_hash  = h;
    #1;
    while (!monitor_ready_flag) begin
      check(accepted_hash_one_hot == '0, "no accepted set shown while stalled");
      stalls++;
      @(negedge clk); #1;
    end
    check(instruction_hash_onehot == (ONEHOT_W'(1) << h), "one-hot hash code");
    check(accepted_hash_one_hot == exp_mask, $sformatf("accepted set %h, expected %h",
                                                       accepted_hash_one_hot, exp_mask));
    @(posedge clk);
    #1;
    instruction_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      instruction_valid = 1'b0;
      #1;
      check(accepted_hash_one_hot == '0, "no accepted set shown without an instruction");
    end
  endtask

  // ---------------- processor model ----------------
  typedef struct {
    int unsigned uptr;      // position in the application graph
    bit          in_call;   // inside a system call
    int unsigned grp;       // OS group of that call
    int unsigned optr;      // position in the OS graph
    int          left;      // system-call instructions still to run
  } task_t;

  task_t tasks [NAPP+1];
  int    cur;               // running PID (1 or 2)

  function automatic graph_entry_t entry_at(int pid, bit os, int unsigned ptr);
    return os ? os_g[ptr] : app_g[pid][ptr];
  endfunction

  // Run one legal instruction of the current task (application or system call).
  task automatic step_task();
    graph_entry_t e;
    logic [HASH_W-1:0] h;
    int st;
    bit os;
    os = tasks[cur].in_call;
    e  = entry_at(cur, os, os ? tasks[cur].optr : tasks[cur].uptr);
    h  = pick_hash(e);
    if (h != HASH_W'($clog2(e.accept & -e.accept))) n_branch++;
    exec(h, e.accept, st);
    check(!interrupt_flag && !reset_flag, "no alarm on a legal instruction");
    if (os) begin
      tasks[cur].optr = succ(e, h);
      tasks[cur].left--;
      if (tasks[cur].left == 0) begin
        // system call returns: OS hands the processor back to the caller
        tasks[cur].in_call = 1'b0;
        cpu_wr(2'd1, 32'(cur));
      end
    end else begin
      tasks[cur].uptr = succ(e, h);
      if (e.call_group != '0) begin
        tasks[cur].in_call = 1'b1;
        tasks[cur].grp     = int'(e.call_group);
        tasks[cur].optr    = grp_lo[int'(e.call_group)];
        tasks[cur].left    = 3 + int'($urandom_range(6));
      end
    end
  endtask

  // An interrupt is modelled only where the next instruction neither enters nor ends a
  // system call, so that the instruction after the IRQ belongs to one context.
  function automatic bit irq_ok();
    if (tasks[cur].in_call) return tasks[cur].left > 1;
    return app_g[cur][tasks[cur].uptr].call_group == '0;
  endfunction

  // Interrupt: one more instruction of the interrupted code, IRQ_ENTRY idle cycles, then
  // the ISR; its first instruction must stall exactly STALL_EXP cycles. The ISR ends with
  // the scheduler resuming the other task. attack = replace the first ISR instruction.
  task automatic interrupt(input bit attack);
    int unsigned iptr;
    graph_entry_t e;
    logic [HASH_W-1:0] h;
    int st;
    if (tasks[cur].in_call) n_irq_in_call++;
    @(negedge clk);
    instruction_valid = 1'b0;
    interrupt_req = 1'b1;
    step_task();
    idle(IRQ_ENTRY);
    iptr = grp_lo[0];
    e = os_g[iptr];
    if (attack) begin
      // the overwritten instruction reports hash 3: one-hot 16'h0008 against 16'h0800
      check(e.accept == 16'h0800, "first ISR entry accepts hash 11 only");
      exec(4'd3, 16'h0800, st);
      n_stall += st;
      idle(1);
      @(negedge clk);
      check(reset_flag && !interrupt_flag, "reset request after an illegal ISR instruction");
      begin
        int len = 1;
        while (reset_flag && len < 100) begin @(negedge clk); len++; end
        check(len == RESET_LEN, $sformatf("reset request held %0d cycles", len));
      end
      n_reset++;
      interrupt_req = 1'b0;
      return;
    end
    for (int k = 0; k < 4; k++) begin
      e = os_g[iptr];
      h = pick_hash(e);
      exec(h, e.accept, st);
      if (k == 0) begin
        check(st == STALL_EXP, $sformatf("interrupt stall %0d cycles", st));
        n_stall += st;
      end
      check(!interrupt_flag && !reset_flag, "no alarm in the ISR");
      iptr = succ(e, h);
    end
    interrupt_req = 1'b0;
    cur = int'(cur % NAPP) + 1;
    cpu_wr(2'd1, 32'(cur));
  endtask

  initial begin
    int st;
    instruction_valid = 0; instruction_hash = '0; interrupt_req = 0;
    cpu_address = '0; cpu_write = 0; cpu_writedata = '0; cpu_read = 0;
    cp_address = '0; cp_write = 0; cp_writedata = '0; cp_read = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // build and load graphs
    // slots one after another: OS graph first, then the four application graphs
    slot_base[0] = 0;
    for (int a = 1; a <= int'(NAPP); a++)
      slot_base[a] = slot_base[a-1] + ((a == 1) ? OS_SIZE : app_size[a-1]);
    check(slot_base[NAPP] + app_size[NAPP] <= 65536, "all graphs fit in graph memory");
    for (int g = 0; g < 4; g++)
      for (int i = int'(grp_lo[g]); i < int'(grp_hi[g]); i++)
        os_g[i] = rand_entry(grp_lo[g], grp_hi[g], 0, 1'b0);
    // the first ISR instruction has hash 11 only (one-hot 16'h0800)
    os_g[grp_lo[0]].accept = 16'h0800;
    for (int a = 1; a <= int'(NAPP); a++)
      for (int i = 0; i < int'(app_size[a]); i++) app_g[a][i] = rand_entry(0, app_size[a], 0, 1'b1);
    for (int i = 0; i < int'(OS_SIZE); i++) load_entry(i, os_g[i]);
    for (int g = 0; g < 4; g++) cp_wr(20'h80000 + 20'(g), grp_lo[g]);
    cp_wr(20'h80010, 32'h8000_0000 | slot_base[0]);
    for (int a = 1; a <= int'(NAPP); a++)
      for (int i = 0; i < int'(app_size[a]); i++) load_entry(slot_base[a] + i, app_g[a][i]);
    for (int a = 1; a < int'(NAPP); a++) cp_wr(20'h80010 + 20'(a), 32'h8000_0000 | slot_base[a]);

    // create task 1 (graph resident) and task 2 (graph loaded on request)
    for (int a = 1; a < int'(NAPP); a++) cpu_wr(2'd0, {20'd0, 4'(a), 8'(a)});
    cpu_wr(2'd0, {20'd0, 4'(NAPP), 8'(NAPP)});
    @(negedge clk);
    check(!monitor_ready_flag, "Done low while a graph is loaded");
    cp_read = 1'b1; cp_address = 20'h80030;
    #1;
    check(cp_readdata == (32'h8000_0000 | NAPP), "loader sees request for the last GID");
    cp_read = 1'b0;
    cp_wr(20'h80010 + 20'(NAPP), 32'h8000_0000 | slot_base[NAPP]);
    @(negedge clk); #1;
    check(monitor_ready_flag, "Done back after the graph is resident");

    // scheduler starts task 1
    for (int p = 1; p <= int'(NAPP); p++) tasks[p] = '{default: 0};
    cur = 1;
    cpu_wr(2'd1, 32'd1);

    for (int r = 0; r < ROUNDS; r++) begin
      if ($urandom_range(9) == 0 && irq_ok()) interrupt(1'b0);
      else step_task();
    end

    // interrupts disabled: an IRQ strobe must not start a switch
    begin
      int irq_before;
      irq_before = n_irq;
      cpu_wr(2'd3, 32'd1);
      @(negedge clk); interrupt_req = 1'b1;
      repeat (20) step_task();
      check(n_irq == irq_before, "IRQ ignored while disabled");
      if (n_irq == irq_before) n_irq_ignored++;
      @(negedge clk); interrupt_req = 1'b0;
      cpu_wr(2'd3, 32'd0);
    end

    // attack on an application: leave any system call first
    while (tasks[cur].in_call) step_task();
    begin
      graph_entry_t e;
      e = app_g[cur][tasks[cur].uptr];
      exec(bad_hash(e), e.accept, st);
      idle(1);
      #1;
      check(interrupt_flag && !reset_flag, "recovery interrupt after an illegal instruction");
      if (interrupt_flag) n_recovery++;
      cpu_wr(2'd2, 32'(cur));           // OS kills the task
      #1;
      check(!interrupt_flag, "recovery interrupt cleared by the OS");
      cur = int'(cur % NAPP) + 1;
      cpu_wr(2'd1, 32'(cur));
      repeat (10) if (!tasks[cur].in_call) step_task();
    end

    // attack on the interrupt service routine: first ISR instruction overwritten
    while (!irq_ok() || tasks[cur].in_call) step_task();
    interrupt(1'b1);

    check(n_irq > 0, "interrupt switch happened");
    check(n_call > 0, "system-call switch happened");
    check(n_sched > 0, "scheduler switch happened");
    check(n_load > 0, "graph load request happened");
    check(n_stall > 0, "processor stalled");
    check(n_branch > 0, "a non-first successor was taken");
    check(n_recovery > 0, "recovery interrupt happened");
    check(n_reset > 0, "reset request happened");
    check(n_irq_ignored > 0, "disabled IRQ ignored");
    check(n_irq_in_call > 0, "interrupt inside a system call happened");
    $display("events: irq=%0d call=%0d sched=%0d load=%0d stall_cycles=%0d branch=%0d irq_in_call=%0d recovery=%0d reset=%0d",
             n_irq, n_call, n_sched, n_load, n_stall, n_branch, n_irq_in_call, n_recovery, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
