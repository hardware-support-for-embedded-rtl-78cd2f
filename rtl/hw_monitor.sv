// Multi-context hardware monitor for an embedded processor running an operating system.
//
// The processor reports a 4-bit hash of every instruction it executes. The monitor walks a
// monitoring graph (an automaton whose states are instructions and whose edges are the
// allowed successors) in lock step and flags any instruction the graph does not allow. Each
// application and the OS have their own graph; the monitor follows the processor's context
// switches (interrupts, system calls, scheduler) so that the right graph is active for every
// instruction, and it stalls the processor (Done low) while it switches.
//
// Blocks: hash_check (monitoring hardware), seq_logic with group_base_table (sequencing
// logic and group base addresses), addr_path (override mux, address pointer, slot address,
// adder), graph_mem, bookkeeping (slot and task tables), monitor_ctrl (controller FSM),
// cpu_if (main processor interface) and crypto_if (co-processor write interface). This
// structure follows the document's block diagram; field layouts, register maps and cycle
// counts inside the blocks are this design's own, as each block's header says.
//
// Processor-side ports carry the names of the prototype's signal trace where one exists:
// instruction_hash, interrupt_req, monitor_ready_flag (Done), reset_flag (reset request to
// the processor's reset pin), interrupt_flag (recovery interrupt to its interrupt
// controller), instruction_hash_onehot and accepted_hash_one_hot. An instruction is checked
// in a cycle where instruction_valid and monitor_ready_flag are both high; with
// instruction_valid high and monitor_ready_flag low the processor must hold the instruction.
module hw_monitor
  import hwmon_pkg::*;
#(
  parameter int unsigned ADDR_W            = 16,   // graph memory: 65,536 x 36 bits
  parameter int unsigned NUM_GIDS          = 16,
  parameter int unsigned NUM_PIDS          = 64,
  parameter int unsigned OS_GID            = 0,
  parameter int unsigned CTX_SWITCH_CYCLES = 12,
  parameter int unsigned RESET_CYCLES      = 16,
  localparam int unsigned GID_W            = $clog2(NUM_GIDS),
  localparam int unsigned PID_W            = $clog2(NUM_PIDS)
) (
  input  logic                clk,
  input  logic                reset_reset_n,
  // instruction reports from the processor pipeline
  input  logic                instruction_valid,
  input  logic [HASH_W-1:0]   instruction_hash,
  input  logic                interrupt_req,
  output logic                monitor_ready_flag,
  output logic                reset_flag,
  output logic                interrupt_flag,
  output logic [ONEHOT_W-1:0] instruction_hash_onehot,
  output logic [ONEHOT_W-1:0] accepted_hash_one_hot,
  // main processor bus
  input  logic [1:0]          cpu_address,
  input  logic                cpu_write,
  input  logic [31:0]         cpu_writedata,
  input  logic                cpu_read,
  output logic [31:0]         cpu_readdata,
  output logic                cpu_waitrequest,
  // cryptographic co-processor bus
  input  logic [19:0]         cp_address,
  input  logic                cp_write,
  input  logic [31:0]         cp_writedata,
  input  logic                cp_read,
  output logic [31:0]         cp_readdata,
  // monitoring events, one-cycle pulses (for counters or debug)
  output logic                ev_irq_switch,
  output logic                ev_call_switch,
  output logic                ev_sched_switch,
  output logic                ev_graph_load
);

  graph_entry_t entry;
  logic [HASH_W-1:0]  rank;
  logic               match;
  logic [GROUP_W-1:0] group_sel;
  logic [PTR_W-1:0]   group_base, isr_base, next_ptr, call_ptr;
  logic               is_call;

  logic               gm_we;
  logic [ADDR_W-1:0]  gm_waddr, rd_addr;
  logic [ENTRY_W-1:0] gm_wdata, gm_rdata;
  logic               gb_we;
  logic [GROUP_W-1:0] gb_waddr;
  logic [PTR_W-1:0]   gb_wdata;

  logic               bk_slot_we, bk_slot_wres;
  logic [GID_W-1:0]   bk_slot_wgid;
  logic [ADDR_W-1:0]  bk_slot_wbase;
  logic [GID_W-1:0]   slot_rgid;
  logic               slot_rres, os_res;
  logic [ADDR_W-1:0]  slot_rbase, os_base;
  logic               task_we, task_wvalid, task_win_os, task_rvalid, task_rin_os;
  logic [PID_W-1:0]   task_wpid, task_rpid, cur_pid;
  logic [GID_W-1:0]   task_wgid, task_rgid;
  logic [PTR_W-1:0]   task_wuptr, task_woptr, task_ruptr, task_roptr;

  logic               adv, ovr, ap_slot_we;
  logic [PTR_W-1:0]   ovr_ptr, ptr;
  logic [ADDR_W-1:0]  ap_slot, slot;

  logic               cmd_valid, cmd_ready, irq_disable;
  cmd_op_e            cmd_op;
  logic [PID_W-1:0]   cmd_pid;
  logic [GID_W-1:0]   cmd_gid;
  logic               load_req, armed, in_os;
  logic [GID_W-1:0]   load_gid;

  assign entry = graph_entry_t'(gm_rdata);

  hash_check u_hash_check (
    .hash_i   (instruction_hash),
    .accept_i (entry.accept),
    .onehot_o (instruction_hash_onehot),
    .match_o  (match),
    .rank_o   (rank)
  );

  seq_logic u_seq_logic (
    .entry_i      (entry),
    .rank_i       (rank),
    .group_sel_o  (group_sel),
    .group_base_i (group_base),
    .next_ptr_o   (next_ptr),
    .is_call_o    (is_call),
    .call_ptr_o   (call_ptr)
  );

  group_base_table u_group_base_table (
    .clk        (clk),
    .rst_n      (reset_reset_n),
    .we_i       (gb_we),
    .waddr_i    (gb_waddr),
    .wdata_i    (gb_wdata),
    .raddr_i    (group_sel),
    .rdata_o    (group_base),
    .isr_base_o (isr_base)
  );

  addr_path #(.ADDR_W(ADDR_W)) u_addr_path (
    .clk       (clk),
    .rst_n     (reset_reset_n),
    .adv_i     (adv),
    .seq_ptr_i (next_ptr),
    .ovr_i     (ovr),
    .ovr_ptr_i (ovr_ptr),
    .slot_we_i (ap_slot_we),
    .slot_i    (ap_slot),
    .ptr_o     (ptr),
    .slot_o    (slot),
    .rd_addr_o (rd_addr)
  );

  graph_mem #(.ADDR_W(ADDR_W)) u_graph_mem (
    .clk     (clk),
    .we_i    (gm_we),
    .waddr_i (gm_waddr),
    .wdata_i (gm_wdata),
    .raddr_i (rd_addr),
    .rdata_o (gm_rdata)
  );

  bookkeeping #(
    .ADDR_W(ADDR_W), .NUM_GIDS(NUM_GIDS), .NUM_PIDS(NUM_PIDS), .OS_GID(OS_GID)
  ) u_bookkeeping (
    .clk           (clk),
    .rst_n         (reset_reset_n),
    .slot_we_i     (bk_slot_we),
    .slot_wgid_i   (bk_slot_wgid),
    .slot_wres_i   (bk_slot_wres),
    .slot_wbase_i  (bk_slot_wbase),
    .slot_rgid_i   (slot_rgid),
    .slot_rres_o   (slot_rres),
    .slot_rbase_o  (slot_rbase),
    .os_res_o      (os_res),
    .os_base_o     (os_base),
    .task_we_i     (task_we),
    .task_wpid_i   (task_wpid),
    .task_wvalid_i (task_wvalid),
    .task_wgid_i   (task_wgid),
    .task_wuptr_i  (task_wuptr),
    .task_win_os_i (task_win_os),
    .task_woptr_i  (task_woptr),
    .task_rpid_i   (task_rpid),
    .task_rvalid_o (task_rvalid),
    .task_rgid_o   (task_rgid),
    .task_ruptr_o  (task_ruptr),
    .task_rin_os_o (task_rin_os),
    .task_roptr_o  (task_roptr)
  );

  monitor_ctrl #(
    .ADDR_W(ADDR_W), .NUM_GIDS(NUM_GIDS), .NUM_PIDS(NUM_PIDS), .OS_GID(OS_GID),
    .CTX_SWITCH_CYCLES(CTX_SWITCH_CYCLES), .RESET_CYCLES(RESET_CYCLES)
  ) u_monitor_ctrl (
    .clk           (clk),
    .rst_n         (reset_reset_n),
    .instr_valid_i (instruction_valid),
    .irq_i         (interrupt_req),
    .irq_disable_i (irq_disable),
    .ready_o       (monitor_ready_flag),
    .reset_req_o   (reset_flag),
    .recovery_o    (interrupt_flag),
    .cmd_valid_i   (cmd_valid),
    .cmd_op_i      (cmd_op),
    .cmd_pid_i     (cmd_pid),
    .cmd_gid_i     (cmd_gid),
    .cmd_ready_o   (cmd_ready),
    .match_i       (match),
    .is_call_i     (is_call),
    .next_ptr_i    (next_ptr),
    .call_ptr_i    (call_ptr),
    .isr_ptr_i     (isr_base),
    .slot_rgid_o   (slot_rgid),
    .slot_rres_i   (slot_rres),
    .slot_rbase_i  (slot_rbase),
    .os_res_i      (os_res),
    .os_base_i     (os_base),
    .task_we_o     (task_we),
    .task_wpid_o   (task_wpid),
    .task_wvalid_o (task_wvalid),
    .task_wgid_o   (task_wgid),
    .task_wuptr_o  (task_wuptr),
    .task_win_os_o (task_win_os),
    .task_woptr_o  (task_woptr),
    .task_rpid_o   (task_rpid),
    .task_rvalid_i (task_rvalid),
    .task_rgid_i   (task_rgid),
    .task_ruptr_i  (task_ruptr),
    .task_rin_os_i (task_rin_os),
    .task_roptr_i  (task_roptr),
    .adv_o         (adv),
    .ovr_o         (ovr),
    .ovr_ptr_o     (ovr_ptr),
    .slot_we_o     (ap_slot_we),
    .slot_o        (ap_slot),
    .load_req_o    (load_req),
    .load_gid_o    (load_gid),
    .armed_o       (armed),
    .in_os_o       (in_os),
    .cur_pid_o     (cur_pid),
    .ev_irq_o      (ev_irq_switch),
    .ev_call_o     (ev_call_switch),
    .ev_sched_o    (ev_sched_switch),
    .ev_load_o     (ev_graph_load)
  );

  cpu_if #(.NUM_GIDS(NUM_GIDS), .NUM_PIDS(NUM_PIDS)) u_cpu_if (
    .clk           (clk),
    .rst_n         (reset_reset_n),
    .address_i     (cpu_address),
    .write_i       (cpu_write),
    .writedata_i   (cpu_writedata),
    .read_i        (cpu_read),
    .readdata_o    (cpu_readdata),
    .waitrequest_o (cpu_waitrequest),
    .cmd_valid_o   (cmd_valid),
    .cmd_op_o      (cmd_op),
    .cmd_pid_o     (cmd_pid),
    .cmd_gid_o     (cmd_gid),
    .cmd_ready_i   (cmd_ready),
    .irq_disable_o (irq_disable),
    .done_i        (monitor_ready_flag),
    .armed_i       (armed),
    .in_os_i       (in_os),
    .recovery_i    (interrupt_flag),
    .reset_req_i   (reset_flag),
    .cur_pid_i     (cur_pid)
  );

  crypto_if #(.ADDR_W(ADDR_W), .NUM_GIDS(NUM_GIDS)) u_crypto_if (
    .clk          (clk),
    .rst_n        (reset_reset_n),
    .address_i    (cp_address),
    .write_i      (cp_write),
    .writedata_i  (cp_writedata),
    .read_i       (cp_read),
    .readdata_o   (cp_readdata),
    .gm_we_o      (gm_we),
    .gm_waddr_o   (gm_waddr),
    .gm_wdata_o   (gm_wdata),
    .gb_we_o      (gb_we),
    .gb_waddr_o   (gb_waddr),
    .gb_wdata_o   (gb_wdata),
    .slot_we_o    (bk_slot_we),
    .slot_wgid_o  (bk_slot_wgid),
    .slot_wres_o  (bk_slot_wres),
    .slot_wbase_o (bk_slot_wbase),
    .load_req_i   (load_req),
    .load_gid_i   (load_gid)
  );

  // The accepted set is shown only in a cycle where an instruction is checked, as in the
  // prototype's trace: 0 with no instruction reported, during a switch and while disarmed.
  assign accepted_hash_one_hot = (armed && instruction_valid && monitor_ready_flag) ?
                                 entry.accept : '0;

endmodule
