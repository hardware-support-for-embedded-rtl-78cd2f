// Controller of the hardware monitor: follows the processor's context switches.
//
// The controller keeps the current monitoring context (PID of the running task, its graph
// GID, whether OS code or the interrupt service routine is being monitored) and drives the
// address path. It has four jobs:
//  * Checking. In RUN every reported instruction is compared with the current graph entry.
//    A match advances the address pointer; a mismatch raises the reset request (violation in
//    OS code) or the recovery interrupt (violation in an application).
//  * Interrupts. The IRQ line goes to both processor and monitor. A rising edge, unless the
//    processor has disabled interrupts in the monitor's status register or the ISR graph is
//    already active, marks an interrupt pending. After the next matched instruction the
//    controller saves the interrupted position in the task table and switches to the ISR
//    group of the OS graph.
//  * System calls. A matched entry with a non-zero call group saves the caller's return
//    position and switches to that group of the OS graph.
//  * Scheduler. The processor writes the PID of the task it resumes; the controller looks
//    the task up and resumes its graph (or the OS code it was interrupted in).
// Task creation binds a PID to a GID; if that graph is not resident the controller asks the
// secure loader for it and holds Done low until the slot table marks it resident.
//
// Timing: while a switch runs, ready_o (the Done signal) is low and the processor stalls on
// its next instruction. A switch occupies CTX_SWITCH_CYCLES cycles after the instruction
// that triggered it: save (1), look-up (1), load pointer and slot (1), then waiting. The
// default of 12 cycles is set so that a processor with a 6-cycle interrupt entry is stalled
// 6 extra cycles per interrupt, the overhead reported for the prototype; the document does
// not break these cycles down, so the state sequence is this design's. The reset request is
// held RESET_CYCLES cycles, after which the monitor is disarmed until the next scheduler
// switch; the recovery interrupt is held until the processor issues its next command.
module monitor_ctrl
  import hwmon_pkg::*;
#(
  parameter int unsigned ADDR_W            = 16,
  parameter int unsigned NUM_GIDS          = 16,
  parameter int unsigned NUM_PIDS          = 64,
  parameter int unsigned OS_GID            = 0,
  parameter int unsigned CTX_SWITCH_CYCLES = 12,
  parameter int unsigned RESET_CYCLES      = 16,
  localparam int unsigned GID_W            = $clog2(NUM_GIDS),
  localparam int unsigned PID_W            = $clog2(NUM_PIDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              instr_valid_i,
  input  logic              irq_i,
  input  logic              irq_disable_i,
  output logic              ready_o,
  output logic              reset_req_o,
  output logic              recovery_o,
  // commands from the main processor interface
  input  logic              cmd_valid_i,
  input  cmd_op_e           cmd_op_i,
  input  logic [PID_W-1:0]  cmd_pid_i,
  input  logic [GID_W-1:0]  cmd_gid_i,
  output logic              cmd_ready_o,
  // comparison and sequencing results for the current entry
  input  logic              match_i,
  input  logic              is_call_i,
  input  logic [PTR_W-1:0]  next_ptr_i,
  input  logic [PTR_W-1:0]  call_ptr_i,
  input  logic [PTR_W-1:0]  isr_ptr_i,
  // bookkeeping tables
  output logic [GID_W-1:0]  slot_rgid_o,
  input  logic              slot_rres_i,
  input  logic [ADDR_W-1:0] slot_rbase_i,
  input  logic              os_res_i,
  input  logic [ADDR_W-1:0] os_base_i,
  output logic              task_we_o,
  output logic [PID_W-1:0]  task_wpid_o,
  output logic              task_wvalid_o,
  output logic [GID_W-1:0]  task_wgid_o,
  output logic [PTR_W-1:0]  task_wuptr_o,
  output logic              task_win_os_o,
  output logic [PTR_W-1:0]  task_woptr_o,
  output logic [PID_W-1:0]  task_rpid_o,
  input  logic              task_rvalid_i,
  input  logic [GID_W-1:0]  task_rgid_i,
  input  logic [PTR_W-1:0]  task_ruptr_i,
  input  logic              task_rin_os_i,
  input  logic [PTR_W-1:0]  task_roptr_i,
  // address path
  output logic              adv_o,
  output logic              ovr_o,
  output logic [PTR_W-1:0]  ovr_ptr_o,
  output logic              slot_we_o,
  output logic [ADDR_W-1:0] slot_o,
  // graph loading request to the secure loader
  output logic              load_req_o,
  output logic [GID_W-1:0]  load_gid_o,
  // status and event pulses
  output logic              armed_o,
  output logic              in_os_o,
  output logic [PID_W-1:0]  cur_pid_o,
  output logic              ev_irq_o,
  output logic              ev_call_o,
  output logic              ev_sched_o,
  output logic              ev_load_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_RUN, S_SAVE, S_LOOKUP, S_LOADWAIT, S_LOAD, S_WAIT, S_CREATE_LOAD,
    S_RESET, S_RECOVER
  } state_e;

  typedef enum logic [1:0] {K_IRQ, K_CALL, K_SCHED} kind_e;

  localparam int unsigned CNT_W = $clog2(CTX_SWITCH_CYCLES + RESET_CYCLES + 2) + 1;

  state_e            state_q, state_d;
  kind_e             kind_q, kind_d;
  logic [CNT_W-1:0]  cnt_q, cnt_d;
  logic [PID_W-1:0]  cur_pid_q, cur_pid_d;
  logic [GID_W-1:0]  cur_gid_q, cur_gid_d;
  logic              cur_os_q, cur_os_d;     // monitoring the OS graph
  logic              cur_isr_q, cur_isr_d;   // monitoring the ISR (interrupts masked)
  logic [PID_W-1:0]  tgt_pid_q, tgt_pid_d;
  logic [GID_W-1:0]  tgt_gid_q, tgt_gid_d;
  logic              tgt_os_q, tgt_os_d;
  logic              tgt_isr_q, tgt_isr_d;
  logic [PTR_W-1:0]  tgt_ptr_q, tgt_ptr_d;
  logic [PTR_W-1:0]  save_ptr_q, save_ptr_d;
  logic              ret_run_q, ret_run_d;   // state to return to after a create-load
  logic              irq_q, irq_pend_q, irq_pend_d;

  logic irq_rise;
  assign irq_rise = irq_i & ~irq_q;

  // Slot table look-up: the GID of a command while Done is high, else the switch target.
  assign slot_rgid_o = (state_q == S_IDLE || state_q == S_RUN || state_q == S_RECOVER)
                       ? cmd_gid_i : tgt_gid_q;

  always_comb begin
    state_d    = state_q;
    kind_d     = kind_q;
    cnt_d      = (cnt_q == '1) ? cnt_q : cnt_q + CNT_W'(1);
    cur_pid_d  = cur_pid_q;
    cur_gid_d  = cur_gid_q;
    cur_os_d   = cur_os_q;
    cur_isr_d  = cur_isr_q;
    tgt_pid_d  = tgt_pid_q;
    tgt_gid_d  = tgt_gid_q;
    tgt_os_d   = tgt_os_q;
    tgt_isr_d  = tgt_isr_q;
    tgt_ptr_d  = tgt_ptr_q;
    save_ptr_d = save_ptr_q;
    ret_run_d  = ret_run_q;
    irq_pend_d = irq_pend_q;

    ready_o       = 1'b0;
    reset_req_o   = 1'b0;
    recovery_o    = 1'b0;
    cmd_ready_o   = 1'b0;
    task_we_o     = 1'b0;
    task_wpid_o   = cur_pid_q;
    task_wvalid_o = 1'b1;
    task_wgid_o   = cur_gid_q;
    task_wuptr_o  = '0;
    task_win_os_o = 1'b0;
    task_woptr_o  = '0;
    task_rpid_o   = (kind_q == K_SCHED) ? tgt_pid_q : cur_pid_q;
    adv_o         = 1'b0;
    ovr_o         = 1'b0;
    ovr_ptr_o     = tgt_ptr_q;
    slot_we_o     = 1'b0;
    slot_o        = tgt_os_q ? os_base_i : slot_rbase_i;
    load_req_o    = 1'b0;
    load_gid_o    = tgt_gid_q;
    ev_irq_o      = 1'b0;
    ev_call_o     = 1'b0;
    ev_sched_o    = 1'b0;
    ev_load_o     = 1'b0;

    if (irq_rise && !irq_disable_i && state_q != S_IDLE && state_q != S_RESET &&
        state_q != S_RECOVER) begin
      irq_pend_d = 1'b1;
    end

    unique case (state_q)
      // Done is high: check instructions (RUN only) and take processor commands.
      S_IDLE, S_RUN, S_RECOVER: begin : open_states
        logic busy;         // this cycle already starts a switch or an alarm
        ready_o    = 1'b1;
        recovery_o = (state_q == S_RECOVER);
        busy       = 1'b0;
        if (state_q == S_RUN && instr_valid_i) begin
          if (!match_i) begin
            busy       = 1'b1;
            irq_pend_d = 1'b0;
            cnt_d      = '0;
            state_d    = cur_os_q ? S_RESET : S_RECOVER;
          end else begin
            adv_o      = 1'b1;
            save_ptr_d = next_ptr_i;
            if (is_call_i) begin
              busy      = 1'b1;
              ev_call_o = 1'b1;
              kind_d    = K_CALL;
              tgt_gid_d = GID_W'(OS_GID);
              tgt_os_d  = 1'b1;
              tgt_isr_d = 1'b0;
              tgt_ptr_d = call_ptr_i;
              cnt_d     = CNT_W'(1);
              state_d   = S_SAVE;
            end else if (irq_pend_q) begin
              irq_pend_d = 1'b0;
              if (!cur_isr_q) begin
                busy      = 1'b1;
                ev_irq_o  = 1'b1;
                kind_d    = K_IRQ;
                tgt_gid_d = GID_W'(OS_GID);
                tgt_os_d  = 1'b1;
                tgt_isr_d = 1'b1;
                tgt_ptr_d = isr_ptr_i;
                cnt_d     = CNT_W'(1);
                state_d   = S_SAVE;
              end
            end
          end
        end
        if (!busy && cmd_valid_i) begin
          cmd_ready_o = 1'b1;
          unique case (cmd_op_i)
            CMD_CREATE: begin
              task_we_o     = 1'b1;
              task_wpid_o   = cmd_pid_i;
              task_wgid_o   = cmd_gid_i;
              if (!slot_rres_i) begin
                tgt_gid_d = cmd_gid_i;
                ret_run_d = (state_q == S_RUN);
                ev_load_o = 1'b1;
                state_d   = S_CREATE_LOAD;
              end else if (state_q == S_RECOVER) begin
                state_d = S_IDLE;
              end
            end
            CMD_DELETE: begin
              task_we_o     = 1'b1;
              task_wpid_o   = cmd_pid_i;
              task_wvalid_o = 1'b0;
              if (state_q == S_RECOVER) state_d = S_IDLE;
            end
            default: begin  // CMD_SWITCH
              ev_sched_o = 1'b1;
              kind_d     = K_SCHED;
              tgt_pid_d  = cmd_pid_i;
              irq_pend_d = 1'b0;
              cnt_d      = CNT_W'(1);
              state_d    = S_SAVE;
            end
          endcase
        end
      end

      // Save the context being left (or, for the scheduler, read the resumed task).
      S_SAVE: begin
        unique case (kind_q)
          K_CALL: begin
            // A call entry met inside OS code is a plain jump: nothing to save.
            task_we_o    = !cur_os_q;
            task_wuptr_o = save_ptr_q;
            state_d      = S_LOOKUP;
          end
          K_IRQ: begin
            task_we_o = 1'b1;
            if (cur_os_q) begin
              task_wgid_o   = task_rgid_i;
              task_wuptr_o  = task_ruptr_i;
              task_win_os_o = 1'b1;
              task_woptr_o  = save_ptr_q;
            end else begin
              task_wuptr_o  = save_ptr_q;
            end
            state_d = S_LOOKUP;
          end
          default: begin  // K_SCHED
            if (!task_rvalid_i) begin
              cnt_d   = '0;
              state_d = S_RESET;
            end else begin
              // Resume where the task stopped; clear its in-OS mark.
              task_we_o    = 1'b1;
              task_wpid_o  = tgt_pid_q;
              task_wgid_o  = task_rgid_i;
              task_wuptr_o = task_ruptr_i;
              tgt_gid_d    = task_rin_os_i ? GID_W'(OS_GID) : task_rgid_i;
              tgt_os_d     = task_rin_os_i;
              tgt_isr_d    = 1'b0;
              tgt_ptr_d    = task_rin_os_i ? task_roptr_i : task_ruptr_i;
              state_d      = S_LOOKUP;
            end
          end
        endcase
      end

      S_LOOKUP: begin
        if (tgt_os_q ? os_res_i : slot_rres_i) begin
          state_d = S_LOAD;
        end else begin
          ev_load_o = 1'b1;
          state_d   = S_LOADWAIT;
        end
      end

      S_LOADWAIT: begin
        load_req_o = 1'b1;
        if (tgt_os_q ? os_res_i : slot_rres_i) state_d = S_LOAD;
      end

      // Override the address pointer and load the slot address of the new graph.
      S_LOAD: begin
        ovr_o     = 1'b1;
        slot_we_o = 1'b1;
        cur_gid_d = tgt_gid_q;
        cur_os_d  = tgt_os_q;
        cur_isr_d = tgt_isr_q;
        if (kind_q == K_SCHED) cur_pid_d = tgt_pid_q;
        state_d   = S_WAIT;
      end

      S_WAIT: begin
        if (cnt_q >= CNT_W'(CTX_SWITCH_CYCLES)) state_d = S_RUN;
      end

      S_CREATE_LOAD: begin
        load_req_o = 1'b1;
        if (slot_rres_i) state_d = ret_run_q ? S_RUN : S_IDLE;
      end

      S_RESET: begin
        reset_req_o = 1'b1;
        irq_pend_d  = 1'b0;
        if (cnt_q >= CNT_W'(RESET_CYCLES - 1)) state_d = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      kind_q     <= K_SCHED;
      cnt_q      <= '0;
      cur_pid_q  <= '0;
      cur_gid_q  <= '0;
      cur_os_q   <= 1'b0;
      cur_isr_q  <= 1'b0;
      tgt_pid_q  <= '0;
      tgt_gid_q  <= '0;
      tgt_os_q   <= 1'b0;
      tgt_isr_q  <= 1'b0;
      tgt_ptr_q  <= '0;
      save_ptr_q <= '0;
      ret_run_q  <= 1'b0;
      irq_q      <= 1'b0;
      irq_pend_q <= 1'b0;
    end else begin
      state_q    <= state_d;
      kind_q     <= kind_d;
      cnt_q      <= cnt_d;
      cur_pid_q  <= cur_pid_d;
      cur_gid_q  <= cur_gid_d;
      cur_os_q   <= cur_os_d;
      cur_isr_q  <= cur_isr_d;
      tgt_pid_q  <= tgt_pid_d;
      tgt_gid_q  <= tgt_gid_d;
      tgt_os_q   <= tgt_os_d;
      tgt_isr_q  <= tgt_isr_d;
      tgt_ptr_q  <= tgt_ptr_d;
      save_ptr_q <= save_ptr_d;
      ret_run_q  <= ret_run_d;
      irq_q      <= irq_i;
      irq_pend_q <= irq_pend_d;
    end
  end

  assign armed_o   = (state_q != S_IDLE) && (state_q != S_RESET) && (state_q != S_RECOVER);
  assign in_os_o   = cur_os_q;
  assign cur_pid_o = cur_pid_q;

  // A violation is reported with exactly one of the two alarm outputs.
  assert property (@(posedge clk) disable iff (!rst_n) !(reset_req_o && recovery_o));
  // Commands are only taken while the processor sees Done.
  assert property (@(posedge clk) disable iff (!rst_n) cmd_ready_o |-> ready_o);

endmodule
