// Bookkeeping tables: which graph belongs to which task, and where each task stopped.
//
// Slot table (one row per graph ID, GID): resident flag and the start address of the slot
// that holds the graph in graph memory. Written by the secure loader once a graph is loaded.
// Task table (one row per process ID, PID): valid flag, the task's GID, the saved position
// in the task's own graph (uptr), and, for a task interrupted while inside OS code, a flag
// and the saved position in the OS graph (in_os, optr). Written by the controller on task
// creation and on every context switch that leaves a task.
//
// Interface: slot table has one write port and two combinational read ports (any GID, and
// the OS graph's GID); task table has one write port and one combinational read port.
// Reset clears all valid and resident flags. 16 GIDs and 64 PIDs are this design's sizes
// (the OS used in the document allows 64 tasks); the row contents follow the document's
// description of what the tables associate.
module bookkeeping
  import hwmon_pkg::*;
#(
  parameter int unsigned ADDR_W   = 16,
  parameter int unsigned NUM_GIDS = 16,
  parameter int unsigned NUM_PIDS = 64,
  parameter int unsigned OS_GID   = 0,
  localparam int unsigned GID_W   = $clog2(NUM_GIDS),
  localparam int unsigned PID_W   = $clog2(NUM_PIDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // slot table
  input  logic              slot_we_i,
  input  logic [GID_W-1:0]  slot_wgid_i,
  input  logic              slot_wres_i,
  input  logic [ADDR_W-1:0] slot_wbase_i,
  input  logic [GID_W-1:0]  slot_rgid_i,
  output logic              slot_rres_o,
  output logic [ADDR_W-1:0] slot_rbase_o,
  output logic              os_res_o,
  output logic [ADDR_W-1:0] os_base_o,
  // task table
  input  logic              task_we_i,
  input  logic [PID_W-1:0]  task_wpid_i,
  input  logic              task_wvalid_i,
  input  logic [GID_W-1:0]  task_wgid_i,
  input  logic [PTR_W-1:0]  task_wuptr_i,
  input  logic              task_win_os_i,
  input  logic [PTR_W-1:0]  task_woptr_i,
  input  logic [PID_W-1:0]  task_rpid_i,
  output logic              task_rvalid_o,
  output logic [GID_W-1:0]  task_rgid_o,
  output logic [PTR_W-1:0]  task_ruptr_o,
  output logic              task_rin_os_o,
  output logic [PTR_W-1:0]  task_roptr_o
);

  typedef struct packed {
    logic              resident;
    logic [ADDR_W-1:0] base;
  } slot_row_t;

  typedef struct packed {
    logic             valid;
    logic [GID_W-1:0] gid;
    logic [PTR_W-1:0] uptr;
    logic             in_os;
    logic [PTR_W-1:0] optr;
  } task_row_t;

  slot_row_t slot_q [NUM_GIDS];
  task_row_t task_q [NUM_PIDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NUM_GIDS; g++) slot_q[g] <= '0;
    end else if (slot_we_i) begin
      slot_q[slot_wgid_i] <= '{resident: slot_wres_i, base: slot_wbase_i};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PIDS; p++) task_q[p] <= '0;
    end else if (task_we_i) begin
      task_q[task_wpid_i] <= '{valid: task_wvalid_i, gid: task_wgid_i, uptr: task_wuptr_i,
                               in_os: task_win_os_i, optr: task_woptr_i};
    end
  end

  assign slot_rres_o   = slot_q[slot_rgid_i].resident;
  assign slot_rbase_o  = slot_q[slot_rgid_i].base;
  assign os_res_o      = slot_q[OS_GID].resident;
  assign os_base_o     = slot_q[OS_GID].base;
  assign task_rvalid_o = task_q[task_rpid_i].valid;
  assign task_rgid_o   = task_q[task_rpid_i].gid;
  assign task_ruptr_o  = task_q[task_rpid_i].uptr;
  assign task_rin_os_o = task_q[task_rpid_i].in_os;
  assign task_roptr_o  = task_q[task_rpid_i].optr;

endmodule
