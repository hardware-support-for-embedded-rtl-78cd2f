// Shared types and constants of the multi-context hardware monitor.
//
// A monitoring graph is a deterministic automaton over executed instructions. Each graph
// entry describes one instruction position and is 36 bits wide:
//   [35:32] call_group : 0 = ordinary instruction; 1..15 = this instruction enters the
//                        operating-system function graph of that group (a system call)
//   [31:16] accept     : one-hot set of the 4-bit instruction hashes allowed next
//   [15:0]  next_ptr   : graph-relative index of the successor entry for the lowest
//                        accepted hash; the successors of the other accepted hashes follow
//                        in ascending hash order
// The entry width of 36 bits follows the graph sizes quoted for the prototype (every graph
// has exactly 36 bits per entry). The split of those bits into fields is this design's own.
package hwmon_pkg;

  localparam int unsigned HASH_W     = 4;              // reported instruction hash
  localparam int unsigned ONEHOT_W   = 1 << HASH_W;    // 16 possible hash values
  localparam int unsigned PTR_W      = 16;             // graph-relative entry index
  localparam int unsigned GROUP_W    = 4;              // OS function group index
  localparam int unsigned NUM_GROUPS = 1 << GROUP_W;   // 16 groups
  localparam int unsigned ENTRY_W    = GROUP_W + ONEHOT_W + PTR_W;  // 36

  // Group 0 (the first group) is the interrupt service routine entry of the OS graph.
  localparam logic [GROUP_W-1:0] ISR_GROUP = '0;

  typedef struct packed {
    logic [GROUP_W-1:0]  call_group;
    logic [ONEHOT_W-1:0] accept;
    logic [PTR_W-1:0]    next_ptr;
  } graph_entry_t;

  // Commands the main processor issues through its register interface.
  typedef enum logic [1:0] {
    CMD_CREATE = 2'd0,   // bind a new PID to a GID (loads the graph if not resident)
    CMD_SWITCH = 2'd1,   // scheduler resumes the task with this PID
    CMD_DELETE = 2'd2    // task killed: unbind the PID
  } cmd_op_e;

  // Alarm classes sent to the processor when an instruction does not match.
  typedef enum logic [1:0] {
    ALARM_NONE     = 2'd0,
    ALARM_RECOVERY = 2'd1,   // violation in an application: interrupt the processor
    ALARM_RESET    = 2'd2    // violation in OS code: reset the processor
  } alarm_e;

endpackage
