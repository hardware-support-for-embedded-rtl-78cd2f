// Main processor interface: the monitor's registers on the main processor's bus.
//
// The operating system uses these registers to tell the monitor about task management:
//   word 0  CREATE  write {gid[11:8], pid[7:0]}: a new task PID runs graph GID
//   word 1  SWITCH  write pid[7:0]: the scheduler resumes task PID
//   word 2  DELETE  write pid[7:0]: task PID was killed
//   word 3  STATUS  write bit 0: ignore IRQ strobes (processor disabled interrupts);
//                   read {cur_pid[15:8], reset_req[5], recovery[4], armed[3], in_os[2],
//                   done[1], irq_disable[0]}
// Bus: memory-mapped slave with waitrequest (the style of the soft processor's bus). A
// command write is held with waitrequest high until the controller accepts it, so the
// processor cannot run past a task switch it has announced. Reads return data in the same
// cycle. The register map and encodings are this design's; the document gives the messages
// (PID with GID on task creation, PID on a scheduler switch, the interrupt-disable command).
module cpu_if
  import hwmon_pkg::*;
#(
  parameter int unsigned NUM_GIDS = 16,
  parameter int unsigned NUM_PIDS = 64,
  localparam int unsigned GID_W   = $clog2(NUM_GIDS),
  localparam int unsigned PID_W   = $clog2(NUM_PIDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor bus
  input  logic [1:0]       address_i,
  input  logic             write_i,
  input  logic [31:0]      writedata_i,
  input  logic             read_i,
  output logic [31:0]      readdata_o,
  output logic             waitrequest_o,
  // to the controller
  output logic             cmd_valid_o,
  output cmd_op_e          cmd_op_o,
  output logic [PID_W-1:0] cmd_pid_o,
  output logic [GID_W-1:0] cmd_gid_o,
  input  logic             cmd_ready_i,
  output logic             irq_disable_o,
  // status
  input  logic             done_i,
  input  logic             armed_i,
  input  logic             in_os_i,
  input  logic             recovery_i,
  input  logic             reset_req_i,
  input  logic [PID_W-1:0] cur_pid_i
);

  localparam logic [1:0] A_STATUS = 2'd3;

  logic irq_disable_q;

  always_comb begin
    cmd_valid_o   = write_i && (address_i != A_STATUS);
    cmd_op_o      = cmd_op_e'(address_i);
    cmd_pid_o     = writedata_i[PID_W-1:0];
    cmd_gid_o     = writedata_i[8 +: GID_W];
    waitrequest_o = cmd_valid_o && !cmd_ready_i;
    readdata_o    = '0;
    if (read_i && address_i == A_STATUS) begin
      readdata_o[15:8] = 8'(cur_pid_i);
      readdata_o[5:0]  = {reset_req_i, recovery_i, armed_i, in_os_i, done_i, irq_disable_q};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              irq_disable_q <= 1'b0;
    else if (write_i && address_i == A_STATUS) irq_disable_q <= writedata_i[0];
  end

  assign irq_disable_o = irq_disable_q;

  // Bus rule: a stalled write keeps its address and data until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   write_i && waitrequest_o |=> write_i && $stable(address_i) && $stable(writedata_i));

endmodule
