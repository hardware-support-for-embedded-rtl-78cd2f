// Group base address table of the sequencing logic.
//
// Holds one graph-relative start index per operating-system function group (16 groups).
// The OS monitoring graph is stored as one slot that contains the graphs of its functions
// (interrupt service routine, system calls, scheduler) one after the other; entry g of this
// table is where the graph of group g begins inside that slot. Group 0 is the interrupt
// service routine. The table is written by the secure loader together with the graphs.
//
// Interface: one synchronous write port, two combinational read ports (the group named by
// a system-call entry, and the interrupt service routine group). Reset clears all entries.
// The number of groups follows the document; the use of each entry is this design's reading.
module group_base_table
  import hwmon_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we_i,
  input  logic [GROUP_W-1:0] waddr_i,
  input  logic [PTR_W-1:0]   wdata_i,
  input  logic [GROUP_W-1:0] raddr_i,
  output logic [PTR_W-1:0]   rdata_o,
  output logic [PTR_W-1:0]   isr_base_o
);

  logic [PTR_W-1:0] base_q [NUM_GROUPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NUM_GROUPS; g++) base_q[g] <= '0;
    end else if (we_i) begin
      base_q[waddr_i] <= wdata_i;
    end
  end

  assign rdata_o    = base_q[raddr_i];
  assign isr_base_o = base_q[ISR_GROUP];

endmodule
