// Graph memory: the secure on-chip memory that holds the monitoring graphs.
//
// One entry per graph position (36 bits, see hwmon_pkg). Graphs occupy slots: the OS
// graph, with all its function groups, and one slot per application graph. The secure
// loader writes entries through the write port; the monitor reads one entry per cycle.
//
// Depth 65,536 entries (2,359,296 bits) holds the OS graph and the four benchmark graphs
// of the prototype together (61,182 entries). The depth is this design's choice sized from
// those graph sizes. Simple dual-port RAM: synchronous write, read data registered one cycle
// after the read address (block-RAM style); contents are not reset.
module graph_mem
  import hwmon_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic               clk,
  input  logic               we_i,
  input  logic [ADDR_W-1:0]  waddr_i,
  input  logic [ENTRY_W-1:0] wdata_i,
  input  logic [ADDR_W-1:0]  raddr_i,
  output logic [ENTRY_W-1:0] rdata_o
);

  logic [ENTRY_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    rdata_o <= mem[raddr_i];
  end

endmodule
