// Cryptographic co-processor interface: the secure loader's write path into the monitor.
//
// The co-located loader processor decrypts and verifies monitoring graphs and writes them
// here. Word addresses on its bus:
//   0x00000 + a         graph memory entry a: bits [31:0] from the data word, bits [35:32]
//                       from the high-bits register
//   0x80000 + g (g<16)  group base address g of the OS graph (data [15:0])
//   0x80010 + gid       slot table row: data[31] = resident, data[ADDR_W-1:0] = slot start
//   0x80020             high-bits register (data [3:0]) for the next graph entry write
//   0x80030 (read)      pending load request: {request[31], gid[3:0]}
// The monitor raises a load request when a task is bound to a graph that is not resident;
// the loader answers by writing the graph and then its slot table row with resident set.
// Writes take effect at the clock edge; there is no wait state. The address map and the
// two-word entry write are this design's; the document gives only the block and its role.
module crypto_if
  import hwmon_pkg::*;
#(
  parameter int unsigned ADDR_W   = 16,
  parameter int unsigned NUM_GIDS = 16,
  localparam int unsigned GID_W   = $clog2(NUM_GIDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // co-processor bus
  input  logic [19:0]        address_i,
  input  logic               write_i,
  input  logic [31:0]        writedata_i,
  input  logic               read_i,
  output logic [31:0]        readdata_o,
  // graph memory write port
  output logic               gm_we_o,
  output logic [ADDR_W-1:0]  gm_waddr_o,
  output logic [ENTRY_W-1:0] gm_wdata_o,
  // group base address table write port
  output logic               gb_we_o,
  output logic [GROUP_W-1:0] gb_waddr_o,
  output logic [PTR_W-1:0]   gb_wdata_o,
  // slot table write port
  output logic               slot_we_o,
  output logic [GID_W-1:0]   slot_wgid_o,
  output logic               slot_wres_o,
  output logic [ADDR_W-1:0]  slot_wbase_o,
  // load request from the controller
  input  logic               load_req_i,
  input  logic [GID_W-1:0]   load_gid_i
);

  logic [ENTRY_W-33:0] hi_q;
  logic                is_reg;
  logic [1:0]          reg_sel;

  always_comb begin
    is_reg       = address_i[19];
    reg_sel      = address_i[5:4];
    gm_we_o      = write_i && !is_reg;
    gm_waddr_o   = address_i[ADDR_W-1:0];
    gm_wdata_o   = {hi_q, writedata_i};
    gb_we_o      = write_i && is_reg && reg_sel == 2'd0;
    gb_waddr_o   = address_i[GROUP_W-1:0];
    gb_wdata_o   = writedata_i[PTR_W-1:0];
    slot_we_o    = write_i && is_reg && reg_sel == 2'd1;
    slot_wgid_o  = address_i[GID_W-1:0];
    slot_wres_o  = writedata_i[31];
    slot_wbase_o = writedata_i[ADDR_W-1:0];
    readdata_o   = '0;
    if (read_i && is_reg && reg_sel == 2'd3) begin
      readdata_o[31]        = load_req_i;
      readdata_o[GID_W-1:0] = load_gid_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   hi_q <= '0;
    else if (write_i && is_reg && reg_sel == 2'd2) hi_q <= writedata_i[ENTRY_W-33:0];
  end

endmodule
