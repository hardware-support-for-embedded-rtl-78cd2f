// Graph memory address path: override multiplexer, address pointer, slot address, adder.
//
// The address pointer holds the graph-relative index of the entry that describes the next
// instruction; the slot address holds the start of the active graph's slot in graph memory.
// The read address is their sum. In normal operation the pointer is loaded from the
// sequencing logic (multiplexer input 0); during a context switch the controller overrides
// it (input 1) and loads a new slot address.
//
// Timing: graph memory has a registered read address, so this block hands it the address
// that the registers will hold after this clock edge (rd_addr_o). The entry for the pointer
// is then valid in the cycle after it was loaded. The register-plus-adder structure follows
// the document's block diagram; reset value zero is this design's choice.
module addr_path
  import hwmon_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv_i,       // load the pointer from the sequencing logic
  input  logic [PTR_W-1:0]  seq_ptr_i,   // multiplexer input 0
  input  logic              ovr_i,       // override: load the pointer from ovr_ptr_i
  input  logic [PTR_W-1:0]  ovr_ptr_i,   // multiplexer input 1
  input  logic              slot_we_i,   // load a new slot address
  input  logic [ADDR_W-1:0] slot_i,
  output logic [PTR_W-1:0]  ptr_o,       // current address pointer
  output logic [ADDR_W-1:0] slot_o,      // current slot address
  output logic [ADDR_W-1:0] rd_addr_o    // read address for the coming cycle
);

  logic [PTR_W-1:0]  ptr_q,  ptr_d;
  logic [ADDR_W-1:0] slot_q, slot_d;

  always_comb begin
    ptr_d = ptr_q;
    if (ovr_i)      ptr_d = ovr_ptr_i;
    else if (adv_i) ptr_d = seq_ptr_i;
    slot_d    = slot_we_i ? slot_i : slot_q;
    rd_addr_o = slot_d + ADDR_W'(ptr_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q  <= '0;
      slot_q <= '0;
    end else begin
      ptr_q  <= ptr_d;
      slot_q <= slot_d;
    end
  end

  assign ptr_o  = ptr_q;
  assign slot_o = slot_q;

endmodule
