// Sequencing logic: selects the next position in the active monitoring graph.
//
// For an ordinary instruction the successor is next_ptr + rank, where rank is the position
// of the reported hash among the hashes the entry accepts (successors are stored in
// ascending hash order, so an entry with k accepted hashes owns k consecutive successors).
// An entry whose call_group field is non-zero marks a system call: the next position is
// then the start of that OS function group, taken from the group base address table, and
// the controller switches the slot to the OS graph. The interrupt service routine start is
// passed through for the controller's interrupt switch.
//
// Purely combinational. The successor layout and the call_group field are this design's
// own; the document gives the block's role and its link to the group base addresses.
module seq_logic
  import hwmon_pkg::*;
(
  input  graph_entry_t       entry_i,      // current graph entry (graph memory read data)
  input  logic [HASH_W-1:0]  rank_i,       // from hash_check
  output logic [GROUP_W-1:0] group_sel_o,  // group looked up in the base address table
  input  logic [PTR_W-1:0]   group_base_i, // base of group_sel_o
  output logic [PTR_W-1:0]   next_ptr_o,   // successor inside the current graph
  output logic               is_call_o,    // entry is a system call
  output logic [PTR_W-1:0]   call_ptr_o    // start of the called OS function group
);

  always_comb begin
    group_sel_o = entry_i.call_group;
    is_call_o   = entry_i.call_group != '0;
    next_ptr_o  = entry_i.next_ptr + PTR_W'(rank_i);
    call_ptr_o  = group_base_i;
  end

endmodule
