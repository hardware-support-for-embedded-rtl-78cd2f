// Monitoring hardware: per-instruction comparison of the reported hash with the graph.
//
// The processor reports a 4-bit hash of every executed instruction. This block turns the
// hash into a 16-bit one-hot code (hash h sets bit h, so hash 0xF gives 16'h8000) and tests
// it against the one-hot set of hashes that the current graph entry accepts. A hash that is
// not in the set is a deviation from the monitoring graph. The block also returns the rank
// of the hash inside the accepted set (how many accepted hashes are numerically smaller),
// which the sequencing logic uses to select the successor entry.
//
// Purely combinational. The one-hot coding follows the document; the rank output is part of
// this design's own graph-entry layout (successors stored in ascending hash order).
module hash_check
  import hwmon_pkg::*;
(
  input  logic [HASH_W-1:0]   hash_i,     // reported instruction hash
  input  logic [ONEHOT_W-1:0] accept_i,   // accepted one-hot hash set of the current entry
  output logic [ONEHOT_W-1:0] onehot_o,   // one-hot code of hash_i
  output logic                match_o,    // hash_i is in the accepted set
  output logic [HASH_W-1:0]   rank_o      // number of accepted hashes below hash_i
);

  logic [ONEHOT_W-1:0] below;

  always_comb begin
    onehot_o = ONEHOT_W'(1) << hash_i;
    match_o  = |(onehot_o & accept_i);
    below    = accept_i & (onehot_o - ONEHOT_W'(1));
    rank_o   = '0;
    for (int i = 0; i < ONEHOT_W; i++) begin
      rank_o = rank_o + HASH_W'(below[i]);
    end
  end

endmodule
