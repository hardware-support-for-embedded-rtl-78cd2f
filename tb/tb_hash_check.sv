// Test of hash_check: every hash against random accepted sets, plus the two cases printed
// for the prototype (hash 0x3 against accepted set 16'h0800 must not match).
// Expected values are computed bit by bit in the test.
module tb_hash_check;
  import hwmon_pkg::*;

  logic [HASH_W-1:0]   hash;
  logic [ONEHOT_W-1:0] accept, onehot;
  logic                match;
  logic [HASH_W-1:0]   rank;

  hash_check dut (.hash_i(hash), .accept_i(accept), .onehot_o(onehot), .match_o(match),
                  .rank_o(rank));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic try_one(input logic [HASH_W-1:0] h, input logic [ONEHOT_W-1:0] a);
    int r;
    hash = h; accept = a;
    #1;
    r = 0;
    for (int i = 0; i < int'(h); i++) r += int'(a[i]);
    for (int i = 0; i < ONEHOT_W; i++)
      check(onehot[i] == (i == int'(h)), $sformatf("onehot bit %0d for hash %0d", i, h));
    check(match == a[h], $sformatf("match hash %0d set %h", h, a));
    check(int'(rank) == r, $sformatf("rank hash %0d set %h: %0d vs %0d", h, a, rank, r));
  endtask

  initial begin
    try_one(4'h3, 16'h0800);
    check(onehot == 16'h0008 && !match, "attack example: 0x0008 vs 0x0800");
    try_one(4'hB, 16'h0800);
    check(onehot == 16'h0800 && match, "ISR example: 0x0800 accepted");
    try_one(4'hF, 16'h0000);
    check(onehot == 16'h8000 && !match, "hash F gives 0x8000");
    for (int n = 0; n < 200; n++)
      for (int h = 0; h < ONEHOT_W; h++) try_one(HASH_W'(h), ONEHOT_W'($urandom));
    try_one(4'hF, 16'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
