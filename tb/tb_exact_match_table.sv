// tb_exact_match_table: checks the set-associative exact-match table used for
// the f-FIB tables and the HCT. It fills several ways of one set and of other
// sets, then checks hits with their data, misses for absent keys (including
// a key of the same set that differs from a stored one in two bits), the one-cycle
// result latency, invalidation of one way, and overwriting an entry.
`timescale 1ns/1ps
module tb_exact_match_table;
  localparam int KB = 32, DB = 24, IB = 10, W = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          lookup_valid = 0, res_valid, hit, wr_en = 0, wr_entry_valid = 0;
  logic [KB-1:0] lookup_key = 0, wr_key = 0;
  logic [DB-1:0] data, wr_data = 0;
  logic [1:0]    wr_way = 0;

  exact_match_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [IB-1:0] fold(logic [KB-1:0] k);
    logic [IB-1:0] x;
    x = 0;
    for (int b = 0; b < KB; b++) x[b % IB] ^= k[b];
    return x;
  endfunction

  task automatic write(logic [KB-1:0] k, logic [1:0] w, logic v, logic [DB-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_key = k; wr_way = w; wr_entry_valid = v; wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  // present at a falling edge, result is read one clock later
  task automatic lookup(logic [KB-1:0] k, bit exp_hit, logic [DB-1:0] exp_d, string tag);
    @(negedge clk);
    lookup_valid = 1; lookup_key = k;
    @(negedge clk);
    lookup_valid = 0;
    check(res_valid, {tag, ": result one cycle later"});
    check(hit == exp_hit, $sformatf("%s: hit %0d exp %0d", tag, hit, exp_hit));
    if (exp_hit) check(data == exp_d, $sformatf("%s: data %h exp %h", tag, data, exp_d));
  endtask

  logic [KB-1:0] keys [8];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // four keys in the same set: k, then k with bits b and b+IB flipped
    keys[0] = 32'h1234_5678;
    for (int i = 1; i < 4; i++) keys[i] = keys[0] ^ (32'h1 << i) ^ (32'h1 << (i + IB));
    for (int i = 4; i < 8; i++) keys[i] = 32'hA000_0000 + 32'(i * 977);
    for (int i = 0; i < 4; i++) check(fold(keys[i]) == fold(keys[0]), "same set");
    for (int i = 0; i < 4; i++) write(keys[i], 2'(i), 1, 24'h100000 + 24'(i));
    for (int i = 4; i < 8; i++) write(keys[i], 2'(i % 4), 1, 24'hABC000 + 24'(i));
    for (int i = 0; i < 4; i++) lookup(keys[i], 1, 24'h100000 + 24'(i), "way");
    for (int i = 4; i < 8; i++) lookup(keys[i], 1, 24'hABC000 + 24'(i), "other set");
    // differs in bits 31 and 1, which fold onto the same index bit: same set
    lookup(keys[0] ^ 32'h8000_0002, 0, 0, "top-bit near miss");
    lookup(32'hDEAD_BEEF, 0, 0, "absent");
    write(keys[2], 2, 0, 0);
    lookup(keys[2], 0, 0, "invalidated");
    lookup(keys[3], 1, 24'h100003, "neighbour kept");
    write(keys[1], 1, 1, 24'h0FF0F0);
    lookup(keys[1], 1, 24'h0FF0F0, "overwritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
