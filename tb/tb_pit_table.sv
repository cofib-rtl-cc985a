// tb_pit_table: checks the register PIT. Interests insert name hashes with
// their arrival port; a Data lookup must hit with the ports of all Interests
// of that name, consume the entry (a second Data misses), miss for unknown
// hashes, and lose an entry replaced by another hash in the same slot.
`timescale 1ns/1ps
module tb_pit_table;
  localparam int IB = 8, P = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ins_valid = 0, lookup_valid = 0, res_valid, hit;
  logic [31:0]   ins_hash = 0, lookup_hash = 0;
  logic [3:0]    ins_port = 0;
  logic [P-1:0]  out_ports;

  pit_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ins(logic [31:0] h, int port);
    @(negedge clk);
    ins_valid = 1; ins_hash = h; ins_port = 4'(port);
    @(negedge clk);
    ins_valid = 0;
  endtask

  task automatic data(logic [31:0] h, bit exp_hit, logic [P-1:0] exp_p, string tag);
    @(negedge clk);
    lookup_valid = 1; lookup_hash = h;
    @(negedge clk);
    lookup_valid = 0;
    check(res_valid, {tag, ": result one cycle later"});
    check(hit == exp_hit, $sformatf("%s: hit %0d exp %0d", tag, hit, exp_hit));
    if (exp_hit) check(out_ports == exp_p, $sformatf("%s: ports %h exp %h", tag, out_ports, exp_p));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    data(32'h1111_2222, 0, 0, "empty");
    ins(32'h1111_2222, 3);
    ins(32'h1111_2222, 9);
    ins(32'hCAFE_0001, 0);
    data(32'h1111_2222, 1, 16'h0208, "two ports");
    data(32'h1111_2222, 0, 0, "consumed");
    data(32'hCAFE_0001, 1, 16'h0001, "other name");
    // same slot: flipping bits 0 and 8 keeps the 8-bit fold
    ins(32'h0BAD_F00D, 5);
    ins(32'h0BAD_F00D ^ 32'h0000_0101, 6);
    data(32'h0BAD_F00D, 0, 0, "replaced");
    data(32'h0BAD_F00D ^ 32'h0000_0101, 1, 16'h0040, "replacement");
    data(32'h7777_7777, 0, 0, "unknown");
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
