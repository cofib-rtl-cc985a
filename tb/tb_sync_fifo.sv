// tb_sync_fifo: checks the recirculation queue against a queue model under
// random pushes and pops (never pushing when full nor popping when empty):
// order of the data, the empty and full flags and the occupancy count.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 16, D = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          push = 0, pop = 0, empty, full;
  logic [W-1:0]  din = 0, dout;
  logic [$clog2(D):0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] model [$];
  int n_full = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
      if (model.size() != 0) check(dout == model[0], $sformatf("dout %h exp %h", dout, model[0]));
      if (full) n_full++;
      // bias towards filling in the first half, draining in the second
      push = !full && ($urandom_range(0, 99) < ((c < 300) ? 70 : 35));
      pop  = !empty && ($urandom_range(0, 99) < ((c < 300) ? 35 : 70));
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0; pop = 0;
    end
    check(n_full > 0, "queue never reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
