// tb_shape_tcam: checks the ternary shape table used as DPST and CPST. Rows
// hold prefix shapes masked to their own length; the test checks that a
// full name shape hits the longest installed prefix shape (lower row wins),
// that a shorter prefix shape is found when the longer one differs, misses,
// invalidation and the one-cycle result latency.
`timescale 1ns/1ps
module tb_shape_tcam;
  localparam int KB = 40, DB = 4, D = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          lookup_valid = 0, res_valid, hit, wr_en = 0, wr_entry_valid = 0;
  logic [KB-1:0] lookup_key = 0, wr_value = 0, wr_mask = 0;
  logic [DB-1:0] data, wr_data = 0;
  logic [8:0]    wr_index = 0;

  shape_tcam dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // shape of lengths l[0..n-1], and its mask
  function automatic logic [KB-1:0] shp(int n, int l0, int l1 = 0, int l2 = 0, int l3 = 0);
    logic [KB-1:0] s;
    int l [4];
    l[0] = l0; l[1] = l1; l[2] = l2; l[3] = l3;
    s = 0;
    for (int i = 0; i < n; i++) s[KB - 5 * (i + 1) +: 5] = 5'(l[i]);
    return s;
  endfunction
  function automatic logic [KB-1:0] msk(int n);
    logic [KB-1:0] m;
    m = 0;
    for (int i = 0; i < n; i++) m[KB - 5 * (i + 1) +: 5] = 5'h1F;
    return m;
  endfunction

  task automatic write(int row, logic [KB-1:0] v, logic [KB-1:0] m, int d, bit valid = 1);
    @(negedge clk);
    wr_en = 1; wr_index = 9'(row); wr_value = v; wr_mask = m; wr_data = 4'(d); wr_entry_valid = valid;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic lookup(logic [KB-1:0] k, bit exp_hit, int exp_d, string tag);
    @(negedge clk);
    lookup_valid = 1; lookup_key = k;
    @(negedge clk);
    lookup_valid = 0;
    check(res_valid, {tag, ": result one cycle later"});
    check(hit == exp_hit, $sformatf("%s: hit %0d exp %0d", tag, hit, exp_hit));
    if (exp_hit) check(int'(data) == exp_d, $sformatf("%s: data %0d exp %0d", tag, data, exp_d));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    lookup(shp(2, 2, 3), 0, 0, "empty table");
    // /2/3/5 at row 0, /2/3 at row 1, /2 at row 2, /7 at the last row
    write(0, shp(3, 2, 3, 5), msk(3), 3);
    write(1, shp(2, 2, 3), msk(2), 2);
    write(2, shp(1, 2), msk(1), 1);
    write(D - 1, shp(1, 7), msk(1), 1);
    lookup(shp(4, 2, 3, 5, 9), 1, 3, "longest shape");
    lookup(shp(3, 2, 3, 5), 1, 3, "exact shape");
    lookup(shp(3, 2, 3, 6), 1, 2, "two components");
    lookup(shp(2, 2, 4), 1, 1, "one component");
    lookup(shp(2, 7, 31), 1, 1, "last row");
    lookup(shp(2, 3, 3), 0, 0, "no shape");
    write(0, shp(3, 2, 3, 5), msk(3), 3, 0);
    lookup(shp(4, 2, 3, 5, 9), 1, 2, "after invalidation");
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
