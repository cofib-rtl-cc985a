// tb_lnpm_stage: directed test of one ingress match-action block. The test
// installs a handful of f-FIB entries (ASCII keys in T3/T4, a crc32 key in
// T5), an HCT entry, DPST and CPST shapes, and then sends hand-built
// packets covering: a first component that matches and continues, a match
// that ends on the continuity bit, shape misses to the controller and to the
// drop path, a second component checked through its sub-prefix hash (right
// and wrong predecessor), the DPST limit, a conflicting component resolved
// through the HCT (hit and miss), a wrong position, and a component whose
// table is in the egress block. Every result is worked out by hand here.
// It also checks the 3-cycle latency and one packet per cycle throughput.
`timescale 1ns/1ps
module tb_lnpm_stage;
  import cofib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid = 0, out_valid, cp_wr_en = 0;
  ipkt_t     in_pkt, out_pkt;
  cp_write_t cp_wr;

  lnpm_stage dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] crc(string s);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < s.len(); i++) begin
      c ^= {24'd0, s[i]};
      repeat (8) c = (c >> 1) ^ (32'hEDB8_8320 & {32{c[0]}});
    end
    return ~c;
  endfunction
  function automatic logic [31:0] asc(string s);
    logic [31:0] k = 0;
    for (int i = 0; i < s.len() && i < 4; i++) k = (k << 8) | 32'(s[i]);
    return k;
  endfunction
  function automatic logic [31:0] F2(string a, string b);
    return 32'h0100_0193 * crc(a) + crc(b);
  endfunction

  task automatic cpw(cp_target_e t, int tl, int idx, logic [39:0] key, logic [39:0] mask,
                     logic [23:0] data);
    @(negedge clk);
    cp_wr = '0;
    cp_wr.target = t; cp_wr.table_len = 5'(tl); cp_wr.index = 16'(idx);
    cp_wr.entry_valid = 1; cp_wr.key = key; cp_wr.mask = mask; cp_wr.data = data;
    cp_wr_en = 1;
    @(negedge clk);
    cp_wr_en = 0;
  endtask

  function automatic logic [23:0] cad(bit c, bit e, bit cf, int p, logic [7:0] sw, logic [9:0] hs);
    return {c, e, cf, 3'(p), sw, hs};
  endfunction

  // shape mask/value of up to 2 lengths
  function automatic logic [39:0] sv(int n, int l0, int l1 = 0);
    logic [39:0] s = 0;
    s[39:35] = 5'(l0);
    if (n > 1) s[34:30] = 5'(l1);
    return s;
  endfunction
  function automatic logic [39:0] sm(int n);
    return (n > 1) ? 40'hFF_C000_0000 : 40'hF8_0000_0000;
  endfunction

  function automatic ipkt_t mk(string c0, string c1, string c2, int n, bit normal, int idx,
                               logic [31:0] f_prev, logic [7:0] best, int max, bit cpst);
    ipkt_t p;
    string c [3];
    c[0] = c0; c[1] = c1; c[2] = c2;
    p = '0;
    p.desc.n = 4'(n);
    for (int j = 0; j < n; j++) begin
      p.desc.len[j]   = 5'(c[j].len());
      p.desc.ascii[j] = asc(c[j]);
      p.desc.crc[j]   = crc(c[j]);
    end
    p.meta.normal    = normal;
    p.meta.idx       = 4'(idx);
    p.meta.max       = 4'(max);
    p.meta.f_prev    = f_prev;
    p.meta.best_swid = best;
    p.meta.best_len  = (best != 0) ? 4'(idx - 1) : 4'd0;
    p.meta.cpst_hit  = cpst;
    p.meta.action    = ACT_NONE;
    p.meta.passes    = 4'd1;
    return p;
  endfunction

  typedef struct {
    action_e    act;
    logic [7:0] best;
    int         idx;
    int         max;
  } exp_t;
  exp_t expq [$];
  int n_out = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t x;
    n_out++;
    if (expq.size() == 0) check(0, "unexpected output");
    else begin
      x = expq.pop_front();
      check(out_pkt.meta.action == x.act,
            $sformatf("pkt %0d action %0d exp %0d", n_out, out_pkt.meta.action, x.act));
      check(out_pkt.meta.best_swid == x.best,
            $sformatf("pkt %0d best %h exp %h", n_out, out_pkt.meta.best_swid, x.best));
      check(int'(out_pkt.meta.idx) == x.idx,
            $sformatf("pkt %0d idx %0d exp %0d", n_out, out_pkt.meta.idx, x.idx));
      check(int'(out_pkt.meta.max) == x.max,
            $sformatf("pkt %0d max %0d exp %0d", n_out, out_pkt.meta.max, x.max));
    end
  end

  task automatic put(ipkt_t p, action_e a, logic [7:0] best, int idx, int max);
    exp_t x;
    x.act = a; x.best = best; x.idx = idx; x.max = max;
    expq.push_back(x);
    @(negedge clk);
    in_valid = 1;
    in_pkt   = p;
  endtask

  initial begin
    int lat;
    cp_wr = '0;
    in_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // f-FIB entries (position, hs from the predecessor)
    cpw(TGT_FFIB, 3, 0, {8'd0, asc("abc")}, 0, cad(1, 1, 0, 1, 8'h11, 0));
    cpw(TGT_FFIB, 3, 0, {8'd0, asc("xyz")}, 0, cad(0, 1, 0, 1, 8'h22, 0));
    cpw(TGT_FFIB, 5, 0, {8'd0, crc("hello")}, 0, cad(1, 0, 0, 2, 8'h00, 10'(crc("abc") >> 22)));
    cpw(TGT_FFIB, 4, 0, {8'd0, asc("conf")}, 0, cad(0, 1, 1, 2, 8'h00, 0));
    cpw(TGT_HCT, 0, 0, {8'd0, F2("abc", "conf")}, 0, 24'h000044);
    // shapes: DPST /3/5 (2), /3/4 (2), /3 (1), /20 (1); CPST /7 (1)
    cpw(TGT_DPST, 0, 0, sv(2, 3, 5), sm(2), 24'd2);
    cpw(TGT_DPST, 0, 1, sv(2, 3, 4), sm(2), 24'd2);
    cpw(TGT_DPST, 0, 2, sv(1, 3), sm(1), 24'd1);
    cpw(TGT_DPST, 0, 3, sv(1, 20), sm(1), 24'd1);
    cpw(TGT_CPST, 0, 0, sv(1, 7), sm(1), 24'd1);

    // latency of one packet
    put(mk("abc", "hello", "wwwwwwwww", 3, 1, 1, 0, 0, 8, 0), ACT_NONE, 8'h11, 2, 2);
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("latency %0d exp 3", lat));
    // back to back
    put(mk("xyz", "", "", 1, 1, 1, 0, 0, 8, 0), ACT_CORE, 8'h22, 1, 1);
    put(mk("qqqqqqq", "", "", 1, 1, 1, 0, 0, 8, 0), ACT_CONTROLLER, 8'h00, 1, 8);
    put(mk("qq", "", "", 1, 1, 1, 0, 0, 8, 0), ACT_DROP, 8'h00, 1, 8);
    put(mk("abc", "hello", "x", 3, 0, 2, crc("abc"), 8'h11, 2, 0), ACT_CORE, 8'h11, 2, 2);
    put(mk("zzz", "hello", "ww", 3, 0, 2, crc("zzz"), 8'h00, 3, 0), ACT_DROP, 8'h00, 2, 3);
    put(mk("abc", "conf", "", 2, 0, 2, crc("abc"), 8'h11, 2, 0), ACT_CORE, 8'h44, 2, 2);
    put(mk("abq", "conf", "", 2, 0, 2, crc("abq"), 8'h11, 2, 0), ACT_CORE, 8'h11, 2, 2);
    put(mk("abcdefghijklmnopqrst", "", "", 1, 1, 1, 0, 0, 8, 0), ACT_NONE, 8'h00, 1, 1);
    put(mk("abc", "xyz", "", 2, 0, 2, crc("abc"), 8'h00, 2, 1), ACT_CONTROLLER, 8'h00, 2, 2);
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    check(n_out == 10, $sformatf("outputs %0d exp 10", n_out));
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
