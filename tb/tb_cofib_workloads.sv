// tb_cofib_workloads: runs the whole data plane, at its default sizes, on
// forwarding tables shaped like the two small name sets CoFIB is evaluated
// with: about 150 prefixes of 2..5 components of about 6.5 characters, with
// many shared leading components (names seen on an NDN testbed), and about
// 510 prefixes of 6..8 components of about 16 characters whose components
// fall into ingress and egress tables in every order (a synthetic set).
// The real names are not reproduced: the testbench generates random
// canonical prefix sets with those statistics (every component string is
// tied to one position by its first character).
//
// For each workload the design is reset, the testbench acts as the control
// plane and writes the component tables, HCT, DPST and CPST entries, then
// sends every prefix as an Interest (half of them with an extra suffix
// component) followed by random names, back to back, and checks action,
// swId and pipeline passes of every result against a reference that
// searches the prefix list directly. The larger evaluated sets (180K and
// up) exceed the default table sizes and are not run.
`timescale 1ns/1ps
module tb_cofib_workloads;
  import cofib_pkg::*;

  localparam int NMAX    = 520;   // prefixes at most
  localparam int NCPST   = 6;     // slow-path shapes
  localparam int NRAND   = 100;   // random names per workload
  localparam logic [30:0] PLACE = 31'h0000_3FFF;  // top default
  localparam int IB      = 10;    // top default FFIB/HCT index bits
  localparam int WAYS    = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid = 0, in_ready, in_last = 0;
  logic [7:0]        in_data = 0;
  logic [3:0]        in_port = 0;
  logic              cp_wr_en = 0;
  cp_write_t         cp_wr;
  logic              ires_valid;
  action_e           ires_action;
  logic [7:0]        ires_swid;
  logic [3:0]        ires_passes, ires_match_len, ires_in_port;
  logic [31:0]       ires_name_hash;
  logic              dres_valid, dres_hit;
  logic [15:0]       dres_ports;
  logic              parse_err;

  cofib_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- independent helpers ----------------
  function automatic logic [31:0] ref_crc(string s);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < s.len(); i++) begin
      c ^= {24'd0, s[i]};
      repeat (8) c = (c >> 1) ^ (32'hEDB8_8320 & {32{c[0]}});
    end
    return ~c;
  endfunction

  function automatic logic [31:0] ref_key(string s);
    logic [31:0] k = 0;
    if (s.len() > 4) return ref_crc(s);
    for (int i = 0; i < s.len(); i++) k = (k << 8) | 32'(s[i]);
    return k;
  endfunction

  function automatic logic [9:0] ref_fold(logic [31:0] k, int bits);
    logic [9:0] x = 0;
    for (int b = 0; b < bits; b++) x[b % IB] ^= k[b];
    return x;
  endfunction

  // ---------------- the FIB ----------------
  string pfx  [NMAX][9];
  int    plen [NMAX];
  logic [7:0] pswid [NMAX];
  int    npfx = 0;
  int    cp_len [NCPST][9];
  int    cp_n   [NCPST];

  logic [31:0] lfsr = 32'h0BAD_F00D;
  function automatic int rnd(int m);
    lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    lfsr = lfsr * 32'd1103515245 + 32'd12345;
    return int'(lfsr[30:8] % 23'(m));
  endfunction

  function automatic string rnd_comp(int pos, int len);
    string s;
    s = $sformatf("%c", 8'(8'h60 + pos));  // first char marks the position
    for (int i = 1; i < len; i++) s = $sformatf("%s%c", s, 8'(8'h61 + rnd(26)));
    return s;
  endfunction

  // F() of the first j components of a name
  function automatic logic [31:0] ref_F(string nm[9], int j);
    logic [31:0] f = 0;
    for (int i = 1; i <= j; i++) f = (i == 1) ? ref_crc(nm[i]) : (32'h0100_0193 * f + ref_crc(nm[i]));
    return f;
  endfunction

  function automatic bit same_path(string a[9], string b[9], int j);
    for (int i = 1; i <= j; i++) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  // Random canonical prefix set: target size, component count range
  // [dmin, dmin + dspan - 1], component length range [lmin, lmin + lspan - 1];
  // with probability share_pct % a new prefix reuses the leading components
  // of an existing one.
  task automatic build_workload(int target, int dmin, int dspan, int lmin, int lspan,
                                int share_pct);
    npfx = 0;
    while (npfx < target) begin
      int d, m;
      bit dup;
      d = dmin + rnd(dspan);
      m = 0;
      if (npfx > 0 && rnd(100) < share_pct) begin
        int r = rnd(npfx);
        m = 1 + rnd((plen[r] < d ? plen[r] : d));
        if (m >= d) m = d - 1;
        for (int j = 1; j <= m; j++) pfx[npfx][j] = pfx[r][j];
      end
      for (int j = m + 1; j <= d; j++) pfx[npfx][j] = rnd_comp(j, lmin + rnd(lspan));
      for (int j = d + 1; j <= 8; j++) pfx[npfx][j] = "";
      plen[npfx] = d;
      dup = 0;
      for (int r = 0; r < npfx; r++)
        if (plen[r] == d && same_path(pfx[r], pfx[npfx], d)) dup = 1;
      if (!dup) begin
        pswid[npfx] = 8'(1 + rnd(255));
        npfx++;
      end
    end
    for (int c = 0; c < NCPST; c++) begin
      cp_n[c] = 1 + rnd(3);
      for (int j = 1; j <= cp_n[c]; j++) cp_len[c][j] = 1 + rnd(31);
    end
  endtask

  int ffib_used [32][1024];
  int hct_used  [1024];
  int dpst_rows = 0;

  task automatic cp_write(cp_write_t w);
    @(negedge clk);
    cp_wr    = w;
    cp_wr_en = 1;
    @(negedge clk);
    cp_wr_en = 0;
  endtask

  // the swId of the prefix equal to the first j components of nm, or 0
  function automatic logic [7:0] exact_swid(string nm[9], int j);
    for (int r = 0; r < npfx; r++)
      if (plen[r] == j && same_path(pfx[r], nm, j)) return pswid[r];
    return 0;
  endfunction

  // component s at position j: CAD fields
  function automatic bit comp_c(int j, string s);
    for (int r = 0; r < npfx; r++) if (plen[r] > j && pfx[r][j] == s) return 1;
    return 0;
  endfunction

  function automatic bit comp_cf(int j, string s);
    int first = -1;
    for (int r = 0; r < npfx; r++)
      if (plen[r] >= j && pfx[r][j] == s) begin
        if (first < 0) first = r;
        else if (!same_path(pfx[r], pfx[first], j - 1)) return 1;
      end
    return 0;
  endfunction

  task automatic load_tables();
    cp_write_t w;
    bit done_comp [string];
    for (int r = 0; r < npfx; r++)
      for (int j = 1; j <= plen[r]; j++) begin
        string q;
        q = $sformatf("%0d:%s", j, pfx[r][j]);
        if (!done_comp.exists(q)) begin
          string s = pfx[r][j];
          int l = s.len();
          logic [31:0] key = ref_key(s);
          logic [9:0] set = ref_fold(key, (l <= 4) ? 8 * l : 32);
          bit c = comp_c(j, s), cf = comp_cf(j, s), e = 0;
          logic [7:0] sw = 0;
          logic [9:0] hs = 0;
          for (int u = 0; u < npfx; u++)
            if (plen[u] == j && pfx[u][j] == s) begin e = 1; sw = pswid[u]; end
          if (!cf && j > 1) hs = ref_F(pfx[r], j - 1) >> 22;
          done_comp[q] = 1;
          w = '0;
          w.target = TGT_FFIB; w.table_len = 5'(l); w.entry_valid = 1;
          w.key = {8'd0, key};
          w.way = 2'(ffib_used[l][set]);
          if (ffib_used[l][set] >= WAYS) $fatal(1, "tb: f-FIB set full");
          ffib_used[l][set]++;
          w.data = {c, e, cf, 3'(j), sw, hs};
          cp_write(w);
          // HCT: every distinct path ending in this conflicting component
          if (cf)
            for (int u = 0; u < npfx; u++)
              if (plen[u] >= j && pfx[u][j] == s) begin
                bit seen = 0;
                for (int v = 0; v < u; v++)
                  if (plen[v] >= j && same_path(pfx[v], pfx[u], j)) seen = 1;
                if (!seen) begin
                  logic [31:0] hk = ref_F(pfx[u], j);
                  logic [9:0] hset = ref_fold(hk, 32);
                  w = '0;
                  w.target = TGT_HCT; w.entry_valid = 1; w.key = {8'd0, hk};
                  w.way = 2'(hct_used[hset]);
                  if (hct_used[hset] >= WAYS) $fatal(1, "tb: HCT set full");
                  hct_used[hset]++;
                  w.data = {16'd0, exact_swid(pfx[u], j)};
                  cp_write(w);
                end
              end
        end
      end
    // DPST: distinct prefix shapes, longest first
    for (int k = 8; k >= 1; k--)
      for (int r = 0; r < npfx; r++)
        if (plen[r] == k) begin
          bit seen = 0;
          for (int v = 0; v < r; v++)
            if (plen[v] == k) begin
              bit eq = 1;
              for (int j = 1; j <= k; j++) if (pfx[v][j].len() != pfx[r][j].len()) eq = 0;
              if (eq) seen = 1;
            end
          if (!seen) begin
            w = '0;
            if (dpst_rows >= 512) $fatal(1, "tb: DPST full");
            w.target = TGT_DPST; w.entry_valid = 1; w.index = 16'(dpst_rows++);
            for (int j = 1; j <= k; j++) begin
              w.key[40 - 5 * j +: 5]  = 5'(pfx[r][j].len());
              w.mask[40 - 5 * j +: 5] = 5'h1F;
            end
            w.data = 24'(k);
            cp_write(w);
          end
        end
    for (int c = 0; c < NCPST; c++) begin
      w = '0;
      w.target = TGT_CPST; w.entry_valid = 1; w.index = 16'(c);
      for (int j = 1; j <= cp_n[c]; j++) begin
        w.key[40 - 5 * j +: 5]  = 5'(cp_len[c][j]);
        w.mask[40 - 5 * j +: 5] = 5'h1F;
      end
      w.data = 24'(cp_n[c]);
      cp_write(w);
    end
  endtask

  // ---------------- reference LNPM ----------------
  typedef struct {
    action_e    act;
    logic [7:0] swid;
    int         passes;
    int         best_len;
  } exp_t;

  function automatic exp_t ref_lnpm(string nm[9], int n, output bit alias_hit);
    exp_t x;
    int kmax = 0, L = 0, j;
    bit cpst = 0, c;
    alias_hit = 0;
    x.swid = 0; x.best_len = 0; x.passes = 1;
    for (int r = 0; r < npfx; r++)
      if (plen[r] <= n && plen[r] > kmax) begin
        bit eq = 1;
        for (int q = 1; q <= plen[r]; q++) if (pfx[r][q].len() != nm[q].len()) eq = 0;
        if (eq) kmax = plen[r];
      end
    for (int cc = 0; cc < NCPST; cc++)
      if (cp_n[cc] <= n) begin
        bit eq = 1;
        for (int q = 1; q <= cp_n[cc]; q++) if (cp_len[cc][q] != nm[q].len()) eq = 0;
        if (eq) cpst = 1;
      end
    if (kmax == 0) begin
      x.act = cpst ? ACT_CONTROLLER : ACT_DROP;
      return x;
    end
    j = 1;
    forever begin
      bit node = 0, comp_in_fib = 0;
      L = j;
      for (int r = 0; r < npfx; r++) begin
        if (plen[r] >= j && same_path(pfx[r], nm, j)) node = 1;
        if (plen[r] >= j && pfx[r][j] == nm[j]) comp_in_fib = 1;
      end
      // a stored component with a unique, different predecessor whose F()
      // shares the top 10 bits would be accepted by the hardware
      if (!node && comp_in_fib && j > 1 && !comp_cf(j, nm[j])) begin
        for (int r = 0; r < npfx; r++)
          if (plen[r] >= j && pfx[r][j] == nm[j] &&
              (ref_F(pfx[r], j - 1) >> 22) == (ref_F(nm, j - 1) >> 22)) alias_hit = 1;
      end
      if (!node) break;
      if (exact_swid(nm, j) != 0) begin
        x.swid = exact_swid(nm, j);
        x.best_len = j;
      end
      c = comp_c(j, nm[j]);
      if (c && j < n && j < kmax) j++;
      else break;
    end
    // pipeline passes for components 1..L
    begin
      int pos = 0;  // 0 at ingress, 1 at egress, 2 past egress
      x.passes = 1;
      for (int q = 1; q <= L; q++) begin
        bit ig = PLACE[nm[q].len() - 1];
        if (ig) begin
          if (pos >= 1) x.passes++;
          pos = 1;
        end else begin
          if (pos == 2) x.passes++;
          pos = 2;
        end
      end
    end
    x.act = (x.swid != 0) ? ACT_CORE : (cpst ? ACT_CONTROLLER : ACT_DROP);
    return x;
  endfunction

  // ---------------- packet driver ----------------
  // drives on the falling edge; a byte is taken at the rising edge that
  // follows a falling edge where in_ready is high
  task automatic send_bytes(byte unsigned b[$], logic [3:0] port);
    @(negedge clk);
    for (int i = 0; i < b.size(); i++) begin
      in_valid = 1;
      in_data  = b[i];
      in_last  = (i == b.size() - 1);
      in_port  = port;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    in_last  = 0;
  endtask

  function automatic void interest_bytes(string nm[9], int n, ref byte unsigned b[$]);
    b.delete();
    b.push_back(8'hF0 | 8'(n));
    for (int j = 1; j <= n; j++) b.push_back(8'(nm[j].len()));
    for (int j = 1; j <= n; j++) for (int i = 0; i < nm[j].len(); i++) b.push_back(nm[j][i]);
    for (int i = 0; i < 3; i++) b.push_back(8'(rnd(256)));  // TLV0 bytes
  endfunction

  exp_t exp_by_hash [logic [31:0]];
  int   outstanding = 0;
  int   n_results = 0, n_core = 0, n_recirc = 0, max_passes = 0;

  always @(posedge clk) if (rst_n && ires_valid) begin
    n_results++;
    if (!exp_by_hash.exists(ires_name_hash)) begin
      check(0, $sformatf("unexpected result hash %h", ires_name_hash));
    end else begin
      exp_t x;
      x = exp_by_hash[ires_name_hash];
      check(ires_action == x.act, $sformatf("action %0d exp %0d hash %h", ires_action, x.act, ires_name_hash));
      check(ires_swid == ((x.act == ACT_CORE) ? x.swid : 8'd0),
            $sformatf("swid %h exp %h", ires_swid, x.swid));
      check(int'(ires_passes) == x.passes,
            $sformatf("passes %0d exp %0d hash %h", ires_passes, x.passes, ires_name_hash));
      if (ires_action == ACT_CORE) n_core++;
      if (ires_passes > 1) n_recirc++;
      if (int'(ires_passes) > max_passes) max_passes = int'(ires_passes);
    end
    outstanding--;
  end

  int n_sent = 0, n_alias = 0;
  task automatic post(string nm[9], int n);
    byte unsigned b[$];
    exp_t x;
    bit al;
    logic [31:0] h;
    h = ref_F(nm, n);
    x = ref_lnpm(nm, n, al);
    if (al || exp_by_hash.exists(h)) begin n_alias++; return; end
    exp_by_hash[h] = x;
    outstanding++;
    n_sent++;
    interest_bytes(nm, n, b);
    send_bytes(b, 4'(rnd(16)));
  endtask

  task automatic run_workload(string name, int target, int dmin, int dspan, int lmin,
                              int lspan, int share_pct);
    string nm[9];
    int n, sent0, res0, core0, rec0;
    // reset the design: every table entry becomes invalid
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_by_hash.delete();
    for (int t = 0; t < 32; t++) for (int s = 0; s < 1024; s++) ffib_used[t][s] = 0;
    for (int s = 0; s < 1024; s++) hct_used[s] = 0;
    dpst_rows = 0;
    build_workload(target, dmin, dspan, lmin, lspan, share_pct);
    load_tables();
    sent0 = n_sent; res0 = n_results; core0 = n_core; rec0 = n_recirc;
    // every prefix, half of them with a suffix component
    for (int r = 0; r < npfx; r++) begin
      n = plen[r];
      for (int j = 1; j <= 8; j++) nm[j] = (j <= n) ? pfx[r][j] : "";
      if (r % 2 == 1 && n < 8) begin n++; nm[n] = rnd_comp(n, 1 + rnd(31)); end
      post(nm, n);
    end
    // random names: a prefix with one component replaced, or unrelated
    for (int i = 0; i < NRAND; i++) begin
      int r = rnd(npfx), q;
      n = plen[r];
      for (int j = 1; j <= 8; j++) nm[j] = (j <= n) ? pfx[r][j] : "";
      q = 1 + rnd(n);
      nm[q] = rnd_comp(q, (rnd(2) == 0) ? nm[q].len() : 1 + rnd(31));
      post(nm, n);
    end
    while (outstanding != 0) @(posedge clk);
    $display("tb: workload %s: %0d prefixes, %0d DPST rows, %0d Interests, %0d to core, %0d recirculated, up to %0d passes",
             name, npfx, dpst_rows, n_sent - sent0, n_core - core0, n_recirc - rec0, max_passes);
    check(n_results - res0 == n_sent - sent0, $sformatf("%s: results %0d exp %0d", name, n_results - res0, n_sent - sent0));
    check(n_core - core0 >= npfx / 2, $sformatf("%s: only %0d Interests reached the core", name, n_core - core0));
  endtask

  initial begin : main
    cp_wr = '0;
    repeat (3) @(posedge clk);
    //           name    size dmin dspan lmin lspan share%
    run_workload("0.1K", 150, 2,   4,    1,   12,   75);
    run_workload("0.5K", 510, 6,   3,    3,   27,   50);
    check(n_recirc > 0, "no recirculation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
