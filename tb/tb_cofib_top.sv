// tb_cofib_top: end-to-end test of the CoFIB data plane at its default sizes.
//
// The testbench plays the control plane: it builds a random canonical FIB
// (every component string is tied to one position), derives the table
// entries from it (component keys with their CAD words, HCT entries for
// conflicting components, DPST shapes, plus a few CPST shapes standing for
// the slow-path FIB), and writes them through the control-plane port. It
// then streams P4NF Interests and checks each result against a reference
// that searches the prefix list directly for the longest matching prefix,
// with the pipeline pass count worked out from the table placement.
// Isolated Interests also check the latency formula, Data packets check the
// PIT, and malformed packets check the error pulse. Each mechanism (shape
// miss to controller or drop, LNPM miss, conflicting component via the HCT,
// early stop on the continuity bit, the DPST limit, a table absent from
// ingress, recirculation, two matches in one pass, queue back-pressure, PIT
// hit and miss, parse error) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_cofib_top;
  import cofib_pkg::*;

  localparam int NPOOL   = 5;     // component strings per position
  localparam int NPFX    = 90;    // FIB prefixes requested
  localparam int NCPST   = 6;     // slow-path shapes
  localparam int NPKT    = 400;   // Interests in the random phase
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
  string pool [9][NPOOL];
  string pfx  [NPFX][9];
  int    plen [NPFX];
  logic [7:0] pswid [NPFX];
  int    npfx = 0;
  int    cp_len [NCPST][9];
  int    cp_n   [NCPST];

  logic [31:0] lfsr = 32'h1234_5678;
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

  // ---------------- control-plane writes ----------------
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

  task automatic build_fib();
    // pools: distinct strings per position, lengths spread over 1..31
    for (int j = 1; j <= 8; j++)
      for (int q = 0; q < NPOOL; q++) begin
        bit dup;
        do begin
          int l = (q == 0) ? 1 + rnd(4) : (q == 1) ? 5 + rnd(10) : 1 + rnd(31);
          pool[j][q] = rnd_comp(j, l);
          dup = 0;
          for (int r = 0; r < q; r++) if (pool[j][r] == pool[j][q]) dup = 1;
        end while (dup);
      end
    for (int t = 0; t < NPFX; t++) begin
      int d = 1 + rnd(6) + ((rnd(4) == 0) ? 2 : 0);
      bit dup = 0;
      if (d > 8) d = 8;
      for (int j = 1; j <= d; j++) pfx[npfx][j] = pool[j][rnd((j == 1) ? 3 : NPOOL)];
      plen[npfx] = d;
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
    bit done_comp [9][NPOOL];
    for (int j = 1; j <= 8; j++) for (int q = 0; q < NPOOL; q++) done_comp[j][q] = 0;
    for (int r = 0; r < npfx; r++)
      for (int j = 1; j <= plen[r]; j++) begin
        int q = -1;
        for (int z = 0; z < NPOOL; z++) if (pool[j][z] == pfx[r][j]) q = z;
        if (!done_comp[j][q]) begin
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
          done_comp[j][q] = 1;
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

  // mechanism counters
  int n_dpst_ctrl, n_dpst_drop, n_lnpm_miss, n_conflict, n_cstop, n_maxstop;
  int n_skip_ig, n_recirc, n_two_per_pass, n_core, n_alias;

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

  // counters of what a reference walk exercised
  task automatic count_mechanisms(string nm[9], int n, exp_t x);
    int kmax = 0, pos = 0, pass = 1, L;
    bit conflict = 0;
    for (int r = 0; r < npfx; r++)
      if (plen[r] <= n && plen[r] > kmax) begin
        bit eq = 1;
        for (int q = 1; q <= plen[r]; q++) if (pfx[r][q].len() != nm[q].len()) eq = 0;
        if (eq) kmax = plen[r];
      end
    if (kmax == 0) begin
      if (x.act == ACT_CONTROLLER) n_dpst_ctrl++; else n_dpst_drop++;
      return;
    end
    if (x.act != ACT_CORE) n_lnpm_miss++; else n_core++;
    if (!PLACE[nm[1].len() - 1]) n_skip_ig++;
    if (x.passes > 1) n_recirc++;
    // walk again for matched components
    L = 0;
    for (int j = 1; j <= n; j++) begin
      bit node = 0;
      for (int r = 0; r < npfx; r++) if (plen[r] >= j && same_path(pfx[r], nm, j)) node = 1;
      if (!node) begin L = j; break; end
      if (comp_cf(j, nm[j])) conflict = 1;
      if (!(comp_c(j, nm[j]) && j < n && j < kmax)) begin
        if (!comp_c(j, nm[j])) n_cstop++;
        else if (j == kmax && j < n) n_maxstop++;
        L = j;
        break;
      end
    end
    if (conflict) n_conflict++;
    for (int q = 1; q <= L; q++) begin
      bit ig = PLACE[nm[q].len() - 1];
      if (ig) begin if (pos >= 1) pass++; pos = 1; end
      else begin
        if (pos == 1) n_two_per_pass++;
        if (pos == 2) pass++;
        pos = 2;
      end
    end
  endtask

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

  // expected results keyed by name hash
  exp_t            exp_by_hash [logic [31:0]];
  int              pending     [logic [31:0]];
  int              outstanding = 0;
  logic [31:0]     fwd_hash [$];
  logic [3:0]      fwd_port [$];

  // PIT reference: last insert per slot
  logic [31:0] pit_h   [256];
  logic [15:0] pit_p   [256];
  bit          pit_v   [256];

  function automatic logic [7:0] pit_idx(logic [31:0] h);
    logic [7:0] x = 0;
    for (int b = 0; b < 32; b++) x[b % 8] ^= h[b];
    return x;
  endfunction

  // result monitor
  int n_results = 0;
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
      if (x.act == ACT_CORE) begin
        logic [7:0] ix;
        ix = pit_idx(ires_name_hash);
        pit_p[ix] = (pit_v[ix] && pit_h[ix] == ires_name_hash) ? (pit_p[ix] | (16'd1 << ires_in_port))
                                                                 : (16'd1 << ires_in_port);
        pit_h[ix] = ires_name_hash;
        pit_v[ix] = 1;
        fwd_hash.push_back(ires_name_hash);
      end
      pending[ires_name_hash]--;
    end
    outstanding--;
  end

  // back-pressure seen: a parsed Interest waits for the recirculation queue
  int n_backpressure = 0;
  always @(posedge clk) if (rst_n && dut.p_valid && dut.p_is_int && dut.p_ok && !dut.rq_empty)
    n_backpressure++;

  int n_parse_err = 0;
  always @(posedge clk) if (rst_n && parse_err) n_parse_err++;

  int n_pit_hit = 0, n_pit_miss = 0;
  logic dexp_q [$];
  logic [15:0] dexp_p [$];
  always @(posedge clk) if (rst_n && dres_valid) begin
    logic e;
    logic [15:0] p;
    if (dexp_q.size() == 0) check(0, "unexpected Data result");
    else begin
      e = dexp_q.pop_front();
      p = dexp_p.pop_front();
      check(dres_hit == e, $sformatf("PIT hit %0d exp %0d", dres_hit, e));
      if (e) check(dres_ports == p, $sformatf("PIT ports %h exp %h", dres_ports, p));
      if (dres_hit) n_pit_hit++; else n_pit_miss++;
    end
  end

  // build a test name: often a FIB prefix extended with suffix components
  task automatic make_name(output string nm[9], output int n);
    int kind = rnd(10);
    for (int j = 1; j <= 8; j++) nm[j] = "";
    if (kind < 6) begin
      int r = rnd(npfx);
      n = plen[r] + rnd(3);
      if (n > 8) n = 8;
      for (int j = 1; j <= n; j++)
        nm[j] = (j <= plen[r]) ? pfx[r][j] : ((rnd(2) == 0) ? pool[j][rnd(NPOOL)] : rnd_comp(j, 1 + rnd(31)));
      if (rnd(5) == 0) begin  // break one component
        int q = 1 + rnd(n);
        nm[q] = rnd_comp(q, nm[q].len());
      end
    end else if (kind < 8) begin
      n = 1 + rnd(8);
      for (int j = 1; j <= n; j++) nm[j] = pool[j][rnd(NPOOL)];
    end else begin
      int c = rnd(NCPST);
      n = cp_n[c] + rnd(2);
      for (int j = 1; j <= n; j++)
        nm[j] = rnd_comp(j, (j <= cp_n[c]) ? cp_len[c][j] : 1 + rnd(31));
    end
  endtask

  task automatic post_interest(string nm[9], int n, logic [3:0] port, bit wait_done,
                               output int latency);
    byte unsigned b[$];
    exp_t x;
    bit al;
    logic [31:0] h = ref_F(nm, n);
    int t0;
    x = ref_lnpm(nm, n, al);
    exp_by_hash[h] = x;
    pending[h] = pending.exists(h) ? pending[h] + 1 : 1;
    outstanding++;
    count_mechanisms(nm, n, x);
    interest_bytes(nm, n, b);
    send_bytes(b, port);
    t0 = $time / 10;
    latency = 0;
    if (wait_done) begin
      while (outstanding != 0) @(posedge clk);
      latency = int'($time / 10) - t0;
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin : main
    string nm[9];
    int n, lat, sent;
    bit al;
    exp_t x;
    byte unsigned b[$];
    for (int i = 0; i < 256; i++) pit_v[i] = 0;
    for (int t = 0; t < 32; t++) for (int s = 0; s < 1024; s++) ffib_used[t][s] = 0;
    for (int s = 0; s < 1024; s++) hct_used[s] = 0;
    cp_wr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_fib();
    load_tables();
    $display("tb: %0d prefixes loaded, %0d DPST rows", npfx, dpst_rows);

    // 1. isolated Interests: latency = 2 + 7 * passes - 1 cycles
    for (int r = 0; r < 12; r++) begin
      int q;
      q = (r * 7) % npfx;
      n = plen[q];
      for (int j = 1; j <= 8; j++) nm[j] = (j <= n) ? pfx[q][j] : "";
      x = ref_lnpm(nm, n, al);
      post_interest(nm, n, 4'(r), 1, lat);
      check(lat == 7 * x.passes + 1, $sformatf("latency %0d for %0d passes", lat, x.passes));
    end

    // 2. random Interests, back to back
    sent = 0;
    while (sent < NPKT) begin
      make_name(nm, n);
      x = ref_lnpm(nm, n, al);
      if (al) begin n_alias++; continue; end
      post_interest(nm, n, 4'(rnd(16)), 0, lat);
      sent++;
    end
    while (outstanding != 0) @(posedge clk);

    // 3. Data packets: names that went to the core, and unknown hashes
    repeat (5) @(posedge clk);
    for (int i = 0; i < fwd_hash.size() && i < 40; i++) begin
      logic [31:0] h;
      logic [7:0] ix;
      bit e;
      h  = (i % 4 == 3) ? (fwd_hash[i] ^ 32'h5A5A_0001) : fwd_hash[i];
      ix = pit_idx(h);
      e  = pit_v[ix] && pit_h[ix] == h;
      dexp_q.push_back(e);
      dexp_p.push_back(pit_p[ix]);
      if (e) pit_v[ix] = 0;
      b.delete();
      b.push_back(8'h00); b.push_back(8'd32);
      b.push_back(h[31:24]); b.push_back(h[23:16]); b.push_back(h[15:8]); b.push_back(h[7:0]);
      b.push_back(8'h07); b.push_back(8'h01);
      send_bytes(b, 4'd2);
      @(posedge clk);
    end

    // 4. malformed packets
    b.delete(); b.push_back(8'h35); b.push_back(8'h01); send_bytes(b, 0);             // bad type
    b.delete(); b.push_back(8'hF9); b.push_back(8'h01); send_bytes(b, 0);             // n = 9
    b.delete(); b.push_back(8'hF1); b.push_back(8'd0); b.push_back(8'h61); send_bytes(b, 0);  // C = 0
    b.delete(); b.push_back(8'hF2); b.push_back(8'd3); send_bytes(b, 0);              // cut short
    b.delete(); b.push_back(8'h00); b.push_back(8'd16); b.push_back(8'h01); b.push_back(8'h02); send_bytes(b, 0);
    repeat (20) @(posedge clk);

    check(n_results == 12 + NPKT, $sformatf("results %0d exp %0d", n_results, 12 + NPKT));
    check(dexp_q.size() == 0, "Data results missing");
    check(n_parse_err == 5, $sformatf("parse errors %0d exp 5", n_parse_err));
    $display("tb: mechanisms: dpst->ctrl %0d dpst->drop %0d lnpm-miss %0d core %0d conflict %0d c-stop %0d max-stop %0d skip-ingress %0d recirc %0d two-per-pass %0d backpressure %0d pit-hit %0d pit-miss %0d parse-err %0d (alias skipped %0d)",
             n_dpst_ctrl, n_dpst_drop, n_lnpm_miss, n_core, n_conflict, n_cstop, n_maxstop,
             n_skip_ig, n_recirc, n_two_per_pass, n_backpressure, n_pit_hit, n_pit_miss,
             n_parse_err, n_alias);
    check(n_dpst_ctrl > 0, "no DPST miss sent to the controller");
    check(n_dpst_drop > 0, "no DPST miss dropped");
    check(n_lnpm_miss > 0, "no LNPM miss");
    check(n_core > 0, "no Interest sent to the core");
    check(n_conflict > 0, "no conflicting component");
    check(n_cstop > 0, "no stop on the continuity bit");
    check(n_maxstop > 0, "no stop at the DPST limit");
    check(n_skip_ig > 0, "no first component at egress");
    check(n_recirc > 0, "no recirculation");
    check(n_two_per_pass > 0, "no pass with two matches");
    check(n_backpressure > 0, "no back-pressure from the recirculation queue");
    check(n_pit_hit > 0, "no PIT hit");
    check(n_pit_miss > 0, "no PIT miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
