// lnpm_stage: one match-action control block of the CoFIB pipeline, either
// the ingress block (IS_INGRESS = 1) or the egress block (IS_INGRESS = 0).
// Each block performs at most one step of the longest-name-prefix match
// (LNPM) per packet pass, so a pass through ingress and egress can match two
// name components.
//
// Contents, as the design lays them out: the f-FIB tables Ti assigned to
// this block by the PLACEMENT mask (bit i-1 set = Ti at ingress), a copy of
// the Hash Conflicting Table (HCT, duplicated in both blocks), and, in the
// ingress block only, the DPST and CPST shape tables queried on a packet's
// first pass.
//
// Step for component i of length L (following the ingress flow chart and the
// CAD definition):
//   * first pass, ingress: look the name's shape up in DPST and CPST. DPST
//     miss: to the controller if CPST hits, else drop. DPST hit: its action
//     data k bounds the LNPM to k components.
//   * if table TL is not in this block the packet passes on untouched (to
//     egress, or from egress to recirculation).
//   * otherwise look the component key up in TL. It matches when the entry
//     exists, its position p equals i, and either (cf = 0) its hs equals the
//     top 10 bits of F() of the components matched so far (0 for i = 1), or
//     (cf = 1) the HCT holds F(rho, nc_i). A match records the prefix's
//     swId if one ends here (from the HCT when cf = 1, from the CAD when
//     e = 1), extends F(), and continues with i+1 while c = 1, i < n and
//     i < k. Otherwise the LNPM ends: to the core with the longest swId
//     found, else to the controller if CPST hit, else drop.
// Choices of this implementation: using k as the limit (the text also
// mentions max = 8 - k), a p/hs check on every match, and sending a
// recirculated packet with no match at all to the controller or the drop
// path rather than to the core with an empty swId.
//
// Timing: fully pipelined, one packet per cycle, latency 3 cycles (table
// read; CAD check and HCT read; decision). Packets whose action is already
// decided pass through with the same latency. Control-plane writes arrive on
// cp_wr_en/cp_wr; FFIB writes are taken by the table of matching length if
// it lives in this block, HCT writes by every copy, shape writes by ingress.
// Lint notes: the result-valid pins of the tables are left open because
// their latency is fixed; the CAD fields kept for the decision and the write
// record fields used by other tables show up as unused bits. Neither is a
// circuit problem.
module lnpm_stage
  import cofib_pkg::*;
#(
  parameter bit                    IS_INGRESS      = 1'b1,
  parameter logic [NUM_TABLES-1:0] PLACEMENT       = 31'h0000_3FFF,
  parameter int                    FFIB_INDEX_BITS = 10,
  parameter int                    FFIB_WAYS       = 4,
  parameter int                    HCT_INDEX_BITS  = 10,
  parameter int                    HCT_WAYS        = 4,
  parameter int                    SHAPE_DEPTH     = 512
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  ipkt_t     in_pkt,
  output logic      out_valid,
  output ipkt_t     out_pkt,
  input  logic      cp_wr_en,
  input  cp_write_t cp_wr
);

  // ---------------- s0: component selection and table reads ----------------
  logic [NCOMP_W-1:0] i0;
  logic [2:0]         k0;
  logic [LEN_W-1:0]   len0;
  logic [KEY_W-1:0]   key0;
  logic               active0, here0;

  assign i0      = in_pkt.meta.idx;
  assign k0      = 3'(i0 - 4'd1);
  assign len0    = in_pkt.desc.len[k0];
  assign key0    = comp_key(len0, in_pkt.desc.ascii[k0], in_pkt.desc.crc[k0]);
  assign active0 = in_valid && in_pkt.meta.action == ACT_NONE;
  assign here0   = (len0 != '0) && (PLACEMENT[len0 - 5'd1] == IS_INGRESS);

  logic [NUM_TABLES:1]           t_hit;
  logic [NUM_TABLES:1][CAD_W-1:0] t_data;

  for (genvar t = 1; t <= NUM_TABLES; t++) begin : g_tbl
    localparam int KW = table_key_w(t);
    if (PLACEMENT[t-1] == IS_INGRESS) begin : g_here
      exact_match_table #(
        .KEY_BITS(KW), .DATA_BITS(CAD_W),
        .INDEX_BITS(FFIB_INDEX_BITS), .WAYS(FFIB_WAYS)
      ) u_t (
        .clk, .rst_n,
        .lookup_valid  (active0 && len0 == LEN_W'(t)),
        .lookup_key    (key0[KW-1:0]),
        .res_valid     (),
        .hit           (t_hit[t]),
        .data          (t_data[t]),
        .wr_en         (cp_wr_en && cp_wr.target == TGT_FFIB && cp_wr.table_len == LEN_W'(t)),
        .wr_key        (cp_wr.key[KW-1:0]),
        .wr_way        (cp_wr.way[$clog2(FFIB_WAYS)-1:0]),
        .wr_entry_valid(cp_wr.entry_valid),
        .wr_data       (cp_wr.data)
      );
    end else begin : g_absent
      assign t_hit[t]  = 1'b0;
      assign t_data[t] = '0;
    end
  end

  // Shape tables, ingress only.
  logic                 dpst_hit, cpst_hit;
  logic [NCOMP_W-1:0]   dpst_k;
  if (IS_INGRESS) begin : g_shape
    logic               shape_lk;
    logic [SHAPE_W-1:0] shape0;
    assign shape0   = shape_key(in_pkt.desc.n, in_pkt.desc.len);
    assign shape_lk = active0 && in_pkt.meta.normal;
    shape_tcam #(.KEY_BITS(SHAPE_W), .DATA_BITS(NCOMP_W), .DEPTH(SHAPE_DEPTH)) u_dpst (
      .clk, .rst_n,
      .lookup_valid(shape_lk), .lookup_key(shape0),
      .res_valid(), .hit(dpst_hit), .data(dpst_k),
      .wr_en(cp_wr_en && cp_wr.target == TGT_DPST),
      .wr_index(cp_wr.index[$clog2(SHAPE_DEPTH)-1:0]),
      .wr_entry_valid(cp_wr.entry_valid),
      .wr_value(cp_wr.key), .wr_mask(cp_wr.mask),
      .wr_data(cp_wr.data[NCOMP_W-1:0])
    );
    shape_tcam #(.KEY_BITS(SHAPE_W), .DATA_BITS(NCOMP_W), .DEPTH(SHAPE_DEPTH)) u_cpst (
      .clk, .rst_n,
      .lookup_valid(shape_lk), .lookup_key(shape0),
      .res_valid(), .hit(cpst_hit), .data(),
      .wr_en(cp_wr_en && cp_wr.target == TGT_CPST),
      .wr_index(cp_wr.index[$clog2(SHAPE_DEPTH)-1:0]),
      .wr_entry_valid(cp_wr.entry_valid),
      .wr_value(cp_wr.key), .wr_mask(cp_wr.mask),
      .wr_data(cp_wr.data[NCOMP_W-1:0])
    );
  end else begin : g_noshape
    assign dpst_hit = 1'b0;
    assign cpst_hit = 1'b0;
    assign dpst_k   = '0;
  end

  // ---------------- s1: CAD check, F() update, HCT read ----------------
  logic               v1, act1, here1;
  ipkt_t              p1;
  logic [LEN_W-1:0]   len1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; act1 <= 1'b0; here1 <= 1'b0; p1 <= '0; len1 <= '0;
    end else begin
      v1    <= in_valid;
      act1  <= active0;
      here1 <= here0;
      p1    <= in_pkt;
      len1  <= len0;
    end
  end

  logic               hit1;
  cad_t               cad1;
  logic [31:0]        f1;
  logic               pos_ok1, hs_ok1;
  logic [NCOMP_W-1:0] i1;

  assign i1      = p1.meta.idx;
  assign hit1    = (len1 != '0) ? t_hit[len1] : 1'b0;
  assign cad1    = (len1 != '0) ? cad_t'(t_data[len1]) : cad_t'('0);
  assign f1      = f_next(i1 == 4'd1, p1.meta.f_prev, p1.desc.crc[3'(i1 - 4'd1)]);
  assign pos_ok1 = cad1.p == i1[2:0];
  assign hs_ok1  = (i1 == 4'd1) ? (cad1.hs == '0) : (cad1.hs == p1.meta.f_prev[31 -: HS_W]);

  logic              hct_hit;
  logic [SWID_W-1:0] hct_swid;
  exact_match_table #(
    .KEY_BITS(32), .DATA_BITS(SWID_W), .INDEX_BITS(HCT_INDEX_BITS), .WAYS(HCT_WAYS)
  ) u_hct (
    .clk, .rst_n,
    .lookup_valid  (act1 && here1 && hit1 && cad1.cf),
    .lookup_key    (f1),
    .res_valid     (),
    .hit           (hct_hit),
    .data          (hct_swid),
    .wr_en         (cp_wr_en && cp_wr.target == TGT_HCT),
    .wr_key        (cp_wr.key[31:0]),
    .wr_way        (cp_wr.way[$clog2(HCT_WAYS)-1:0]),
    .wr_entry_valid(cp_wr.entry_valid),
    .wr_data       (cp_wr.data[SWID_W-1:0])
  );

  // ---------------- s2: decision ----------------
  logic               v2, act2, here2, hit2, pos_ok2, hs_ok2, dh2, ch2;
  ipkt_t              p2;
  cad_t               cad2;
  logic [31:0]        f2;
  logic [NCOMP_W-1:0] dk2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; act2 <= 1'b0; here2 <= 1'b0; hit2 <= 1'b0;
      pos_ok2 <= 1'b0; hs_ok2 <= 1'b0; dh2 <= 1'b0; ch2 <= 1'b0;
      p2 <= '0; cad2 <= '0; f2 <= '0; dk2 <= '0;
    end else begin
      v2      <= v1;
      act2    <= act1;
      here2   <= here1;
      hit2    <= hit1;
      pos_ok2 <= pos_ok1;
      hs_ok2  <= hs_ok1;
      dh2     <= dpst_hit;
      ch2     <= cpst_hit;
      dk2     <= dpst_k;
      p2      <= p1;
      cad2    <= cad1;
      f2      <= f1;
    end
  end

  ipkt_t nxt;
  always_comb begin
    logic              matched;
    logic [SWID_W-1:0] sw_here;
    logic              finish;
    nxt     = p2;
    matched = 1'b0;
    sw_here = '0;
    finish  = 1'b0;
    if (act2) begin
      if (IS_INGRESS && p2.meta.normal) begin
        nxt.meta.cpst_hit = ch2;
        if (!dh2) nxt.meta.action = ch2 ? ACT_CONTROLLER : ACT_DROP;
        else      nxt.meta.max    = dk2;
      end
      if (nxt.meta.action == ACT_NONE && here2) begin
        matched = hit2 && pos_ok2 && (cad2.cf ? hct_hit : hs_ok2);
        if (matched) begin
          sw_here = cad2.cf ? hct_swid : (cad2.e ? cad2.swid : '0);
          if (sw_here != '0) begin
            nxt.meta.best_swid = sw_here;
            nxt.meta.best_len  = p2.meta.idx;
          end
          nxt.meta.f_prev = f2;
          if (cad2.c && p2.meta.idx < p2.desc.n && p2.meta.idx < nxt.meta.max)
            nxt.meta.idx = p2.meta.idx + 4'd1;
          else
            finish = 1'b1;
        end else begin
          finish = 1'b1;
        end
        if (finish)
          nxt.meta.action = (nxt.meta.best_swid != '0) ? ACT_CORE
                          : (nxt.meta.cpst_hit ? ACT_CONTROLLER : ACT_DROP);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      out_valid <= v2;
      out_pkt   <= nxt;
    end
  end

endmodule
