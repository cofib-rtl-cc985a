// cofib_top: the CoFIB edge-switch data plane. It resolves NDN Interest
// names against a compressed FIB held in on-chip tables and returns, for
// each Interest, the set of edge switches (swId) that can serve it, or
// sends it to the control plane or drops it. Data packets are matched
// against a small PIT.
//
// Structure (following the design's data-plane block diagram and ingress
// flow chart):
//   p4nf_parser -> ingress lnpm_stage -> egress lnpm_stage -> result
//                        ^                        |
//                        +---- recirculation -----+   (sync_fifo)
//   Data packets: p4nf_parser -> pit_table -> Data result.
// The f-FIB tables T1..T31 are split between the two stages by PLACEMENT
// (default: T1..T14 at ingress, T15..T31 at egress, the linear placement);
// any other split, such as the frequency-driven placement computed offline
// by the control plane, is a different PLACEMENT value. The HCT is held in
// both stages; DPST and CPST sit in the ingress stage.
//
// An Interest whose LNPM is not finished at the end of egress is pushed into
// the recirculation queue and re-enters ingress with its metadata (next
// component, F() so far, best swId) and its pass count increased. The
// recirculation queue has priority over new packets: the parser is held
// while the queue is not empty, which bounds the packets in flight by the
// six pipeline registers and keeps the queue from overflowing. An Interest
// sent to the core records its name hash and arrival port in the PIT.
//
// Interfaces: a P4NF byte stream in; a control-plane write port (one table
// write per cycle); an Interest result (action, swId = multicast group of
// edge switches, pipeline passes, arrival port, name hash); a Data result
// (PIT hit and port mask); a pulse for every malformed packet. Timing: an
// Interest leaves 6 * passes cycles after it enters ingress plus the time it
// waits in the queue; a Data packet answers 1 cycle after its descriptor.
// The queue priority, its depth and the result format are this design's
// choices; the Ethernet encapsulation of the result (marker, swId in the
// destination MAC) is left to the deparser outside this block.
// Lint notes: the queue's count output is left open (empty/full suffice),
// and the overflow assertion samples the asynchronous reset in its
// disable iff, which is not a circuit path.
module cofib_top
  import cofib_pkg::*;
#(
  parameter logic [NUM_TABLES-1:0] PLACEMENT       = 31'h0000_3FFF,
  parameter int                    FFIB_INDEX_BITS = 10,
  parameter int                    FFIB_WAYS       = 4,
  parameter int                    HCT_INDEX_BITS  = 10,
  parameter int                    HCT_WAYS        = 4,
  parameter int                    SHAPE_DEPTH     = 512,
  parameter int                    PIT_INDEX_BITS  = 8,
  parameter int                    RECIRC_DEPTH    = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // P4NF packet byte stream
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [7:0]         in_data,
  input  logic               in_last,
  input  logic [PORT_W-1:0]  in_port,
  // control-plane table writes
  input  logic               cp_wr_en,
  input  cp_write_t          cp_wr,
  // Interest result
  output logic               ires_valid,
  output action_e            ires_action,
  output logic [SWID_W-1:0]  ires_swid,
  output logic [PASS_W-1:0]  ires_passes,
  output logic [NCOMP_W-1:0] ires_match_len,
  output logic [PORT_W-1:0]  ires_in_port,
  output logic [31:0]        ires_name_hash,
  // Data result
  output logic               dres_valid,
  output logic               dres_hit,
  output logic [15:0]        dres_ports,
  // malformed packet seen
  output logic               parse_err
);

  // ---------------- parser ----------------
  logic       p_valid, p_ready, p_ok, p_is_int;
  ipkt_desc_t p_desc;
  logic [31:0] p_dhash;

  p4nf_parser u_parser (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last, .in_port,
    .out_valid(p_valid), .out_ready(p_ready), .out_ok(p_ok),
    .out_is_interest(p_is_int), .out_desc(p_desc), .out_dhash(p_dhash)
  );

  // ---------------- recirculation queue and ingress admission ----------------
  logic        rq_push, rq_pop, rq_empty, rq_full;
  ipkt_t       rq_din, rq_dout;

  sync_fifo #(.WIDTH($bits(ipkt_t)), .DEPTH(RECIRC_DEPTH)) u_recirc (
    .clk, .rst_n,
    .push(rq_push), .din(rq_din), .pop(rq_pop), .dout(rq_dout),
    .empty(rq_empty), .full(rq_full), .count()
  );

  logic  new_ipkt;
  ipkt_t ig_in;
  logic  ig_valid;

  assign new_ipkt = p_valid && p_ok && p_is_int && rq_empty;
  assign p_ready  = !p_ok || !p_is_int || rq_empty;
  assign rq_pop   = !rq_empty;
  assign ig_valid = rq_pop || new_ipkt;

  always_comb begin
    if (rq_pop) begin
      ig_in                  = rq_dout;
      ig_in.meta.normal      = 1'b0;
      ig_in.meta.passes      = rq_dout.meta.passes + 1'b1;
    end else begin
      ig_in                  = '0;
      ig_in.desc             = p_desc;
      ig_in.meta.normal      = 1'b1;
      ig_in.meta.idx         = 4'd1;
      ig_in.meta.max         = 4'(MAX_COMPS);
      ig_in.meta.action      = ACT_NONE;
      ig_in.meta.passes      = 4'd1;
    end
  end

  // ---------------- ingress and egress match-action blocks ----------------
  logic  ig_out_valid, eg_out_valid;
  ipkt_t ig_out, eg_out;

  lnpm_stage #(
    .IS_INGRESS(1'b1), .PLACEMENT(PLACEMENT),
    .FFIB_INDEX_BITS(FFIB_INDEX_BITS), .FFIB_WAYS(FFIB_WAYS),
    .HCT_INDEX_BITS(HCT_INDEX_BITS), .HCT_WAYS(HCT_WAYS), .SHAPE_DEPTH(SHAPE_DEPTH)
  ) u_ingress (
    .clk, .rst_n, .in_valid(ig_valid), .in_pkt(ig_in),
    .out_valid(ig_out_valid), .out_pkt(ig_out), .cp_wr_en, .cp_wr
  );

  lnpm_stage #(
    .IS_INGRESS(1'b0), .PLACEMENT(PLACEMENT),
    .FFIB_INDEX_BITS(FFIB_INDEX_BITS), .FFIB_WAYS(FFIB_WAYS),
    .HCT_INDEX_BITS(HCT_INDEX_BITS), .HCT_WAYS(HCT_WAYS), .SHAPE_DEPTH(SHAPE_DEPTH)
  ) u_egress (
    .clk, .rst_n, .in_valid(ig_out_valid), .in_pkt(ig_out),
    .out_valid(eg_out_valid), .out_pkt(eg_out), .cp_wr_en, .cp_wr
  );

  assign rq_push = eg_out_valid && eg_out.meta.action == ACT_NONE;
  assign rq_din  = eg_out;

  // ---------------- Interest result ----------------
  logic fin;
  assign fin = eg_out_valid && eg_out.meta.action != ACT_NONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ires_valid     <= 1'b0;
      ires_action    <= ACT_NONE;
      ires_swid      <= '0;
      ires_passes    <= '0;
      ires_match_len <= '0;
      ires_in_port   <= '0;
      ires_name_hash <= '0;
      parse_err      <= 1'b0;
    end else begin
      ires_valid     <= fin;
      ires_action    <= eg_out.meta.action;
      ires_swid      <= (eg_out.meta.action == ACT_CORE) ? eg_out.meta.best_swid : '0;
      ires_passes    <= eg_out.meta.passes;
      ires_match_len <= eg_out.meta.best_len;
      ires_in_port   <= eg_out.desc.in_port;
      ires_name_hash <= eg_out.desc.name_hash;
      parse_err      <= p_valid && p_ready && !p_ok;
    end
  end

  // ---------------- PIT for Data packets ----------------
  pit_table #(.INDEX_BITS(PIT_INDEX_BITS), .PORTS(16)) u_pit (
    .clk, .rst_n,
    .ins_valid(fin && eg_out.meta.action == ACT_CORE),
    .ins_hash(eg_out.desc.name_hash),
    .ins_port(eg_out.desc.in_port),
    .lookup_valid(p_valid && p_ok && !p_is_int),
    .lookup_hash(p_dhash),
    .res_valid(dres_valid), .hit(dres_hit), .out_ports(dres_ports)
  );

  a_recirc_room: assert property (@(posedge clk) disable iff (!rst_n) rq_push |-> !rq_full)
    else $error("cofib_top: recirculation queue overflow");

endmodule
