// p4nf_parser: parses the P4 Name Friendly (P4NF) header at the front of an
// NDN packet and turns it into a lookup descriptor.
//
// P4NF places the name where a fixed pipeline can reach it. An Interest
// starts with one byte whose upper four bits are all ones and whose lower
// four bits give the number n of name components (valid: 1..8); then n bytes
// give the component lengths C_1..C_n (valid: 1..31); then the name itself,
// sum(C_i) ASCII bytes; then the rest of the packet in TLV form. A Data
// packet starts with a zero type byte, a byte giving the hash length in bits
// (32 by convention), then the name hash F(name) computed at the edge; then
// TLV blocks. These layouts follow the design description.
//
// Instead of copying the name into the pipeline, the parser does the
// per-component work once, byte by byte, while the name streams in: for each
// component it keeps its length, its first four characters right aligned
// (the key of tables T1..T4), its crc32 (the key of tables T5..T31 and the
// h() of the prefix hash), and the running F() over all components, which is
// the name hash the PIT records. This split is this design's choice.
//
// Interface: a byte stream (in_valid/in_ready/in_data/in_last, in_port
// sampled with the first byte) and a descriptor output held until
// out_ready. One byte is taken per cycle; the descriptor appears in the
// cycle after the last byte. out_ok is low for a malformed header (bad type
// byte, n outside 1..8, a component length of 0 or over 31, a Data hash
// length other than 32, or a packet that ends inside the header). Only a
// 32-bit Data hash is accepted; that restriction is this design's choice.
module p4nf_parser
  import cofib_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  input  logic              in_last,
  input  logic [PORT_W-1:0] in_port,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_ok,
  output logic              out_is_interest,
  output ipkt_desc_t        out_desc,
  output logic [31:0]       out_dhash
);

  typedef enum logic [2:0] {
    ST_TYPE, ST_CSIZE, ST_NAME, ST_DLEN, ST_DHASH, ST_SKIP
  } pstate_e;

  typedef struct packed {
    pstate_e            st;
    logic               bad;
    logic               complete;
    logic               is_int;
    logic [2:0]         ci;        // component being read
    logic [4:0]         bi;        // byte within the component
    logic [31:0]        crc;       // running crc32 of the component
    ipkt_desc_t         d;
    logic [31:0]        dhash;
  } pregs_t;

  pregs_t r, nx;

  logic accept;
  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  always_comb begin
    logic [31:0] c_next;
    nx     = r;
    c_next = crc32_byte(r.crc, in_data);
    if (accept) begin
      unique case (r.st)
        ST_TYPE: begin
          nx.d.in_port = in_port;
          if (in_data[7:4] == 4'hF) begin
            nx.is_int = 1'b1;
            nx.d.n    = in_data[3:0];
            nx.ci     = '0;
            if (in_data[3:0] == 4'd0 || in_data[3:0] > 4'(MAX_COMPS)) begin
              nx.bad = 1'b1;
              nx.st  = ST_SKIP;
            end else begin
              nx.st = ST_CSIZE;
            end
          end else if (in_data == 8'h00) begin
            nx.is_int = 1'b0;
            nx.st     = ST_DLEN;
          end else begin
            nx.bad = 1'b1;
            nx.st  = ST_SKIP;
          end
        end
        ST_CSIZE: begin
          nx.d.len[r.ci] = in_data[LEN_W-1:0];
          if (in_data == 8'd0 || in_data > 8'(MAX_COMP_LEN)) begin
            nx.bad = 1'b1;
            nx.st  = ST_SKIP;
          end else if (4'(r.ci) == r.d.n - 4'd1) begin
            nx.ci  = '0;
            nx.bi  = '0;
            nx.crc = '1;
            nx.st  = ST_NAME;
          end else begin
            nx.ci = r.ci + 3'd1;
          end
        end
        ST_NAME: begin
          if (r.bi < 5'(ASCII_MAX))
            nx.d.ascii[r.ci] = {r.d.ascii[r.ci][KEY_W-9:0], in_data};
          if (r.bi == r.d.len[r.ci] - 5'd1) begin
            nx.d.crc[r.ci]  = ~c_next;
            nx.d.name_hash  = f_next(r.ci == 3'd0, r.d.name_hash, ~c_next);
            nx.bi           = '0;
            nx.crc          = '1;
            if (4'(r.ci) == r.d.n - 4'd1) begin
              nx.complete = 1'b1;
              nx.st       = ST_SKIP;
            end else begin
              nx.ci = r.ci + 3'd1;
            end
          end else begin
            nx.bi  = r.bi + 5'd1;
            nx.crc = c_next;
          end
        end
        ST_DLEN: begin
          nx.bi = '0;
          if (in_data != 8'd32) begin
            nx.bad = 1'b1;
            nx.st  = ST_SKIP;
          end else begin
            nx.st = ST_DHASH;
          end
        end
        ST_DHASH: begin
          nx.dhash = {r.dhash[23:0], in_data};
          if (r.bi == 5'd3) begin
            nx.complete = 1'b1;
            nx.st       = ST_SKIP;
          end else begin
            nx.bi = r.bi + 5'd1;
          end
        end
        default: ;  // ST_SKIP: rest of the packet (TLV blocks)
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r               <= '0;
      r.st            <= ST_TYPE;
      out_valid       <= 1'b0;
      out_ok          <= 1'b0;
      out_is_interest <= 1'b0;
      out_desc        <= '0;
      out_dhash       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (accept && in_last) begin
        out_valid       <= 1'b1;
        out_ok          <= nx.complete && !nx.bad;
        out_is_interest <= nx.is_int;
        out_desc        <= nx.d;
        out_dhash       <= nx.dhash;
        r               <= '0;  // next packet starts clean
        r.st            <= ST_TYPE;
      end else begin
        r <= nx;
      end
    end
  end

endmodule
