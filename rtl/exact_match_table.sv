// exact_match_table: an SRAM exact-match table, the storage of every f-FIB
// table Ti and of the Hash Conflicting Table (HCT).
//
// The design places the FIB tables in SRAM by giving them exact-match keys;
// how a switch implements such a table is left to the target. Here it is a
// WAYS-way set-associative hash table: the set index is the XOR fold of the
// key into INDEX_BITS bits, each way of the set holds {key, data} and a valid
// bit. A lookup presented in cycle t returns res_valid/hit/data in cycle t+1
// (one registered SRAM read, all ways compared in parallel). The control
// plane writes one entry per cycle through the wr_* port, naming the way
// itself, so the insertion policy (and what to do when a set is full) stays
// in software. A lookup and a write to the same set in one cycle return the
// old contents. Valid bits are cleared by reset; key and data words are not.
module exact_match_table #(
  parameter int KEY_BITS   = 32,
  parameter int DATA_BITS  = 24,
  parameter int INDEX_BITS = 10,
  parameter int WAYS       = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup port
  input  logic                        lookup_valid,
  input  logic [KEY_BITS-1:0]         lookup_key,
  output logic                        res_valid,
  output logic                        hit,
  output logic [DATA_BITS-1:0]        data,
  // control-plane write port
  input  logic                        wr_en,
  input  logic [KEY_BITS-1:0]         wr_key,
  input  logic [$clog2(WAYS)-1:0]     wr_way,
  input  logic                        wr_entry_valid,
  input  logic [DATA_BITS-1:0]        wr_data
);

  localparam int SETS    = 1 << INDEX_BITS;
  localparam int ENTRY_W = KEY_BITS + DATA_BITS;

  logic [ENTRY_W-1:0]  mem   [WAYS][SETS];
  logic [SETS-1:0]     valid [WAYS];

  logic [ENTRY_W-1:0]  rd_entry [WAYS];
  logic [WAYS-1:0]     rd_valid;
  logic [KEY_BITS-1:0] key_q;

  function automatic logic [INDEX_BITS-1:0] fold(logic [KEY_BITS-1:0] k);
    logic [INDEX_BITS-1:0] x;
    x = '0;
    for (int b = 0; b < KEY_BITS; b++)
      x[b % INDEX_BITS] ^= k[b];
    return x;
  endfunction

  logic [INDEX_BITS-1:0] rd_idx, wr_idx;
  assign rd_idx = fold(lookup_key);
  assign wr_idx = fold(wr_key);

  // SRAM arrays: one read and one write port per way.
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    always_ff @(posedge clk) begin
      if (wr_en && wr_way == w[$clog2(WAYS)-1:0])
        mem[w][wr_idx] <= {wr_key, wr_data};
      rd_entry[w] <= mem[w][rd_idx];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid[w]    <= '0;
        rd_valid[w] <= 1'b0;
      end else begin
        if (wr_en && wr_way == w[$clog2(WAYS)-1:0])
          valid[w][wr_idx] <= wr_entry_valid;
        rd_valid[w] <= valid[w][rd_idx];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      key_q     <= '0;
    end else begin
      res_valid <= lookup_valid;
      key_q     <= lookup_key;
    end
  end

  // Compare the ways read last cycle against the registered key.
  always_comb begin
    hit  = 1'b0;
    data = '0;
    for (int w = 0; w < WAYS; w++)
      if (!hit && rd_valid[w] && rd_entry[w][ENTRY_W-1 -: KEY_BITS] == key_q) begin
        hit  = 1'b1;
        data = rd_entry[w][DATA_BITS-1:0];
      end
  end

endmodule
