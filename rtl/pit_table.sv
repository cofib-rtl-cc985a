// pit_table: a minimal Pending Interest Table kept in registers, so that Data
// packets can follow the Interests that the FIB forwarded.
//
// The design only asks for a simple PIT made of registers that store full
// name hashes: a Data packet whose name hash is found is forwarded to the
// recorded interfaces, otherwise it is dropped. The rest is this design's
// choice. The table is direct mapped: the XOR fold of the 32-bit name hash
// into INDEX_BITS bits picks a slot holding {valid, hash, port mask}. An
// Interest sent towards the core inserts its hash and sets the bit of its
// arrival port (a second Interest with the same hash adds its port; a
// different hash in the same slot replaces the old entry). A Data lookup
// presented in cycle t answers in cycle t+1 with hit and the port mask, and
// a hit consumes the entry. When an insert and a consuming hit meet in one
// slot in one cycle, the insert wins.
module pit_table #(
  parameter int INDEX_BITS = 8,
  parameter int PORTS      = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Interest side
  input  logic                     ins_valid,
  input  logic [31:0]              ins_hash,
  input  logic [$clog2(PORTS)-1:0] ins_port,
  // Data side
  input  logic                     lookup_valid,
  input  logic [31:0]              lookup_hash,
  output logic                     res_valid,
  output logic                     hit,
  output logic [PORTS-1:0]         out_ports
);

  localparam int SLOTS = 1 << INDEX_BITS;

  logic [SLOTS-1:0] slot_valid;
  logic [31:0]      slot_hash  [SLOTS];
  logic [PORTS-1:0] slot_ports [SLOTS];

  function automatic logic [INDEX_BITS-1:0] fold(logic [31:0] h);
    logic [INDEX_BITS-1:0] x;
    x = '0;
    for (int b = 0; b < 32; b++) x[b % INDEX_BITS] ^= h[b];
    return x;
  endfunction

  logic [INDEX_BITS-1:0] ins_idx, lk_idx;
  logic                  lk_match, ins_same;
  assign ins_idx  = fold(ins_hash);
  assign lk_idx   = fold(lookup_hash);
  assign lk_match = lookup_valid && slot_valid[lk_idx] && slot_hash[lk_idx] == lookup_hash;
  assign ins_same = slot_valid[ins_idx] && slot_hash[ins_idx] == ins_hash;

  always_ff @(posedge clk) begin
    if (ins_valid) begin
      slot_hash[ins_idx]  <= ins_hash;
      slot_ports[ins_idx] <= (ins_same ? slot_ports[ins_idx] : '0)
                             | (PORTS'(1) << ins_port);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      res_valid  <= 1'b0;
      hit        <= 1'b0;
      out_ports  <= '0;
    end else begin
      if (lk_match) slot_valid[lk_idx] <= 1'b0;
      if (ins_valid) slot_valid[ins_idx] <= 1'b1;
      res_valid <= lookup_valid;
      hit       <= lk_match;
      out_ports <= lk_match ? slot_ports[lk_idx] : '0;
    end
  end

endmodule
