// shape_tcam: a ternary table keyed by prefix shape; one instance is the Data
// Plane Shape Table (DPST), another the Control Plane Shape Table (CPST).
//
// A prefix shape is the sequence of its component lengths, packed as a
// 40-bit key of 5-bit lengths padded with zeros. Both tables live in TCAM
// and return the number of components of the stored shape as action data.
// An Interest carries the shape of its whole name, so a stored prefix shape
// of k components is installed with a mask covering only its first 5*k bits:
// it then matches every name that begins with that shape. When several rows
// match, the lowest row index wins, so the control plane installs longer
// shapes at lower rows.
//
// Timing: a lookup presented in cycle t gives res_valid/hit/data in cycle
// t+1. Writes (row index, value, mask, data, valid) take effect at the next
// clock edge. All rows are invalid after reset.
module shape_tcam #(
  parameter int KEY_BITS  = 40,
  parameter int DATA_BITS = 4,
  parameter int DEPTH     = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      lookup_valid,
  input  logic [KEY_BITS-1:0]       lookup_key,
  output logic                      res_valid,
  output logic                      hit,
  output logic [DATA_BITS-1:0]      data,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_index,
  input  logic                      wr_entry_valid,
  input  logic [KEY_BITS-1:0]       wr_value,
  input  logic [KEY_BITS-1:0]       wr_mask,
  input  logic [DATA_BITS-1:0]      wr_data
);

  logic [KEY_BITS-1:0]  value [DEPTH];
  logic [KEY_BITS-1:0]  mask  [DEPTH];
  logic [DATA_BITS-1:0] adata [DEPTH];
  logic [DEPTH-1:0]     row_valid;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value[wr_index] <= wr_value;
      mask[wr_index]  <= wr_mask;
      adata[wr_index] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     row_valid <= '0;
    else if (wr_en) row_valid[wr_index] <= wr_entry_valid;
  end

  // Parallel match of every row, then a priority choice of the lowest row.
  logic                 m_hit;
  logic [DATA_BITS-1:0] m_data;
  always_comb begin
    m_hit  = 1'b0;
    m_data = '0;
    for (int r = DEPTH - 1; r >= 0; r--)
      if (row_valid[r] && ((lookup_key ^ value[r]) & mask[r]) == '0) begin
        m_hit  = 1'b1;
        m_data = adata[r];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      hit       <= 1'b0;
      data      <= '0;
    end else begin
      res_valid <= lookup_valid;
      hit       <= lookup_valid & m_hit;
      data      <= m_data;
    end
  end

endmodule
