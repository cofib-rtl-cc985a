// cofib_pkg: constants, record types and pure functions shared by the CoFIB
// name-lookup data plane.
//
// CoFIB stores the canonical name prefixes of an NDN FIB one name component
// at a time, in 31 exact-match tables T1..T31 (table Ti holds components of
// i characters). Each table entry pairs the component key with a 24-bit
// Component Action Data word (CAD) that lets the longest-name-prefix match
// (LNPM) chain components back into prefixes.
//
// Taken from the design description: at most 8 components per prefix, at most
// 31 characters per component, 5-bit component lengths, the 40-bit shape key
// built by concatenating 5-bit lengths and zero padding, the table key width
// (8*i bits for i <= 4, a crc32 digest otherwise), the CAD fields and their
// widths (c, e, cf, 3-bit p, 8-bit swId, 10-bit hs = 24 bits) and the
// recurrence F(rho, nc_i) = m * F(rho, nc_{i-1}) + h(nc_i).
//
// Choices of this implementation: the CAD fields are packed MSB first in the
// left-to-right order of the entry drawing (c at bit 23, hs in bits 9:0);
// crc32 is the common reflected IEEE CRC-32 (polynomial 0xEDB88320, preset
// and final inversion all ones); h() in the recurrence is crc32 for every
// component, including the short ones that the tables keep as ASCII; the odd
// multiplier m is 0x01000193; position 8 is stored in the 3-bit p field as 0.
package cofib_pkg;

  localparam int MAX_COMPS    = 8;   // components per prefix
  localparam int MAX_COMP_LEN = 31;  // characters per component
  localparam int NUM_TABLES   = 31;  // f-FIB tables T1..T31
  localparam int LEN_W        = 5;   // bits of one component length
  localparam int SHAPE_W      = 40;  // shape key: 8 x 5-bit lengths
  localparam int ASCII_MAX    = 4;   // Ti with i <= 4 keep the component as ASCII
  localparam int KEY_W        = 32;  // widest table key
  localparam int SWID_W       = 8;   // one bit per edge switch
  localparam int HS_W         = 10;  // sub-prefix hash bits in the CAD
  localparam int CAD_W        = 24;
  localparam int NCOMP_W      = 4;   // holds 0..8
  localparam int PASS_W       = 4;   // holds 0..15 pipeline passes
  localparam int PORT_W       = 4;

  localparam logic [31:0] F_MULT = 32'h0100_0193;  // odd multiplier m of F()

  // Component Action Data, MSB first: c, e, cf, p, swId, hs.
  typedef struct packed {
    logic              c;     // a longer prefix continues after this component
    logic              e;     // some prefix ends with this component
    logic              cf;    // component is conflicting: consult the HCT
    logic [2:0]        p;     // position of the component (8 stored as 0)
    logic [SWID_W-1:0] swid;  // edge switches of the prefix ending here
    logic [HS_W-1:0]   hs;    // top 10 bits of F() of the preceding sub-prefix
  } cad_t;

  // What the pipeline finally does with an Interest.
  typedef enum logic [1:0] {
    ACT_NONE       = 2'd0,  // LNPM still in progress
    ACT_CORE       = 2'd1,  // send to core, multicast to the swId switches
    ACT_CONTROLLER = 2'd2,  // send to the control plane (s-FIB)
    ACT_DROP       = 2'd3
  } action_e;

  // Interest descriptor produced by the P4NF parser. Index k holds
  // component k+1.
  typedef struct packed {
    logic [NCOMP_W-1:0]                 n;          // number of components
    logic [MAX_COMPS-1:0][LEN_W-1:0]    len;        // component lengths
    logic [MAX_COMPS-1:0][KEY_W-1:0]    ascii;      // first <=4 chars, right aligned
    logic [MAX_COMPS-1:0][31:0]         crc;        // crc32 of each component
    logic [31:0]                        name_hash;  // F() over all n components
    logic [PORT_W-1:0]                  in_port;
  } ipkt_desc_t;

  // LNPM metadata carried with an Interest through ingress, egress and
  // recirculation.
  typedef struct packed {
    logic               normal;     // first pass through the pipeline
    logic [NCOMP_W-1:0] idx;        // next component to match, 1-based
    logic [NCOMP_W-1:0] max;        // LNPM limit from the DPST
    logic [31:0]        f_prev;     // F() of the components matched so far
    logic [SWID_W-1:0]  best_swid;  // swId of the longest prefix matched so far
    logic [NCOMP_W-1:0] best_len;   // its number of components
    logic               cpst_hit;   // the shape is also in the control plane
    action_e            action;     // ACT_NONE while the LNPM goes on
    logic [PASS_W-1:0]  passes;     // pipeline passes begun
  } lnpm_meta_t;

  typedef struct packed {
    ipkt_desc_t desc;
    lnpm_meta_t meta;
  } ipkt_t;

  // Control-plane table write targets.
  typedef enum logic [1:0] {
    TGT_FFIB = 2'd0,
    TGT_HCT  = 2'd1,
    TGT_DPST = 2'd2,
    TGT_CPST = 2'd3
  } cp_target_e;

  // One control-plane write. For FFIB/HCT: key, data, way, entry_valid;
  // table is the component length for FFIB. For DPST/CPST: index selects the
  // TCAM row, key/mask the ternary value, data[3:0] the component count.
  typedef struct packed {
    cp_target_e         target;
    logic [4:0]         table_len;
    logic [15:0]        index;
    logic [1:0]         way;
    logic               entry_valid;
    logic [SHAPE_W-1:0] key;
    logic [SHAPE_W-1:0] mask;
    logic [CAD_W-1:0]   data;
  } cp_write_t;

  // One step of the reflected CRC-32 over a byte.
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'd0, b};
    for (int k = 0; k < 8; k++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

  // F(rho, nc_i): first component starts the chain.
  function automatic logic [31:0] f_next(logic first, logic [31:0] f_prev,
                                         logic [31:0] h);
    return first ? h : (F_MULT * f_prev + h);
  endfunction

  // Shape key: l(nc_1) ++ ... ++ l(nc_n) ++ zeros.
  function automatic logic [SHAPE_W-1:0] shape_key(
      logic [NCOMP_W-1:0] n, logic [MAX_COMPS-1:0][LEN_W-1:0] len);
    logic [SHAPE_W-1:0] s;
    s = '0;
    for (int k = 0; k < MAX_COMPS; k++)
      if (k < int'(n)) s[SHAPE_W-1-LEN_W*k -: LEN_W] = len[k];
    return s;
  endfunction

  // Width in bits of the key of table Ti.
  function automatic int table_key_w(int i);
    return (i <= ASCII_MAX) ? 8 * i : 32;
  endfunction

  // Key of a component as stored in its table: ASCII when short, else crc32.
  function automatic logic [KEY_W-1:0] comp_key(logic [LEN_W-1:0] l,
                                                logic [KEY_W-1:0] ascii,
                                                logic [31:0] crc);
    return (int'(l) <= ASCII_MAX) ? ascii : crc;
  endfunction

endpackage
