// nr_pkg: shared widths, encodings and structs of the NETREACT sensor
// event-detection pipeline.
//
// A filtering rule is a logical expression in conjunctive normal form (CNF):
// an AND of clauses, each clause an OR of atomic predicates on sensor values.
// Each of the N_CONJ conjunction lanes holds at most one clause per sensor.
// The predicate operators (greater than, smaller than, equal, not equal,
// in-range) and the 32-bit clause bitmaps follow the NETREACT data plane; the
// field widths of sensor ID, clause ID and sensor value are this design's own
// choices, as the data plane description gives none.
package nr_pkg;

  // ---- widths -----------------------------------------------------------
  localparam int unsigned SENSOR_ID_W = 8;   // sensors 0..255 (own choice)
  localparam int unsigned VALUE_W     = 32;  // signed sensor value (own choice)
  localparam int unsigned CLAUSE_ID_W = 8;   // clause registers per lane (own choice)
  localparam int unsigned BITMAP_W    = 32;  // clause bitmap width
  localparam int unsigned BITPOS_W    = $clog2(BITMAP_W);
  localparam int unsigned PORT_W      = 9;   // switch port number width (own choice)
  localparam int unsigned DIFF_W      = VALUE_W + 1; // difference never overflows

  typedef logic [SENSOR_ID_W-1:0]  sensor_id_t;
  typedef logic signed [VALUE_W-1:0] value_t;
  typedef logic signed [DIFF_W-1:0]  diff_t;
  typedef logic [CLAUSE_ID_W-1:0]  clause_id_t;
  typedef logic [BITMAP_W-1:0]     bitmap_t;
  typedef logic [BITPOS_W-1:0]     bitpos_t;
  typedef logic [PORT_W-1:0]       port_t;

  // ---- predicate operations ------------------------------------------------
  // OP_NOP: no evaluation, the stored clause bitmap is only read.
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_GT    = 3'd1,   // value >  a
    OP_LT    = 3'd2,   // value <  a
    OP_EQ    = 3'd3,   // value == a
    OP_NE    = 3'd4,   // value != a
    OP_RANGE = 3'd5    // a <= value <= b
  } op_e;

  // ---- conjunction table entry (one clause of one sensor's rule) -------------
  typedef struct packed {
    logic       valid;
    clause_id_t clause_id;
    op_e        op;
    value_t     opnd_a;
    value_t     opnd_b;
  } conj_entry_t;

  // ---- packet header fields seen by the pipeline ---------------------------
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [15:0] ether_type;
    logic [7:0]  ip_proto;
    logic [15:0] udp_dport;
    sensor_id_t  sensor_id;
    value_t      sensor_value;
    port_t       in_port;
  } pkt_hdr_t;

  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_UDP   = 8'd17;

  // ---- control-plane write requests ----------------------------------------
  typedef struct packed {
    logic        en;
    logic [3:0]  lane;
    sensor_id_t  sensor_id;
    conj_entry_t entry;
  } conj_wr_t;

  typedef struct packed {
    logic       en;
    logic [3:0] lane;
    logic [7:0] index;      // entry slot in the associative table
    logic       valid;
    sensor_id_t sensor_id;
    clause_id_t clause_id;
    bitpos_t    bitpos;
  } bitpos_wr_t;

  typedef struct packed {
    logic        en;
    logic [7:0]  index;
    logic        valid;
    logic [47:0] mac;
    port_t       port;
  } l2_wr_t;

endpackage
