// etm_pkg: types and constants shared by the ETMv4 data trace analyzer.
//
// The analyzer sits behind an ETMv4 trace decoder that hands over up to two
// decoded packets per clock (one "lane" each). A decoded packet is described
// by dec_pkt_t: its kind (A-Sync, trace info, timestamp, P1, P2, other), its
// format number, the raw header byte and the payload bytes assembled
// little-endian. The field widths follow the block diagram of the analyzer:
// 8-bit keys and indexes, 64-bit address registers, data values and
// timestamps, 32-bit output addresses, a 7-bit p1_p2_status, five P1 element
// slots and two P2 element slots per clock.
//
// How each of the seven P1 formats and six P2 formats derives its fields is
// this design's own table (p1_fmt_props / p2_fmt_props below): the bit-level
// ETMv4 encodings belong to the ARM architecture specification. The table
// keeps the behaviour that the worked examples show: P1 format 1 carries an
// explicit left-hand key and address, P1 format 2 takes its address from an
// address register, P1 format 5 infers up to four P1 elements that share the
// left-hand key, and P2 formats 5 and 6 infer up to four P1 elements before
// one or two P2 data values.
package etm_pkg;

  localparam int KEY_W      = 8;   // left/right-hand keys
  localparam int IDX_W      = 8;   // p1_index
  localparam int ADDR_W     = 64;  // address registers
  localparam int DATA_W     = 64;  // data transfer value
  localparam int TS_W       = 64;  // timestamp
  localparam int OUT_ADDR_W = 32;  // output data transfer address
  localparam int LANES      = 2;   // decoded packets per clock
  localparam int P1_SLOTS   = 5;   // P1 elements per clock
  localparam int P2_SLOTS   = 2;   // P2 elements (address/value pairs) per clock
  localparam int N_ADDR_REG = 3;   // address_regs[0:2]
  localparam int PAYLOAD_B  = 16;  // payload bytes carried per decoded packet

  typedef enum logic [2:0] {
    PK_NONE       = 3'd0,
    PK_ASYNC      = 3'd1,
    PK_TRACE_INFO = 3'd2,
    PK_TIMESTAMP  = 3'd3,
    PK_P1         = 3'd4,
    PK_P2         = 3'd5,
    PK_OTHER      = 3'd6
  } pkt_kind_e;

  typedef struct packed {
    logic                   valid;
    pkt_kind_e              kind;
    logic [2:0]             fmt;      // 1..7 for P1, 1..6 for P2
    logic [7:0]             header;   // raw header byte
    logic [4:0]             plen;     // payload length in bytes (0..16)
    logic [8*PAYLOAD_B-1:0] payload;  // payload byte k in bits [8k+7:8k]
  } dec_pkt_t;

  // ---------------------------------------------------------------- P1 ----
  typedef enum logic [1:0] {LK_SAME = 2'd0, LK_NEXT = 2'd1, LK_EXPLICIT = 2'd2} lkey_src_e;
  typedef enum logic [1:0] {AD_NONE = 2'd0, AD_PAYLOAD = 2'd1, AD_REG = 2'd2} addr_src_e;

  typedef struct packed {
    lkey_src_e lkey_src;   // where the left-hand key comes from
    addr_src_e addr_src;   // where the address comes from
    logic      key_byte;   // payload byte 0 is an explicit key
    logic      idx_reset;  // the first element starts a new index run
    logic      multi;      // element count = header[1:0] + 1
  } p1_props_t;

  function automatic p1_props_t p1_fmt_props(input logic [2:0] fmt);
    p1_props_t p;
    p = '{lkey_src: LK_SAME, addr_src: AD_NONE, key_byte: 1'b0, idx_reset: 1'b0, multi: 1'b0};
    unique case (fmt)
      3'd1: p = '{lkey_src: LK_EXPLICIT, addr_src: AD_PAYLOAD, key_byte: 1'b1, idx_reset: 1'b1, multi: 1'b0};
      3'd2: p = '{lkey_src: LK_NEXT,     addr_src: AD_REG,     key_byte: 1'b0, idx_reset: 1'b1, multi: 1'b0};
      3'd3: p = '{lkey_src: LK_NEXT,     addr_src: AD_PAYLOAD, key_byte: 1'b0, idx_reset: 1'b1, multi: 1'b0};
      3'd4: p = '{lkey_src: LK_SAME,     addr_src: AD_PAYLOAD, key_byte: 1'b0, idx_reset: 1'b1, multi: 1'b0};
      3'd5: p = '{lkey_src: LK_SAME,     addr_src: AD_NONE,    key_byte: 1'b0, idx_reset: 1'b0, multi: 1'b1};
      3'd6: p = '{lkey_src: LK_NEXT,     addr_src: AD_REG,     key_byte: 1'b0, idx_reset: 1'b1, multi: 1'b1};
      3'd7: p = '{lkey_src: LK_EXPLICIT, addr_src: AD_REG,     key_byte: 1'b1, idx_reset: 1'b1, multi: 1'b0};
      default: ;
    endcase
    return p;
  endfunction

  // What the P1 packet analyzer extracts from one decoded P1 packet.
  typedef struct packed {
    logic              valid;
    logic [2:0]        fmt;
    lkey_src_e         lkey_src;
    logic [KEY_W-1:0]  lkey;        // explicit left-hand key (LK_EXPLICIT)
    addr_src_e         addr_src;
    logic [1:0]        addr_sel;    // address register for AD_REG
    logic [3:0]        addr_nbytes; // low address bytes given (AD_PAYLOAD)
    logic [ADDR_W-1:0] addr_part;   // those bytes, zero-extended
    logic              idx_reset;
    logic [2:0]        count;       // P1 elements in the packet (1..4)
  } p1_info_t;

  // ---------------------------------------------------------------- P2 ----
  typedef struct packed {
    logic       key_byte;   // payload byte 0 is an explicit P2 left-hand key
    logic       has_data;   // data comes from the payload (else zero)
    logic       infer_p1;   // header[2:0] inferred P1 elements precede the data
    logic [1:0] n_data;     // P2 elements (1 or 2)
  } p2_props_t;

  function automatic p2_props_t p2_fmt_props(input logic [2:0] fmt);
    p2_props_t p;
    p = '{key_byte: 1'b0, has_data: 1'b1, infer_p1: 1'b0, n_data: 2'd1};
    unique case (fmt)
      3'd1: p = '{key_byte: 1'b0, has_data: 1'b1, infer_p1: 1'b0, n_data: 2'd1};
      3'd2: p = '{key_byte: 1'b1, has_data: 1'b1, infer_p1: 1'b0, n_data: 2'd1};
      3'd3: p = '{key_byte: 1'b0, has_data: 1'b0, infer_p1: 1'b0, n_data: 2'd1};
      3'd4: p = '{key_byte: 1'b0, has_data: 1'b1, infer_p1: 1'b0, n_data: 2'd1};
      3'd5: p = '{key_byte: 1'b0, has_data: 1'b1, infer_p1: 1'b1, n_data: 2'd1};
      3'd6: p = '{key_byte: 1'b0, has_data: 1'b1, infer_p1: 1'b1, n_data: 2'd2};
      default: ;
    endcase
    return p;
  endfunction

  // What the P2 packet analyzer extracts from one decoded P2 packet.
  typedef struct packed {
    logic              valid;
    logic [2:0]        fmt;
    logic              key_explicit;
    logic [KEY_W-1:0]  key;       // explicit P2 left-hand key
    logic [1:0]        n_data;    // 1 or 2 P2 elements
    logic [DATA_W-1:0] data0;
    logic [DATA_W-1:0] data1;
    logic [2:0]        n_p1;      // inferred P1 elements (0..4)
  } p2_info_t;

  // ------------------------------------------------------ p1_p2_status ----
  typedef enum logic [1:0] {
    CASE_NONE   = 2'd0,  // no P1/P2 element this clock
    CASE_SINGLE = 2'd1,  // one P1 or P2 packet (inferred P1s precede P2s)
    CASE_P1_X   = 2'd2,  // two packets, the first a P1: (P1,P1) or (P1,P2)
    CASE_P2_X   = 2'd3   // two packets, the first a P2: (P2,P1) or (P2,P2)
  } p1p2_case_e;

  typedef struct packed {
    p1p2_case_e pcase;
    logic [2:0] p1_cnt;  // valid P1 slots, 0..5
    logic [1:0] p2_cnt;  // valid P2 slots, 0..2
  } p1p2_status_t;       // 7 bits

  // Global Parameter Updater -> P1_P2 Combiner, one clock's elements.
  typedef struct packed {
    p1p2_status_t                      status;
    logic [P1_SLOTS-1:0][KEY_W-1:0]    p1_left_key;
    logic [P1_SLOTS-1:0][KEY_W-1:0]    p1_right_key;
    logic [P1_SLOTS-1:0][IDX_W-1:0]    p1_index;
    logic [P1_SLOTS-1:0]               p1_addr_we;   // slot carries a new address
    logic [P1_SLOTS-1:0][ADDR_W-1:0]   p1_addr;
    logic [P2_SLOTS-1:0][KEY_W-1:0]    p2_left_key;
    logic [P2_SLOTS-1:0][DATA_W-1:0]   data;
  } elems_t;

  // One analyzer output pair.
  typedef struct packed {
    logic [OUT_ADDR_W-1:0] address;
    logic [DATA_W-1:0]     value;
    logic [KEY_W-1:0]      p1_left_key;
    logic [IDX_W-1:0]      p1_index;
  } pair_t;

endpackage
