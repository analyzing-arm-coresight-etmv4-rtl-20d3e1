// etm_data_trace_analyzer: real-time analyzer of an ETMv4 data trace stream.
//
// Sits behind an ETMv4 trace decoder that delivers up to two decoded packets
// per clock (pkt_i, lane 0 first in stream order) and recovers, for every
// memory access the traced processor made, the pair (data transfer address,
// data transfer value) with the latest timestamp. The structure follows the
// analyzer's block diagram:
//
//   pkt_i -+-> p1_packet_analyzer -+
//          +-> p2_packet_analyzer -+-> global_param_updater --elems--+
//          +-------------------------------^                         |
//          +-> timestamp_analyzer ---- timestamp, en ------> p1_p2_combiner -> outputs
//                                                       (LUT0, LUT1)
//
// Packets are accepted every clock without back-pressure. Results appear two
// clocks after the packets that complete them: one register stage in the
// global parameter updater / timestamp analyzer and one in the combiner.
// Outputs: pair_o[0..1] (address, value, P1 left key, P1 index), timestamp_o
// and en_o = {timestamp enabled, pair 1 valid, pair 0 valid}.
//
// Parameters: P1_LEFT_KEY_MAX and P1_RIGHT_KEY_MAX size LUT0 and LUT1 and
// set the key wrap (implementation-specific in ETMv4; 32 is this design's
// default), ACCESS_BYTES the address step between P1 indexes.
module etm_data_trace_analyzer
  import etm_pkg::*;
#(
  parameter int unsigned P1_LEFT_KEY_MAX  = 32,
  parameter int unsigned P1_RIGHT_KEY_MAX = 32,
  parameter int unsigned ACCESS_BYTES     = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dec_pkt_t        pkt_i [LANES],
  output pair_t           pair_o [P2_SLOTS],
  output logic [TS_W-1:0] timestamp_o,
  output logic [2:0]      en_o,
  output logic            synced_o
);

  p1_info_t        p1_info [LANES];
  p2_info_t        p2_info [LANES];
  elems_t          elems;
  logic [TS_W-1:0] ts;
  logic            ts_en;

  p1_packet_analyzer u_p1 (.pkt_i(pkt_i), .info_o(p1_info));
  p2_packet_analyzer u_p2 (.pkt_i(pkt_i), .info_o(p2_info));

  global_param_updater #(
    .P1_LEFT_KEY_MAX (P1_LEFT_KEY_MAX),
    .P1_RIGHT_KEY_MAX(P1_RIGHT_KEY_MAX)
  ) u_gpu (
    .clk, .rst_n,
    .pkt_i          (pkt_i),
    .p1_i           (p1_info),
    .p2_i           (p2_info),
    .elems_o        (elems),
    .address_regs_o (),
    .synced_o       (synced_o)
  );

  timestamp_analyzer u_ts (
    .clk, .rst_n,
    .pkt_i (pkt_i),
    .ts_o  (ts),
    .en_o  (ts_en)
  );

  p1_p2_combiner #(
    .P1_LEFT_KEY_MAX (P1_LEFT_KEY_MAX),
    .P1_RIGHT_KEY_MAX(P1_RIGHT_KEY_MAX),
    .ACCESS_BYTES    (ACCESS_BYTES)
  ) u_comb (
    .clk, .rst_n,
    .elems_i     (elems),
    .ts_i        (ts),
    .ts_en_i     (ts_en),
    .pair_o      (pair_o),
    .timestamp_o (timestamp_o),
    .en_o        (en_o)
  );

endmodule
