// timestamp_analyzer: keeps the latest trace timestamp.
//
// A timestamp packet carries only the low-order bytes of the new value
// (payload length = number of bytes); they replace the same bytes of the
// held timestamp and the upper bytes are kept. A trace info packet clears
// the timestamp and the enable, since the timestamp is one of the global
// parameters that trace info sets to zero. Nothing is taken before the
// first trace info packet. en_o says that the stream has timestamping
// enabled, i.e. a timestamp packet has been seen since the last trace info.
// The byte-replacement rule is this design's choice of how the timestamp is
// "calculated"; the 64-bit width follows the block diagram.
//
// Lanes are handled in stream order (lane 0 first). Outputs are registered:
// a timestamp packet at the input shows one clock later.
module timestamp_analyzer
  import etm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  dec_pkt_t        pkt_i [LANES],
  output logic [TS_W-1:0] ts_o,
  output logic            en_o
);

  logic            synced_q, synced_d;
  logic [TS_W-1:0] ts_d;
  logic            en_d;

  always_comb begin
    synced_d = synced_q;
    ts_d     = ts_o;
    en_d     = en_o;
    for (int l = 0; l < LANES; l++) begin
      if (pkt_i[l].valid && pkt_i[l].kind == PK_TRACE_INFO) begin
        synced_d = 1'b1;
        ts_d     = '0;
        en_d     = 1'b0;
      end else if (pkt_i[l].valid && pkt_i[l].kind == PK_TIMESTAMP && synced_d) begin
        for (int b = 0; b < TS_W/8; b++)
          if (b < int'(pkt_i[l].plen)) ts_d[8*b +: 8] = pkt_i[l].payload[8*b +: 8];
        en_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synced_q <= 1'b0;
      ts_o     <= '0;
      en_o     <= 1'b0;
    end else begin
      synced_q <= synced_d;
      ts_o     <= ts_d;
      en_o     <= en_d;
    end
  end

endmodule
