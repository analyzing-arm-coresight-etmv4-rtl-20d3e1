// p1_packet_analyzer: extracts the fields of P1 packets (data transfer
// address elements) from the decoded packets of one clock.
//
// For every lane that holds a P1 packet it reports what the packet itself
// says: its format, where its left-hand key and address come from, the
// explicit key and the low address bytes it carries, which address register
// it refers to, whether it starts a new index run and how many P1 elements it
// stands for. Fields that the packet leaves implicit (running keys, index,
// full address) are filled in by the global parameter updater, which owns
// the global parameters.
//
// Per format (see etm_pkg::p1_fmt_props): an explicit key is payload byte 0;
// address bytes follow it (or start at byte 0 when there is no key byte);
// header[1:0] selects the address register (3 reads as 0) and, for the
// multi-element formats 5 and 6, gives the element count minus one. This
// format table is this design's own choice; the element fields reported
// (address, keys, index, format) follow the analyzer's block diagram.
//
// Purely combinational; one result per lane.
module p1_packet_analyzer
  import etm_pkg::*;
(
  input  dec_pkt_t pkt_i  [LANES],
  output p1_info_t info_o [LANES]
);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      p1_props_t         p;
      logic [4:0]        nb;
      logic [ADDR_W-1:0] part;
      p  = p1_fmt_props(pkt_i[l].fmt);
      info_o[l]       = '0;
      info_o[l].valid = pkt_i[l].valid && (pkt_i[l].kind == PK_P1) &&
                        (pkt_i[l].fmt != 3'd0);
      info_o[l].fmt       = pkt_i[l].fmt;
      info_o[l].lkey_src  = p.lkey_src;
      info_o[l].lkey      = p.key_byte ? pkt_i[l].payload[7:0] : '0;
      info_o[l].addr_src  = p.addr_src;
      info_o[l].addr_sel  = (pkt_i[l].header[1:0] == 2'd3) ? 2'd0 : pkt_i[l].header[1:0];
      info_o[l].idx_reset = p.idx_reset;
      info_o[l].count     = p.multi ? {1'b0, pkt_i[l].header[1:0]} + 3'd1 : 3'd1;
      // address bytes present in the payload
      nb = pkt_i[l].plen - {4'd0, p.key_byte};
      if (pkt_i[l].plen < {4'd0, p.key_byte}) nb = '0;
      if (nb > 5'd8) nb = 5'd8;
      part = p.key_byte ? pkt_i[l].payload[8 +: ADDR_W] : pkt_i[l].payload[0 +: ADDR_W];
      for (int b = 0; b < ADDR_W/8; b++)
        if (b >= int'(nb)) part[8*b +: 8] = 8'h00;
      info_o[l].addr_nbytes = (p.addr_src == AD_PAYLOAD) ? nb[3:0] : 4'd0;
      info_o[l].addr_part   = (p.addr_src == AD_PAYLOAD) ? part : '0;
      if (!info_o[l].valid) info_o[l] = '0;  // only valid entries carry fields
    end
  end

endmodule
