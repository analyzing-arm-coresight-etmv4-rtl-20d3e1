// p2_packet_analyzer: extracts the fields of P2 packets (data transfer value
// elements) from the decoded packets of one clock.
//
// For every lane that holds a P2 packet it reports the format, the one or
// two data values, an explicit P2 left-hand key when the format carries one,
// and how many P1 elements the packet infers ahead of its data (formats 5
// and 6 infer up to four; format 5 then has one data value and format 6
// two, as the analyzer's description states). The running P2 left-hand key
// is applied by the global parameter updater.
//
// Encoding choices of this design (etm_pkg::p2_fmt_props): an explicit key
// is payload byte 0 (format 2) and the data value follows it; format 3 has
// no payload and a zero value; format 6 puts its second value in payload
// bytes 8..15, so its first value is bytes 0..7; the inferred P1 count is
// header[2:0], limited to 4.
//
// Purely combinational; one result per lane.
module p2_packet_analyzer
  import etm_pkg::*;
(
  input  dec_pkt_t pkt_i  [LANES],
  output p2_info_t info_o [LANES]
);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      p2_props_t         p;
      logic [4:0]        nb;
      logic [DATA_W-1:0] d0;
      p  = p2_fmt_props(pkt_i[l].fmt);
      info_o[l]       = '0;
      info_o[l].valid = pkt_i[l].valid && (pkt_i[l].kind == PK_P2) &&
                        (pkt_i[l].fmt != 3'd0) && (pkt_i[l].fmt != 3'd7);
      info_o[l].fmt          = pkt_i[l].fmt;
      info_o[l].key_explicit = p.key_byte;
      info_o[l].key          = p.key_byte ? pkt_i[l].payload[7:0] : '0;
      info_o[l].n_data       = p.n_data;
      info_o[l].n_p1         = !p.infer_p1 ? 3'd0 :
                               (pkt_i[l].header[2:0] > 3'd4) ? 3'd4 : pkt_i[l].header[2:0];
      // first data value: the bytes after the key byte, at most eight
      nb = pkt_i[l].plen - {4'd0, p.key_byte};
      if (pkt_i[l].plen < {4'd0, p.key_byte}) nb = '0;
      if (nb > 5'd8) nb = 5'd8;
      d0 = p.key_byte ? pkt_i[l].payload[8 +: DATA_W] : pkt_i[l].payload[0 +: DATA_W];
      for (int b = 0; b < DATA_W/8; b++)
        if (b >= int'(nb)) d0[8*b +: 8] = 8'h00;
      info_o[l].data0 = p.has_data ? d0 : '0;
      info_o[l].data1 = (p.n_data == 2'd2) ? pkt_i[l].payload[DATA_W +: DATA_W] : '0;
      if (!info_o[l].valid) info_o[l] = '0;  // only valid entries carry fields
    end
  end

endmodule
