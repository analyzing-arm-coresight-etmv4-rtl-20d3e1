// tb_p1_packet_analyzer: checks the fields extracted from P1 packets.
//
// Random packets of every kind go into both lanes; for P1 packets the
// expected fields are worked out here from the format table (key source,
// address source and selected register, address bytes after an optional
// key byte, index reset, element count), and anything that is not a P1
// packet must come out invalid.
module tb_p1_packet_analyzer;
  import etm_pkg::*;
  import etm_ref_pkg::*;

  dec_pkt_t pkt  [LANES];
  p1_info_t info [LANES];

  p1_packet_analyzer dut (.pkt_i(pkt), .info_o(info));

  int checks = 0, failures = 0;
  int seen [8];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic p1_info_t expect_info(dec_pkt_t p);
    p1_info_t e;
    int f = int'(p.fmt);
    int first, n;
    e = '0;
    if (!(p.valid && p.kind == PK_P1 && f != 0)) return e;
    e.valid    = 1'b1;
    e.fmt      = p.fmt;
    e.addr_sel = (p.header[1:0] == 2'd3) ? 2'd0 : p.header[1:0];
    e.count    = 3'd1;
    e.idx_reset = (f != 5);
    case (f)
      1, 7: begin e.lkey_src = LK_EXPLICIT; e.lkey = p.payload[7:0]; end
      2, 3, 6: e.lkey_src = LK_NEXT;
      default: e.lkey_src = LK_SAME;
    endcase
    case (f)
      1, 3, 4: e.addr_src = AD_PAYLOAD;
      2, 6, 7: e.addr_src = AD_REG;
      default: e.addr_src = AD_NONE;
    endcase
    if (f == 5 || f == 6) e.count = 3'(int'(p.header[1:0]) + 1);
    if (e.addr_src == AD_PAYLOAD) begin
      first = (f == 1) ? 1 : 0;
      n = int'(p.plen) - first;
      if (n < 0) n = 0;
      if (n > 8) n = 8;
      e.addr_nbytes = 4'(n);
      for (int b = 0; b < n; b++) e.addr_part[8*b +: 8] = p.payload[8*(first+b) +: 8];
    end
    return e;
  endfunction

  initial begin
    p1_info_t e;
    for (int i = 0; i < 4000; i++) begin
      for (int l = 0; l < LANES; l++) begin
        case ($urandom_range(0, 3))
          0: pkt[l] = gen_var();
          1: pkt[l] = gen_zero(5);
          2: pkt[l] = mk_pkt(PK_P1, $urandom_range(1, 7), $urandom_range(0, 255),
                             $urandom_range(0, 16), rnd128());
          default: begin
            pkt[l] = mk_pkt(pkt_kind_e'($urandom_range(0, 6)), $urandom_range(0, 7),
                            $urandom_range(0, 255), $urandom_range(0, 16), rnd128());
            pkt[l].valid = ($urandom_range(0, 3) != 0);
          end
        endcase
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        e = expect_info(pkt[l]);
        if (e.valid) seen[e.fmt]++;
        checks++;
        if (info[l] !== e) begin
          failures++;
          $display("lane %0d kind %0d fmt %0d hdr %h plen %0d: got %p expected %p", l,
                   pkt[l].kind, pkt[l].fmt, pkt[l].header, pkt[l].plen, info[l], e);
        end
      end
    end
    for (int f = 1; f <= 7; f++) begin
      checks++;
      if (seen[f] == 0) begin failures++; $display("format %0d never seen", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
