// tb_p2_packet_analyzer: checks the fields extracted from P2 packets.
//
// Random packets of every kind go into both lanes; for P2 packets the
// expected fields are worked out here from the format table (explicit key
// byte, data bytes, zero data, number of data values, inferred P1 count
// limited to four), and anything that is not a P2 packet of formats 1..6
// must come out invalid.
module tb_p2_packet_analyzer;
  import etm_pkg::*;
  import etm_ref_pkg::*;

  dec_pkt_t pkt  [LANES];
  p2_info_t info [LANES];

  p2_packet_analyzer dut (.pkt_i(pkt), .info_o(info));

  int checks = 0, failures = 0;
  int seen [8];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic p2_info_t expect_info(dec_pkt_t p);
    p2_info_t e;
    int f = int'(p.fmt);
    int first, n;
    e = '0;
    if (!(p.valid && p.kind == PK_P2 && f >= 1 && f <= 6)) return e;
    e.valid  = 1'b1;
    e.fmt    = p.fmt;
    e.n_data = (f == 6) ? 2'd2 : 2'd1;
    if (f == 2) begin
      e.key_explicit = 1'b1;
      e.key          = p.payload[7:0];
    end
    if (f == 5 || f == 6) e.n_p1 = (p.header[2:0] > 3'd4) ? 3'd4 : p.header[2:0];
    if (f != 3) begin
      first = (f == 2) ? 1 : 0;
      n = int'(p.plen) - first;
      if (n < 0) n = 0;
      if (n > 8) n = 8;
      for (int b = 0; b < n; b++) e.data0[8*b +: 8] = p.payload[8*(first+b) +: 8];
    end
    if (f == 6) e.data1 = p.payload[127:64];
    return e;
  endfunction

  initial begin
    p2_info_t e;
    for (int i = 0; i < 4000; i++) begin
      for (int l = 0; l < LANES; l++) begin
        case ($urandom_range(0, 3))
          0: pkt[l] = gen_var();
          1: pkt[l] = gen_zero(5);
          2: pkt[l] = mk_pkt(PK_P2, $urandom_range(1, 7), $urandom_range(0, 255),
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
    for (int f = 1; f <= 6; f++) begin
      checks++;
      if (seen[f] == 0) begin failures++; $display("format %0d never seen", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
