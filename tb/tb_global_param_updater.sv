// tb_global_param_updater: checks the elements and p1_p2_status that the
// global parameter updater produces for a random synthetic trace.
//
// Packets go through the two packet analyzers into the updater; the same
// packets go through the reference model, which logs every P1 element
// (left key, right key, index, address) and P2 element (left key, data) of
// a clock. One clock later elems_o must hold exactly those, in order, with
// the status case and counts. Also checks the address register history and
// that nothing is produced before the first trace info packet.
module tb_global_param_updater;
  import etm_pkg::*;
  import etm_ref_pkg::*;

  localparam int NCYC = 6000;
  localparam int LMAX = 16;
  localparam int RMAX = 8;

  logic     clk;
  logic     rst_n;
  dec_pkt_t pkt [LANES];
  p1_info_t p1_info [LANES];
  p2_info_t p2_info [LANES];
  elems_t   elems;
  logic [N_ADDR_REG-1:0][ADDR_W-1:0] regs;
  logic     synced;

  p1_packet_analyzer u_p1 (.pkt_i(pkt), .info_o(p1_info));
  p2_packet_analyzer u_p2 (.pkt_i(pkt), .info_o(p2_info));

  global_param_updater #(.P1_LEFT_KEY_MAX(LMAX), .P1_RIGHT_KEY_MAX(RMAX)) dut (
    .clk, .rst_n, .pkt_i(pkt), .p1_i(p1_info), .p2_i(p2_info),
    .elems_o(elems), .address_regs_o(regs), .synced_o(synced)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;
  int n_cases[4];

  initial begin
    repeat (NCYC * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  etm_ref_model m;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t mismatch: %s", $time, what);
    end
  endtask

  initial begin
    dec_pkt_t  a, b;
    ref_pair_t out[$];
    ref_p1_t   e1[$];
    ref_p2_t   e2[$];
    int        npk;
    bit        fp2;
    p1p2_case_e ec;
    m = new(LMAX, RMAX, 4);
    rst_n  = 1'b0;
    pkt[0] = no_pkt();
    pkt[1] = no_pkt();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c <= NCYC; c++) begin
      a = no_pkt();
      b = no_pkt();
      if (c < 10)                                a = gen_zero(5);
      else if (c == 10 || $urandom_range(0, 199) == 0) a = mk_pkt(PK_TRACE_INFO, 0, 0, 1, '0);
      else if ($urandom_range(0, 1) == 0)        a = gen_var();
      else begin
        a = gen_zero(5);
        b = gen_zero(5 - p1_elems(a));
      end
      if (c == NCYC) begin a = no_pkt(); b = no_pkt(); end
      pkt[0] = a;
      pkt[1] = b;
      m.process(a, out);
      m.process(b, out);
      e1  = m.e_p1;
      e2  = m.e_p2;
      npk = m.n_pk;
      fp2 = m.first_p2;
      m.end_cycle();
      @(negedge clk);
      if (e1.size() == 0 && e2.size() == 0) ec = CASE_NONE;
      else if (npk == 1)                    ec = CASE_SINGLE;
      else if (fp2)                         ec = CASE_P2_X;
      else                                  ec = CASE_P1_X;
      n_cases[ec]++;
      chk(elems.status.p1_cnt == 3'(e1.size()), $sformatf("p1_cnt %0d vs %0d", elems.status.p1_cnt, e1.size()));
      chk(elems.status.p2_cnt == 2'(e2.size()), $sformatf("p2_cnt %0d vs %0d", elems.status.p2_cnt, e2.size()));
      chk(elems.status.pcase == ec, $sformatf("case %0d vs %0d", elems.status.pcase, ec));
      foreach (e1[i]) begin
        chk(elems.p1_left_key[i] == 8'(e1[i].lk) && elems.p1_right_key[i] == 8'(e1[i].rk) &&
            elems.p1_index[i] == 8'(e1[i].idx) && elems.p1_addr_we[i] == e1[i].has_addr &&
            (!e1[i].has_addr || elems.p1_addr[i] == e1[i].addr),
            $sformatf("P1 slot %0d: lk %0d rk %0d idx %0d we %0d addr %h, expected %0d %0d %0d %0d %h",
                      i, elems.p1_left_key[i], elems.p1_right_key[i], elems.p1_index[i],
                      elems.p1_addr_we[i], elems.p1_addr[i], e1[i].lk, e1[i].rk, e1[i].idx,
                      e1[i].has_addr, e1[i].addr));
      end
      foreach (e2[i])
        chk(elems.p2_left_key[i] == 8'(e2[i].key) && elems.data[i] == e2[i].data,
            $sformatf("P2 slot %0d: key %0d data %h, expected %0d %h", i,
                      elems.p2_left_key[i], elems.data[i], e2[i].key, e2[i].data));
      chk(regs[0] == m.regs[0] && regs[1] == m.regs[1] && regs[2] == m.regs[2], "address registers");
      chk(synced == m.synced, "synced");
    end
    foreach (n_cases[k]) chk(n_cases[k] > 0, $sformatf("case %0d never seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
