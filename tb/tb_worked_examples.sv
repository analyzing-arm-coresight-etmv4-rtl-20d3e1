// tb_worked_examples: replays the two worked traces that motivate the
// design, with p1_right_key_max = 2 so that right-hand keys wrap 0, 1, 0.
//
// (a) one memory access in one P1 and one P2 packet: a P1 format 2 packet
//     with address 0xFF300000 from the address register, left key 2, right
//     key 1, index 0, then a P2 format 4 packet with data 0xABC and left
//     key 1 give address 0xFF300000, data 0xABC, left key 2, index 0.
// (b) one access spread over several packets: P1 format 1 (address
//     0xFF300FE4, left key 0x10, right key 0, index 0), P2 format 4 (data
//     0x234, key 0), P1 format 5 with two elements (right keys 1, 0, indexes
//     1, 2), P2 format 1 (data 0, key 1) and P2 format 1 (data 0x1ABC,
//     key 0) give 0xFF300FE4/0x234, 0xFF300FE8/0 and 0xFF300FEC/0x1ABC.
// The expected numbers are the printed ones. The element fields are also
// checked inside the global parameter updater, and each pair must appear
// exactly two clocks after its P2 packet and not earlier.
module tb_worked_examples;
  import etm_pkg::*;
  import etm_ref_pkg::*;

  logic            clk;
  logic            rst_n;
  dec_pkt_t        pkt [LANES];
  pair_t           pair [P2_SLOTS];
  logic [TS_W-1:0] timestamp;
  logic [2:0]      en;
  logic            synced;

  etm_data_trace_analyzer #(.P1_RIGHT_KEY_MAX(2)) dut (
    .clk, .rst_n, .pkt_i(pkt), .pair_o(pair), .timestamp_o(timestamp),
    .en_o(en), .synced_o(synced)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t mismatch: %s", $time, what);
    end
  endtask

  // one packet for one clock; then check the P1 elements one clock later
  task automatic send(dec_pkt_t p);
    pkt[0] = p;
    pkt[1] = no_pkt();
    @(negedge clk);
    pkt[0] = no_pkt();
  endtask

  task automatic p1_elem(int s, int lk, int rk, int idx);
    chk(dut.u_gpu.elems_o.p1_left_key[s] == 8'(lk) && dut.u_gpu.elems_o.p1_right_key[s] == 8'(rk) &&
        dut.u_gpu.elems_o.p1_index[s] == 8'(idx),
        $sformatf("P1 element %0d: lk %h rk %h idx %h, expected %h %h %h", s,
                  dut.u_gpu.elems_o.p1_left_key[s], dut.u_gpu.elems_o.p1_right_key[s],
                  dut.u_gpu.elems_o.p1_index[s], lk, rk, idx));
  endtask

  // P2 packet: nothing at the output one clock later, the pair after two
  task automatic p2_pair(dec_pkt_t p, int p2key, logic [31:0] addr, logic [63:0] data,
                         int lk, int idx);
    send(p);
    chk(dut.u_gpu.elems_o.p2_left_key[0] == 8'(p2key), "P2 left key");
    chk(en[0] == 1'b0, "pair earlier than two clocks");
    @(negedge clk);
    chk(en[0] == 1'b1 && pair[0].address == addr && pair[0].value == data &&
        pair[0].p1_left_key == 8'(lk) && pair[0].p1_index == 8'(idx),
        $sformatf("pair %h/%h lk %h idx %h, expected %h/%h", pair[0].address, pair[0].value,
                  pair[0].p1_left_key, pair[0].p1_index, addr, data));
  endtask

  initial begin
    dec_pkt_t tinfo;
    rst_n  = 1'b0;
    pkt[0] = no_pkt();
    pkt[1] = no_pkt();
    tinfo  = mk_pkt(PK_TRACE_INFO, 0, 0, 1, '0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // (b)
    send(mk_pkt(PK_ASYNC, 0, 0, 0, '0));
    send(tinfo);
    send(mk_pkt(PK_P1, 1, 0, 5, 128'hFF_30_0F_E4_10));
    p1_elem(0, 'h10, 0, 0);
    chk(dut.u_gpu.elems_o.p1_addr[0] == 64'hFF300FE4, "P1 format 1 address");
    p2_pair(mk_pkt(PK_P2, 4, 0, 2, 128'h234), 0, 32'hFF300FE4, 64'h234, 'h10, 0);
    send(mk_pkt(PK_P1, 5, 1, 0, '0));
    p1_elem(0, 'h10, 1, 1);
    p1_elem(1, 'h10, 0, 2);
    p2_pair(mk_pkt(PK_P2, 1, 0, 1, 128'h0), 1, 32'hFF300FE8, 64'h0, 'h10, 1);
    p2_pair(mk_pkt(PK_P2, 1, 0, 2, 128'h1ABC), 0, 32'hFF300FEC, 64'h1ABC, 'h10, 2);

    // (a): a fresh trace; an earlier access leaves 0xFF300000 in address_regs[0]
    send(tinfo);
    send(mk_pkt(PK_P1, 3, 0, 4, 128'hFF_30_00_00));
    p2_pair(mk_pkt(PK_P2, 1, 0, 1, 128'h55), 0, 32'hFF300000, 64'h55, 1, 0);
    send(mk_pkt(PK_P1, 2, 0, 0, '0));
    p1_elem(0, 2, 1, 0);
    chk(dut.u_gpu.elems_o.p1_addr[0] == 64'hFF300000, "P1 format 2 address");
    p2_pair(mk_pkt(PK_P2, 4, 0, 2, 128'hABC), 1, 32'hFF300000, 64'hABC, 2, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
