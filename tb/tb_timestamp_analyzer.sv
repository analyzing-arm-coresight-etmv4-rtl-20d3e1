// tb_timestamp_analyzer: checks the latest-timestamp tracking.
//
// Directed steps: a timestamp before the first trace info is ignored; after
// trace info a full 8-byte timestamp loads; a 2-byte timestamp replaces only
// the two low bytes; trace info clears value and enable; a timestamp in
// lane 1 after trace info in lane 0 of the same clock is kept, and a trace
// info in lane 1 after a timestamp in lane 0 clears it. Then random packets
// against a model. Every result must appear exactly one clock later.
module tb_timestamp_analyzer;
  import etm_pkg::*;
  import etm_ref_pkg::*;

  logic            clk;
  logic            rst_n;
  dec_pkt_t        pkt [LANES];
  logic [TS_W-1:0] ts;
  logic            en;

  timestamp_analyzer dut (.clk, .rst_n, .pkt_i(pkt), .ts_o(ts), .en_o(en));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one clock, then check one clock later
  task automatic step(dec_pkt_t a, dec_pkt_t b, logic [TS_W-1:0] ets, logic een);
    pkt[0] = a;
    pkt[1] = b;
    @(negedge clk);
    pkt[0] = no_pkt();
    pkt[1] = no_pkt();
    checks++;
    if (ts !== ets || en !== een) begin
      failures++;
      $display("%0t ts %h en %0d, expected %h %0d", $time, ts, en, ets, een);
    end
  endtask

  dec_pkt_t tinfo;

  initial begin
    longint unsigned mts;
    bit              men;
    dec_pkt_t        a, b, p;
    rst_n  = 1'b0;
    pkt[0] = no_pkt();
    pkt[1] = no_pkt();
    tinfo  = mk_pkt(PK_TRACE_INFO, 0, 0, 1, '0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    step(mk_pkt(PK_TIMESTAMP, 0, 0, 8, 128'h1122334455667788), no_pkt(), 64'h0, 1'b0);
    step(tinfo, no_pkt(), 64'h0, 1'b0);
    step(mk_pkt(PK_TIMESTAMP, 0, 0, 8, 128'h0102030405060708), no_pkt(), 64'h0102030405060708, 1'b1);
    step(mk_pkt(PK_TIMESTAMP, 0, 0, 2, 128'hFFFF_AABB), no_pkt(), 64'h010203040506AABB, 1'b1);
    step(no_pkt(), no_pkt(), 64'h010203040506AABB, 1'b1);
    step(tinfo, no_pkt(), 64'h0, 1'b0);
    step(tinfo, mk_pkt(PK_TIMESTAMP, 0, 0, 1, 128'h5A), 64'h5A, 1'b1);
    step(mk_pkt(PK_TIMESTAMP, 0, 0, 3, 128'h123456), tinfo, 64'h0, 1'b0);
    // random
    mts = 0; men = 0;
    for (int i = 0; i < 1000; i++) begin
      a = ($urandom_range(0, 1) == 1) ? mk_pkt(PK_TIMESTAMP, 0, 0, $urandom_range(0, 8), rnd128())
                                      : gen_var();
      b = ($urandom_range(0, 40) == 0) ? tinfo : gen_zero(5);
      foreach (pkt[l]) begin
        p = (l == 0) ? a : b;
        if (p.kind == PK_TRACE_INFO) begin mts = 0; men = 0; end
        else if (p.kind == PK_TIMESTAMP) begin
          for (int k = 0; k < int'(p.plen) && k < 8; k++) begin
            mts &= ~(64'hFF << (8*k));
            mts |= longint'(p.payload[8*k +: 8]) << (8*k);
          end
          men = 1;
        end
      end
      step(a, b, mts, men);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
