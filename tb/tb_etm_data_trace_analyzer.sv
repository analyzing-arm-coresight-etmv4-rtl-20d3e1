// tb_etm_data_trace_analyzer: end-to-end test of the data trace analyzer at
// its default parameters.
//
// A synthetic trace generator feeds the analyzer every clock: the trace is
// cut into sections that each start with an A-Sync and a trace info packet
// and are then filled with random packets, either one variable-payload
// packet (any P1 or P2 format, a timestamp, an unrelated packet) or a pair
// of zero-payload packets in the same clock, with idle clocks in between.
// Each clock's packets also go through the reference model in etm_ref_pkg;
// the analyzer's outputs must equal the model's pairs, timestamp and enables
// exactly two clocks later. Every mechanism of the design must occur at
// least once: trace info resets, each P1 and P2 format, the four same-clock
// pair combinations, four-element P1 format 5, P1s inferred by P2 formats 5
// and 6, same-clock LUT forwarding, key wrap-around, packets dropped before
// the first trace info, timestamp updates and clocks with two output pairs.
module tb_etm_data_trace_analyzer;
  import etm_pkg::*;
  import etm_ref_pkg::*;

  localparam int NCYC   = 20000;
  localparam int LMAX   = 32;   // the analyzer's default parameters
  localparam int RMAX   = 32;
  localparam int ABYTES = 4;

  logic            clk;
  logic            rst_n = 1'b0;
  dec_pkt_t        pkt [LANES];
  pair_t           pair [P2_SLOTS];
  logic [TS_W-1:0] timestamp;
  logic [2:0]      en;
  logic            synced;

  etm_data_trace_analyzer dut (
    .clk, .rst_n, .pkt_i(pkt), .pair_o(pair), .timestamp_o(timestamp),
    .en_o(en), .synced_o(synced)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (NCYC * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int              n;
    ref_pair_t       p[2];
    longint unsigned ts;
    bit              ts_en;
  } exp_t;

  etm_ref_model m;
  exp_t         exp_q [$];
  // mechanism counters
  int c_tinfo, c_async, c_ts, c_dual, c_p1f5x4, c_infer;
  int c_p1fmt[8], c_p2fmt[8], c_pair[4];

  task automatic count(dec_pkt_t p);
    if (!m.synced) return;
    if (p.kind == PK_P1) c_p1fmt[p.fmt]++;
    if (p.kind == PK_P2) c_p2fmt[p.fmt]++;
    if (p.kind == PK_P1 && p.fmt == 3'd5 && p.header[1:0] == 2'd3) c_p1f5x4++;
    if (p.kind == PK_P2 && (p.fmt == 3'd5 || p.fmt == 3'd6) && p.header[2:0] != 0) c_infer++;
    if (p.kind == PK_TIMESTAMP) c_ts++;
  endtask

  task automatic check_out(exp_t e);
    checks++;
    if (en !== {e.ts_en, e.n > 1, e.n > 0}) begin
      failures++;
      $display("%0t en %b, expected ts_en=%0d pairs=%0d", $time, en, e.ts_en, e.n);
    end
    for (int j = 0; j < e.n; j++) begin
      checks++;
      if (pair[j].address !== 32'(e.p[j].address) || pair[j].value !== 64'(e.p[j].value) ||
          pair[j].p1_left_key !== 8'(e.p[j].lk) || pair[j].p1_index !== 8'(e.p[j].idx)) begin
        failures++;
        $display("%0t pair %0d: got addr %h val %h lk %0d idx %0d, expected %h %h %0d %0d",
                 $time, j, pair[j].address, pair[j].value, pair[j].p1_left_key,
                 pair[j].p1_index, 32'(e.p[j].address), e.p[j].value, e.p[j].lk, e.p[j].idx);
      end
    end
    if (e.ts_en) begin
      checks++;
      if (timestamp !== e.ts) begin
        failures++;
        $display("%0t timestamp %h, expected %h", $time, timestamp, e.ts);
      end
    end
    if (e.n == 2) c_dual++;
  endtask

  initial begin
    dec_pkt_t a, b;
    ref_pair_t out[$];
    exp_t e;
    m = new(LMAX, RMAX, ABYTES);
    pkt[0] = no_pkt();
    pkt[1] = no_pkt();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (exp_q.size() == 2) check_out(exp_q.pop_front());
      a = no_pkt();
      b = no_pkt();
      if (c < 20) begin
        // before the first trace info: analyzed packets must be ignored
        a = (c % 2 == 1) ? gen_var() : gen_zero(5);
      end else if (c == 20 || ($urandom_range(0, 299) == 0)) begin
        a = mk_pkt(PK_ASYNC, 0, 0, 0, '0);
        b = mk_pkt(PK_TRACE_INFO, 0, 0, 1, '0);
        c_async++;
        c_tinfo++;
      end else begin
        case ($urandom_range(0, 9))
          0: ;  // idle
          1, 2, 3, 4: a = gen_var();
          default: begin
            a = gen_zero(5);
            b = gen_zero(5 - p1_elems(a));
            if (a.kind == PK_P1 && b.kind == PK_P1) c_pair[0]++;
            if (a.kind == PK_P1 && b.kind == PK_P2) c_pair[1]++;
            if (a.kind == PK_P2 && b.kind == PK_P1) c_pair[2]++;
            if (a.kind == PK_P2 && b.kind == PK_P2) c_pair[3]++;
          end
        endcase
      end
      pkt[0] = a;
      pkt[1] = b;
      out.delete();
      count(a);
      m.process(a, out);
      count(b);
      m.process(b, out);
      m.end_cycle();
      e.n     = out.size();
      foreach (out[i]) e.p[i] = out[i];
      e.ts    = m.ts;
      e.ts_en = m.ts_en;
      exp_q.push_back(e);
    end
    @(negedge clk);
    pkt[0] = no_pkt();
    pkt[1] = no_pkt();
    check_out(exp_q.pop_front());
    @(negedge clk);
    check_out(exp_q.pop_front());

    // every mechanism must have happened
    begin
      int mech[string];
      mech["trace_info_reset"] = c_tinfo;
      mech["async"]            = c_async;
      mech["timestamp_update"] = c_ts;
      mech["dual_pair_output"] = c_dual;
      mech["p1f5_four_elems"]  = c_p1f5x4;
      mech["p2_inferred_p1"]   = c_infer;
      mech["pair_p1_p1"]       = c_pair[0];
      mech["pair_p1_p2"]       = c_pair[1];
      mech["pair_p2_p1"]       = c_pair[2];
      mech["pair_p2_p2"]       = c_pair[3];
      mech["same_clock_fwd"]   = m.n_fwd;
      mech["right_key_wrap"]   = m.n_rk_wrap;
      mech["presync_dropped"]  = m.n_presync;
      for (int f = 1; f <= 7; f++) mech[$sformatf("p1_format_%0d", f)] = c_p1fmt[f];
      for (int f = 1; f <= 6; f++) mech[$sformatf("p2_format_%0d", f)] = c_p2fmt[f];
      foreach (mech[k]) begin
        $display("mechanism %-18s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin
          failures++;
          $display("mechanism %s never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
