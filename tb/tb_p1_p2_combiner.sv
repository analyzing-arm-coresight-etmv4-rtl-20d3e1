// tb_p1_p2_combiner: checks the binding of P2 data to P1 addresses.
//
// First the table walk of the worked example: a P1 element (address, left
// key 2, right key 1, index 0) followed a clock later by a P2 element with
// left key 1 must give that address and value; then a P1 element without
// an address and index 3 must give base + 3 * 4. Then random clocks of
// elements with random status against a model holding LUT0 and LUT1 as
// arrays, applied in stream order (P1 elements before P2 elements unless
// the status says the P2 packet came first). Outputs are checked one clock
// after their elements, together with the timestamp and the enables.
module tb_p1_p2_combiner;
  import etm_pkg::*;

  localparam int LMAX = 8;
  localparam int RMAX = 4;

  logic            clk;
  logic            rst_n;
  elems_t          el;
  logic [TS_W-1:0] ts;
  logic            ts_en;
  pair_t           pair [P2_SLOTS];
  logic [TS_W-1:0] timestamp;
  logic [2:0]      en;

  p1_p2_combiner #(.P1_LEFT_KEY_MAX(LMAX), .P1_RIGHT_KEY_MAX(RMAX), .ACCESS_BYTES(4)) dut (
    .clk, .rst_n, .elems_i(el), .ts_i(ts), .ts_en_i(ts_en),
    .pair_o(pair), .timestamp_o(timestamp), .en_o(en)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0, n_fwd = 0, n_nofwd = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  longint unsigned lut0 [LMAX];
  int              l1_idx [RMAX];
  int              l1_lk  [RMAX];

  typedef struct {
    int n;
    longint unsigned addr[2];
    longint unsigned val[2];
    int lk[2];
    int idx[2];
  } exp_t;

  function automatic exp_t model_step(elems_t e);
    exp_t x;
    bit p2_first = (e.status.pcase == CASE_P2_X);
    x.n = int'(e.status.p2_cnt);
    for (int pass = 0; pass < 2; pass++) begin
      if ((pass == 0) != p2_first) begin
        for (int s = 0; s < int'(e.status.p1_cnt); s++) begin
          l1_idx[int'(e.p1_right_key[s])] = int'(e.p1_index[s]);
          l1_lk[int'(e.p1_right_key[s])]  = int'(e.p1_left_key[s]);
          if (e.p1_addr_we[s]) lut0[int'(e.p1_left_key[s])] = e.p1_addr[s];
        end
      end else begin
        for (int j = 0; j < x.n; j++) begin
          int k = int'(e.p2_left_key[j]);
          x.lk[j]   = l1_lk[k];
          x.idx[j]  = l1_idx[k];
          x.addr[j] = (lut0[x.lk[j]] + longint'(x.idx[j]) * 4) & 64'hFFFF_FFFF;
          x.val[j]  = e.data[j];
        end
      end
    end
    return x;
  endfunction

  task automatic check(exp_t x, logic [TS_W-1:0] ets, logic eten);
    checks++;
    if (en !== {eten, x.n > 1, x.n > 0} || timestamp !== ets) begin
      failures++;
      $display("%0t en %b ts %h, expected pairs %0d ts_en %0d ts %h", $time, en, timestamp,
               x.n, eten, ets);
    end
    for (int j = 0; j < x.n; j++) begin
      checks++;
      if (pair[j].address !== 32'(x.addr[j]) || pair[j].value !== x.val[j] ||
          pair[j].p1_left_key !== 8'(x.lk[j]) || pair[j].p1_index !== 8'(x.idx[j])) begin
        failures++;
        $display("%0t pair %0d: %h %h lk %0d idx %0d, expected %h %h %0d %0d", $time, j,
                 pair[j].address, pair[j].value, pair[j].p1_left_key, pair[j].p1_index,
                 32'(x.addr[j]), x.val[j], x.lk[j], x.idx[j]);
      end
    end
  endtask

  task automatic apply(elems_t e, logic [TS_W-1:0] t, logic te);
    exp_t x;
    // same-clock forwarding happens when a P2 key matches a P1 right key
    if (e.status.pcase != CASE_P2_X)
      for (int j = 0; j < int'(e.status.p2_cnt); j++)
        for (int s = 0; s < int'(e.status.p1_cnt); s++)
          if (e.p1_right_key[s] == e.p2_left_key[j]) n_fwd++;
    if (e.status.pcase == CASE_P2_X && e.status.p1_cnt != 0) n_nofwd++;
    el    = e;
    ts    = t;
    ts_en = te;
    x = model_step(e);
    @(negedge clk);
    check(x, t, te);
  endtask

  initial begin
    elems_t e;
    logic [TS_W-1:0] t;
    int n1, n2;
    rst_n = 1'b0;
    el    = '0;
    ts    = '0;
    ts_en = 1'b0;
    foreach (lut0[i]) lut0[i] = 0;
    foreach (l1_idx[i]) begin l1_idx[i] = 0; l1_lk[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // worked example: P1 (addr FF300000, lk 2, rk 1, idx 0), then P2 (lk 1)
    e = '0;
    e.status = '{pcase: CASE_SINGLE, p1_cnt: 3'd1, p2_cnt: 2'd0};
    e.p1_left_key[0] = 8'd2; e.p1_right_key[0] = 8'd1; e.p1_index[0] = 8'd0;
    e.p1_addr_we[0]  = 1'b1; e.p1_addr[0] = 64'hFF30_0000;
    apply(e, 64'd100, 1'b1);
    e = '0;
    e.status = '{pcase: CASE_SINGLE, p1_cnt: 3'd0, p2_cnt: 2'd1};
    e.p2_left_key[0] = 8'd1; e.data[0] = 64'hABC;
    el = e;
    @(negedge clk);
    checks++;
    if (!(en[0] && pair[0].address == 32'hFF30_0000 && pair[0].value == 64'hABC &&
          pair[0].p1_left_key == 8'd2 && pair[0].p1_index == 8'd0)) begin
      failures++;
      $display("worked example: got %h %h", pair[0].address, pair[0].value);
    end
    // P1 without address, index 3, same left key: address FF30000C
    e = '0;
    e.status = '{pcase: CASE_SINGLE, p1_cnt: 3'd1, p2_cnt: 2'd0};
    e.p1_left_key[0] = 8'd2; e.p1_right_key[0] = 8'd3; e.p1_index[0] = 8'd3;
    el = e;
    @(negedge clk);
    e = '0;
    e.status = '{pcase: CASE_SINGLE, p1_cnt: 3'd0, p2_cnt: 2'd1};
    e.p2_left_key[0] = 8'd3; e.data[0] = 64'h1234;
    el = e;
    @(negedge clk);
    checks++;
    if (!(en[0] && pair[0].address == 32'hFF30_000C && pair[0].p1_index == 8'd3)) begin
      failures++;
      $display("indexed address: got %h", pair[0].address);
    end
    // bring the model in step with the directed writes
    lut0[2] = 64'hFF30_0000;
    l1_idx[1] = 0; l1_lk[1] = 2;
    l1_idx[3] = 3; l1_lk[3] = 2;

    // random clocks
    t = 0;
    for (int c = 0; c < 4000; c++) begin
      n1 = $urandom_range(0, 5);
      n2 = $urandom_range(0, 2);
      e = '0;
      for (int s = 0; s < P1_SLOTS; s++) begin
        e.p1_left_key[s]  = 8'($urandom_range(0, LMAX - 1));
        e.p1_right_key[s] = 8'($urandom_range(0, RMAX - 1));
        e.p1_index[s]     = 8'($urandom_range(0, 255));
        e.p1_addr_we[s]   = ($urandom_range(0, 1) == 1);
        e.p1_addr[s]      = {$urandom, $urandom};
      end
      for (int j = 0; j < P2_SLOTS; j++) begin
        e.p2_left_key[j] = 8'($urandom_range(0, RMAX - 1));
        e.data[j]        = {$urandom, $urandom};
      end
      e.status.p1_cnt = 3'(n1);
      e.status.p2_cnt = 2'(n2);
      if (n1 == 0 && n2 == 0)       e.status.pcase = CASE_NONE;
      else if ($urandom_range(0, 2) == 0) e.status.pcase = CASE_P2_X;
      else                          e.status.pcase = ($urandom_range(0, 1) == 1) ? CASE_P1_X : CASE_SINGLE;
      if ($urandom_range(0, 9) == 0) t = {$urandom, $urandom};
      apply(e, t, c > 100);
    end
    checks++;
    if (n_fwd == 0 || n_nofwd == 0) begin
      failures++;
      $display("forwarding %0d / P2-first %0d never exercised", n_fwd, n_nofwd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
