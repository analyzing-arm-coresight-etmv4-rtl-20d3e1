// p1_p2_combiner: binds each P2 data value to its P1 data address.
//
// Two look-up tables hold what the P1 elements left behind:
//   LUT0[p1_left_key]  = latest address of a P1 packet with that left key
//   LUT1[p1_right_key] = {p1_index, p1_left_key}
// A P2 element with left-hand key k belongs to the P1 element whose
// right-hand key is k: LUT1[k] gives its index and left key, LUT0 of that
// left key gives the base address, and the data transfer address is
// base + index * ACCESS_BYTES. (The two-table scheme is the published one;
// the index scaling by 4 bytes is read from its worked example, where
// indexes 1 and 2 follow an address ...FE4 with ...FE8 and ...FEC.)
//
// Elements of one clock are applied in stream order. Unless the clock's
// p1_p2_status says that the P2 packet came first, the P1 elements of the
// same clock precede its P2 elements, so both lookups forward from the
// same-clock P1 slots (the newest matching slot wins) before falling back
// to the tables; the tables themselves are written at the clock edge.
//
// Outputs, registered one clock after elems_i: up to two (address, value)
// pairs with the P1 left key and index they came from, the latest
// timestamp, and en_o = {timestamp enabled, pair 1 valid, pair 0 valid}.
module p1_p2_combiner
  import etm_pkg::*;
#(
  parameter int unsigned P1_LEFT_KEY_MAX  = 32,
  parameter int unsigned P1_RIGHT_KEY_MAX = 32,
  parameter int unsigned ACCESS_BYTES     = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  elems_t          elems_i,
  input  logic [TS_W-1:0] ts_i,
  input  logic            ts_en_i,
  output pair_t           pair_o [P2_SLOTS],
  output logic [TS_W-1:0] timestamp_o,
  output logic [2:0]      en_o
);

  localparam int unsigned LAW = (P1_LEFT_KEY_MAX  > 1) ? $clog2(P1_LEFT_KEY_MAX)  : 1;
  localparam int unsigned RAW = (P1_RIGHT_KEY_MAX > 1) ? $clog2(P1_RIGHT_KEY_MAX) : 1;
  localparam int unsigned L1W = IDX_W + KEY_W;

  // LUT0: address by P1 left-hand key
  logic [P1_SLOTS-1:0]              l0_we;
  logic [P1_SLOTS-1:0][LAW-1:0]     l0_waddr;
  logic [P1_SLOTS-1:0][ADDR_W-1:0]  l0_wdata;
  logic [P2_SLOTS-1:0][LAW-1:0]     l0_raddr;
  logic [P2_SLOTS-1:0][ADDR_W-1:0]  l0_rdata;
  // LUT1: {p1_index, p1_left_key} by P1 right-hand key
  logic [P1_SLOTS-1:0]              l1_we;
  logic [P1_SLOTS-1:0][RAW-1:0]     l1_waddr;
  logic [P1_SLOTS-1:0][L1W-1:0]     l1_wdata;
  logic [P2_SLOTS-1:0][RAW-1:0]     l1_raddr;
  logic [P2_SLOTS-1:0][L1W-1:0]     l1_rdata;

  key_lut #(.DEPTH(P1_LEFT_KEY_MAX), .WIDTH(ADDR_W), .NW(P1_SLOTS), .NR(P2_SLOTS)) u_lut0 (
    .clk, .rst_n,
    .we_i(l0_we), .waddr_i(l0_waddr), .wdata_i(l0_wdata),
    .raddr_i(l0_raddr), .rdata_o(l0_rdata)
  );

  key_lut #(.DEPTH(P1_RIGHT_KEY_MAX), .WIDTH(L1W), .NW(P1_SLOTS), .NR(P2_SLOTS)) u_lut1 (
    .clk, .rst_n,
    .we_i(l1_we), .waddr_i(l1_waddr), .wdata_i(l1_wdata),
    .raddr_i(l1_raddr), .rdata_o(l1_rdata)
  );

  logic  fwd_ok;    // same-clock P1 slots precede the P2 slots
  pair_t pair_d [P2_SLOTS];
  logic [P2_SLOTS-1:0] pv_d;

  always_comb begin
    for (int s = 0; s < P1_SLOTS; s++) begin
      logic v;
      v           = s < int'(elems_i.status.p1_cnt);
      l1_we[s]    = v;
      l1_waddr[s] = elems_i.p1_right_key[s][RAW-1:0];
      l1_wdata[s] = {elems_i.p1_index[s], elems_i.p1_left_key[s]};
      l0_we[s]    = v && elems_i.p1_addr_we[s];
      l0_waddr[s] = elems_i.p1_left_key[s][LAW-1:0];
      l0_wdata[s] = elems_i.p1_addr[s];
    end
  end

  assign fwd_ok = (elems_i.status.pcase != CASE_P2_X);

  // LUT1 lookup by the P2 left-hand key, with same-clock forwarding
  logic [P2_SLOTS-1:0][KEY_W-1:0] lk_f;
  logic [P2_SLOTS-1:0][IDX_W-1:0] idx_f;

  always_comb begin
    for (int j = 0; j < P2_SLOTS; j++)
      l1_raddr[j] = elems_i.p2_left_key[j][RAW-1:0];
  end

  always_comb begin
    for (int j = 0; j < P2_SLOTS; j++) begin
      {idx_f[j], lk_f[j]} = l1_rdata[j];
      if (fwd_ok)
        for (int s = 0; s < P1_SLOTS; s++)
          if (s < int'(elems_i.status.p1_cnt) &&
              elems_i.p1_right_key[s] == elems_i.p2_left_key[j]) begin
            idx_f[j] = elems_i.p1_index[s];
            lk_f[j]  = elems_i.p1_left_key[s];
          end
      l0_raddr[j] = lk_f[j][LAW-1:0];
    end
  end

  // LUT0 lookup by the P1 left-hand key found above, with forwarding
  always_comb begin
    for (int j = 0; j < P2_SLOTS; j++) begin
      logic [ADDR_W-1:0] base;
      base = l0_rdata[j];
      if (fwd_ok)
        for (int s = 0; s < P1_SLOTS; s++)
          if (s < int'(elems_i.status.p1_cnt) && elems_i.p1_addr_we[s] &&
              elems_i.p1_left_key[s] == lk_f[j])
            base = elems_i.p1_addr[s];
      pair_d[j].address     = OUT_ADDR_W'(base + ADDR_W'(idx_f[j]) * ADDR_W'(ACCESS_BYTES));
      pair_d[j].value       = elems_i.data[j];
      pair_d[j].p1_left_key = lk_f[j];
      pair_d[j].p1_index    = idx_f[j];
      pv_d[j]               = j < int'(elems_i.status.p2_cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < P2_SLOTS; j++) pair_o[j] <= '0;
      timestamp_o <= '0;
      en_o        <= '0;
    end else begin
      for (int j = 0; j < P2_SLOTS; j++) pair_o[j] <= pv_d[j] ? pair_d[j] : '0;
      timestamp_o <= ts_i;
      en_o        <= {ts_en_i, pv_d};
    end
  end

endmodule
