// global_param_updater: owns the global parameters shared by all packets and
// turns the analyzed P1/P2 packets of one clock into numbered elements.
//
// Global parameters: address_regs[0:2], p1_left_key, p1_right_key,
// p2_left_key and p1_index (the timestamp is kept by timestamp_analyzer).
// Each trace info packet sets them all to zero, and nothing is analyzed
// before the first one. Lanes are processed in stream order:
//  * a P1 packet produces 1..4 P1 elements. Its first element takes a new
//    left-hand key if the format says so (explicit, or the previous key + 1)
//    and, if it starts a new index run, index 0; every element takes the
//    running right-hand key and index, which then advance by one. An address
//    from the payload replaces the low bytes of address_regs[0] and is pushed
//    onto the three-entry address register history; an address-register
//    format reads the selected register.
//  * a P2 packet first produces its inferred P1 elements (formats 5/6) like
//    a P1 format 5, then one or two P2 elements, each taking the running P2
//    left-hand key (or the explicit one), which then advances by one.
// Keys wrap at p1_left_key_max / p1_right_key_max (powers of two). The P2
// left-hand key counts modulo p1_right_key_max because a P2 element pairs
// with the P1 element whose right-hand key equals its left-hand key.
// These update rules are this design's reading of the described behaviour;
// the published architecture names the parameters and the special cases,
// not the rules.
//
// p1_p2_status (7 bits) gives the case (none, single packet, pair starting
// with P1, pair starting with P2) and the P1 and P2 element counts. Outputs
// are registered: elements show one clock after their packets.
module global_param_updater
  import etm_pkg::*;
#(
  parameter int unsigned P1_LEFT_KEY_MAX  = 32,
  parameter int unsigned P1_RIGHT_KEY_MAX = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dec_pkt_t    pkt_i [LANES],
  input  p1_info_t    p1_i  [LANES],
  input  p2_info_t    p2_i  [LANES],
  output elems_t      elems_o,
  output logic [N_ADDR_REG-1:0][ADDR_W-1:0] address_regs_o,
  output logic        synced_o
);

  localparam logic [KEY_W-1:0] LMASK = KEY_W'(P1_LEFT_KEY_MAX - 1);
  localparam logic [KEY_W-1:0] RMASK = KEY_W'(P1_RIGHT_KEY_MAX - 1);

  typedef struct packed {
    logic                             synced;
    logic [N_ADDR_REG-1:0][ADDR_W-1:0] regs;
    logic [KEY_W-1:0]                 p1_lk;
    logic [KEY_W-1:0]                 p1_rk;
    logic [KEY_W-1:0]                 p2_lk;
    logic [IDX_W-1:0]                 idx;
  } gstate_t;

  gstate_t st_q, st_d;
  elems_t  el_d;
  logic    p1_overflow, p2_overflow, infer_shared;

  always_comb begin
    int         n1, n2, npk;
    logic       first_is_p2, has_infer;
    logic [ADDR_W-1:0] a;
    st_d        = st_q;
    el_d        = '0;
    n1          = 0;
    n2          = 0;
    npk         = 0;
    first_is_p2 = 1'b0;
    has_infer   = 1'b0;
    p1_overflow = 1'b0;
    p2_overflow = 1'b0;
    a           = '0;
    for (int l = 0; l < LANES; l++) begin
      if (pkt_i[l].valid && pkt_i[l].kind == PK_TRACE_INFO) begin
        st_d        = '0;
        st_d.synced = 1'b1;
      end else if (st_d.synced && p1_i[l].valid) begin
        if (npk == 0) first_is_p2 = 1'b0;
        npk++;
        for (int k = 0; k < 4; k++) begin
          if (k < int'(p1_i[l].count)) begin
            logic we;
            we = 1'b0;
            if (k == 0) begin
              unique case (p1_i[l].lkey_src)
                LK_NEXT:     st_d.p1_lk = (st_d.p1_lk + 1'b1) & LMASK;
                LK_EXPLICIT: st_d.p1_lk = p1_i[l].lkey & LMASK;
                default: ;
              endcase
              if (p1_i[l].idx_reset) st_d.idx = '0;
              if (p1_i[l].addr_src == AD_PAYLOAD) begin
                a = st_d.regs[0];
                for (int b = 0; b < ADDR_W/8; b++)
                  if (b < int'(p1_i[l].addr_nbytes)) a[8*b +: 8] = p1_i[l].addr_part[8*b +: 8];
                st_d.regs[2] = st_d.regs[1];
                st_d.regs[1] = st_d.regs[0];
                st_d.regs[0] = a;
                we = 1'b1;
              end else if (p1_i[l].addr_src == AD_REG) begin
                a  = st_d.regs[p1_i[l].addr_sel];
                we = 1'b1;
              end
            end
            if (n1 < P1_SLOTS) begin
              el_d.p1_left_key[n1]  = st_d.p1_lk;
              el_d.p1_right_key[n1] = st_d.p1_rk;
              el_d.p1_index[n1]     = st_d.idx;
              el_d.p1_addr_we[n1]   = we;
              el_d.p1_addr[n1]      = we ? a : '0;
              n1++;
            end else begin
              p1_overflow = 1'b1;
            end
            st_d.p1_rk = (st_d.p1_rk + 1'b1) & RMASK;
            st_d.idx   = st_d.idx + 1'b1;
          end
        end
      end else if (st_d.synced && p2_i[l].valid) begin
        if (npk == 0) first_is_p2 = 1'b1;
        npk++;
        if (p2_i[l].n_p1 != 3'd0) has_infer = 1'b1;
        for (int k = 0; k < 4; k++) begin
          if (k < int'(p2_i[l].n_p1)) begin
            if (n1 < P1_SLOTS) begin
              el_d.p1_left_key[n1]  = st_d.p1_lk;
              el_d.p1_right_key[n1] = st_d.p1_rk;
              el_d.p1_index[n1]     = st_d.idx;
              n1++;
            end else begin
              p1_overflow = 1'b1;
            end
            st_d.p1_rk = (st_d.p1_rk + 1'b1) & RMASK;
            st_d.idx   = st_d.idx + 1'b1;
          end
        end
        for (int d = 0; d < 2; d++) begin
          if (d < int'(p2_i[l].n_data)) begin
            logic [KEY_W-1:0] k2;
            k2 = (d == 0 && p2_i[l].key_explicit) ? (p2_i[l].key & RMASK) : st_d.p2_lk;
            if (n2 < P2_SLOTS) begin
              el_d.p2_left_key[n2] = k2;
              el_d.data[n2]        = (d == 0) ? p2_i[l].data0 : p2_i[l].data1;
              n2++;
            end else begin
              p2_overflow = 1'b1;
            end
            st_d.p2_lk = (k2 + 1'b1) & RMASK;
          end
        end
      end
    end
    infer_shared = has_infer && (npk > 1);
    el_d.status.p1_cnt = 3'(n1);
    el_d.status.p2_cnt = 2'(n2);
    if (n1 == 0 && n2 == 0) el_d.status.pcase = CASE_NONE;
    else if (npk == 1)      el_d.status.pcase = CASE_SINGLE;
    else if (first_is_p2)   el_d.status.pcase = CASE_P2_X;
    else                    el_d.status.pcase = CASE_P1_X;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= '0;
      elems_o <= '0;
    end else begin
      st_q    <= st_d;
      elems_o <= el_d;
    end
  end

  assign address_regs_o = st_q.regs;
  assign synced_o       = st_q.synced;

  // The decoder delivers two packets in one clock only when both are
  // zero-payload packets, so a clock never holds more elements than the
  // element slots, and the P2 formats that infer P1 elements (variable
  // payload) always arrive alone.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else begin
      a_p1_slots: assert (!p1_overflow)
        else $error("more than %0d P1 elements in one clock", P1_SLOTS);
      a_p2_slots: assert (!p2_overflow)
        else $error("more than %0d P2 elements in one clock", P2_SLOTS);
      a_infer_alone: assert (!infer_shared)
        else $error("P2 format 5/6 shares a clock with another packet");
    end
  end

  initial begin
    assert (P1_LEFT_KEY_MAX  >= 1 && P1_LEFT_KEY_MAX  <= (1 << KEY_W) &&
            (P1_LEFT_KEY_MAX  & (P1_LEFT_KEY_MAX  - 1)) == 0);
    assert (P1_RIGHT_KEY_MAX >= 1 && P1_RIGHT_KEY_MAX <= (1 << KEY_W) &&
            (P1_RIGHT_KEY_MAX & (P1_RIGHT_KEY_MAX - 1)) == 0);
  end

endmodule
