// etm_ref_pkg: a software reference model of the ETMv4 data trace analyzer,
// plus helpers that build decoded packets, for the testbenches.
//
// The model walks the packets one by one in stream order, keeping the global
// parameters in plain integers and the two key tables in associative arrays,
// and returns each (address, value) pair as soon as its P2 element is seen.
// It is written from the format table and update rules stated in the RTL
// headers, not from the RTL code, so a testbench can compare the two.
package etm_ref_pkg;
  import etm_pkg::*;

  typedef struct {
    longint unsigned address;
    longint unsigned value;
    int              lk;
    int              idx;
  } ref_pair_t;

  function automatic dec_pkt_t mk_pkt(pkt_kind_e kind, int fmt, int header,
                                      int plen, logic [127:0] payload);
    dec_pkt_t p;
    p.valid   = 1'b1;
    p.kind    = kind;
    p.fmt     = 3'(fmt);
    p.header  = 8'(header);
    p.plen    = 5'(plen);
    p.payload = payload;
    // bytes beyond plen are not part of the packet
    for (int b = 0; b < 16; b++) if (b >= plen) p.payload[8*b +: 8] = 8'h00;
    return p;
  endfunction

  function automatic dec_pkt_t no_pkt();
    dec_pkt_t p;
    p = '0;
    return p;
  endfunction

  // Synthetic trace generator: random packets of one clock.
  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic dec_pkt_t gen_var();
    int r = $urandom_range(0, 12);
    case (r)
      0: return mk_pkt(PK_P1, 1, 0, $urandom_range(2, 9), rnd128());
      1: return mk_pkt(PK_P1, 3, 0, $urandom_range(1, 8), rnd128());
      2: return mk_pkt(PK_P1, 4, 0, $urandom_range(1, 8), rnd128());
      3: return mk_pkt(PK_P1, 7, $urandom_range(0, 3), 1, rnd128());
      4, 5: return mk_pkt(PK_P2, 1, 0, $urandom_range(1, 8), rnd128());
      6: return mk_pkt(PK_P2, 2, 0, $urandom_range(2, 9), rnd128());
      7: return mk_pkt(PK_P2, 4, 0, $urandom_range(1, 8), rnd128());
      8: return mk_pkt(PK_P2, 5, $urandom_range(0, 4), 8, rnd128());
      9: return mk_pkt(PK_P2, 6, $urandom_range(0, 4), 16, rnd128());
      10: return mk_pkt(PK_TIMESTAMP, 0, 0, $urandom_range(1, 8), rnd128());
      11: return mk_pkt(PK_OTHER, 0, $urandom_range(0, 255), $urandom_range(0, 4), rnd128());
      default: return mk_pkt(PK_P1, 2, $urandom_range(0, 3), 0, '0);
    endcase
  endfunction

  // zero-payload packet with at most max_p1 P1 elements
  function automatic dec_pkt_t gen_zero(int max_p1);
    int r = $urandom_range(0, 4);
    int n = $urandom_range(0, 3);
    if (max_p1 < 1) return mk_pkt(PK_P2, 3, 0, 0, '0);
    if (n + 1 > max_p1) n = max_p1 - 1;
    case (r)
      0: return mk_pkt(PK_P1, 2, $urandom_range(0, 3), 0, '0);
      1: return mk_pkt(PK_P1, 5, n, 0, '0);
      2: return mk_pkt(PK_P1, 6, int'({6'($urandom_range(0, 63)), 2'(n)}), 0, '0);
      default: return mk_pkt(PK_P2, 3, 0, 0, '0);
    endcase
  endfunction

  function automatic int p1_elems(dec_pkt_t p);
    if (p.kind != PK_P1) return 0;
    if (p.fmt == 3'd5 || p.fmt == 3'd6) return int'(p.header[1:0]) + 1;
    return 1;
  endfunction

  typedef struct {
    int              lk, rk, idx;
    bit              has_addr;
    longint unsigned addr;
  } ref_p1_t;

  typedef struct {
    int              key;
    longint unsigned data;
  } ref_p2_t;

  class etm_ref_model;
    int              lmax, rmax, abytes;
    bit              synced;
    longint unsigned regs[3];
    int              p1_lk, p1_rk, p2_lk, idx;
    longint unsigned ts;
    bit              ts_en;
    longint unsigned lut0[int];
    int              lut1_idx[int];
    int              lut1_lk[int];
    int              lut1_cyc[int];  // clock in which an entry was written
    int              cyc;
    // event counters
    int n_fwd, n_rk_wrap, n_presync;
    // elements of the current clock, in stream order
    ref_p1_t e_p1[$];
    ref_p2_t e_p2[$];
    int      n_pk;        // P1/P2 packets analyzed this clock
    bit      first_p2;    // the first of them was a P2

    function new(int lmax_i, int rmax_i, int abytes_i);
      lmax = lmax_i; rmax = rmax_i; abytes = abytes_i;
      synced = 0; ts = 0; ts_en = 0; cyc = 0;
      n_fwd = 0; n_rk_wrap = 0; n_presync = 0;
      clear_globals();
    endfunction

    function void clear_globals();
      foreach (regs[i]) regs[i] = 0;
      p1_lk = 0; p1_rk = 0; p2_lk = 0; idx = 0;
      ts = 0; ts_en = 0;
    endfunction

    function longint unsigned bytes_of(dec_pkt_t p, int first, int n);
      longint unsigned v = 0;
      for (int b = 0; b < n && b < 8; b++)
        if (first + b < int'(p.plen)) v |= longint'(p.payload[8*(first+b) +: 8]) << (8*b);
      return v;
    endfunction

    function longint unsigned merged_addr(dec_pkt_t p, int first);
      int n = int'(p.plen) - first;
      longint unsigned a = regs[0];
      if (n < 0) n = 0;
      if (n > 8) n = 8;
      for (int b = 0; b < n; b++) begin
        a &= ~(64'hFF << (8*b));
        a |= longint'(p.payload[8*(first+b) +: 8]) << (8*b);
      end
      regs[2] = regs[1]; regs[1] = regs[0]; regs[0] = a;
      return a;
    endfunction

    function void p1_elem(bit has_addr, longint unsigned addr);
      e_p1.push_back('{lk: p1_lk, rk: p1_rk, idx: idx, has_addr: has_addr, addr: addr});
      lut1_idx[p1_rk] = idx;
      lut1_lk[p1_rk]  = p1_lk;
      lut1_cyc[p1_rk] = cyc;
      if (has_addr) lut0[p1_lk] = addr;
      if (p1_rk == rmax - 1) n_rk_wrap++;
      p1_rk = (p1_rk + 1) % rmax;
      idx   = (idx + 1) % 256;
    endfunction

    function void p2_elem(int key, longint unsigned data, ref ref_pair_t out[$]);
      ref_pair_t r;
      int i, lk;
      longint unsigned base;
      e_p2.push_back('{key: key, data: data});
      i  = lut1_idx.exists(key) ? lut1_idx[key] : 0;
      lk = lut1_lk.exists(key)  ? lut1_lk[key]  : 0;
      if (lut1_cyc.exists(key) && lut1_cyc[key] == cyc) n_fwd++;
      base = lut0.exists(lk) ? lut0[lk] : 0;
      r.address = (base + longint'(i) * abytes) & 64'hFFFF_FFFF;
      r.value   = data;
      r.lk      = lk;
      r.idx     = i;
      out.push_back(r);
      p2_lk = (key + 1) % rmax;
    endfunction

    function int sel_of(dec_pkt_t p);
      return (p.header[1:0] == 2'd3) ? 0 : int'(p.header[1:0]);
    endfunction

    // Process one packet; pairs completed by it are appended to out.
    function void process(dec_pkt_t p, ref ref_pair_t out[$]);
      int n;
      if (!p.valid) return;
      if (p.kind == PK_TRACE_INFO) begin
        clear_globals();
        synced = 1;
        return;
      end
      if (!synced) begin
        if (p.kind == PK_P1 || p.kind == PK_P2 || p.kind == PK_TIMESTAMP) n_presync++;
        return;
      end
      if (p.kind == PK_P1 || p.kind == PK_P2) begin
        if (n_pk == 0) first_p2 = (p.kind == PK_P2);
        n_pk++;
      end
      case (p.kind)
        PK_TIMESTAMP: begin
          for (int b = 0; b < int'(p.plen) && b < 8; b++) begin
            ts &= ~(64'hFF << (8*b));
            ts |= longint'(p.payload[8*b +: 8]) << (8*b);
          end
          ts_en = 1;
        end
        PK_P1: case (int'(p.fmt))
          1: begin p1_lk = int'(p.payload[7:0]) % lmax; idx = 0; p1_elem(1, merged_addr(p, 1)); end
          2: begin p1_lk = (p1_lk + 1) % lmax; idx = 0; p1_elem(1, regs[sel_of(p)]); end
          3: begin p1_lk = (p1_lk + 1) % lmax; idx = 0; p1_elem(1, merged_addr(p, 0)); end
          4: begin idx = 0; p1_elem(1, merged_addr(p, 0)); end
          5: begin n = int'(p.header[1:0]) + 1; repeat (n) p1_elem(0, 0); end
          6: begin
            n = int'(p.header[1:0]) + 1;
            p1_lk = (p1_lk + 1) % lmax; idx = 0;
            p1_elem(1, regs[sel_of(p)]);
            repeat (n - 1) p1_elem(0, 0);
          end
          7: begin p1_lk = int'(p.payload[7:0]) % lmax; idx = 0; p1_elem(1, regs[sel_of(p)]); end
          default: ;
        endcase
        PK_P2: case (int'(p.fmt))
          1, 4: p2_elem(p2_lk, bytes_of(p, 0, 8), out);
          2:    p2_elem(int'(p.payload[7:0]) % rmax, bytes_of(p, 1, 8), out);
          3:    p2_elem(p2_lk, 0, out);
          5, 6: begin
            n = int'(p.header[2:0]);
            if (n > 4) n = 4;
            repeat (n) p1_elem(0, 0);
            p2_elem(p2_lk, bytes_of(p, 0, 8), out);
            if (p.fmt == 3'd6) p2_elem(p2_lk, p.payload[127:64], out);
          end
          default: ;
        endcase
        default: ;
      endcase
    endfunction

    function void end_cycle();
      cyc++;
      e_p1.delete();
      e_p2.delete();
      n_pk = 0;
      first_p2 = 0;
    endfunction
  endclass

endpackage
