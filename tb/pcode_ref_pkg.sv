// pcode_ref_pkg: behavioural reference of the GPS P-code for the testbenches.
//
// It computes the state of every register at chip n of the week directly from
// n (position inside the short cycle, completed cycles, 37-chip extension), with
// the LFSRs stepped one chip at a time from their initial vectors. The feedback
// is written from the polynomial tap lists, independently of the RTL masks.
// Valid before the last X1A period of the week.
package pcode_ref_pkg;
  import pacq_pkg::pcode_init_t;

  localparam longint C1 = 64'd4092 * 64'd3750;
  localparam longint C2 = 64'd4093 * 64'd3749;

  function automatic logic [11:0] step(input logic [11:0] s, input int which);
    int taps[$];
    logic fb;
    case (which)
      0: taps = '{6, 8, 11, 12};
      1: taps = '{1, 2, 5, 8, 9, 10, 11, 12};
      2: taps = '{1, 3, 4, 5, 7, 8, 9, 10, 11, 12};
      default: taps = '{2, 3, 4, 8, 9, 12};
    endcase
    fb = 1'b0;
    foreach (taps[k]) fb ^= s[taps[k]-1];
    return {s[10:0], fb};
  endfunction

  function automatic logic [11:0] vec_at(input int which, input int pos);
    logic [11:0] s;
    case (which)
      0: s = 12'h248; 1: s = 12'h554; 2: s = 12'h925; default: s = 12'h554;
    endcase
    for (int k = 0; k < pos; k++) s = step(s, which);
    return s;
  endfunction

  // positions and counts for chip n
  function automatic void positions(input longint n, output int pos[4], output int cnt[4],
                                    output int dv, output int zc);
    longint r, m;
    zc = int'(n / C1);
    r  = n % C1;
    m  = n % (C1 + 37);
    pos[0] = int'(r % 4092);                 cnt[0] = int'(r / 4092);
    if (r >= C2) begin pos[1] = 4092; cnt[1] = 3748; end
    else begin pos[1] = int'(r % 4093); cnt[1] = int'(r / 4093); end
    if (m >= C1) begin pos[2] = 4091; cnt[2] = 3749; dv = int'(m - C1 + 1); end
    else begin pos[2] = int'(m % 4092); cnt[2] = int'(m / 4092); dv = 0; end
    if (m >= C2) begin pos[3] = 4092; cnt[3] = 3748; end
    else begin pos[3] = int'(m % 4093); cnt[3] = int'(m / 4093); end
  endfunction

  function automatic logic [11:0] vec(input longint n, input int which);
    int pos[4], cnt[4], dv, zc;
    positions(n, pos, cnt, dv, zc);
    return vec_at(which, pos[which]);
  endfunction

  function automatic logic x2_chip(input longint n);
    if (n < 0) return 1'b0;
    return vec(n, 2)[11] ^ vec(n, 3)[11];
  endfunction

  function automatic logic p_chip(input longint n, input int prn);
    return vec(n, 0)[11] ^ vec(n, 1)[11] ^ x2_chip(n - prn);
  endfunction

  // P_i chips n0 .. n0+count-1, computed chip by chip from the position formulas
  // with each register stepped incrementally (fast for long runs).
  function automatic void gen_chips(input longint n0, input int count, input int prn,
                                    output bit chips[]);
    logic [11:0] st[4];
    int prev[4];
    bit x2h[$];
    int idx;
    chips = new[count];
    for (int w = 0; w < 4; w++) prev[w] = -2;
    for (longint n = n0 - prn; n < n0 + count; n++) begin
      int pos[4], cnt[4], dv, zc;
      positions(n, pos, cnt, dv, zc);
      for (int w = 0; w < 4; w++) begin
        if (pos[w] == prev[w] + 1)  st[w] = step(st[w], w);
        else if (pos[w] != prev[w]) st[w] = vec_at(w, pos[w]);
        prev[w] = pos[w];
      end
      x2h.push_back(st[2][11] ^ st[3][11]);
      idx = int'(n - n0);
      if (idx >= 0) chips[idx] = st[0][11] ^ st[1][11] ^ x2h[0];
      if (x2h.size() > prn) void'(x2h.pop_front());
    end
  endfunction

  // tuning model: generator start state for chip n
  function automatic pcode_init_t tune(input longint n);
    pcode_init_t t;
    int pos[4], cnt[4], dv, zc;
    positions(n, pos, cnt, dv, zc);
    t.x1a_st = vec_at(0, pos[0]); t.x1b_st = vec_at(1, pos[1]);
    t.x2a_st = vec_at(2, pos[2]); t.x2b_st = vec_at(3, pos[3]);
    t.x1a_cnt = 12'(cnt[0]); t.x1b_cnt = 12'(cnt[1]);
    t.x2a_cnt = 12'(cnt[2]); t.x2b_cnt = 12'(cnt[3]);
    t.dv = 6'(dv); t.zcount = 19'(zc);
    for (int k = 0; k < 37; k++) t.x2_hist[k] = x2_chip(n - 1 - k);
    return t;
  endfunction
endpackage
