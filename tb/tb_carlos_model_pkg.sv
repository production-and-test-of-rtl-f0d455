// Reference model of the compressor for the testbenches.
//
// Written from the algorithm, independently of the RTL: it evaluates the
// two-threshold cross test on a whole event matrix held in memory, lists
// the records the compressor must send, and decodes a received bit stream
// back into records, doing the reverse of the compressor. Pixels outside
// the matrix count as zero. Record format: '1' anode sample code for an
// isolated cluster, '0' code for a continuation; value code '0'+4 bits
// (v<16), '10'+6 bits (v<64), '11'+8 bits.
package tb_carlos_model_pkg;

  typedef struct {
    int  a;
    int  s;
    int  v;
    bit  cont;
  } rec_t;

  function automatic int pix(const ref byte unsigned m[], input int na, input int len,
                             input int a, input int s);
    if (a < 0 || a >= na || s < 0 || s >= len) return 0;
    return int'(m[a * len + s]);
  endfunction

  // exact statement: some pixel above th_hi and some other pixel above th_lo
  function automatic bit is_hit(const ref byte unsigned m[], input int na, input int len,
                                input int a, input int s, input int thi, input int tlo);
    int p[5];
    p[0] = pix(m, na, len, a, s);
    p[1] = pix(m, na, len, a - 1, s);
    p[2] = pix(m, na, len, a + 1, s);
    p[3] = pix(m, na, len, a, s - 1);
    p[4] = pix(m, na, len, a, s + 1);
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        if (i != j && p[i] > thi && p[j] > tlo) return 1'b1;
    return 1'b0;
  endfunction

  function automatic void expected(const ref byte unsigned m[], input int na, input int len,
                                   input int thi, input int tlo, ref rec_t q[$]);
    rec_t r;
    bit   prev;
    q.delete();
    for (int a = 0; a < na; a++) begin
      prev = 1'b0;
      for (int s = 0; s < len; s++) begin
        bit h = is_hit(m, na, len, a, s, thi, tlo);
        if (h) begin
          r.a = a; r.s = s; r.v = int'(m[a * len + s]); r.cont = prev;
          q.push_back(r);
        end
        prev = h;
      end
    end
  endfunction

  function automatic int take(const ref bit b[$], ref int idx, input int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | int'(b[idx]);
      idx++;
    end
    return v;
  endfunction

  // Decode one event's bit stream. Returns the number of format errors.
  function automatic int decode(const ref bit b[$], input int nw, input int sw, ref rec_t q[$]);
    int   idx = 0;
    int   n   = b.size();
    int   errs = 0;
    rec_t r;
    int   pa = -1, ps = -1;
    q.delete();
    while (idx < n) begin
      int rem = n - idx;
      if (b[idx] == 1'b1 && rem < 1 + nw + sw + 5) begin
        // tail fill: all ones, one to sixteen bits
        if (rem > 16) errs++;
        for (int i = idx; i < n; i++) if (b[i] != 1'b1) errs++;
        break;
      end
      if (b[idx] == 1'b0 && rem < 6) begin
        errs++;
        break;
      end
      if (take(b, idx, 1) == 1) begin
        r.a = take(b, idx, nw);
        r.s = take(b, idx, sw);
        r.cont = 1'b0;
      end else begin
        r.a = pa;
        r.s = ps + 1;
        r.cont = 1'b1;
      end
      if (take(b, idx, 1) == 0)       r.v = take(b, idx, 4);
      else if (take(b, idx, 1) == 0)  r.v = take(b, idx, 6);
      else                            r.v = take(b, idx, 8);
      if (idx > n) begin
        errs++;
        break;
      end
      pa = r.a;
      ps = r.s;
      q.push_back(r);
    end
    return errs;
  endfunction

  function automatic void put(ref byte unsigned m[], input int na, input int len,
                             input int a, input int s, input int v);
    if (a < 0 || a >= na || s < 0 || s >= len) return;
    if (v > 255) v = 255;
    if (int'(m[a * len + s]) < v) m[a * len + s] = 8'(v);
  endfunction

  // Synthetic events. kind 0: low noise with clusters, lone spikes and
  // clusters in two corners; kind 1: uniform random values; kind 2: wider
  // bell-shaped noise (sum of four uniforms) with clusters.
  function automatic void gen_event(ref byte unsigned m[], input int na, input int len,
                                    input int kind, input int nclusters);
    m = new[na * len];
    foreach (m[i]) begin
      case (kind)
        1: m[i] = 8'($urandom_range(0, 255));
        2: m[i] = 8'($urandom_range(0, 8) + $urandom_range(0, 8) + $urandom_range(0, 8) +
                     $urandom_range(0, 8));
        default: m[i] = 8'($urandom_range(0, 12));
      endcase
    end
    if (kind == 1) return;
    for (int c = 0; c < nclusters + 2; c++) begin
      int a0, s0, pk;
      a0 = (c == 0) ? 0 : ((c == 1) ? na - 1 : $urandom_range(0, na - 1));
      s0 = (c == 0) ? 0 : ((c == 1) ? len - 1 : $urandom_range(0, len - 1));
      pk = $urandom_range(60, 255);
      for (int da = -1; da <= 1; da++)
        for (int ds = -3; ds <= 3; ds++) begin
          int d = (da < 0 ? -da : da) + (ds < 0 ? -ds : ds);
          put(m, na, len, a0 + da, s0 + ds, pk >> d);
        end
    end
    // lone spikes well away from the corners
    for (int c = 0; c < nclusters / 2 + 1; c++) begin
      int a0 = $urandom_range(1, na - 2), s0 = $urandom_range(1, len - 2);
      m[a0 * len + s0] = 8'($urandom_range(150, 255));
    end
  endfunction

endpackage
