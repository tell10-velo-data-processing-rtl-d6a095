// Stimulus and reference model shared by the link, half and board
// testbenches.  Included inside a testbench module.
//
// link_gen builds the two front-end byte streams of one GBT link and, next
// to them, the hits each bunch crossing must produce after the time
// reordering.  An nSPP packet is {BCnt 12b, super-pixel address 12b, hit
// count - 1 4b, n hit addresses 4b each, n ToTs 4b each, 4 zero bits}, 4 + n
// bytes, sent first byte first.  Per bunch crossing and link:
//   - no packet at all (an empty event),
//   - some packets on each half, 8 RAM words at most in total, or
//   - overflow: 4 or 5 long packets on one half only, more than the 8 words
//     of an event slot, so the model can tell which ones are dropped.
// Packets of one half are sent in order of BCnt plus a random jitter, which
// puts some of them out of time order.  Optionally one late packet, far
// behind the stream, is added; the reordering must drop it.  Traffic runs
// for nb + 40 crossings: the last 40 give the later stages the events that
// complete the last checked MEP.  Each half is closed with a short packet so
// that its length is a whole number of 5-byte GBT half-words.
class link_gen;
  int           link_id, nb, jit, delay;
  byte unsigned q [2][$];          // bytes per half, bit 79:40 half first
  int           key [2][$];        // send order key of each byte's packet
  int unsigned  hits [int][$];     // bunch crossing -> expected hit words
  bit           ovf [int];         // bunch crossings that lose packets
  int           n_pkt, n_ooo, n_ovf_drop, n_late_drop, n_empty, n_ovf_ev;

  typedef struct { int b; int k; int n; logic [11:0] sp; logic [63:0] ad; logic [63:0] tt; } pkt_t;

  function new(int link_id, int nb, int jit, int delay);
    this.link_id = link_id; this.nb = nb; this.jit = jit; this.delay = delay;
    n_pkt = 0; n_ooo = 0; n_ovf_drop = 0; n_late_drop = 0; n_empty = 0; n_ovf_ev = 0;
  endfunction

  static function int words_of(int n);
    return (4 + n + 7) / 8;
  endfunction

  function pkt_t mk(int b, int n);
    pkt_t p;
    p.b = b; p.n = n; p.sp = 12'($urandom);
    p.ad = {$urandom, $urandom}; p.tt = {$urandom, $urandom};
    p.k = b * 16 + $urandom_range(0, jit * 16);
    return p;
  endfunction

  function void hits_of(pkt_t p);
    for (int i = 0; i < p.n; i++)
      hits[p.b].push_back({7'b0, 5'(link_id), p.sp, p.ad[4*i +: 4], p.tt[4*i +: 4]});
  endfunction

  function void put(int h, pkt_t p);
    logic [191:0] bits;
    bits = '0;
    bits[191 -: 28] = {12'(p.b), p.sp, 4'(p.n - 1)};
    for (int i = 0; i < p.n; i++) begin
      bits[191 - 28 - 4 * i -: 4]       = p.ad[4*i +: 4];
      bits[191 - 28 - 4 * p.n - 4 * i -: 4] = p.tt[4*i +: 4];
    end
    for (int j = 0; j < 4 + p.n; j++) begin
      q[h].push_back(bits[191 - 8 * j -: 8]);
      key[h].push_back(p.k);
    end
    n_pkt++;
  endfunction

  // late_at: bunch crossing after whose packets a late one is sent (or -1)
  function void build(int late_at);
    pkt_t pk [2][$];
    pkt_t p;
    int mode, used, n, oh, maxb [2], tot;
    for (int b = 0; b < nb + 40; b++) begin
      mode = $urandom_range(0, 19);
      if (b == late_at) mode = 5;
      if (mode < 3) begin
        n_empty++;
      end else if (mode == 3) begin
        // overflow on one half, in arrival order, no jitter among them
        oh = $urandom_range(0, 1); used = 0; n_ovf_ev++;
        for (int i = 0, cnt = $urandom_range(4, 5); i < cnt; i++) begin
          p = mk(b, $urandom_range(5, 16)); p.k = b * 16;
          if (used + words_of(p.n) <= 8) begin used += words_of(p.n); hits_of(p); end
          else begin n_ovf_drop++; ovf[b] = 1; end
          pk[oh].push_back(p);
        end
      end else begin
        used = 0;
        if (b == late_at) begin
          // a packet of this crossing on half 0 ahead of the late one
          p = mk(b, 2); p.k = b * 16; hits_of(p); pk[0].push_back(p); used = 1;
        end
        for (int h = 0; h < 2; h++)
          for (int i = 0, cnt = $urandom_range(0, 2); i < cnt; i++) begin
            n = $urandom_range(1, 16);
            if (used + words_of(n) > 8) break;
            used += words_of(n);
            p = mk(b, n); hits_of(p); pk[h].push_back(p);
          end
        if (used == 0) begin
          p = mk(b, $urandom_range(1, 3)); hits_of(p); pk[0].push_back(p);
        end
        if (b == late_at) begin
          p = mk(b - delay - 5, 2); p.k = (b + jit + 1) * 16;
          pk[0].push_back(p); n_late_drop++;
        end
      end
    end
    // sort each half by key (stable), count packets behind an earlier one
    for (int h = 0; h < 2; h++) begin
      pkt_t s [$];
      // insertion sort keeps packets with equal keys in order
      s = pk[h];
      for (int i = 1; i < s.size(); i++)
        for (int j = i; j > 0 && s[j].k < s[j-1].k; j--) begin p = s[j]; s[j] = s[j-1]; s[j-1] = p; end
      pk[h] = s;
      maxb[h] = -1;
      foreach (pk[h][i]) begin
        if (pk[h][i].b < maxb[h]) n_ooo++;
        if (pk[h][i].b > maxb[h]) maxb[h] = pk[h][i].b;
        put(h, pk[h][i]);
      end
      // closing packet: length to a multiple of 5 bytes
      tot = q[h].size();
      n = (5 - ((tot + 4) % 5)) % 5;
      if (n == 0) n = 5;
      p = mk(nb + 40, n); p.k = (nb + 40 + jit + 2) * 16; hits_of(p); put(h, p);
    end
  endfunction

  // may half h send its next 5 bytes? (keeps the halves within a few
  // bunch crossings of each other)
  function bit can_send(int h);
    if (q[h].size() < 5) return 0;
    if (q[1-h].size() == 0) return 1;
    return key[h][0] <= key[1-h][0] + 4 * 16;
  endfunction

  function logic [39:0] take(int h);
    logic [39:0] w;
    for (int j = 0; j < 5; j++) begin
      w[39 - 8 * j -: 8] = q[h].pop_front();
      void'(key[h].pop_front());
    end
    return w;
  endfunction

  function bit done();
    return q[0].size() == 0 && q[1].size() == 0;
  endfunction
endclass

// Sorts a list of hit words so that two events can be compared as sets.
function automatic void sort_hits(ref int unsigned a [$]);
  a.sort();
endfunction
