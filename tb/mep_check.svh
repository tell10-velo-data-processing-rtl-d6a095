// Reference model of one half of the board after the links, shared by the
// half and board testbenches.  Included inside a testbench module.
//
// half_check holds the hits expected per bunch crossing (the union of its
// links' hits), makes the level-0 decisions and knows from them which
// events must reach the output.  It rebuilds each Multi Event Packet from
// the output words (sop .. eop) and checks, byte by byte:
//   header: ID of the first event, MEP length = sum of (2 + event length),
//           MEP factor, zeros in the rest of the 32-byte word;
//   records: per event a 16-bit byte length, a multiple of 4, then exactly
//           the expected hits (compared as sets), link ids not decreasing
//           (the linkers keep link order);
//   the end: fewer than 32 bytes of padding, all zero.
class half_check;
  int           f, nb, half;
  int unsigned  exp [int][$];      // event -> expected hit words
  logic [32:0]  dec [$];           // {event ID, keep} in sending order
  int           kept [$];          // IDs of the events that must come out
  int           k_idx;             // next entry of kept to be checked
  int           k_need;            // entries of kept up to event nb
  byte unsigned b [$];
  int           checks, failures;
  int           n_mep, n_ev, n_empty, n_pad, n_rej, n_stale, n_nodec;

  function new(int f, int nb, int half);
    this.f = f; this.nb = nb; this.half = half;
    k_idx = 0; checks = 0; failures = 0;
    n_mep = 0; n_ev = 0; n_empty = 0; n_pad = 0; n_rej = 0; n_stale = 0; n_nodec = 0;
  endfunction

  function void add_link(link_gen g);
    foreach (g.hits[e]) foreach (g.hits[e][i]) exp[e].push_back(g.hits[e][i]);
  endfunction

  // Decisions for events 0 .. ndec-1: most with a random keep bit, some
  // missing (the event must then be kept), some preceded by a stale
  // decision for the event before.  The last ones are always present, so
  // that every event before them can be decided.
  function void make_decisions(int ndec);
    int mode, prev;
    logic keep;
    prev = 2;
    for (int e = 0; e < ndec; e++) begin
      mode = (e >= ndec - 8) ? 2 : $urandom_range(0, 24);
      if (mode == 1 && (prev == 0 || e == 0)) mode = 2;
      prev = mode;
      keep = $urandom_range(0, 3) != 0;
      if (mode == 1) begin dec.push_back({32'(e - 1), 1'b1}); if (e <= nb) n_stale++; end
      if (mode == 0) begin keep = 1; if (e <= nb) n_nodec++; end
      else dec.push_back({32'(e), keep});
      if (keep) kept.push_back(e);
      else if (e <= nb) n_rej++;
    end
    k_need = 0;
    foreach (kept[i]) if (kept[i] <= nb) k_need = i + 1;
    // whole MEPs only: round up to the MEP factor
    k_need = ((k_need + f - 1) / f) * f;
  endfunction

  function bit done();
    return k_idx >= k_need;
  endfunction

  function void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("half %0d MEP %0d: %s", half, n_mep, what);
    end
  endfunction

  function int get(int pos, int n);
    int v = 0;
    for (int j = 0; j < n; j++) v = (v << 8) | int'(b[pos + j]);
    return v;
  endfunction

  function void word(logic [255:0] d, bit sop, bit eop);
    if (sop) chk(b.size() == 0, "start of packet inside a packet");
    if (sop) b.delete();
    for (int j = 0; j < 32; j++) b.push_back(d[255 - 8 * j -: 8]);
    if (eop) begin parse(); b.delete(); end
  endfunction

  function void parse();
    int pos, len, l, id, last_link;
    int unsigned got [$], e [$];
    bit zero;
    chk(k_idx + f <= kept.size(), "more packets than decided events");
    if (k_idx + f > kept.size()) return;
    chk(get(0, 4) == kept[k_idx], $sformatf("first event ID %0d, expected %0d", get(0, 4), kept[k_idx]));
    len = get(4, 3);
    chk(get(7, 1) == f, "MEP factor");
    zero = 1;
    for (int j = 8; j < 32; j++) if (b[j] != 0) zero = 0;
    chk(zero, "header not zero after the factor");
    pos = 32;
    for (int i = 0; i < f; i++) begin
      id = kept[k_idx + i];
      if (pos + 2 > b.size()) begin chk(0, "packet too short"); return; end
      l = get(pos, 2); pos += 2;
      chk(l % 4 == 0, "event length not a multiple of 4");
      if (pos + l > b.size()) begin chk(0, "packet too short for event"); return; end
      got.delete(); e.delete();
      last_link = -1;
      for (int j = 0; j < l / 4; j++) begin
        got.push_back(32'(get(pos + 4 * j, 4)));
        if (int'(got[j][24:20]) < last_link) chk(0, "link order");
        last_link = int'(got[j][24:20]);
      end
      pos += l;
      if (exp.exists(id)) e = exp[id];
      got.sort(); e.sort();
      chk(got == e, $sformatf("event %0d: %0d hits, expected %0d", id, got.size(), e.size()));
      if (l == 0) n_empty++;
      n_ev++;
    end
    chk(len == pos - 32, $sformatf("MEP length %0d, records take %0d", len, pos - 32));
    chk(b.size() - pos < 32, "more than one word of padding");
    zero = 1;
    for (int j = pos; j < b.size(); j++) if (b[j] != 0) zero = 0;
    chk(zero, "padding not zero");
    n_pad += b.size() - pos;
    k_idx += f;
    n_mep++;
  endfunction
endclass
