// End-to-end bench for ced_top: a tester model, a core model and a checker.
//
// Tester model (encoder). For every diagnosis pattern it draws a few care
// bits in the fault-free response, the input care bits that determine them,
// and some extra input care bits. It then encodes the whole run the way the
// test data would be prepared off line:
//   * every scan slot (shift or capture) is preceded by as few stall cycles
//     as possible;
//   * the mask (uncoded) or mask code (coded) needed in a slot must be
//     present in the mask (code) register in that cycle, given the bits
//     shifted in one per clock;
//   * the care bits of the pattern being loaded and the expected values of
//     the response care bits being unloaded give linear equations over GF(2)
//     on the Data bits, through the phase shifter taps (re-derived here from
//     the tap rule); an online Gaussian elimination adds them and, on a
//     contradiction (a decompression lockout), one more stall cycle is tried;
//   * coded mode assigns one code per mask, code 0 to the all-0 mask, and
//     splits the pattern set into sessions whose masks fit the memory; the
//     memory is reprogrammed (under reset) before each session.
// With LINES > 1 Mask lines, each clock shifts LINES mask (code) bits in.
// Core model: response cell (i,j) = cell(i,j) ^ cell(i+1,j+1) (indices
// wrap), with injected faults that flip chosen response cells; some faults
// sit on care bits, some on X positions.
// Checker: the applied mask in every slot, the loaded care bits at every
// capture, the comparator register and failure_detect after every slot
// (they must flag exactly the faults on care bits), and in a BIST-mode run
// the signature against a MISR model. Mechanism counters (mask-load stalls,
// lockout stalls, captures, detected and filtered faults, sessions, BIST
// signatures, spare codes given to masks that already have one) must each be
// non-zero where the configuration allows them. The bench reports the scan
// time in clocks (memory reloads between sessions included) and its ratio to
// the time a single scan chain of n*L cells would need.
module ced_bench #(
  parameter int N             = 8,
  parameter int L             = 6,
  parameter int R             = 8,
  parameter int K             = 3,
  parameter bit CODED         = 1'b1,
  parameter bit FULL          = 1'b0,
  parameter int PATTERNS      = 6,
  parameter int RESP_CARE     = 3,
  parameter int EXTRA_CARE    = 2,
  parameter int MAXV          = 2048,
  parameter bit NEED_LOCKOUT  = 1'b1,
  parameter bit NEED_SESSIONS = 1'b1,
  parameter bit MCM           = 1'b1,
  parameter bit NEED_MCM      = 1'b0,
  parameter int SEED          = 1,
  parameter int LINES         = 1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   clocks
);

  localparam int CW   = CODED ? K : N;   // length of the mask (code) register
  localparam int CMAX = CW + 4 * R + 8;  // give up on a slot after this many clocks
  localparam int NC   = 2 ** K;

  typedef logic [N-1:0][L-1:0] grid_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic data_in = 1'b0, stall = 1'b0, scan_en = 1'b1, bist_mode = 1'b0;
  logic [LINES-1:0] mask_in = '0;
  logic mem_we = 1'b0;
  logic [K-1:0] mem_waddr = '0;
  logic [N-1:0] mem_wdata = '0;
  grid_t core_resp, cells, flip;
  logic result, failure_detect;
  logic [N-1:0] cmp_q, mask;

  always #5 clk = ~clk;

  if (FULL) begin : g_dut
    ced_top dut (
      .clk, .rst_n, .data_in, .mask_in, .stall, .scan_en, .bist_mode,
      .mem_we, .mem_waddr, .mem_wdata, .core_resp, .cells,
      .result, .failure_detect, .cmp_q, .mask
    );
  end else begin : g_dut
    ced_top #(.N(N), .L(L), .R(R), .K(K), .MASK_LINES(LINES), .MASK_CODED(CODED)) dut (
      .clk, .rst_n, .data_in, .mask_in, .stall, .scan_en, .bist_mode,
      .mem_we, .mem_waddr, .mem_wdata, .core_resp, .cells,
      .result, .failure_detect, .cmp_q, .mask
    );
  end

  // core under diagnosis, with fault injection
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < L; j++)
        core_resp[i][j] = cells[i][j] ^ cells[(i + 1) % N][(j + 1) % L] ^ flip[i][j];
  end

  // ---------------------------------------------------------------- test set
  grid_t pcare [PATTERNS], pval [PATTERNS], rcare [PATTERNS], rgood [PATTERNS], fault [PATTERNS];

  // mask needed while unloading shift s of the response of pattern p
  function automatic logic [N-1:0] resp_mask(int p, int s);
    logic [N-1:0] m;
    for (int i = 0; i < N; i++) m[i] = rcare[p][i][L-1-s];
    return m;
  endfunction

  // phase shifter tap rule, written out independently of the RTL package
  function automatic int tap(int ch, int k);
    int q, a;
    q = ch / R;
    a = ch % R;
    if (k == 0) return a;
    if (k == 1) return (a + 1 + q) % R;
    return (a + 4 + 3 * q) % R;
  endfunction

  // ----------------------------------------------------- GF(2) elimination
  typedef bit [MAXV-1:0] row_t;
  row_t rows [$];
  bit   rhs  [$];
  int   piv  [$];

  // returns 0 on a contradiction
  function automatic bit add_eq(row_t r, bit b);
    int p;
    for (int k = 0; k < rows.size(); k++) begin
      if (r[piv[k]]) begin
        r ^= rows[k];
        b ^= rhs[k];
      end
    end
    if (r == '0) return !b;
    p = -1;
    for (int u = MAXV - 1; u >= 0; u--) if (r[u]) begin p = u; break; end
    rows.push_back(r);
    rhs.push_back(b);
    piv.push_back(p);
    return 1'b1;
  endfunction

  function automatic row_t chan_row(int ch, int t);
    row_t r;
    r = '0;
    for (int k = 0; k < 3; k++) begin
      int u;
      u = t - 1 - tap(ch, k);
      if (u >= 0) r[u] = ~r[u];
    end
    return r;
  endfunction

  // Can the slots that unload response pu while loading pattern pl (either
  // may be -1) be solved at all, i.e. with a window of fresh Data bits?
  function automatic bit slots_ok(int pu, int pl);
    for (int s = 0; s < L; s++) begin
      logic [R-1:0] rw [$];
      bit           rb [$];
      int           rp [$];
      rw.delete(); rb.delete(); rp.delete();
      for (int i = 0; i < N; i++)
        for (int side = 0; side < 2; side++) begin
          logic [R-1:0] v;
          bit b, used;
          int ch, np;
          used = 1'b0; b = 1'b0; ch = 0;
          if (side == 0 && pl >= 0 && pcare[pl][i][L-1-s]) begin used = 1'b1; b = pval[pl][i][L-1-s]; ch = i; end
          if (side == 1 && pu >= 0 && rcare[pu][i][L-1-s]) begin used = 1'b1; b = rgood[pu][i][L-1-s]; ch = N + i; end
          if (!used) continue;
          v = '0;
          for (int k = 0; k < 3; k++) v[tap(ch, k)] = ~v[tap(ch, k)];
          // forward elimination in insertion order, as in add_eq
          for (int x = 0; x < rw.size(); x++)
            if (v[rp[x]]) begin v ^= rw[x]; b ^= rb[x]; end
          if (v == '0) begin
            if (b) return 1'b0;
          end else begin
            np = 0;
            for (int u = 0; u < R; u++) if (v[u]) np = u;
            rw.push_back(v); rb.push_back(b); rp.push_back(np);
          end
        end
    end
    return 1'b1;
  endfunction

  // ------------------------------------------------------ per-session plan
  int  min_v [MAXV][LINES]; // mask line values per cycle, -1 = free
  bit  dat_v [MAXV];
  bit  stl_v [MAXV];
  bit  sen_v [MAXV];
  int  slot_p_load [MAXV];  // per cycle: pattern loaded in this slot (-1)
  int  slot_p_unl  [MAXV];  // pattern whose response is unloaded (-1)
  int  slot_s      [MAXV];  // shift index, -1 for capture, -2 for stall
  int  slot_cap_p  [MAXV];  // pattern captured in this slot (-1)
  logic [N-1:0] slot_m [MAXV];
  logic [N-1:0] table_m [NC];
  bit           table_ok [NC];
  int  ncyc;
  logic [N-1:0] unseen [$];

  // mechanism counters
  int n_mask_stall = 0, n_lock_stall = 0, n_lock_events = 0, n_capture = 0;
  int n_detect = 0, n_care_fault = 0, n_x_fault = 0, n_sessions = 0;
  int n_bist_edges = 0, n_slots = 0, n_cycles = 0, n_extra_codes = 0, n_reload = 0;

  // Register bit b held in cycle t entered k = ceil((CW-b)/LINES) clocks
  // earlier, on mask line l = b - CW + LINES*k (one line: cycle t-CW+b).
  function automatic int src_k(int b);
    return (CW - b + LINES - 1) / LINES;
  endfunction

  // can the register hold value v (width CW) at t?
  function automatic bit reg_fits(logic [N-1:0] v, int t);
    for (int b = 0; b < CW; b++) begin
      int u, l;
      u = t - src_k(b);
      l = b - CW + LINES * src_k(b);
      if (u < 0) begin
        if (v[b]) return 1'b0;
      end else if (min_v[u][l] >= 0 && min_v[u][l] != int'(v[b])) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic void reg_commit(logic [N-1:0] v, int t);
    for (int b = 0; b < CW; b++) begin
      int u, l;
      u = t - src_k(b);
      l = b - CW + LINES * src_k(b);
      if (u >= 0) min_v[u][l] = int'(v[b]);
    end
  endfunction

  // encode one session; returns 0 if it cannot be encoded
  function automatic bit encode(int sp[$]);
    int tprev, np;
    np = sp.size();
    rows.delete(); rhs.delete(); piv.delete();
    for (int u = 0; u < MAXV; u++) begin
      for (int l = 0; l < LINES; l++) min_v[u][l] = -1;
      stl_v[u] = 1'b1; sen_v[u] = 1'b1;
      slot_p_load[u] = -1; slot_p_unl[u] = -1; slot_s[u] = -2; slot_cap_p[u] = -1;
      slot_m[u] = '0;
    end
    for (int c = 0; c < NC; c++) begin table_ok[c] = 1'b0; table_m[c] = '0; end
    table_ok[0] = 1'b1;
    // distinct masks of the current memory session not yet given a code
    unseen.delete();
    foreach (sp[k])
      for (int s = 0; s < L; s++) begin
        logic [N-1:0] m;
        bit have;
        m = resp_mask(sp[k], s);
        have = (m == '0);
        foreach (unseen[x]) if (unseen[x] == m) have = 1'b1;
        if (!have) unseen.push_back(m);
      end
    tprev = -1;
    for (int q = 0; q <= np; q++) begin
      for (int s = -1; s < L; s++) begin
        // s = -1 is the capture slot of the previous pattern (none for q = 0)
        int lp, up, cmask_c, chosen_c, code;
        logic [N-1:0] m;
        bit found;
        if (s == -1 && q == 0) continue;
        lp = (s >= 0 && q < np) ? sp[q] : -1;
        up = (s >= 0 && q > 0) ? sp[q-1] : -1;
        m  = (up >= 0) ? resp_mask(up, s) : '0;
        found = 1'b0; cmask_c = -1; chosen_c = -1; code = -1;
        for (int c = 1; c <= CMAX && !found; c++) begin
          int t, nrows;
          bit ok;
          t = tprev + c;
          if (t >= MAXV) break;
          // mask / mask code constraint
          ok = 1'b0;
          if (!CODED) ok = reg_fits(m, t);
          else begin
            for (int cd = 0; cd < NC && !ok; cd++)
              if (table_ok[cd] && table_m[cd] == m && reg_fits(N'(cd), t)) begin ok = 1'b1; code = cd; end
            if (!ok) begin
              bit known;
              int nfree;
              known = 1'b0; nfree = 0;
              for (int cd = 0; cd < NC; cd++) begin
                if (table_ok[cd] && table_m[cd] == m) known = 1'b1;
                if (!table_ok[cd]) nfree++;
              end
              // a new mask takes a free code; a known one may take a spare
              // code (several codes per mask) if enough remain for the rest
              if (!known || (MCM && nfree > unseen.size()))
                for (int cd = 0; cd < NC && !ok; cd++)
                  if (!table_ok[cd] && reg_fits(N'(cd), t)) begin ok = 1'b1; code = cd; end
            end
          end
          if (!ok) continue;
          if (cmask_c < 0) cmask_c = c;
          // decompression equations
          nrows = rows.size();
          for (int i = 0; i < N && ok; i++) begin
            if (lp >= 0 && pcare[lp][i][L-1-s]) ok = add_eq(chan_row(i, t), pval[lp][i][L-1-s]);
            if (ok && up >= 0 && m[i]) ok = add_eq(chan_row(N + i, t), rgood[up][i][L-1-s]);
          end
          if (!ok) begin
            while (rows.size() > nrows) begin
              void'(rows.pop_back()); void'(rhs.pop_back()); void'(piv.pop_back());
            end
            continue;
          end
          // commit the slot at cycle t
          found = 1'b1; chosen_c = c;
          if (CODED) begin
            reg_commit(N'(code), t);
            if (!table_ok[code]) begin
              bit known;
              known = 1'b0;
              for (int cd = 0; cd < NC; cd++) if (table_ok[cd] && table_m[cd] == m) known = 1'b1;
              if (known) n_extra_codes++;
              for (int x = unseen.size() - 1; x >= 0; x--) if (unseen[x] == m) unseen.delete(x);
            end
            table_ok[code] = 1'b1; table_m[code] = m;
          end else reg_commit(m, t);
          stl_v[t] = 1'b0;
          sen_v[t] = (s >= 0);
          slot_s[t] = s;
          slot_p_load[t] = lp;
          slot_p_unl[t] = up;
          slot_cap_p[t] = (s == -1) ? sp[q-1] : -1;
          slot_m[t] = m;
          tprev = t;
        end
        if (!found) return 1'b0;
        n_mask_stall += cmask_c - 1;
        if (chosen_c > cmask_c) begin
          n_lock_stall += chosen_c - cmask_c;
          n_lock_events++;
        end
        n_slots++;
      end
    end
    ncyc = tprev + 1;
    // pick the Data bits: free variables at random, then back-substitute
    for (int u = 0; u < MAXV; u++) dat_v[u] = 1'($urandom);
    for (int k = rows.size() - 1; k >= 0; k--) begin
      bit v;
      v = rhs[k];
      for (int u = 0; u < ncyc; u++) if (u != piv[k] && rows[k][u]) v ^= dat_v[u];
      dat_v[piv[k]] = v;
    end
    for (int u = 0; u < MAXV; u++)
      for (int l = 0; l < LINES; l++)
        if (min_v[u][l] < 0) min_v[u][l] = int'($urandom_range(0, 1));
    return 1'b1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (N=%0d coded=%0d) at %0t", what, N, CODED, $time);
    end
  endtask

  // apply one encoded session
  task automatic run_session();
    rst_n = 1'b0; bist_mode = 1'b0; stall = 1'b1; flip = '0;
    if (CODED) begin
      for (int c = 0; c < NC; c++) begin
        mem_we = 1'b1; mem_waddr = K'(c); mem_wdata = table_ok[c] ? table_m[c] : '0;
        @(posedge clk); #1;
        if (n_sessions > 1) n_reload++;
      end
      mem_we = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int u = 0; u < ncyc; u++) begin
      for (int l = 0; l < LINES; l++) mask_in[l] = 1'(min_v[u][l]);
      data_in = dat_v[u]; stall = stl_v[u]; scan_en = sen_v[u];
      flip = (slot_cap_p[u] >= 0) ? fault[slot_cap_p[u]] : '0;
      if (!stl_v[u]) begin
        check(mask == slot_m[u], "applied mask");
        if (slot_cap_p[u] >= 0) begin
          int p;
          p = slot_cap_p[u];
          check(((cells ^ pval[p]) & pcare[p]) == '0, "loaded care bits");
          n_capture++;
        end
      end
      @(posedge clk); #1;
      n_cycles++;
      if (!stl_v[u]) begin
        logic [N-1:0] want;
        want = '0;
        if (slot_p_unl[u] >= 0)
          for (int i = 0; i < N; i++)
            want[i] = slot_m[u][i] & fault[slot_p_unl[u]][i][L-1-slot_s[u]];
        check(cmp_q == want, "comparator register");
        check(failure_detect == (want != '0), "failure detect");
        check(result == cmp_q[0], "result bit");
        for (int i = 0; i < N; i++) if (want[i]) n_detect++;
      end
    end
    stall = 1'b1;
  endtask

  // MISR feedback taps for the chain counts used by the benches
  function automatic logic [N-1:0] misr_fb();
    logic [N-1:0] m;
    int t [4];
    m = '0;
    if (N == 8) t = '{8, 6, 5, 4};
    else if (N == 16) t = '{16, 15, 13, 4};
    else if (N == 64) t = '{64, 63, 61, 60};
    else t = '{N, N - 1, 0, 0};
    for (int k = 0; k < 4; k++) if (t[k] > 0) m[N - t[k]] = 1'b1;
    return m;
  endfunction

  task automatic run_bist();
    logic [N-1:0] sig, t, fbm;
    fbm = misr_fb();
    rst_n = 1'b0; stall = 1'b1; flip = '0;
    @(posedge clk); #1;
    bist_mode = 1'b1;
    if (CODED) begin
      mem_we = 1'b1; mem_waddr = '1; mem_wdata = '1;
      @(posedge clk); #1;
      mem_we = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    sig = '0;
    for (int u = 0; u < (PATTERNS + 1) * (L + 1) + CW; u++) begin
      data_in = 1'($urandom); mask_in = '1;
      stall = (u >= CW) && ($urandom_range(0, 5) == 0);
      scan_en = (u % (L + 1)) != L;
      if (u >= CW + 1) check(mask == '1, "BIST mask all ones");
      t = '0;
      for (int i = 0; i < N; i++) t[i] = cells[i][L-1] & mask[i];
      @(posedge clk);
      if (!stall) begin
        sig = {^(sig & fbm), sig[N-1:1]} ^ t;
        if (t != '0) n_bist_edges++;
      end
      #1;
      check(cmp_q == sig, "MISR signature");
      check(!failure_detect, "no failure detect in BIST mode");
    end
    rst_n = 1'b0; stall = 1'b1;
    @(posedge clk); #1;
    bist_mode = 1'b0;
  endtask

  initial begin
    int order [$];
    done = 1'b0; checks = 0; failures = 0; clocks = 0; flip = '0;
    void'($urandom(SEED));
    // draw the diagnosis test set
    for (int p = 0; p < PATTERNS; p++) begin
      int tries;
      tries = 0;
      // redraw until every slot of this pattern has a consistent system
      do begin
      tries++;
      pcare[p] = '0; pval[p] = '0; rcare[p] = '0; rgood[p] = '0; fault[p] = '0;
      for (int r = 0; r < RESP_CARE; r++) begin
        int i, j;
        i = $urandom_range(0, N - 1); j = $urandom_range(0, L - 1);
        rcare[p][i][j] = 1'b1;
        if (!pcare[p][i][j]) begin pcare[p][i][j] = 1'b1; pval[p][i][j] = 1'($urandom); end
        if (!pcare[p][(i+1)%N][(j+1)%L]) begin
          pcare[p][(i+1)%N][(j+1)%L] = 1'b1; pval[p][(i+1)%N][(j+1)%L] = 1'($urandom);
        end
      end
      for (int r = 0; r < EXTRA_CARE; r++) begin
        int i, j;
        i = $urandom_range(0, N - 1); j = $urandom_range(0, L - 1);
        if (!pcare[p][i][j]) begin pcare[p][i][j] = 1'b1; pval[p][i][j] = 1'($urandom); end
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < L; j++)
          rgood[p][i][j] = rcare[p][i][j] & (pval[p][i][j] ^ pval[p][(i+1)%N][(j+1)%L]);
      end while (!(slots_ok(p - 1, p) && (p < PATTERNS - 1 ? 1'b1 : slots_ok(p, -1))) && tries < 1000);
      if (tries >= 1000) check(1'b0, "no encodable pattern drawn");
      // faults: one on a care bit every other pattern, one on an X every third
      if (p % 2 == 0) begin
        int i, j;
        do begin i = $urandom_range(0, N - 1); j = $urandom_range(0, L - 1); end
        while (!rcare[p][i][j]);
        fault[p][i][j] = 1'b1; n_care_fault++;
      end
      if (p % 3 == 1) begin
        int i, j;
        do begin i = $urandom_range(0, N - 1); j = $urandom_range(0, L - 1); end
        while (rcare[p][i][j]);
        fault[p][i][j] = 1'b1; n_x_fault++;
      end
    end
    // sessions: first fit in pattern order, masks of a session fit the memory
    for (int p = 0; p < PATTERNS; ) begin
      logic [N-1:0] seen [$];
      int sess [$];
      seen.delete();
      sess.delete();
      seen.push_back('0);
      while (p < PATTERNS) begin
        logic [N-1:0] add [$];
        add.delete();
        for (int s = 0; s < L; s++) begin
          logic [N-1:0] m;
          bit have;
          m = resp_mask(p, s);
          have = 1'b0;
          foreach (seen[k]) if (seen[k] == m) have = 1'b1;
          foreach (add[k]) if (add[k] == m) have = 1'b1;
          if (!have) add.push_back(m);
        end
        if (CODED && seen.size() + add.size() > NC) begin
          if (sess.size() == 0) begin
            check(1'b0, "pattern needs more masks than the memory holds");
            p++;
          end
          break;
        end
        foreach (add[k]) seen.push_back(add[k]);
        sess.push_back(p);
        p++;
      end
      if (sess.size() == 0) continue;
      n_sessions++;
      $display("session %0d: %0d patterns from %0d at %0t", n_sessions, sess.size(), sess[0], $time);
      if (!encode(sess)) check(1'b0, "encoding failed");
      else run_session();
    end
    run_bist();
    // every mechanism must have occurred
    check(n_mask_stall > 0, "mask-load stalls occurred");
    if (NEED_LOCKOUT) check(n_lock_events > 0, "decompression lockout stalls occurred");
    check(n_capture > 0, "captures occurred");
    check(n_detect == n_care_fault, "every fault on a care bit detected once");
    check(n_detect > 0, "failures detected");
    check(n_x_fault > 0, "faults on X positions filtered");
    if (NEED_SESSIONS && CODED) check(n_sessions > 1, "mask memory reprogrammed between sessions");
    if (NEED_MCM && MCM && CODED) check(n_extra_codes > 0, "spare codes given to masks that already had one");
    clocks = n_cycles + n_reload;
    check(n_bist_edges > 0, "BIST compaction occurred");
    $display("bench N=%0d L=%0d R=%0d K=%0d coded=%0d: %0d patterns, %0d sessions, %0d slots, %0d clocks, mask-load stalls %0d, lockout stalls %0d (%0d events), captures %0d, detected %0d of %0d, X faults %0d, extra codes %0d, reload clocks %0d",
             N, L, R, K, CODED, PATTERNS, n_sessions, n_slots, n_cycles, n_mask_stall,
             n_lock_stall, n_lock_events, n_capture, n_detect, n_care_fault, n_x_fault,
             n_extra_codes, n_reload);
    $display("bench N=%0d coded=%0d: scan time %0d clocks, single-chain time %0d clocks, ratio %0.2f",
             N, CODED, clocks, PATTERNS * (N * L + 1) + N * L,
             real'(PATTERNS * (N * L + 1) + N * L) / real'(clocks));
    done = 1'b1;
  end

endmodule
