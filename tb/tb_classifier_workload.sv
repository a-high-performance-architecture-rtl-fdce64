// tb_classifier_workload: the full-size classifier loaded with large
// synthetic rule-sets, 1000 rules and then 10000 rules over ten units.
//
// The rule-sets are built to be partitionable the way the architecture
// expects: every rule of unit u is exact, and unique within the unit, on
// two "index" header bytes chosen for that unit, and the unit's byte order
// reads those two bytes first. The other fields are random prefixes
// (addresses) or exact-or-any values (protocol, ports), widened where an
// index byte lies inside them so every field stays a prefix. Once the index
// bytes are read at most one rule (plus the default) remains, so a unit of
// R rules needs at most R+1 nodes on any level; 10000 rules give 1000 per
// unit and fit the 1024 nodes of a bank.
//
// Each unit is compiled with a set-based builder (a node is the set of
// rules still matching, up to 1024 rules per unit), loaded through the
// write port, and then a stream of headers, three quarters of them made to
// hit a random rule, is classified one per clock. Every result is compared
// with a direct priority search over the whole rule-set, the 29-cycle
// latency is checked, and each unit must supply a winning rule at least once.
module tb_classifier_workload;
  import pc_pkg::*;
  import bdd_build_pkg::*;
  import cls_tb_pkg::*;

  localparam int MAXR    = 1024;   // rules per unit, default included
  localparam int LATENCY = 1 + LEVELS + 4;
  localparam int PKTS    = 1500;

  typedef logic [MAXR-1:0] set_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0;
  logic   in_ready;
  hdr_t   in_hdr = '0;
  upd_t   upd = '0;
  logic   out_valid;
  match_t out_match;
  logic [UNIT_W-1:0] out_unit;

  packet_classifier dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_hdr(in_hdr),
    .upd(upd), .out_valid(out_valid), .out_match(out_match), .out_unit(out_unit));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Index bytes of each unit (header byte numbers).
  int idx_byte [N_UNITS][2] = '{'{0, 1}, '{4, 5}, '{0, 4}, '{8, 12}, '{1, 5},
                                '{11, 12}, '{9, 10}, '{2, 6}, '{8, 4}, '{3, 7}};
  // Field of each header byte and the byte's position in that field.
  int fld_of [HDR_BYTES] = '{0, 0, 0, 0, 1, 1, 1, 1, 2, 3, 3, 4, 4};
  int pos_in [HDR_BYTES] = '{0, 1, 2, 3, 0, 1, 2, 3, 0, 0, 1, 0, 1};

  rule_t all_rules[$];
  int    rule_unit[$];
  rule_t unit_rules [N_UNITS][$];
  int    perm [N_UNITS][HDR_BYTES];

  typedef struct { match_t m; int unit; longint t; } exp_t;
  exp_t   expq[$];
  longint cyc = 0;
  int     got = 0;
  int     wins [N_UNITS];
  int     default_hits = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      got++;
      if (expq.size() == 0) check(1'b0, "result with no header");
      else begin
        automatic exp_t e = expq.pop_front();
        check(out_match == e.m, $sformatf("match prio %0d action %0d, expected prio %0d action %0d",
                                          out_match.prio, out_match.action, e.m.prio, e.m.action));
        check(int'(out_unit) == e.unit, $sformatf("unit %0d, expected %0d", out_unit, e.unit));
        check(cyc - e.t == LATENCY, $sformatf("latency %0d, expected %0d", cyc - e.t, LATENCY));
        if (e.m.prio == 0) default_hits++;
        else wins[e.unit]++;
      end
    end
  end

  initial begin : watchdog
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rule number k of unit u; prio is unique over the whole rule-set.
  function automatic rule_t wl_rule(int u, int k, int prio);
    rule_t r;
    hdr_t  v = rand_hdr();
    hdr_t  c = '0;
    int    minb [5] = '{0, 0, 0, 0, 0};
    logic [15:0] idx = 16'(k * 40503 + u * 7919);   // odd multiplier: unique per k
    for (int j = 0; j < 2; j++) begin
      int b = idx_byte[u][j];
      if (pos_in[b] + 1 > minb[fld_of[b]]) minb[fld_of[b]] = pos_in[b] + 1;
    end
    for (int f = 0; f < 2; f++) begin       // address prefixes
      int lo  = minb[f] * 8;
      int len = (lo == 0 && $urandom_range(0, 3) == 0) ? 0
              : $urandom_range((lo < 8) ? 8 : lo, 32);
      for (int b = 0; b < len; b++) c[HDR_W-1-32*f-b] = 1'b1;
    end
    if (minb[2] > 0 || $urandom_range(0, 1) == 0) c[HDR_W-65 -: 8]  = 8'hFF;
    if (minb[3] > 0 || $urandom_range(0, 2) == 0) c[HDR_W-73 -: 16] = 16'hFFFF;
    if (minb[4] > 0 || $urandom_range(0, 2) == 0) c[HDR_W-89 -: 16] = 16'hFFFF;
    v[HDR_W-1-8*idx_byte[u][0] -: 8] = idx[15:8];
    v[HDR_W-1-8*idx_byte[u][1] -: 8] = idx[7:0];
    r.val  = '0; r.care = '0;
    r.care[HDR_W-1:0] = c;
    r.val[HDR_W-1:0]  = v & c;
    r.prio = prio;
    r.res  = 64'({ACTION_W'($urandom_range(1, 255)), PRIO_W'(prio)});
    return r;
  endfunction

  // Index bytes first, then the rest in header order.
  function automatic void wl_perm(int u, output int p[HDR_BYTES]);
    int j = 2;
    p[0] = idx_byte[u][0];
    p[1] = idx_byte[u][1];
    for (int b = 0; b < HDR_BYTES; b++)
      if (b != idx_byte[u][0] && b != idx_byte[u][1]) begin p[j] = b; j++; end
  endfunction

  // Set-based compiler for one unit. rs must be sorted by falling priority
  // (so the best rule of a set is its lowest member); key layout as in
  // bdd_build_pkg::build with the classifier's ROOT_BITS and STRIDE.
  task automatic build_unit(input rule_t rs[$], output wr_t wrs[$],
                            output int maxn, output int total);
    set_t cur[$];
    set_t nxt[$];
    set_t mask [1 << STRIDE];
    wrs.delete();
    maxn = 0; total = 0;
    for (int v = 0; v < (1 << ROOT_BITS); v++) begin
      set_t s = '0;
      foreach (rs[i]) if (bits_match(rs[i], HDR_W-1, ROOT_BITS, v)) s[i] = 1'b1;
      cur.push_back(s);
    end
    for (int l = 0; l < LEVELS; l++) begin
      int id[set_t];
      int hi = HDR_W - 1 - ROOT_BITS - l*STRIDE;
      if (cur.size() > maxn) maxn = cur.size();
      total += cur.size();
      for (int v = 0; v < (1 << STRIDE); v++) begin
        mask[v] = '0;
        foreach (rs[i]) if (bits_match(rs[i], hi, STRIDE, v)) mask[v][i] = 1'b1;
      end
      id.delete();
      nxt.delete();
      for (int n = 0; n < cur.size(); n++) begin
        for (int v = 0; v < (1 << STRIDE); v++) begin
          set_t s = cur[n] & mask[v];
          wr_t  w;
          w.level = l;
          w.addr  = (n << STRIDE) | v;
          if (l == LEVELS - 1) begin
            w.data = 0;
            for (int i = 0; i < rs.size(); i++) if (s[i]) begin w.data = rs[i].res; break; end
          end else begin
            if (!id.exists(s)) begin
              id[s] = nxt.size();
              nxt.push_back(s);
            end
            w.data = id[s];
          end
          wrs.push_back(w);
        end
      end
      cur = nxt;
    end
  endtask

  task automatic write(upd_t u);
    upd = u;
    @(posedge clk);
    #1 upd = '0;
  endtask

  task automatic load_unit(int u, output int maxn, output int total);
    wr_t   wrs[$];
    rule_t pr[$];
    foreach (unit_rules[u][i]) pr.push_back(permute_rule(unit_rules[u][i], perm[u]));
    pr.rsort(r) with (r.prio);
    check(pr.size() <= MAXR, "too many rules in a unit");
    build_unit(pr, wrs, maxn, total);
    check(maxn <= NODES, $sformatf("unit %0d needs %0d nodes on a level", u, maxn));
    for (int j = 0; j < HDR_BYTES; j++) begin
      upd_t c = '0;
      c.valid = 1'b1; c.target = UPD_PERM; c.unit = UNIT_W'(u);
      c.addr = ADDR_W'(j); c.data = WDATA_W'(perm[u][j]);
      write(c);
    end
    foreach (wrs[i]) begin
      upd_t c = '0;
      c.valid = 1'b1; c.target = UPD_NODE; c.unit = UNIT_W'(u);
      c.level = LVL_W'(wrs[i].level); c.addr = ADDR_W'(wrs[i].addr);
      c.data = WDATA_W'(wrs[i].data);
      write(c);
    end
  endtask

  function automatic hdr_t hit_hdr();
    hdr_t  h = rand_hdr();
    rule_t r = all_rules[$urandom_range(0, all_rules.size() - 1)];
    return (h & ~r.care[HDR_W-1:0]) | r.val[HDR_W-1:0];
  endfunction

  task automatic run_workload(int n_rules);
    int prios[$];
    int maxn_all = 0, total_all = 0;
    all_rules.delete(); rule_unit.delete();
    for (int u = 0; u < N_UNITS; u++) begin unit_rules[u].delete(); wins[u] = 0; end
    default_hits = 0;
    for (int i = 1; i <= n_rules; i++) prios.push_back(i);
    prios.shuffle();
    for (int i = 0; i < n_rules; i++) begin
      automatic int    u = i % N_UNITS;
      automatic rule_t r = wl_rule(u, i / N_UNITS, prios[i]);
      all_rules.push_back(r);
      rule_unit.push_back(u);
      unit_rules[u].push_back(r);
    end
    for (int u = 0; u < N_UNITS; u++) begin
      int maxn, total;
      unit_rules[u].push_back(default_rule());
      wl_perm(u, perm[u]);
      load_unit(u, maxn, total);
      if (maxn > maxn_all) maxn_all = maxn;
      total_all += total;
    end
    $display("%0d rules: %0d nodes in all, at most %0d on one level", n_rules, total_all, maxn_all);

    for (int k = 0; k < PKTS; k++) begin
      automatic hdr_t h = ($urandom_range(0, 3) == 0) ? rand_hdr() : hit_hdr();
      automatic int   bi = ref_best(all_rules, 128'(h), HDR_W);
      automatic exp_t e;
      e.m = '0; e.unit = 0;
      if (bi >= 0) begin e.m = match_t'(all_rules[bi].res); e.unit = rule_unit[bi]; end
      e.t = cyc;
      in_valid = 1'b1; in_hdr = h;
      expq.push_back(e);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (LATENCY + 10) @(posedge clk);
    #1 check(expq.size() == 0, $sformatf("%0d results missing", expq.size()));
    for (int u = 0; u < N_UNITS; u++)
      check(wins[u] > 0, $sformatf("unit %0d never supplied the winner", u));
    check(default_hits > 0, "default rule never used");
    $display("%0d rules: %0d headers, default rule won %0d times", n_rules, PKTS, default_hits);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    run_workload(1000);
    run_workload(10000);
    check(got == 2 * PKTS, $sformatf("%0d results, expected %0d", got, 2 * PKTS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
