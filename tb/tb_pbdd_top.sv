// tb_pbdd_top: end-to-end test of the whole design at its default size:
// the ten-unit packet classifier and the IP forwarding engine, side by side.
//
// Classifier: 40 random 5-tuple rules over ten units (each with its own
// random byte order and a default rule) are compiled, loaded through the
// write port, and headers are classified one per clock; every result is
// checked against a direct priority search. IP engine: a 40-prefix table
// with a default route is loaded the same way and destination addresses are
// checked against a direct longest-prefix search. Both engines run at the
// same time.
//
// Mechanisms counted (a failure is counted for each that never happens):
//   byte-order writes, node writes stalling traffic, a header or address
//   refused while stalled, each classifier unit supplying the winning rule,
//   the default rule winning, an incremental rule update changing a result,
//   the IP default route, a longer prefix overriding a shorter match, and
//   one result per clock at the fixed latency (29 and 32 cycles).
module tb_pbdd_top;
  import pc_pkg::*;
  import bdd_build_pkg::*;
  import cls_tb_pkg::*;

  localparam int RULES_PER_UNIT = 4;
  localparam int CLS_LAT = 1 + LEVELS + 4;
  localparam int FWD_LAT = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   cls_in_valid = 1'b0, cls_in_ready;
  hdr_t   cls_in_hdr = '0;
  upd_t   cls_upd = '0;
  logic   cls_out_valid;
  match_t cls_out_match;
  logic [UNIT_W-1:0] cls_out_unit;
  logic        fwd_in_valid = 1'b0, fwd_in_ready;
  logic [31:0] fwd_in_dst_ip = '0;
  logic        fwd_upd_valid = 1'b0;
  logic [4:0]  fwd_upd_level = '0;
  logic [14:0] fwd_upd_addr = '0;
  logic [13:0] fwd_upd_data = '0;
  logic        fwd_out_valid;
  logic [7:0]  fwd_out_port;

  pbdd_top dut (
    .clk(clk), .rst_n(rst_n),
    .cls_in_valid(cls_in_valid), .cls_in_ready(cls_in_ready), .cls_in_hdr(cls_in_hdr),
    .cls_upd(cls_upd), .cls_out_valid(cls_out_valid), .cls_out_match(cls_out_match),
    .cls_out_unit(cls_out_unit),
    .fwd_in_valid(fwd_in_valid), .fwd_in_ready(fwd_in_ready), .fwd_in_dst_ip(fwd_in_dst_ip),
    .fwd_upd_valid(fwd_upd_valid), .fwd_upd_level(fwd_upd_level), .fwd_upd_addr(fwd_upd_addr),
    .fwd_upd_data(fwd_upd_data), .fwd_out_valid(fwd_out_valid), .fwd_out_port(fwd_out_port));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_perm_wr = 0, n_cls_stall = 0, n_fwd_stall = 0, n_refused = 0;
  int n_unit_win [N_UNITS];
  int n_default = 0, n_update_changed = 0, n_fwd_default = 0, n_fwd_longer = 0;
  int n_cls_lat = 0, n_fwd_lat = 0;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- classifier side ----------------
  hdr_t  tmpl [NT];
  rule_t all_rules[$];
  int    rule_unit[$];
  rule_t unit_rules [N_UNITS][$];
  int    perm [N_UNITS][HDR_BYTES];
  wr_t   unit_wrs [N_UNITS][$];

  typedef struct { match_t m; int unit; longint t; bit chk_lat; } cexp_t;
  cexp_t cexpq[$];
  int    cgot = 0;

  always @(posedge clk) begin
    if (rst_n && cls_out_valid) begin
      cgot++;
      if (cexpq.size() == 0) check(1'b0, "classifier result with no header");
      else begin
        automatic cexp_t e = cexpq.pop_front();
        check(cls_out_match == e.m, $sformatf("match prio %0d action %0d, expected prio %0d action %0d",
                                              cls_out_match.prio, cls_out_match.action, e.m.prio, e.m.action));
        check(int'(cls_out_unit) == e.unit, $sformatf("unit %0d, expected %0d", cls_out_unit, e.unit));
        if (e.m.prio == 0) n_default++;
        else n_unit_win[e.unit]++;
        if (e.chk_lat) begin
          check(cyc - e.t == CLS_LAT, $sformatf("classifier latency %0d, expected %0d", cyc - e.t, CLS_LAT));
          n_cls_lat++;
        end
      end
    end
  end

  task automatic cls_write(upd_t u);
    cls_upd = u;
    #1 if (u.target == UPD_NODE) check(!cls_in_ready, "classifier ready during a node write");
    @(posedge clk);
    #1 cls_upd = '0;
  endtask

  task automatic cls_node_write(int unit, wr_t w);
    upd_t u = '0;
    u.valid = 1'b1; u.target = UPD_NODE; u.unit = UNIT_W'(unit);
    u.level = LVL_W'(w.level); u.addr = ADDR_W'(w.addr); u.data = WDATA_W'(w.data);
    cls_write(u);
  endtask

  task automatic load_unit(int unit, bit only_changes);
    wr_t old[$] = unit_wrs[unit];
    wr_t nw[$];
    rule_t pr[$];
    int maxn;
    longint unsigned prev [int];
    foreach (unit_rules[unit][i]) pr.push_back(permute_rule(unit_rules[unit][i], perm[unit]));
    build(HDR_W, ROOT_BITS, STRIDE, pr, nw, maxn);
    check(maxn <= NODES, $sformatf("unit %0d needs %0d nodes on a level", unit, maxn));
    foreach (old[i]) prev[old[i].level * 65536 + old[i].addr] = old[i].data;
    foreach (nw[i]) begin
      automatic int k = nw[i].level * 65536 + nw[i].addr;
      if (!only_changes || !prev.exists(k) || prev[k] != nw[i].data) cls_node_write(unit, nw[i]);
    end
    unit_wrs[unit] = nw;
  endtask

  task automatic load_perm(int unit);
    for (int j = 0; j < HDR_BYTES; j++) begin
      upd_t u = '0;
      u.valid = 1'b1; u.target = UPD_PERM; u.unit = UNIT_W'(unit);
      u.addr = ADDR_W'(j); u.data = WDATA_W'(perm[unit][j]);
      cls_write(u);
      n_perm_wr++;
    end
  endtask

  function automatic cexp_t cls_expect(hdr_t h);
    cexp_t e;
    int bi = ref_best(all_rules, 128'(h), HDR_W);
    e.m = '0; e.unit = 0; e.chk_lat = 1'b0; e.t = 0;
    if (bi >= 0) begin
      e.m = match_t'(all_rules[bi].res);
      e.unit = rule_unit[bi];
    end
    return e;
  endfunction

  // A header that satisfies rule i (its don't-care bits random).
  function automatic hdr_t hit_hdr(int i);
    hdr_t h = rand_hdr();
    return (h & ~hdr_t'(all_rules[i].care)) | hdr_t'(all_rules[i].val);
  endfunction

  function automatic hdr_t pick_hdr();
    int c = $urandom_range(0, 9);
    if (c < 4) return hit_hdr($urandom_range(0, all_rules.size() - 1));
    if (c < 8) return near_hdr(tmpl);
    return rand_hdr();
  endfunction

  task automatic cls_stream(int n, int stall_every, bit chk_lat);
    for (int k = 0; k < n; k++) begin
      automatic hdr_t h = pick_hdr();
      automatic cexp_t e = cls_expect(h);
      if (stall_every > 0 && $urandom_range(1, stall_every) == 1) begin
        automatic int u = $urandom_range(0, N_UNITS - 1);
        cls_in_valid = 1'b1; cls_in_hdr = rand_hdr();
        cls_node_write(u, unit_wrs[u][$urandom_range(0, unit_wrs[u].size() - 1)]);
        n_cls_stall++; n_refused++;
      end
      cls_in_valid = 1'b1; cls_in_hdr = h;
      e.t = cyc; e.chk_lat = chk_lat;
      cexpq.push_back(e);
      @(posedge clk);
      #1;
    end
    cls_in_valid = 1'b0;
  endtask

  // ---------------- forwarding side ----------------
  logic [31:0] base [4];
  rule_t ftab[$];
  wr_t   fwords[$];
  typedef struct { int port; longint t; bit chk_lat; } fexp_t;
  fexp_t fexpq[$];
  int    fgot = 0;

  always @(posedge clk) begin
    if (rst_n && fwd_out_valid) begin
      fgot++;
      if (fexpq.size() == 0) check(1'b0, "forwarding result with no address");
      else begin
        automatic fexp_t e = fexpq.pop_front();
        check(int'(fwd_out_port) == e.port, $sformatf("port %0d, expected %0d", fwd_out_port, e.port));
        if (e.chk_lat) begin
          check(cyc - e.t == FWD_LAT, $sformatf("forwarding latency %0d, expected %0d", cyc - e.t, FWD_LAT));
          n_fwd_lat++;
        end
      end
    end
  end

  function automatic rule_t prefix(logic [31:0] a, int len, int port);
    rule_t r;
    r.care = '0;
    for (int b = 0; b < len; b++) r.care[31-b] = 1'b1;
    r.val  = 128'(a) & r.care;
    r.prio = len;
    r.res  = 64'(port);
    return r;
  endfunction

  function automatic logic [31:0] near_addr();
    return base[$urandom_range(0, 3)] ^ 32'($urandom_range(0, 255) << $urandom_range(0, 24));
  endfunction

  task automatic fwd_write(wr_t w);
    fwd_upd_valid = 1'b1; fwd_upd_level = 5'(w.level); fwd_upd_addr = 15'(w.addr);
    fwd_upd_data = 14'(w.data);
    #1 check(!fwd_in_ready, "forwarding ready during a node write");
    @(posedge clk);
    #1 fwd_upd_valid = 1'b0;
  endtask

  task automatic fwd_load();
    int maxn;
    build(32, 0, 1, ftab, fwords, maxn);
    check(maxn <= 16384, $sformatf("%0d nodes on a level", maxn));
    foreach (fwords[i]) fwd_write(fwords[i]);
  endtask

  // Longest-prefix reference; also notes whether a shorter non-default
  // prefix matched too (a longer prefix overrode it).
  function automatic int fwd_expect(logic [31:0] a, output bit overridden);
    int bi = ref_best(ftab, 128'(a), 32);
    overridden = 1'b0;
    foreach (ftab[i]) begin
      logic [127:0] d = (ftab[i].val ^ 128'(a)) & ftab[i].care;
      if (d[31:0] == '0 && ftab[i].prio > 0 && ftab[i].prio < ftab[bi].prio) overridden = 1'b1;
    end
    return int'(ftab[bi].res);
  endfunction

  task automatic fwd_stream(int n, int stall_every, bit chk_lat);
    for (int k = 0; k < n; k++) begin
      automatic logic [31:0] a = ($urandom_range(0, 5) == 0) ? 32'($urandom) : near_addr();
      automatic fexp_t e;
      automatic bit ov;
      e.port = fwd_expect(a, ov);
      if (e.port == 0) n_fwd_default++;
      if (ov) n_fwd_longer++;
      if (stall_every > 0 && $urandom_range(1, stall_every) == 1) begin
        fwd_in_valid = 1'b1; fwd_in_dst_ip = $urandom;
        fwd_write(fwords[$urandom_range(0, fwords.size() - 1)]);
        n_fwd_stall++; n_refused++;
      end
      fwd_in_valid = 1'b1; fwd_in_dst_ip = a;
      e.t = cyc; e.chk_lat = chk_lat;
      fexpq.push_back(e);
      @(posedge clk);
      #1;
    end
    fwd_in_valid = 1'b0;
  endtask

  task automatic drain();
    repeat (FWD_LAT + 10) @(posedge clk);
    #1;
    check(cexpq.size() == 0, $sformatf("%0d classifier results missing", cexpq.size()));
    check(fexpq.size() == 0, $sformatf("%0d forwarding results missing", fexpq.size()));
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < N_UNITS; u++) n_unit_win[u] = 0;
    for (int t = 0; t < NT; t++) tmpl[t] = rand_hdr();
    begin
      int prios[$];
      for (int i = 1; i <= N_UNITS * RULES_PER_UNIT; i++) prios.push_back(i);
      prios.shuffle();
      for (int i = 0; i < N_UNITS * RULES_PER_UNIT; i++) begin
        automatic rule_t r = gen_rule(tmpl, prios[i]);
        all_rules.push_back(r);
        rule_unit.push_back(i % N_UNITS);
        unit_rules[i % N_UNITS].push_back(r);
      end
    end
    for (int u = 0; u < N_UNITS; u++) begin
      unit_rules[u].push_back(default_rule());
      rand_perm(u, perm[u]);
    end
    for (int i = 0; i < 4; i++) base[i] = $urandom;
    ftab.push_back(prefix(32'h0, 0, 0));
    while (ftab.size() < 40) begin
      automatic rule_t r = prefix(near_addr(), $urandom_range(8, 32), $urandom_range(1, 255));
      automatic bit dup = 1'b0;
      foreach (ftab[i]) if (ftab[i].prio == r.prio && ftab[i].val == r.val) dup = 1'b1;
      if (!dup) ftab.push_back(r);
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    fork
      for (int u = 0; u < N_UNITS; u++) begin
        load_perm(u);
        load_unit(u, 1'b0);
      end
      fwd_load();
    join

    // full-rate streams on both engines at once
    fork
      cls_stream(400, 0, 1'b1);
      fwd_stream(400, 0, 1'b1);
    join
    drain();
    check(cgot == 400 && fgot == 400, "full-rate streams lost results");
    // traffic with node writes
    fork
      cls_stream(600, 6, 1'b0);
      fwd_stream(600, 6, 1'b0);
    join
    drain();

    // incremental update of unit 3: drop its best rule, add a new top rule
    begin
      automatic int victim = -1;
      automatic rule_t nr;
      automatic hdr_t probe;
      automatic cexp_t e_old, e_new;
      foreach (rule_unit[i]) if (victim < 0 && rule_unit[i] == 3) victim = i;
      nr = gen_rule(tmpl, N_UNITS * RULES_PER_UNIT + 1);
      probe = (rand_hdr() & ~hdr_t'(nr.care)) | hdr_t'(nr.val);
      e_old = cls_expect(probe);
      for (int i = 0; i < unit_rules[3].size(); i++)
        if (unit_rules[3][i].prio == all_rules[victim].prio) begin
          unit_rules[3].delete(i);
          break;
        end
      all_rules.delete(victim);
      rule_unit.delete(victim);
      all_rules.push_back(nr);
      rule_unit.push_back(3);
      unit_rules[3].push_back(nr);
      e_new = cls_expect(probe);
      load_unit(3, 1'b1);
      if (e_old.m != e_new.m) n_update_changed++;
      cls_in_valid = 1'b1; cls_in_hdr = probe;
      e_new.t = cyc; e_new.chk_lat = 1'b0;
      cexpq.push_back(e_new);
      @(posedge clk);
      #1 cls_in_valid = 1'b0;
      cls_stream(300, 8, 1'b0);
      drain();
    end

    $display("perm_writes=%0d cls_stalls=%0d fwd_stalls=%0d refused=%0d default=%0d update_changed=%0d",
             n_perm_wr, n_cls_stall, n_fwd_stall, n_refused, n_default, n_update_changed);
    $display("fwd_default=%0d fwd_longer=%0d cls_latency_checked=%0d fwd_latency_checked=%0d",
             n_fwd_default, n_fwd_longer, n_cls_lat, n_fwd_lat);
    for (int u = 0; u < N_UNITS; u++) $display("unit %0d won %0d times", u, n_unit_win[u]);
    check(n_perm_wr > 0, "no byte-order write");
    check(n_cls_stall > 0 && n_fwd_stall > 0, "a stall never happened");
    check(n_refused > 0, "no input was refused");
    check(n_default > 0, "the default rule never won");
    check(n_update_changed > 0, "the rule update changed nothing");
    check(n_fwd_default > 0, "the default route never used");
    check(n_fwd_longer > 0, "no longer prefix overrode a shorter one");
    check(n_cls_lat >= 400 && n_fwd_lat >= 400, "latency not checked at full rate");
    for (int u = 0; u < N_UNITS; u++) check(n_unit_win[u] > 0, $sformatf("unit %0d never won", u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
