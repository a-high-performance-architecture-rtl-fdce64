// tb_packet_classifier: self-checking test of the complete multi-field
// classifier at its full size (10 units, 24 banks of 1024 x 16 words each).
//
// A random rule-set of 40 5-tuple rules is split over the ten units (four
// each, plus the catch-all default rule per unit). Every unit but the first
// gets a random byte order; its rules are rewritten in that order, compiled
// to node words and loaded, with the byte order, through the write port.
// Headers near the rule templates are then classified one per clock and
// each result (action, priority, unit) is compared with a direct priority
// search over the whole rule-set in the original byte order. Also checked:
// the 29-cycle latency and one result per clock in a stall-free stream; node
// writes in the middle of traffic stall the pipeline, refuse the header
// offered in that cycle and change no result; and an incremental update
// (one rule deleted, one added, only changed words rewritten) takes effect.
module tb_packet_classifier;
  import pc_pkg::*;
  import bdd_build_pkg::*;
  import cls_tb_pkg::*;

  localparam int RULES_PER_UNIT = 4;
  localparam int LATENCY = 1 + LEVELS + 4;

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

  hdr_t  tmpl [NT];
  rule_t all_rules[$];
  int    rule_unit[$];
  rule_t unit_rules [N_UNITS][$];
  int    perm [N_UNITS][HDR_BYTES];
  wr_t   unit_wrs [N_UNITS][$];

  typedef struct { match_t m; int unit; longint t; bit chk_lat; } exp_t;
  exp_t   expq[$];
  longint cyc = 0;
  int     got = 0, lat_ok = 0, stalls = 0, refused = 0;
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
        if (e.chk_lat) begin
          check(cyc - e.t == LATENCY, $sformatf("latency %0d, expected %0d", cyc - e.t, LATENCY));
          lat_ok++;
        end
      end
    end
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All stimulus changes 1 time unit after a rising edge, with blocking
  // assignments; the design samples it at the next rising edge.
  task automatic write(upd_t u);
    upd = u;
    #1 if (u.target == UPD_NODE) check(!in_ready, "ready during a node write");
    @(posedge clk);
    #1 upd = '0;
  endtask

  task automatic node_write(int unit, wr_t w);
    upd_t u = '0;
    u.valid = 1'b1; u.target = UPD_NODE; u.unit = UNIT_W'(unit);
    u.level = LVL_W'(w.level); u.addr = ADDR_W'(w.addr); u.data = WDATA_W'(w.data);
    write(u);
  endtask

  // Compile one unit's rules; write every word, or only changed ones.
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
      if (!only_changes || !prev.exists(k) || prev[k] != nw[i].data) node_write(unit, nw[i]);
    end
    unit_wrs[unit] = nw;
  endtask

  task automatic load_perm(int unit);
    for (int j = 0; j < HDR_BYTES; j++) begin
      upd_t u = '0;
      u.valid = 1'b1; u.target = UPD_PERM; u.unit = UNIT_W'(unit);
      u.addr = ADDR_W'(j); u.data = WDATA_W'(perm[unit][j]);
      write(u);
    end
  endtask

  function automatic exp_t expect_for(hdr_t h);
    exp_t e;
    int bi = ref_best(all_rules, 128'(h), HDR_W);
    e.m = '0; e.unit = 0; e.chk_lat = 1'b0; e.t = 0;
    if (bi >= 0) begin
      e.m = match_t'(all_rules[bi].res);
      e.unit = rule_unit[bi];
    end
    return e;
  endfunction

  // Offer n headers, one per clock; with stall_every > 0 a node re-write
  // (same data) is issued every so often, with a junk header offered too.
  task automatic stream(int n, int stall_every, bit chk_lat);
    for (int k = 0; k < n; k++) begin
      automatic hdr_t h = ($urandom_range(0, 4) == 0) ? rand_hdr() : near_hdr(tmpl);
      automatic exp_t e = expect_for(h);
      if (stall_every > 0 && $urandom_range(1, stall_every) == 1) begin
        automatic int u = $urandom_range(0, N_UNITS - 1);
        automatic int j = $urandom_range(0, unit_wrs[u].size() - 1);
        in_valid = 1'b1; in_hdr = rand_hdr();
        node_write(u, unit_wrs[u][j]);
        stalls++; refused++;
      end
      in_valid = 1'b1; in_hdr = h;
      e.t = cyc; e.chk_lat = chk_lat;
      expq.push_back(e);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
  endtask

  task automatic drain();
    repeat (LATENCY + 10) @(posedge clk);
    #1 check(expq.size() == 0, $sformatf("%0d results missing", expq.size()));
  endtask

  initial begin
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

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int u = 0; u < N_UNITS; u++) begin
      load_perm(u);
      load_unit(u, 1'b0);
    end

    // one result per clock, fixed latency
    begin
      automatic int g0 = got;
      stream(300, 0, 1'b1);
      drain();
      check(got - g0 == 300, "stall-free stream lost results");
      check(lat_ok >= 300, "latency not checked");
    end
    // traffic with node writes in between
    stream(400, 6, 1'b0);
    drain();
    check(stalls > 10, "too few stalls exercised");

    // incremental update: delete one rule and add one, in unit 3
    begin
      automatic int victim = -1;
      automatic rule_t nr;
      foreach (rule_unit[i]) if (victim < 0 && rule_unit[i] == 3) victim = i;
      for (int i = 0; i < unit_rules[3].size(); i++)
        if (unit_rules[3][i].prio == all_rules[victim].prio) begin
          unit_rules[3].delete(i);
          break;
        end
      all_rules.delete(victim);
      rule_unit.delete(victim);
      nr = gen_rule(tmpl, N_UNITS * RULES_PER_UNIT + 1);
      all_rules.push_back(nr);
      rule_unit.push_back(3);
      unit_rules[3].push_back(nr);
      load_unit(3, 1'b1);
      stream(300, 8, 1'b0);
      drain();
    end

    $display("stalls=%0d results=%0d", stalls, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
