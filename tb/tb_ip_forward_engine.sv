// tb_ip_forward_engine: self-checking test of the IP forwarding engine at
// its full size (32 binary levels, 16384 nodes per level).
//
// A forwarding table of nested prefixes around a few base addresses, plus
// the default route (length 0, port 0), is compiled into node words with
// one address bit per level (priority = prefix length, so the longest match
// wins) and written into the banks. Destination addresses near the bases
// are looked up one per clock and compared with a direct longest-prefix
// search. Checked: the 32-cycle latency and one result per clock, node
// writes during traffic (they stall lookups and refuse the address offered
// in that cycle), and an incremental update that adds and removes prefixes
// by rewriting only the words that change. A second, collapsed instance
// (STRIDE = 4: 8 banks of 16-way nodes, 4096 nodes per bank) is loaded with
// the same table, compiled four bits per level, and checked the same way
// with its 8-cycle latency.
module tb_ip_forward_engine;
  import bdd_build_pkg::*;

  localparam int LATENCY = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [31:0] in_dst_ip = '0;
  logic        upd_valid = 1'b0;
  logic [4:0]  upd_level = '0;
  logic [14:0] upd_addr = '0;
  logic [13:0] upd_data = '0;
  logic        out_valid;
  logic [7:0]  out_port;

  ip_forward_engine dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_dst_ip(in_dst_ip),
    .upd_valid(upd_valid), .upd_level(upd_level), .upd_addr(upd_addr), .upd_data(upd_data),
    .out_valid(out_valid), .out_port(out_port));

  // collapsed instance: 4 address bits per bank
  localparam int LAT4 = 8;
  logic        in4_valid = 1'b0;
  logic        in4_ready;
  logic        upd4_valid = 1'b0;
  logic [2:0]  upd4_level = '0;
  logic [15:0] upd4_addr = '0;
  logic [11:0] upd4_data = '0;
  logic        out4_valid;
  logic [7:0]  out4_port;

  ip_forward_engine #(.PTR_W(12), .STRIDE(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in4_valid), .in_ready(in4_ready), .in_dst_ip(in_dst_ip),
    .upd_valid(upd4_valid), .upd_level(upd4_level), .upd_addr(upd4_addr), .upd_data(upd4_data),
    .out_valid(out4_valid), .out_port(out4_port));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0] base [4];
  rule_t table_q[$];
  wr_t   words[$];

  typedef struct { int port; longint t; bit chk_lat; } exp_t;
  exp_t   expq[$];
  longint cyc = 0;
  int     got = 0, stalls = 0;
  always @(posedge clk) cyc <= cyc + 1;

  exp_t expq4[$];
  int   got4 = 0;
  always @(posedge clk) begin
    if (rst_n && out4_valid) begin
      got4++;
      if (expq4.size() == 0) check(1'b0, "collapsed engine: result with no address");
      else begin
        automatic exp_t e = expq4.pop_front();
        check(int'(out4_port) == e.port, $sformatf("collapsed engine: port %0d, expected %0d", out4_port, e.port));
        check(cyc - e.t == LAT4, $sformatf("collapsed engine: latency %0d, expected %0d", cyc - e.t, LAT4));
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      got++;
      if (expq.size() == 0) check(1'b0, "result with no address");
      else begin
        automatic exp_t e = expq.pop_front();
        check(int'(out_port) == e.port, $sformatf("port %0d, expected %0d", out_port, e.port));
        if (e.chk_lat) check(cyc - e.t == LATENCY, $sformatf("latency %0d, expected %0d", cyc - e.t, LATENCY));
      end
    end
  end

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  function automatic bit present(rule_t r);
    foreach (table_q[i]) if (table_q[i].prio == r.prio && table_q[i].val == r.val) return 1'b1;
    return 1'b0;
  endfunction

  function automatic rule_t rand_prefix();
    logic [31:0] a = base[$urandom_range(0, 3)] ^ 32'($urandom_range(0, 255) << $urandom_range(0, 24));
    return prefix(a, $urandom_range(8, 32), $urandom_range(1, 255));
  endfunction

  // All stimulus changes 1 time unit after a rising edge.
  task automatic write(wr_t w);
    upd_valid = 1'b1; upd_level = 5'(w.level); upd_addr = 15'(w.addr); upd_data = 14'(w.data);
    #1 check(!in_ready, "ready during a node write");
    @(posedge clk);
    #1 upd_valid = 1'b0;
  endtask

  task automatic load(bit only_changes);
    wr_t nw[$];
    int maxn;
    longint unsigned prev [int];
    build(32, 0, 1, table_q, nw, maxn);
    check(maxn <= 16384, $sformatf("%0d nodes on a level", maxn));
    foreach (words[i]) prev[words[i].level * 65536 + words[i].addr] = words[i].data;
    foreach (nw[i]) begin
      automatic int k = nw[i].level * 65536 + nw[i].addr;
      if (!only_changes || !prev.exists(k) || prev[k] != nw[i].data) write(nw[i]);
    end
    words = nw;
  endtask

  task automatic stream(int n, int stall_every, bit chk_lat);
    for (int k = 0; k < n; k++) begin
      automatic logic [31:0] a = base[$urandom_range(0, 3)] ^ 32'($urandom_range(0, 255) << $urandom_range(0, 24));
      automatic exp_t e;
      if ($urandom_range(0, 5) == 0) a = $urandom;
      e.port = int'(table_q[ref_best(table_q, 128'(a), 32)].res);
      if (stall_every > 0 && $urandom_range(1, stall_every) == 1) begin
        in_valid = 1'b1; in_dst_ip = $urandom;
        write(words[$urandom_range(0, words.size() - 1)]);
        stalls++;
      end
      in_valid = 1'b1; in_dst_ip = a;
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
    for (int i = 0; i < 4; i++) base[i] = $urandom;
    table_q.push_back(prefix(32'h0, 0, 0));
    while (table_q.size() < 40) begin
      automatic rule_t r = rand_prefix();
      if (!present(r)) table_q.push_back(r);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    load(1'b0);
    begin
      automatic int g0 = got;
      stream(300, 0, 1'b1);
      drain();
      check(got - g0 == 300, "stall-free stream lost results");
    end
    stream(400, 6, 1'b0);
    drain();
    check(stalls > 10, "too few stalls exercised");
    // incremental update: drop two prefixes, add five
    table_q.delete(5);
    table_q.delete(9);
    for (int i = 0; i < 5; i++) begin
      automatic rule_t r = rand_prefix();
      if (!present(r)) table_q.push_back(r);
    end
    load(1'b1);
    stream(300, 8, 1'b0);
    drain();

    // collapsed engine: compile 4 bits per level, load, stream
    begin
      wr_t nw[$];
      int  maxn;
      build(32, 0, 4, table_q, nw, maxn);
      check(maxn <= 4096, $sformatf("collapsed: %0d nodes on a level", maxn));
      foreach (nw[i]) begin
        upd4_valid = 1'b1; upd4_level = 3'(nw[i].level);
        upd4_addr = 16'(nw[i].addr); upd4_data = 12'(nw[i].data);
        #1 check(!in4_ready, "collapsed engine: ready during a node write");
        @(posedge clk);
        #1 upd4_valid = 1'b0;
      end
      for (int k = 0; k < 400; k++) begin
        automatic logic [31:0] a = base[$urandom_range(0, 3)] ^ 32'($urandom_range(0, 255) << $urandom_range(0, 24));
        automatic exp_t e;
        if ($urandom_range(0, 5) == 0) a = $urandom;
        e.port = int'(table_q[ref_best(table_q, 128'(a), 32)].res);
        in4_valid = 1'b1; in_dst_ip = a;
        e.t = cyc; e.chk_lat = 1'b1;
        expq4.push_back(e);
        @(posedge clk);
        #1;
      end
      in4_valid = 1'b0;
      drain();
      check(expq4.size() == 0 && got4 == 400, $sformatf("collapsed engine: %0d results", got4));
    end
    $display("stalls=%0d results=%0d collapsed results=%0d", stalls, got, got4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
