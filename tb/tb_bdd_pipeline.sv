// tb_bdd_pipeline: self-checking test of the SRAM decision-diagram pipeline.
//
// Part 1 loads the three-variable example function
// f = x0.x1 + x0'.(x1'.x2 + x1.x2') as the three banks {0,1}, {0,1,2,3},
// {0,1,1,0,0,0,1,1} (binary slices, one bit per level) and checks all eight
// inputs and the 3-cycle latency.
// Part 2 uses a small multi-bit configuration (16-bit key, 4 root bits,
// 4 bits per level, 3 banks): a random rule list is compiled to node words,
// written, and 300 random keys are streamed one per cycle while node writes
// (re-writes of the current contents) stall the pipeline. Each result is
// compared with a direct priority search over the rules, the results must
// come out in order, and a stream without stalls must deliver one result
// per clock.
module tb_bdd_pipeline;
  import bdd_build_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- part 1: the 3-variable example ----------------
  logic       a_stall = 1'b0, a_in_valid = 1'b0, a_wr_en = 1'b0;
  logic [2:0] a_key = '0;
  logic [1:0] a_wr_level = '0;
  logic [2:0] a_wr_addr = '0;
  logic [1:0] a_wr_data = '0;
  logic       a_out_valid;
  logic [0:0] a_out;

  bdd_pipeline #(.KEY_W(3), .ROOT_BITS(0), .STRIDE(1), .PTR_W(2), .RES_W(1)) dut_a (
    .clk(clk), .rst_n(rst_n), .stall(a_stall), .in_valid(a_in_valid), .in_key(a_key),
    .wr_en(a_wr_en), .wr_level(a_wr_level), .wr_addr(a_wr_addr), .wr_data(a_wr_data),
    .out_valid(a_out_valid), .out_result(a_out));

  // ---------------- part 2: 16-bit key, 4 bits per level ----------------
  localparam int KW = 16, RB = 4, ST = 4, PW = 6, RW = 12;
  localparam int LV = (KW - RB) / ST;
  logic          b_stall = 1'b0, b_in_valid = 1'b0, b_wr_en = 1'b0;
  logic [KW-1:0] b_key = '0;
  logic [1:0]    b_wr_level = '0;
  logic [PW+ST-1:0] b_wr_addr = '0;
  logic [RW-1:0] b_wr_data = '0;
  logic          b_out_valid;
  logic [RW-1:0] b_out;

  bdd_pipeline #(.KEY_W(KW), .ROOT_BITS(RB), .STRIDE(ST), .PTR_W(PW), .RES_W(RW)) dut_b (
    .clk(clk), .rst_n(rst_n), .stall(b_stall), .in_valid(b_in_valid), .in_key(b_key),
    .wr_en(b_wr_en), .wr_level(b_wr_level), .wr_addr(b_wr_addr), .wr_data(b_wr_data),
    .out_valid(b_out_valid), .out_result(b_out));

  longint unsigned b_expect[$];
  int  b_got = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && b_out_valid) begin
      longint unsigned e;
      b_got++;
      if (b_expect.size() == 0) begin
        check(1'b0, "unexpected result from part-2 pipeline");
      end else begin
        e = b_expect.pop_front();
        check(b_out == RW'(e), $sformatf("part 2 result %0h, expected %0h", b_out, e));
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rule_t rules[$];
  wr_t   wrs[$];
  int    maxn;

  initial begin
    automatic int lvl0 [2]  = '{0, 1};
    automatic int lvl1 [4]  = '{0, 1, 2, 3};
    automatic int lvl2 [8]  = '{0, 1, 1, 0, 0, 0, 1, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- part 1 ----
    for (int l = 0; l < 3; l++) begin
      automatic int n = 2 << l;
      for (int a = 0; a < n; a++) begin
        a_stall <= 1'b1; a_wr_en <= 1'b1; a_wr_level <= 2'(l); a_wr_addr <= 3'(a);
        a_wr_data <= (l == 0) ? 2'(lvl0[a]) : (l == 1) ? 2'(lvl1[a]) : 2'(lvl2[a]);
        @(posedge clk);
      end
    end
    a_wr_en <= 1'b0; a_stall <= 1'b0;
    for (int x = 0; x < 8; x++) begin
      automatic bit x0 = x[2], x1 = x[1], x2 = x[0];
      automatic bit f = (x0 & x1) | (!x0 & ((!x1 & x2) | (x1 & !x2)));
      longint t0;
      a_key <= 3'(x); a_in_valid <= 1'b1;
      @(posedge clk);
      t0 = cyc;
      a_in_valid <= 1'b0;
      do @(posedge clk); while (!a_out_valid && cyc < t0 + 10);
      check(a_out_valid, $sformatf("part 1 no result for x=%0d", x));
      check(a_out[0] == f, $sformatf("part 1 f(%03b)=%0d expected %0d", x, a_out[0], f));
      check(cyc - t0 == 3, $sformatf("part 1 latency %0d cycles, expected 3", cyc - t0));
    end

    // ---- part 2 ----
    for (int i = 0; i < 10; i++) begin
      rule_t r;
      automatic int plen = $urandom_range(0, KW);
      r.val  = 128'($urandom);
      r.care = '0;
      for (int b = 0; b < plen; b++) r.care[KW-1-b] = 1'b1;
      if ($urandom_range(0, 2) == 0) r.care[3:0] = 4'hF;  // a non-prefix condition
      r.prio = 1 + i * 3;
      r.res  = 64'($urandom_range(1, (1 << RW) - 1));
      rules.push_back(r);
    end
    begin
      rule_t d;
      d.val = '0; d.care = '0; d.prio = 0; d.res = 0;
      rules.push_back(d);
    end
    build(KW, RB, ST, rules, wrs, maxn);
    check(maxn <= (1 << PW), $sformatf("part 2 needs %0d nodes per level", maxn));
    foreach (wrs[i]) begin
      b_stall <= 1'b1; b_wr_en <= 1'b1;
      b_wr_level <= 2'(wrs[i].level); b_wr_addr <= (PW+ST)'(wrs[i].addr);
      b_wr_data <= RW'(wrs[i].data);
      @(posedge clk);
    end
    b_wr_en <= 1'b0; b_stall <= 1'b0;
    @(posedge clk);

    // Stream without stalls: results must arrive one per clock.
    begin
      longint first_in, first_out, last_out;
      first_out = -1;
      fork
        begin
          for (int k = 0; k < 100; k++) begin
            logic [KW-1:0] key;
            int bi;
            key = KW'($urandom);
            if (k % 3 == 0) key = KW'(rules[$urandom_range(0, 9)].val) ^ KW'($urandom_range(0, 3));
            bi = ref_best(rules, 128'(key), KW);
            b_expect.push_back(rules[bi].res);
            b_key <= key; b_in_valid <= 1'b1;
            @(posedge clk);
            if (k == 0) first_in = cyc;
          end
          b_in_valid <= 1'b0;
        end
        begin
          @(posedge clk iff b_out_valid);
          first_out = cyc;
          repeat (99) @(posedge clk iff b_out_valid);
          last_out = cyc;
        end
      join
      check(first_out - first_in == LV, $sformatf("part 2 latency %0d, expected %0d", first_out - first_in, LV));
      check(last_out - first_out == 99, $sformatf("part 2: 100 results took %0d cycles", last_out - first_out + 1));
    end

    // Stream with stalls from node re-writes.
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(0, 4) == 0) begin
        automatic int j = $urandom_range(0, wrs.size() - 1);
        b_in_valid <= 1'b0;
        b_stall <= 1'b1; b_wr_en <= 1'b1;
        b_wr_level <= 2'(wrs[j].level); b_wr_addr <= (PW+ST)'(wrs[j].addr);
        b_wr_data <= RW'(wrs[j].data);
        @(posedge clk);
        b_stall <= 1'b0; b_wr_en <= 1'b0;
      end
      begin
        logic [KW-1:0] key;
        int bi;
        key = KW'($urandom);
        if (k % 2 == 0) key = KW'(rules[$urandom_range(0, 9)].val);
        bi = ref_best(rules, 128'(key), KW);
        b_expect.push_back(rules[bi].res);
        b_key <= key; b_in_valid <= 1'b1;
        @(posedge clk);
      end
    end
    b_in_valid <= 1'b0;
    repeat (LV + 5) @(posedge clk);
    check(b_got == 300 && b_expect.size() == 0, $sformatf("part 2: %0d results for 300 keys", b_got));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
