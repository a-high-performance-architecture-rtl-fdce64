// tb_prio_encoder: self-checking test of the 10-input pipelined priority
// encoder. Feeds one random set of ten (action, priority) results per clock,
// with equal priorities forced now and then, and compares the output with
// a direct search for the largest priority (lowest unit on ties). Checks
// the 4-cycle latency and one result per clock.
module tb_prio_encoder;
  import pc_pkg::*;
  localparam int N = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic   in_valid = 1'b0;
  match_t in_match [N];
  logic   out_valid;
  match_t out_match;
  logic [3:0] out_unit;

  typedef struct { match_t m; int unit; } exp_t;
  exp_t expq[$];
  longint cyc = 0;
  longint t_in[$];
  int got = 0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  prio_encoder #(.N_IN(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_match(in_match),
    .out_valid(out_valid), .out_match(out_match), .out_unit(out_unit));

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      got++;
      if (expq.size() == 0) check(1'b0, "unexpected output");
      else begin
        automatic exp_t e = expq.pop_front();
        automatic longint t = t_in.pop_front();
        check(out_match == e.m && int'(out_unit) == e.unit,
              $sformatf("got unit %0d prio %0d action %0d, expected unit %0d prio %0d action %0d",
                        out_unit, out_match.prio, out_match.action, e.unit, e.m.prio, e.m.action));
        check(cyc - t == 4, $sformatf("latency %0d, expected 4", cyc - t));
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) in_match[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 1000; k++) begin
      automatic exp_t e;
      automatic int range = (k % 4 == 0) ? 3 : (1 << PRIO_W) - 1;
      e.unit = -1;
      for (int i = 0; i < N; i++) begin
        in_match[i].action <= ACTION_W'($urandom);
        in_match[i].prio   <= PRIO_W'($urandom_range(0, range));
      end
      #1;
      for (int i = 0; i < N; i++)
        if (e.unit < 0 || in_match[i].prio > e.m.prio) begin
          e.unit = i; e.m = in_match[i];
        end
      in_valid <= (k % 7 != 6);
      #1;
      if (in_valid) begin expq.push_back(e); t_in.push_back(cyc); end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    check(expq.size() == 0 && got > 800, $sformatf("%0d outputs, %0d missing", got, expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
