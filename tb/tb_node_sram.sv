// tb_node_sram: self-checking test of one single-port node memory bank.
// Writes random words to random addresses, then reads them back and checks
// the one-cycle read latency, that a write leaves the read data unchanged
// and that the read data holds while the bank is not enabled.
module tb_node_sram;
  localparam int AW = 8, DW = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0;
  logic [DW-1:0] rdata;
  logic [DW-1:0] model [2**AW];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  node_sram #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = DW'($urandom);
      en <= 1'b1; we <= 1'b1; addr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    for (int k = 0; k < 500; k++) begin
      automatic int a = $urandom_range(0, 2**AW - 1);
      automatic logic [DW-1:0] held;
      if ($urandom_range(0, 3) == 0) begin
        // overwrite, then check the read port kept its last value
        held = rdata;
        model[a] = DW'($urandom);
        en <= 1'b1; we <= 1'b1; addr <= AW'(a); wdata <= model[a];
        @(posedge clk);
        #1 check(rdata == held, "write changed read data");
      end
      en <= 1'b1; we <= 1'b0; addr <= AW'(a);
      @(posedge clk);
      #1 check(rdata == model[a], $sformatf("addr %0d read %0h expected %0h", a, rdata, model[a]));
      if ($urandom_range(0, 3) == 0) begin
        held = rdata;
        en <= 1'b0; addr <= AW'(a + 1);
        @(posedge clk);
        #1 check(rdata == held, "read data changed while disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
