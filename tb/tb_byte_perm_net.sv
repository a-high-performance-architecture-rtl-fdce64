// tb_byte_perm_net: self-checking test of the 13 x 13 byte permutation
// network. Checks the identity mapping after reset, then loads random
// permutations (and a few arbitrary selections) through the configuration
// port and compares every output byte of random headers with the selected
// input byte, one cycle later. Also checks that stall holds the output.
module tb_byte_perm_net;
  localparam int NB = 13;
  localparam int W = 8 * NB;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic         stall = 1'b0, cfg_we = 1'b0, in_valid = 1'b0;
  logic [3:0]   cfg_idx = '0, cfg_sel = '0;
  logic [W-1:0] in_hdr = '0;
  logic         out_valid;
  logic [W-1:0] out_hdr;
  int           sel [NB];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte_perm_net #(.N_BYTES(NB)) dut (
    .clk(clk), .rst_n(rst_n), .stall(stall), .cfg_we(cfg_we), .cfg_idx(cfg_idx),
    .cfg_sel(cfg_sel), .in_valid(in_valid), .in_hdr(in_hdr),
    .out_valid(out_valid), .out_hdr(out_hdr));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_hdr();
    logic [W-1:0] h;
    for (int i = 0; i < NB; i++) h[W-1-8*i -: 8] = 8'($urandom);
    return h;
  endfunction

  task automatic run_and_check(int n);
    for (int k = 0; k < n; k++) begin
      automatic logic [W-1:0] h = rand_hdr();
      in_hdr <= h; in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      #1;
      check(out_valid, "no valid output");
      for (int j = 0; j < NB; j++)
        check(out_hdr[W-1-8*j -: 8] == h[W-1-8*sel[j] -: 8],
              $sformatf("out byte %0d = %02h, expected in byte %0d = %02h",
                        j, out_hdr[W-1-8*j -: 8], sel[j], h[W-1-8*sel[j] -: 8]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NB; j++) sel[j] = j;
    run_and_check(5);
    for (int t = 0; t < 30; t++) begin
      // random permutation by shuffling, or any selection every 5th round
      for (int j = 0; j < NB; j++) sel[j] = j;
      if (t % 5 == 4) begin
        for (int j = 0; j < NB; j++) sel[j] = $urandom_range(0, NB - 1);
      end else begin
        for (int j = NB - 1; j > 0; j--) begin
          automatic int r = $urandom_range(0, j);
          automatic int tmp = sel[j];
          sel[j] = sel[r]; sel[r] = tmp;
        end
      end
      for (int j = 0; j < NB; j++) begin
        cfg_we <= 1'b1; cfg_idx <= 4'(j); cfg_sel <= 4'(sel[j]);
        @(posedge clk);
      end
      cfg_we <= 1'b0;
      run_and_check(10);
    end
    // stall holds the registered output
    begin
      automatic logic [W-1:0] held = out_hdr;
      stall <= 1'b1; in_hdr <= rand_hdr(); in_valid <= 1'b1;
      repeat (3) @(posedge clk);
      #1 check(out_hdr == held, "output changed during stall");
      stall <= 1'b0; in_valid <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
