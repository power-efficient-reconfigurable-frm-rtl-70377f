// tb_dram_ppg: self-checking testbench for the distributed-RAM partial
// product generator.
//
// A 3-group, 4-taps-per-group instance covering the first 10 model filter taps
// is checked against a direct tap-by-tap sum: after reset both banks must give
// sum_t h(t)*bit(t); then bank 1 is loaded with random coefficients (the
// testbench forms each RAM word itself) and both banks are read at random.
// Every read is checked one clock after rd_en (registered RAM output), and a
// cycle without rd_en must hold the previous result.
module tb_dram_ppg;
  import frm_pkg::*;

  localparam int G = 3, K = 4, LW = 18, TAPS = 10, PPW = LW + 2;

  logic clk = 0, rst = 1;
  logic rd_en = 0, rd_bank = 0, wr_en = 0, wr_bank = 0;
  logic [G*K-1:0] addr_bits = '0;
  logic [3:0] wr_group = '0;
  logic [K-1:0] wr_addr = '0;
  logic signed [LW-1:0] wr_data = '0;
  logic signed [PPW-1:0] pp;
  int checks = 0, failures = 0;
  int coef [2][G*K];

  dram_ppg #(.GROUPS(G), .K(K), .LUT_W(LW), .TAPS(TAPS), .INIT(INIT_MODEL), .KIND(PPA_BK)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_pp(int bank, logic [G*K-1:0] bits);
    int s = 0;
    for (int t = 0; t < G * K; t++) if (bits[t]) s += coef[bank][t];
    return s;
  endfunction

  task automatic read_check(int bank, logic [G*K-1:0] bits);
    int want;
    @(negedge clk);
    rd_en = 1; rd_bank = 1'(bank); addr_bits = bits;
    want = expect_pp(bank, bits);
    @(negedge clk);
    rd_en = 0; addr_bits = ~bits;
    checks++;
    if (pp !== PPW'(want)) begin
      failures++;
      if (failures < 10) $display("FAIL bank %0d bits %b: pp=%0d want %0d", bank, bits, pp, want);
    end
    @(negedge clk);          // rd_en low: value held
    checks++;
    if (pp !== PPW'(want)) begin
      failures++;
      $display("FAIL hold: pp=%0d want %0d", pp, want);
    end
  endtask

  initial begin
    for (int t = 0; t < G * K; t++) begin
      coef[0][t] = (t < TAPS) ? model_coef(t) : 0;
      coef[1][t] = coef[0][t];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    // reset contents, all addresses of each group, both banks
    for (int bk = 0; bk < 2; bk++)
      for (int g = 0; g < G; g++)
        for (int a = 0; a < 16; a++)
          read_check(bk, (G*K)'(a) << (g * K));
    for (int n = 0; n < 100; n++) read_check(n % 2, (G*K)'($urandom));
    // reload bank 1 with random coefficients
    for (int t = 0; t < G * K; t++) coef[1][t] = int'($urandom_range(0, 60000)) - 30000;
    for (int g = 0; g < G; g++)
      for (int a = 0; a < 16; a++) begin
        automatic int s = 0;
        for (int j = 0; j < K; j++) if (a[j]) s += coef[1][g*K+j];
        @(negedge clk);
        wr_en = 1; wr_bank = 1; wr_group = 4'(g); wr_addr = 4'(a); wr_data = LW'(s);
      end
    @(negedge clk);
    wr_en = 1; wr_bank = 1; wr_group = 4'(G); wr_addr = '0; wr_data = '1;  // out-of-range group: ignored
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 300; n++) read_check($urandom_range(0, 1), (G*K)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
