// da_pu_check: stimulus and checker for one da_pu instance, used by
// tb_da_pu. The processing unit is fed random 8-bit samples, full-scale
// values included, at random times, also while it is busy (those offers must
// be refused). Each result is compared with a direct convolution of the
// accepted samples using the unit's power-up taps, and the delay-line centre
// sample, the bank and the latency (IN_W/PES+2 edges from acceptance) are
// checked. Bank 1 is then loaded with random coefficients and samples
// alternate between the banks. `done` rises when the run is over; checks and
// failures are counted in the two output variables.
module da_pu_check
  import frm_pkg::*;
#(
  parameter int        TAPS = 45,
  parameter int        SP   = 2,
  parameter int        PES  = 4,
  parameter lut_init_e INIT = INIT_MODEL
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int G = (TAPS + 3) / 4, LW = 18, ACCW = LW + $clog2(G) + 8 + 1;
  // cycles from the offer cycle to the out_valid cycle: the accepting edge plus IN_W/PES+2
  localparam int LAT = 1 + 8 / PES + 2;

  initial begin done = 1'b0; checks = 0; failures = 0; end

  logic rst = 1;
  logic in_valid = 0, in_ready, in_bank = 0;
  logic [7:0] in_data = '0;
  logic wr_en = 0, wr_bank = 0;
  logic [3:0] wr_group = '0;
  logic [3:0] wr_addr = '0;
  logic signed [LW-1:0] wr_data = '0;
  logic out_valid, out_bank;
  logic signed [ACCW-1:0] out_data;
  logic [7:0] out_center;

  da_pu #(.TAPS(TAPS), .SPACING(SP), .PES(PES), .INIT(INIT)) dut (.*);

  int cycle = 0, refused = 0;
  int coef [2][TAPS];
  int hist [$];               // accepted samples, newest first
  longint exp_data [$];
  int exp_center [$], exp_bank [$], exp_cycle [$];

  always @(posedge clk) cycle++;


  // results, checked on the falling edge
  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_data.size() == 0) begin
      failures++; $display("FAIL unexpected out_valid");
    end else begin
      automatic longint d = exp_data.pop_front();
      automatic int c = exp_center.pop_front(), b = exp_bank.pop_front(), t = exp_cycle.pop_front();
      if (longint'(out_data) != d || out_center !== 8'(c) || out_bank !== 1'(b) || cycle - t != LAT) begin
        failures++;
        if (failures < 10)
          $display("FAIL out=%0d want %0d centre=%0d want %0d bank=%0d lat=%0d", out_data, d, out_center, c, out_bank, cycle - t);
      end
    end
  end

  task automatic offer(int bank, int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 3) != 0);
      in_data  = 8'($urandom);
      if ($urandom_range(0, 9) == 0) in_data = 8'h80;
      if ($urandom_range(0, 9) == 0) in_data = 8'h7f;
      in_bank = (bank < 0) ? 1'($urandom) : 1'(bank);
      #1;
      if (in_valid && !in_ready) refused++;
      if (in_valid && in_ready) begin
        automatic longint s = 0;
        hist.push_front(int'(signed'(in_data)));
        for (int t = 0; t < TAPS; t++)
          if (t * SP < hist.size()) s += longint'(coef[in_bank][t]) * hist[t * SP];
        exp_data.push_back(s);
        exp_center.push_back(((TAPS - 1) / 2) * SP < hist.size() ? hist[((TAPS - 1) / 2) * SP] : 0);
        exp_bank.push_back(int'(in_bank));
        exp_cycle.push_back(cycle);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < TAPS; t++) begin coef[0][t] = init_coef(INIT, t, TAPS); coef[1][t] = coef[0][t]; end
    repeat (3) @(negedge clk);
    rst = 0;
    offer(0, 1200);
    @(negedge clk); in_valid = 0;
    // load bank 1 with random coefficients
    for (int t = 0; t < TAPS; t++) coef[1][t] = int'($urandom_range(0, 20000)) - 10000;
    for (int g = 0; g < G; g++)
      for (int a = 0; a < 16; a++) begin
        automatic int s = 0;
        for (int j = 0; j < 4; j++) if (a[j] && g * 4 + j < TAPS) s += coef[1][g*4+j];
        @(negedge clk);
        wr_en = 1; wr_bank = 1; wr_group = 4'(g); wr_addr = 4'(a); wr_data = LW'(s);
      end
    @(negedge clk); wr_en = 0;
    offer(1, 600);
    offer(-1, 1200);
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_data.size() != 0 || refused == 0) begin
      failures++; $display("FAIL %0d results missing, %0d refused offers", exp_data.size(), refused);
    end
    done = 1'b1;
  end

endmodule
