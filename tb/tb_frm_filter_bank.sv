// tb_frm_filter_bank: end-to-end, full-size testbench of the FRM filter bank.
//
// The top runs with all parameters at their defaults (45-tap model filter
// interpolated by M = 4, 16-tap masking filters, 8-bit samples, Brent-Kung
// adders). The testbench holds its own integer model of
//   m[n] = rs(sum_t h(t) x[n-tM]),  c[n] = rs(2^14 x[n-22M] - sum_t h(t) x[n-tM]),
//   y[n] = rs(sum_k hM(k) m[n-k] + sum_k hCM(k) c[n-k]),
// rs() = round half up by 14 bits and saturate to 8 bits, evaluated per
// sample with the bank chosen by ctrl for that sample, and compares every
// output bit-exactly, together with the 10-cycle latency.
// Phases: (1) reset contents on bank 0 (model filter through a unit-impulse
// mask); (2) while samples flow, bank 1 of all three filters is loaded with
// other coefficients (masking gains above one, to force saturation); (3) ctrl
// selects bank 1; (4) ctrl changes at random from sample to sample.
// It counts the mechanisms of the design and fails if one never happened:
// coefficient writes, bank switches, refused offers (x_ready low), saturation
// of a branch signal and of the output, and negative full-scale input.
module tb_frm_filter_bank;
  import frm_pkg::*;

  localparam int N = 45, M = 4, MT = 16, LW = 18, LAT = 1 + 10;

  logic clk = 0, reset = 1;
  logic x_valid = 0, x_ready, ctrl = 0;
  logic [7:0] X = '0;
  logic lut_we = 0, lut_bank = 0;
  filter_sel_e lut_filter = SEL_MODEL;
  logic [3:0] lut_group = '0, lut_addr = '0;
  logic signed [LW-1:0] lut_data = '0;
  logic y_valid;
  logic [7:0] Y_n;

  frm_filter_bank dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_writes = 0, n_switch = 0, n_refused = 0, n_sat_branch = 0, n_sat_out = 0, n_minus = 0;
  int hm [2][N], hmask [2][MT], hcmask [2][MT];
  int xh [$], mh [$], ch [$];      // histories, newest first
  int exp_y [$], exp_cycle [$];
  int last_bank = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(longint v, ref int sat_count);
    longint r = (v + 8192) >>> 14;
    if (r > 127)  begin sat_count++; return 127;  end
    if (r < -128) begin sat_count++; return -128; end
    return int'(r);
  endfunction

  function automatic int at(ref int q [$], input int i);
    return (i < q.size()) ? q[i] : 0;
  endfunction

  // reference model for one accepted sample
  task automatic model_sample(int x, int b);
    longint acc = 0, y = 0;
    int mv, cv;
    xh.push_front(x);
    for (int t = 0; t < N; t++) acc += longint'(hm[b][t]) * at(xh, t * M);
    mv = rs(acc, n_sat_branch);
    cv = rs((longint'(at(xh, (N - 1) / 2 * M)) <<< 14) - acc, n_sat_branch);
    mh.push_front(mv);
    ch.push_front(cv);
    for (int k = 0; k < MT; k++)
      y += longint'(hmask[b][k]) * at(mh, k) + longint'(hcmask[b][k]) * at(ch, k);
    exp_y.push_back(rs(y, n_sat_out));
    exp_cycle.push_back(cycle);
    if (x == -128) n_minus++;
  endtask

  always @(negedge clk) if (!reset && y_valid) begin
    checks++;
    if (exp_y.size() == 0) begin
      failures++; $display("FAIL unexpected y_valid");
    end else begin
      automatic int w = exp_y.pop_front(), t = exp_cycle.pop_front();
      if (Y_n !== 8'(w) || cycle - t != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d want %0d latency %0d", signed'(Y_n), w, cycle - t);
      end
    end
  end

  // one cycle of stimulus; a coefficient write may go with it
  task automatic step(int bank_mode);
    @(negedge clk);
    x_valid = 1'($urandom_range(0, 2) != 0);
    case ($urandom_range(0, 7))
      0:       X = 8'h80;
      1:       X = 8'h7f;
      2, 3:    X = 8'($urandom_range(0, 15)) - 8'd8;
      default: X = 8'($urandom);
    endcase
    if (bank_mode == 2) ctrl = 1'($urandom_range(0, 3) == 0) ? ~ctrl : ctrl;
    else                ctrl = 1'(bank_mode);
    #1;
    if (x_valid && !x_ready) n_refused++;
    if (x_valid && x_ready) begin
      if (int'(ctrl) != last_bank) n_switch++;
      last_bank = int'(ctrl);
      model_sample(int'(signed'(X)), int'(ctrl));
    end
  endtask

  // write all RAM words of one filter's bank, one word per stimulus cycle

  task automatic write_word(filter_sel_e f, int bank, int g, int a, int value);
    @(negedge clk);
    lut_we = 1; lut_filter = f; lut_bank = 1'(bank);
    lut_group = 4'(g); lut_addr = 4'(a); lut_data = LW'(value);
    n_writes++;
    @(negedge clk);
    lut_we = 0;
  endtask

  initial begin
    for (int b = 0; b < 2; b++) begin
      for (int t = 0; t < N; t++) hm[b][t] = model_coef(t);
      for (int k = 0; k < MT; k++) begin
        hmask[b][k]  = (k == 0) ? 16384 : 0;
        hcmask[b][k] = 0;
      end
    end
    repeat (3) @(negedge clk);
    reset = 0;
    // (1) reset contents
    repeat (2000) step(0);
    // (2) load bank 1 while bank 0 keeps running: new masking filters with
    // gains above one, and the model filter taps scaled by 3/4
    fork
      repeat (1500) step(0);
      begin
        for (int t = 0; t < N; t++) hm[1][t] = (model_coef(t) * 3) / 4;
        for (int k = 0; k < MT; k++) begin
          hmask[1][k]  = int'($urandom_range(0, 12000)) - 3000;
          hcmask[1][k] = int'($urandom_range(0, 12000)) - 6000;
        end
        for (int g = 0; g < 12; g++)
          for (int a = 0; a < 16; a++) begin
            automatic int s = 0;
            for (int j = 0; j < 4; j++) if (a[j] && g * 4 + j < N) s += hm[1][g*4+j];
            write_word(SEL_MODEL, 1, g, a, s);
          end
        for (int g = 0; g < 4; g++)
          for (int a = 0; a < 16; a++) begin
            automatic int s1 = 0, s2 = 0;
            for (int j = 0; j < 4; j++) if (a[j]) begin
              s1 += hmask[1][g*4+j];
              s2 += hcmask[1][g*4+j];
            end
            write_word(SEL_MASK, 1, g, a, s1);
            write_word(SEL_CMASK, 1, g, a, s2);
          end
      end
    join
    // (3) bank 1, (4) random bank per sample
    repeat (3000) step(1);
    repeat (3000) step(2);
    @(negedge clk); x_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_y.size()); end
    $display("mechanisms: writes=%0d bank_switches=%0d refused=%0d branch_sat=%0d out_sat=%0d minus_full_scale=%0d",
             n_writes, n_switch, n_refused, n_sat_branch, n_sat_out, n_minus);
    if (n_writes == 0)     begin failures++; $display("FAIL no coefficient write"); end
    if (n_switch == 0)     begin failures++; $display("FAIL no bank switch"); end
    if (n_refused == 0)    begin failures++; $display("FAIL no refused offer"); end
    if (n_sat_branch == 0) begin failures++; $display("FAIL no branch saturation"); end
    if (n_sat_out == 0)    begin failures++; $display("FAIL no output saturation"); end
    if (n_minus == 0)      begin failures++; $display("FAIL no negative full-scale input"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
