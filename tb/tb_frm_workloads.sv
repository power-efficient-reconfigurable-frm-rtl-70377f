// tb_frm_workloads: the filter's workloads on all four adder variants.
//
// Four frm_filter_bank instances, identical except for the prefix adder
// network (Brent-Kung, Kogge-Stone, Han-Carlson, Ladner-Fischer), receive the
// same samples with the power-up coefficients (output = periodic model filter
// H(z^4)). Checks:
//   1. impulse response: an input impulse of 127 must give 127*h(k) at output
//      sample 4k (and 0 between), within one LSB of the real-valued model
//      filter taps h(k) listed below (not the quantised package table);
//   2. step response: a constant input of 100 settles to 99 (DC gain 0.992);
//   3. the input sequence 0, E9, 3C, 00, 40, BD (hex) followed by 2000 random
//      samples: all four variants must give identical outputs at the same cycles.
module tb_frm_workloads;
  import frm_pkg::*;

  localparam int NV = 4;
  localparam real H_REAL [23] = '{
    0.000219970958237,  0.000114454809802, -0.000802764151062, -0.002561006035400,
   -0.003855280510825, -0.002617559966678,  0.001825152451519,  0.006756221902118,
    0.007035185245136, -0.000271153016967, -0.011139963144638, -0.015391302383321,
   -0.005003970063579,  0.015866668224653,  0.029561623256230,  0.017590270813397,
   -0.020132227522036, -0.056343428240625, -0.050023401316209,  0.023107308494801,
    0.145681212438898,  0.261622593435563,  0.309160333127354
  };

  logic clk = 0, reset = 1;
  logic x_valid = 0, ctrl = 0;
  logic [7:0] X = '0;
  logic [NV-1:0] x_ready, y_valid;
  logic [7:0] Y_n [NV];
  int checks = 0, failures = 0;
  int outs [NV][$];

  for (genvar v = 0; v < NV; v++) begin : g_var
    frm_filter_bank #(.KIND(ppa_kind_e'(v))) dut (
      .clk, .reset, .x_valid, .x_ready(x_ready[v]), .X, .ctrl,
      .lut_we(1'b0), .lut_filter(SEL_MODEL), .lut_bank(1'b0), .lut_group(4'd0),
      .lut_addr(4'd0), .lut_data(18'sd0), .y_valid(y_valid[v]), .Y_n(Y_n[v])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!reset) begin
    if (y_valid != '0 && y_valid != '1) begin
      failures++; $display("FAIL variants disagree on y_valid timing: %b", y_valid);
    end
    for (int v = 0; v < NV; v++) if (y_valid[v]) outs[v].push_back(int'(signed'(Y_n[v])));
  end

  task automatic send(logic [7:0] value);
    @(negedge clk);
    while (!x_ready[0]) @(negedge clk);
    x_valid = 1; X = value;
    @(negedge clk);
    x_valid = 0;
  endtask

  function automatic real h_real(int k);
    return (k <= 22) ? H_REAL[k] : H_REAL[44 - k];
  endfunction

  initial begin
    int base;
    repeat (3) @(negedge clk);
    reset = 0;
    // 1. impulse response
    send(8'd127);
    repeat (200) send(8'd0);
    repeat (20) @(negedge clk);
    for (int n = 0; n < 190; n++) begin
      real want = (n % 4 == 0 && n / 4 < 45) ? 127.0 * h_real(n / 4) : 0.0;
      int got = outs[0][n];
      checks++;
      if (real'(got) - want > 1.0 || want - real'(got) > 1.0) begin
        failures++; $display("FAIL impulse response y[%0d]=%0d want %f", n, got, want);
      end
    end
    // 2. step response
    base = outs[0].size();
    repeat (400) send(8'd100);
    repeat (20) @(negedge clk);
    for (int n = base + 200; n < base + 400; n++) begin
      checks++;
      if (outs[0][n] != 99) begin failures++; $display("FAIL step y=%0d", outs[0][n]); end
    end
    // 3. printed input sequence, then random samples
    send(8'h00); send(8'hE9); send(8'h3C); send(8'h00); send(8'h40); send(8'hBD);
    repeat (2000) send(8'($urandom));
    repeat (20) @(negedge clk);
    for (int v = 1; v < NV; v++) begin
      checks++;
      if (outs[v] != outs[0]) begin failures++; $display("FAIL variant %0d output differs", v); end
    end
    checks++;
    if (outs[0].size() != 1 + 200 + 400 + 6 + 2000) begin
      failures++; $display("FAIL %0d outputs", outs[0].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
