// tb_da_pu: self-checking testbench for the distributed-arithmetic processing
// unit. Two instances run side by side, each with its own checker
// (da_pu_check):
//   - 45 taps with the model filter coefficients, tap spacing 2 (a periodic
//     filter H(z^2)), 4 processing elements of 2 bits;
//   - 16 taps starting as a unit impulse, spacing 1, 2 processing elements of
//     4 bits (6 cycles per sample).
module tb_da_pu;
  import frm_pkg::*;

  logic clk = 0;
  logic done_a, done_b;
  int checks_a, checks_b, failures_a, failures_b;

  always #5 clk = ~clk;

  da_pu_check #(.TAPS(45), .SP(2), .PES(4), .INIT(INIT_MODEL))   u_a (.clk, .done(done_a), .checks(checks_a), .failures(failures_a));
  da_pu_check #(.TAPS(16), .SP(1), .PES(2), .INIT(INIT_IMPULSE)) u_b (.clk, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end

endmodule
