// tb_shift_acc: self-checking testbench for the shift accumulator.
//
// Random runs of 1 to 4 enabled steps, with random shifts, sign-plane
// subtraction and idle cycles in between, are compared against an integer
// model. Inputs change on the falling edge; acc is checked on the next one.
module tb_shift_acc;

  localparam int IW = 22, SW = 2, AW = IW + 4 + 1;

  logic clk = 0, rst = 1, en = 0, first = 0, neg = 0;
  logic [SW-1:0] shift = '0;
  logic signed [IW-1:0] pp = '0;
  logic signed [AW-1:0] acc;
  longint model = 0;
  int checks = 0, failures = 0;

  shift_acc #(.IN_W(IW), .SH_W(SW), .ACC_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL reset value %0d", acc); end
    for (int r = 0; r < 3000; r++) begin
      automatic int steps = $urandom_range(1, 4);
      for (int k = 0; k < steps; k++) begin
        longint term;
        en = 1; first = (k == 0); neg = 1'($urandom); shift = SW'($urandom);
        pp = IW'($urandom);
        if (r < 4) pp = (r % 2 == 0) ? {1'b1, {(IW-1){1'b0}}} : {1'b0, {(IW-1){1'b1}}};
        term = longint'(pp) <<< shift;
        if (neg) term = -term;
        model = (first ? 0 : model) + term;
        @(negedge clk);
        checks++;
        if (longint'(acc) != model) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d step %0d: acc=%0d want %0d", r, k, acc, model);
        end
      end
      en = 0; pp = IW'($urandom); first = 1'($urandom);
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (longint'(acc) != model) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
