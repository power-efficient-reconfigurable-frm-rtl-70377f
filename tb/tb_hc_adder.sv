// tb_hc_adder: self-checking testbench for the Han-Carlson adder.
//
// Checks an 8-bit instance exhaustively (every a, b and carry in) against the
// integer sum, the printed example vector of the 8-bit design, and a 22-bit
// instance (the width used inside the partial product generator) on random
// operands. The adder is combinational; each vector is given 1 ns to settle.
module tb_hc_adder;

  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  logic [21:0] a22, b22, s22;
  logic        cin22, cout22;
  int checks = 0, failures = 0;

  hc_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(cin8),  .s(s8),  .cout(cout8));
  hc_adder #(.W(22)) dut22 (.a(a22), .b(b22), .cin(cin22), .s(s22), .cout(cout22));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(logic [7:0] x, logic [7:0] y, logic ci);
    logic [8:0] ref9;
    a8 = x; b8 = y; cin8 = ci;
    #1;
    ref9 = {1'b0, x} + {1'b0, y} + {8'd0, ci};
    checks++;
    if ({cout8, s8} !== ref9) begin
      failures++;
      if (failures < 10) $display("FAIL W=8 %h + %h + %b: got %b_%h want %h", x, y, ci, cout8, s8, ref9);
    end
  endtask

  initial begin
    logic [22:0] ref23;
    a22 = '0; b22 = '0; cin22 = 1'b0;
    // printed example vector
    a8 = 8'b00101110; b8 = 8'b01000000; cin8 = 1'b0;
    #1;
    checks++;
    if (s8 !== 8'b01101110 || cout8 !== 1'b0) begin
      failures++;
      $display("FAIL example vector: s=%b cout=%b", s8, cout8);
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++)
          check8(8'(x), 8'(y), 1'(ci));
    for (int n = 0; n < 20000; n++) begin
      a22 = 22'($urandom); b22 = 22'($urandom); cin22 = 1'($urandom);
      if (n < 4) begin a22 = '1; b22 = 22'(n); end  // long carry chains
      #1;
      ref23 = {1'b0, a22} + {1'b0, b22} + {22'd0, cin22};
      checks++;
      if ({cout22, s22} !== ref23) begin
        failures++;
        if (failures < 10) $display("FAIL W=22 %h + %h + %b", a22, b22, cin22);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
