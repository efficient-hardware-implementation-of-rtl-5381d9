// Self-checking testbench for rca: every input combination of a 3-bit adder
// (the width of the multiplier's adder rows) and of a 4-bit adder, carry in
// included, compared with the integer sum.
module tb_rca;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic       c3i, c3o, c4i, c4o;
  int checks = 0, failures = 0;

  rca #(.W(3)) dut3 (.a(a3), .b(b3), .cin(c3i), .s(s3), .cout(c3o));
  rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(c4i), .s(s4), .cout(c4o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int c = 0; c < 2; c++) begin
          a3 = 3'(i); b3 = 3'(j); c3i = 1'(c);
          #1;
          checks++;
          if ({c3o, s3} != 4'(i + j + c)) begin
            failures++;
            $display("FAIL W=3 %0d+%0d+%0d -> %0d", i, j, c, {c3o, s3});
          end
        end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); c4i = 1'(c);
          #1;
          checks++;
          if ({c4o, s4} != 5'(i + j + c)) begin
            failures++;
            $display("FAIL W=4 %0d+%0d+%0d -> %0d", i, j, c, {c4o, s4});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
