// Self-checking testbench for mult_array: all 64 products of the 3x3-bit
// multiplier, all 1024 products of a 5x5-bit one (the widest the FCU uses)
// and random products of a 4x6-bit one, compared with integer products.
module tb_mult_array;
  logic [2:0] a3, b3;
  logic [5:0] p3;
  logic [4:0] a5, b5;
  logic [9:0] p5;
  logic [3:0] a46;
  logic [5:0] b46;
  logic [9:0] p46;
  int checks = 0, failures = 0;

  mult_array #(.A_W(3), .B_W(3)) dut3  (.a(a3),  .b(b3),  .p(p3));
  mult_array #(.A_W(5), .B_W(5)) dut5  (.a(a5),  .b(b5),  .p(p5));
  mult_array #(.A_W(4), .B_W(6)) dut46 (.a(a46), .b(b46), .p(p46));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        checks++;
        if (p3 != 6'(i * j)) begin
          failures++;
          $display("FAIL 3x3 %0d*%0d -> %0d", i, j, p3);
        end
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if (p5 != 10'(i * j)) begin
          failures++;
          $display("FAIL 5x5 %0d*%0d -> %0d", i, j, p5);
        end
      end
    for (int n = 0; n < 200; n++) begin
      a46 = 4'($urandom); b46 = 6'($urandom);
      #1;
      checks++;
      if (p46 != 10'(int'(a46) * int'(b46))) begin
        failures++;
        $display("FAIL 4x6 %0d*%0d -> %0d", a46, b46, p46);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
