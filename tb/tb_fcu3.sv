// Self-checking testbench for fcu3.
//
// 1. The two single-unit measurements of the reference build: the input
//    block and the taps are held for several clocks, so the delayed terms
//    equal the current ones. Expected outputs come from the direct FIR sum
//    (a circular 3-point convolution in this steady state):
//      x=[0 0 7], h=[1 2 3]  ->  y=[14 21 7]
//      x=[1 3 3], h=[3 2 2]  ->  y=[15 17 17]
// 2. Random streams, with random gaps (en low) and resets, compared every
//    clock with y(n) = sum_i h(i) x(n-i) computed from the accepted samples.
//    Each block's three outputs must be correct in the cycle the block is
//    presented: three outputs per clock, no latency.
module tb_fcu3;
  import cnn_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n, en;
  data_t    h [3];
  data_t    x [3];
  fcu_out_t y [3];
  int checks = 0, failures = 0;

  fcu3 dut (.clk, .rst_n, .en, .h, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];   // accepted samples since the last reset, oldest first

  function automatic int ref_y(int n, int h0, int h1, int h2);
    int s = 0;
    int hh [3];
    hh = '{h0, h1, h2};
    for (int i = 0; i < 3; i++)
      if (n - i >= 0) s += hh[i] * hist[n-i];
    return s;
  endfunction

  task automatic check3(input int e0, e1, e2, input string what);
    int e [3];
    e = '{e0, e1, e2};
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (int'(y[k]) != e[k]) begin
        failures++;
        $display("FAIL %s y%0d=%0d expected %0d", what, k, y[k], e[k]);
      end
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    hist.delete();
  endtask

  task automatic held(input int x0, x1, x2, h0, h1, h2, e0, e1, e2, input string what);
    do_reset();
    h = '{data_t'(h0), data_t'(h1), data_t'(h2)};
    x = '{data_t'(x0), data_t'(x1), data_t'(x2)};
    en = 1'b1;
    repeat (3) @(negedge clk);
    #1 check3(e0, e1, e2, what);
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0;
    h = '{default: '0}; x = '{default: '0};
    held(0, 0, 7, 1, 2, 3, 14, 21, 7, "measurement 1");
    held(1, 3, 3, 3, 2, 2, 15, 17, 17, "measurement 2");

    // random streams
    for (int run = 0; run < 20; run++) begin
      int nblk, m;
      do_reset();
      h = '{data_t'($urandom), data_t'($urandom), data_t'($urandom)};
      if (run == 0) h = '{default: data_t'((1 << DATA_W) - 1)};   // largest values
      nblk = 20 + int'($urandom_range(0, 20));
      m = 0;
      while (m < nblk) begin
        @(negedge clk);
        en = ($urandom_range(0, 3) != 0);
        for (int k = 0; k < 3; k++)
          x[k] = (run == 0) ? data_t'((1 << DATA_W) - 1) : data_t'($urandom);
        if (en) begin
          for (int k = 0; k < 3; k++) hist.push_back(int'(x[k]));
          #1 check3(ref_y(3*m,   int'(h[0]), int'(h[1]), int'(h[2])),
                    ref_y(3*m+1, int'(h[0]), int'(h[1]), int'(h[2])),
                    ref_y(3*m+2, int'(h[0]), int'(h[1]), int'(h[2])), $sformatf("run %0d block %0d", run, m));
          m++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
