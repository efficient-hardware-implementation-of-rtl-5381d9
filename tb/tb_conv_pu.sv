// End-to-end testbench for conv_pu, the processing unit, at its default
// size (3x3 kernel, 3 rows x 2 columns of FCUs, 4 image rows in, 2 output
// rows out, 3-bit data).
//
// Each frame: reset, hold a kernel, then stream the image rows block by
// block (three samples per row per clock), with random idle cycles, and a
// final all-zero block that flushes the right edge. Every clock with
// out_valid high, all 2 x 3 outputs are compared with a direct 2D
// correlation computed here from the image and kernel:
//   out[j][c] = sum_{i,t} w[i][t] * img[i+j][c+t],  img = 0 outside the frame,
// which the unit delivers at stream position c+2 (positions 0 and 1 hold
// the left-edge terms c = -2, -1).
//
// Frames: the 4x3 image and 3x3 kernel of the reference measurement, a
// frame of all-maximum values (largest possible sums), then random frames
// of random width. The mechanisms counted, each required at least once:
//   carry  - a block whose outputs depend on the previous block, i.e. on
//            the FCUs' one-block delay registers
//   stall  - an idle cycle (in_valid low) inside a frame
//   flip   - a frame with an asymmetric kernel row, so the kernel reversal
//            matters
//   reuse  - a frame in which image rows 1 and 2 each feed more than one
//            FCU with non-zero data (diagonal row sharing)
//   maxval - the all-maximum frame, no output wraps
// The number of clocks with out_valid high must equal the number of blocks
// fed (one block per clock, outputs in the same clock).
module tb_conv_pu;
  import cnn_pkg::*;

  localparam int unsigned NC = K - 1;        // output rows
  localparam int unsigned NR = K + NC - 1;   // image rows
  localparam int unsigned MAXW = 48;         // widest random frame

  logic    clk = 1'b0;
  logic    rst_n, in_valid, out_valid;
  data_t   w   [K][K];
  data_t   img_row [NR][K];
  pu_out_t y   [NC][K];

  int checks = 0, failures = 0;
  int n_carry = 0, n_stall = 0, n_flip = 0, n_reuse = 0, n_maxval = 0;
  int n_valid_clk = 0, n_blocks = 0;

  conv_pu dut (.clk, .rst_n, .in_valid, .w, .img_row, .out_valid, .y);

  always #5 clk = ~clk;

  always @(posedge clk) if (out_valid) n_valid_clk++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [NR][MAXW];
  int ker [K][K];
  int width;

  function automatic int pix(int r, int c);
    if (c < 0 || c >= width) return 0;
    return img[r][c];
  endfunction

  function automatic int ref_out(int j, int c);
    int s = 0;
    for (int i = 0; i < K; i++)
      for (int t = 0; t < K; t++)
        s += ker[i][t] * pix(i + j, c + t);
    return s;
  endfunction

  task automatic run_frame(input string name, input bit gaps);
    int nblk, m;
    bit asym;
    nblk = (width + K - 1) / K + 1;   // data blocks plus one flush block
    @(negedge clk);
    rst_n = 1'b0; in_valid = 1'b0;
    for (int i = 0; i < K; i++)
      for (int t = 0; t < K; t++) w[i][t] = data_t'(ker[i][t]);
    @(negedge clk);
    rst_n = 1'b1;
    asym = 1'b0;
    for (int i = 0; i < K; i++) if (ker[i][0] != ker[i][K-1]) asym = 1'b1;
    if (asym) n_flip++;
    begin
      bit r1 = 1'b0, r2 = 1'b0;
      for (int c = 0; c < width; c++) begin
        if (img[1][c] != 0) r1 = 1'b1;
        if (img[2][c] != 0) r2 = 1'b1;
      end
      if (r1 && r2) n_reuse++;
    end
    m = 0;
    while (m < nblk) begin
      @(negedge clk);
      in_valid = !(gaps && $urandom_range(0, 3) == 0);
      for (int r = 0; r < NR; r++)
        for (int k = 0; k < K; k++) img_row[r][k] = data_t'(pix(r, K*m + k));
      if (!in_valid) begin
        n_stall++;
        continue;
      end
      n_blocks++;
      #1;
      for (int j = 0; j < NC; j++)
        for (int k = 0; k < K; k++) begin
          int p, e;
          p = K*m + k;          // stream position
          e = ref_out(j, p - (K - 1));
          checks++;
          if (int'(y[j][k]) != e) begin
            failures++;
            $display("FAIL %s row %0d pos %0d: got %0d expected %0d", name, j, p, y[j][k], e);
          end
          if (m > 0 && k < K - 1 && e != 0) n_carry++;
          if (name == "maxval" && int'(y[j][k]) == K*K*((1 << DATA_W) - 1)**2) n_maxval++;
        end
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL %s: out_valid low with in_valid high", name);
      end
      m++;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int ex_img [4][3];
    int ex_ker [3][3];
    rst_n = 1'b0; in_valid = 1'b0;
    w = '{default: '{default: '0}};
    img_row = '{default: '{default: '0}};

    // reference measurement: 4x3 image, 3x3 kernel
    ex_img = '{'{1, 2, 3}, '{4, 5, 6}, '{7, 1, 2}, '{1, 2, 1}};
    ex_ker = '{'{1, 0, 2}, '{4, 1, 1}, '{3, 1, 2}};
    width = 3;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 3; c++) img[r][c] = ex_img[r][c];
    for (int i = 0; i < 3; i++) for (int t = 0; t < 3; t++) ker[i][t] = ex_ker[i][t];
    run_frame("example", 1'b0);
    $display("example: valid outputs %0d %0d", ref_out(0, 0), ref_out(1, 0));

    // all-maximum frame
    width = 9;
    for (int r = 0; r < NR; r++) for (int c = 0; c < width; c++) img[r][c] = (1 << DATA_W) - 1;
    for (int i = 0; i < K; i++) for (int t = 0; t < K; t++) ker[i][t] = (1 << DATA_W) - 1;
    run_frame("maxval", 1'b1);

    // random frames
    for (int f = 0; f < 40; f++) begin
      width = int'($urandom_range(1, MAXW));
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < width; c++) img[r][c] = int'($urandom_range(0, (1 << DATA_W) - 1));
      for (int i = 0; i < K; i++)
        for (int t = 0; t < K; t++) ker[i][t] = int'($urandom_range(0, (1 << DATA_W) - 1));
      run_frame($sformatf("random%0d", f), 1'b1);
    end

    @(negedge clk);
    checks++;
    if (n_valid_clk != n_blocks) begin
      failures++;
      $display("FAIL throughput: %0d valid clocks for %0d blocks", n_valid_clk, n_blocks);
    end
    $display("mechanisms: carry=%0d stall=%0d flip=%0d reuse=%0d maxval=%0d blocks=%0d",
             n_carry, n_stall, n_flip, n_reuse, n_maxval, n_blocks);
    checks += 5;
    if (n_carry  == 0) begin failures++; $display("FAIL carry never exercised");  end
    if (n_stall  == 0) begin failures++; $display("FAIL stall never exercised");  end
    if (n_flip   == 0) begin failures++; $display("FAIL flip never exercised");   end
    if (n_reuse  == 0) begin failures++; $display("FAIL reuse never exercised");  end
    if (n_maxval == 0) begin failures++; $display("FAIL maxval never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
