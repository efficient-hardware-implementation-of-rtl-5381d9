// conv_pu -- processing unit: 2D convolution of a 3x3 kernel with an image,
// N_COLS output rows at a time, three output samples per row per clock.
//
// The 2D convolution is split into 1D row convolutions: output row j is the
// sum over kernel rows i of (image row i+j) filtered with (kernel row i).
// The unit is a grid of K = 3 rows by N_COLS columns of 3-parallel FCUs
// (fcu3). FCU(i,j), in grid row i and column j, filters image row i+j with
// kernel row i:
//   * kernel row i enters at the left of grid row i and is passed along it;
//   * image row i enters FCU(i,0); image rows K-1+j enter FCU(K-1,j) from
//     below, and every other FCU takes its image row from the FCU one row
//     down and one column left (diagonal reuse, so each row is fetched once);
//   * the FCU outputs of one column are summed from the bottom row upwards
//     and leave the top as output row j.
// With N_COLS = K-1 = 2 (the reference grid of k x (k-1) FCUs) the unit
// reads image rows 0..3 and writes output rows 0..1.
//
// Kernel orientation. A CNN layer computes a correlation,
//   out[j][c] = sum_{i,t} w[i][t] * img[i+j][c+t].
// An FIR filter convolves, so each kernel row is reversed before it is used
// as FIR taps (h[a] = w[i][K-1-a]), as the reference does. The FIR output
// at column n is then out[j][n-2]: the first two samples of each output row
// are edge terms (the image taken as zero left of column 0) and output
// column c appears at stream position c+2.
//
// Interface and timing: each clock with in_valid high presents block m of
// every image row, img_row[r][0..2] = img[r][3m..3m+2]. The outputs y[j][0..2]
// (stream positions 3m..3m+2 of output row j) are combinational and valid in
// the same cycle (out_valid = in_valid). The kernel w must be held steady
// while a frame streams. Reset (synchronous, active low) clears the FCUs'
// one-block history, so it must be applied, or one all-zero block fed, between
// image rows. The grid, the weight passing, the diagonal row reuse and the
// column sums follow the reference; valid/reset handling and the output
// widths are this design's choice.
module conv_pu
  import cnn_pkg::*;
#(
  parameter int unsigned N_COLS = K - 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  data_t   w       [K][K],
  input  data_t   img_row [K+N_COLS-1][K],
  output logic    out_valid,
  output pu_out_t y       [N_COLS][K]
);

  data_t    w_in   [K][N_COLS][K];   // kernel row seen by FCU(i,j)
  data_t    row_in [K][N_COLS][K];   // image row seen by FCU(i,j)
  data_t    h_in   [K][N_COLS][K];   // reversed kernel row (FIR taps)
  fcu_out_t f_out  [K][N_COLS][K];   // FCU outputs
  pu_out_t  psum   [N_COLS][K];      // column sums

  for (genvar i = 0; i < K; i++) begin : g_r
    for (genvar j = 0; j < N_COLS; j++) begin : g_c
      // Kernel row i is passed along grid row i, so every FCU of the row
      // sees w[i]. The image row reaching FCU(i,j) diagonally from FCU(i+1,
      // j-1), or from the left or bottom edge, is always image row i+j.
      assign w_in[i][j]   = w[i];
      assign row_in[i][j] = img_row[i+j];

      for (genvar a = 0; a < K; a++) begin : g_h
        assign h_in[i][j][a] = w_in[i][j][K-1-a];
      end

      fcu3 #(.DW(DATA_W)) u_fcu (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (in_valid),
        .h    (h_in[i][j]),
        .x    (row_in[i][j]),
        .y    (f_out[i][j])
      );
    end
  end

  // column sums, accumulated from the bottom grid row upwards
  always_comb begin
    for (int j = 0; j < N_COLS; j++) begin
      for (int a = 0; a < K; a++) begin
        psum[j][a] = '0;
        for (int i = K - 1; i >= 0; i--) begin
          psum[j][a] = psum[j][a] + pu_out_t'(f_out[i][j][a]);
        end
      end
    end
  end

  for (genvar j = 0; j < N_COLS; j++) begin : g_y
    assign y[j] = psum[j];
  end

  assign out_valid = in_valid;

endmodule
