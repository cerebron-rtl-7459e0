// Data collection unit: the register files between the buffers and the CU array.
//
// Row register file (vertical-overlap reuse). It holds RF_ROWS input rows, row y in
// slot y mod RF_ROWS, each row as ROW_WORDS neuron-state words (word = x*CG + g).
// Rows are read from the neuron state buffer once; when the array moves down by a
// band of output rows, only the rows no longer needed are replaced and the rows
// shared by the two bands stay, which is the vertical-overlap reuse.
//
// Window extraction (horizontal-overlap reuse). Items are cut from the held rows, not
// from the buffer, so neighbouring kernel windows that overlap reuse the same stored
// words:
//  * standard / pointwise (systolic mode): for CU row r and PE l the word at
//    (row slot r, pixel std_x, channel group std_cg[l]) is the PE's index vector;
//  * depthwise / pooling (unicasting mode): for CU (r, c) and PE l, lane k of the
//    index vector is the spike of channel (col_g[c], col_b[c]) at pixel px[l][k] of
//    row slot r: one kernel row of the PE's window, reshaped into a vector.
// A negative pixel coordinate marks padding and reads as zero spikes.
//
// Weight register files: one per CU column, WRF_DEPTH weight vectors. The column's
// weight bus reads entry col_tag*L + l for PE l in standard mode and entry col_tag for
// all PEs in depthwise mode.
// All reads are combinational; writes take effect at the clock edge.
// The FIFO / register-file roles follow the design description; holding whole rows
// and cutting windows by address (rather than shifting data through FIFOs) is this
// implementation's own realisation.
module data_collection
  import cerebron_pkg::*;
(
  input  logic                       clk,
  input  layer_e                     ltype,
  input  logic [6:0]                 cg,
  input  logic [3:0]                 k,
  // row register file write
  input  logic                       wr_en,
  input  logic [$clog2(RF_ROWS)-1:0] wr_slot,
  input  logic [$clog2(ROW_WORDS)-1:0] wr_word,
  input  logic [VEC-1:0]             wr_data,
  // weight register file write
  input  logic                       wrf_we,
  input  logic [$clog2(M)-1:0]       wrf_col,
  input  logic [$clog2(WRF_DEPTH)-1:0] wrf_entry,
  input  wvec_t                      wrf_data,
  // per CU row: slot of the input row used this step
  input  logic [N-1:0][$clog2(RF_ROWS)-1:0] row_slot,
  input  logic [N-1:0]               row_ok,
  // standard mode read
  input  coord_t                     std_x,
  input  logic [L-1:0][6:0]          std_cg,
  input  logic [L-1:0]               std_cg_ok,
  output logic [N-1:0][L-1:0][VEC-1:0] std_idx,
  // unicasting mode read
  input  coord_t [L-1:0][KMAX-1:0]   px,
  input  logic [M-1:0][6:0]          col_g,
  input  logic [M-1:0][2:0]          col_b,
  output logic [N-1:0][M-1:0][L-1:0][VEC-1:0] uni_idx,
  // weight bus
  input  logic [M-1:0][TAGW-1:0]     col_tag,
  output wvec_t [M-1:0][L-1:0]       col_w
);
  localparam int unsigned RWA = $clog2(ROW_WORDS);

  logic [VEC-1:0] rows [RF_ROWS][ROW_WORDS];
  wvec_t          wrf  [M][WRF_DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en)  rows[wr_slot][wr_word] <= wr_data;
    if (wrf_we) wrf[wrf_col][wrf_entry] <= wrf_data;
  end

  // word address of (pixel, group); pixel assumed in range
  function automatic logic [RWA-1:0] waddr(coord_t x, logic [6:0] g, logic [6:0] ncg);
    logic [YW-1:0] ux;
    ux = x[YW-1:0];
    return RWA'(ux * ncg + g);
  endfunction

  always_comb begin
    for (int r = 0; r < N; r++)
      for (int l = 0; l < L; l++)
        std_idx[r][l] = (row_ok[r] && std_cg_ok[l] && std_x >= 0)
                      ? rows[row_slot[r]][waddr(std_x, std_cg[l], cg)] : '0;
  end

  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        for (int l = 0; l < L; l++) begin
          uni_idx[r][c][l] = '0;
          for (int kk = 0; kk < KMAX && kk < VEC; kk++)
            if (row_ok[r] && kk < int'(k) && px[l][kk] >= 0)
              uni_idx[r][c][l][kk] = rows[row_slot[r]][waddr(px[l][kk], col_g[c], cg)][col_b[c]];
        end
  end

  always_comb begin
    for (int c = 0; c < M; c++)
      for (int l = 0; l < L; l++)
        if (ltype == L_STD) col_w[c][l] = wrf[c][$clog2(WRF_DEPTH)'(col_tag[c]*L + l)];
        else                col_w[c][l] = wrf[c][$clog2(WRF_DEPTH)'(col_tag[c])];
  end

endmodule
