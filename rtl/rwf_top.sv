// rwf_top: the reconfigurable binary-coefficient wavelet filter family.
//
// Two parts stand side by side, each with its own ports.
//
// Filter bank: four streaming 1-D wavelet analysis filters on one input
// sample stream, so their results can be compared or any one of them used:
//   A  alpha = -1.67 9/7 filter (19 adders), low and high every sample
//   B  alpha = -1.8  9/7 filter (17 adders), low and high every sample
//   C  alpha = -2    9/7 filter (12 adders), low and high every sample
//   F  alpha = -2 folded filter  (9 adders), low or high every sample,
//      chosen by in_lo_nhi
// Each can run as the full 9/7 filter or, with its extension hardware idle,
// as the Le Gall 5/3 filter; in_mode_97 selects this per sample and may change
// on any sample (on-the-fly switching, no flush).
//
// 2-D transform (rwf_dwt2d): a one-level 2-D DWT of a ROWS x COLS frame
// (default 1080 x 1440, a 1440x1080 HD frame) built from two folded alpha = -2
// filters, one for rows and one for columns, and two frame buffers.
//
// Interface: one signed DATA_W-bit sample per clock when in_valid is high.
// All outputs are signed IW-bit words scaled by 2^FRAC_W (value = word /
// 2^FRAC_W), exact.  *_mode_97 tells the mode each output was computed in.
// Timing: every output appears 3 clock edges after the sample that completes
// its 9-sample window (the window's centre is 4 samples earlier).
// The 2-D part's interface and timing are described in rwf_dwt2d.
// Running all four filters together and sharing the mode input are this
// design's choices; each filter follows its published block diagram.
module rwf_top
  import rwf_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 6,
  parameter int unsigned IW     = DATA_W + FRAC_W + 4,
  parameter int unsigned ROWS   = 1080,
  parameter int unsigned COLS   = 1440,
  parameter int unsigned IW2    = IW + FRAC_W + 4,
  parameter int unsigned RW     = $clog2(ROWS + 8),
  parameter int unsigned CW     = $clog2(COLS + 8)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_x,
  input  logic                     in_mode_97,
  input  logic                     in_lo_nhi,
  // alpha = -1.67
  output logic                     a_valid,
  output logic                     a_mode_97,
  output logic signed [IW-1:0]     a_low,
  output logic signed [IW-1:0]     a_high,
  // alpha = -1.8
  output logic                     b_valid,
  output logic                     b_mode_97,
  output logic signed [IW-1:0]     b_low,
  output logic signed [IW-1:0]     b_high,
  // alpha = -2
  output logic                     c_valid,
  output logic                     c_mode_97,
  output logic signed [IW-1:0]     c_low,
  output logic signed [IW-1:0]     c_high,
  // alpha = -2 folded
  output logic                     f_valid,
  output logic                     f_mode_97,
  output logic                     f_lo_nhi,
  output logic signed [IW-1:0]     f_y,
  // 2-D transform: frame in, sub-band coefficients out
  input  logic                     d_in_valid,
  output logic                     d_in_ready,
  input  logic signed [DATA_W-1:0] d_in_pix,
  input  logic                     d_in_mode_97,
  output logic                     d_out_valid,
  output logic [1:0]               d_out_band,
  output logic [RW-1:0]            d_out_row,
  output logic [CW-1:0]            d_out_col,
  output logic signed [IW2-1:0]    d_out_coef,
  output logic                     d_out_mode_97,
  output logic                     d_busy
);

  mode_e in_mode, a_mode, b_mode, c_mode, f_mode;
  assign in_mode = in_mode_97 ? MODE_97 : MODE_53;

  rwf_filter #(.VARIANT(VAR_A), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW)) u_fa (
    .clk, .rst_n, .in_valid, .in_x, .in_mode,
    .out_valid(a_valid), .out_mode(a_mode), .out_low(a_low), .out_high(a_high)
  );

  rwf_filter #(.VARIANT(VAR_B), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW)) u_fb (
    .clk, .rst_n, .in_valid, .in_x, .in_mode,
    .out_valid(b_valid), .out_mode(b_mode), .out_low(b_low), .out_high(b_high)
  );

  rwf_filter #(.VARIANT(VAR_C), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW)) u_fc (
    .clk, .rst_n, .in_valid, .in_x, .in_mode,
    .out_valid(c_valid), .out_mode(c_mode), .out_low(c_low), .out_high(c_high)
  );

  rwf_folded_c #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW)) u_ff (
    .clk, .rst_n, .in_valid, .in_x, .in_mode, .in_lo_nhi,
    .out_valid(f_valid), .out_mode(f_mode), .out_lo_nhi(f_lo_nhi), .out_y(f_y)
  );

  rwf_dwt2d #(
    .ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W), .FRAC_W(FRAC_W),
    .IW1(IW), .IW2(IW2), .RW(RW), .CW(CW)
  ) u_dwt2d (
    .clk, .rst_n,
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_pix(d_in_pix),
    .in_mode_97(d_in_mode_97),
    .out_valid(d_out_valid), .out_band(d_out_band), .out_row(d_out_row),
    .out_col(d_out_col), .out_coef(d_out_coef), .out_mode_97(d_out_mode_97),
    .busy(d_busy)
  );

  assign a_mode_97 = (a_mode == MODE_97);
  assign b_mode_97 = (b_mode == MODE_97);
  assign c_mode_97 = (c_mode == MODE_97);
  assign f_mode_97 = (f_mode == MODE_97);

endmodule
