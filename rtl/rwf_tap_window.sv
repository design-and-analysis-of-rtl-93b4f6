// rwf_tap_window: input delay line and symmetric pre-adders of the 9/7 filters.
//
// Function: holds the nine most recent samples x(i+4) .. x(i-4) of the input
// stream (x(i+4) is the newest) and forms the pairwise sums of samples that
// share a coefficient in a symmetric filter:
//   w0 = x(i), w1 = x(i-1)+x(i+1), w2 = x(i-2)+x(i+2),
//   w3 = x(i-3)+x(i+3), w4 = x(i-4)+x(i+4).
// The delay line and the four pre-adders follow the filter architecture this
// design implements; the w values are registered, as in that architecture.
//
// Interface: in_valid/in_x accept one sample per clock (gaps allowed; the
// delay line only shifts on a valid sample).  in_tag is a side-band word that
// travels with the sample (the filters use it for the mode and lo/hi select).
// w_o[k] is wk, sign-extended to IW bits and scaled by 2^FRAC_W, so its
// FRAC_W low bits are always zero (they give the later shifts room to be exact).
//
// Timing: a sample accepted at clock edge n enters the delay line at edge n;
// the w values whose newest sample x(i+4) is that sample are registered at
// edge n+1, when w_valid is high for one cycle with w_tag = the sample's tag.
// So w_o describes centre sample i = (sample accepted 4 samples earlier).
//
// Own choices: asynchronous active-low reset clearing the delay line to zero,
// so that the first outputs see zero history (boundary handling is not
// specified); the FRAC_W scaling (see rwf_pkg).
module rwf_tap_window
  import rwf_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 6,
  parameter int unsigned IW     = DATA_W + FRAC_W + 4,
  parameter int unsigned TAG_W  = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_x,
  input  logic        [TAG_W-1:0]  in_tag,
  output logic                     w_valid,
  output logic        [TAG_W-1:0]  w_tag,
  output logic signed [IW-1:0]     w_o [NUM_W]
);

  localparam int unsigned NTAPS = 2 * HALF_TAPS + 1;

  // x_q[0] = x(i+4) (newest) ... x_q[4] = x(i) ... x_q[8] = x(i-4) (oldest)
  logic signed [DATA_W-1:0] x_q [NTAPS];
  logic                     v_q;
  logic        [TAG_W-1:0]  tag_q;
  logic signed [IW-1:0]     w_d [NUM_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) x_q[k] <= '0;
      v_q   <= 1'b0;
      tag_q <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        x_q[0] <= in_x;
        for (int k = 1; k < NTAPS; k++) x_q[k] <= x_q[k-1];
        tag_q  <= in_tag;
      end
    end
  end

  // Pre-adders: one for each pair x(i-k) + x(i+k), k = 1..4.
  always_comb begin
    w_d[0] = IW'(x_q[HALF_TAPS]) <<< FRAC_W;
    for (int k = 1; k <= HALF_TAPS; k++) begin
      w_d[k] = (IW'(x_q[HALF_TAPS-k]) + IW'(x_q[HALF_TAPS+k])) <<< FRAC_W;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_W; k++) w_o[k] <= '0;
      w_valid <= 1'b0;
      w_tag   <= '0;
    end else begin
      w_valid <= v_q;
      if (v_q) begin
        w_o   <= w_d;
        w_tag <= tag_q;
      end
    end
  end

endmodule
