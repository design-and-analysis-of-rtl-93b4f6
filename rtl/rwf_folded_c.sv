// rwf_folded_c: folded alpha = -2 reconfigurable wavelet filter (9 adders).
//
// Function: for alpha = -2 the 9/7 low pass output depends only on the 5/3
// low pass output and the 9/7 high pass output only on the 5/3 high pass
// output:
//   low_C  = low53      + w4/64 - w0/32
//   high_C = high53 / 2 + w3/32 - w1/32
// so one datapath, steered by a lo/hi select, computes either.  Per sample it
// produces one output: the low pass (in_lo_nhi = 1) or the high pass
// (in_lo_nhi = 0) value of the window centred four samples back, in 9/7 mode
// (MODE_97) or as the plain Le Gall 5/3 value (MODE_53).  Alternating
// in_lo_nhi on successive samples yields the two decimated DWT sub-bands
// interleaved on one output.
//
// Datapath (after the published folded diagram; each mux is steered by
// lo/hi):
//   5/3 part:  out53 = mux(lo: (w0>>1)+(w0>>2)+(w1>>2), hi: w0)
//                    - mux(lo: w2>>3,                    hi: w1>>1)
//   9/7 part:  out_C = mux(lo: out53, hi: out53>>1)
//                    + (mux(lo: w4>>6, hi: w3>>5) - mux(lo: w0>>5, hi: w1>>5))
// Adders: 4 pre-adders + 3 in the 5/3 part + 2 in the 9/7 part = 9.
// The high output is half of the alpha = -2 high-pass coefficient table
// (1/2, -9/32, 0, 1/32 on w0..w3) and out53 in hi mode is the 5/3 high pass
// (1, -1/2 on w0, w1), following the published decomposition.
//
// In MODE_53 the 9/7 part's operands are forced to zero and its registers are
// not clocked (the power saving of the 5/3 mode).
//
// Interface: in_x signed DATA_W bits; out_y signed IW bits scaled by 2^FRAC_W
// (exact).  out_mode/out_lo_nhi tell what out_y is.
// Timing: one sample per clock; a sample accepted at edge n gives out_y at
// edge n+3 (out_valid high), in both modes.  The pipeline split is this
// design's choice.
module rwf_folded_c
  import rwf_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 6,
  parameter int unsigned IW     = DATA_W + FRAC_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_x,
  input  mode_e                    in_mode,
  input  logic                     in_lo_nhi,
  output logic                     out_valid,
  output mode_e                    out_mode,
  output logic                     out_lo_nhi,
  output logic signed [IW-1:0]     out_y
);

  typedef struct packed {
    mode_e mode;
    logic  lo_nhi;
  } tag_t;

  logic                 w_valid;
  tag_t                 w_tag;
  logic signed [IW-1:0] w   [NUM_W];
  logic signed [IW-1:0] w_q [NUM_W];

  rwf_tap_window #(
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW), .TAG_W($bits(tag_t))
  ) u_window (
    .clk, .rst_n,
    .in_valid, .in_x, .in_tag(tag_t'{mode: in_mode, lo_nhi: in_lo_nhi}),
    .w_valid, .w_tag, .w_o(w)
  );

  // ---- folded 5/3 part ---------------------------------------------------
  logic signed [IW-1:0] lo_sum, m_plus, m_minus, out53_d, out53_q;
  logic                 c_valid;
  tag_t                 c_tag;

  always_comb begin
    lo_sum  = ((w[0] >>> 1) + (w[0] >>> 2)) + (w[1] >>> 2);
    m_plus  = w_tag.lo_nhi ? lo_sum      : w[0];
    m_minus = w_tag.lo_nhi ? (w[2] >>> 3) : (w[1] >>> 1);
    out53_d = m_plus - m_minus;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c_tag   <= '0;
      out53_q <= '0;
      for (int k = 0; k < NUM_W; k++) w_q[k] <= '0;
    end else begin
      c_valid <= w_valid;
      if (w_valid) begin
        c_tag   <= w_tag;
        out53_q <= out53_d;
      end
      // w carried to the 9/7 part only for 9/7 samples
      if (w_valid && w_tag.mode == MODE_97) w_q <= w;
    end
  end

  // ---- folded 9/7 part ---------------------------------------------------
  logic                 act;
  logic signed [IW-1:0] o53, corr_p, corr_m, outc_d, outc_q, out53_qq;
  logic                 o_valid;
  tag_t                 o_tag;

  assign act    = c_valid && c_tag.mode == MODE_97;
  assign o53    = act ? out53_q : '0;
  assign corr_p = c_tag.lo_nhi ? (w_q[4] >>> 6) : (w_q[3] >>> 5);
  assign corr_m = c_tag.lo_nhi ? (w_q[0] >>> 5) : (w_q[1] >>> 5);
  assign outc_d = (c_tag.lo_nhi ? o53 : (o53 >>> 1)) + (corr_p - corr_m);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid  <= 1'b0;
      o_tag    <= '0;
      outc_q   <= '0;
      out53_qq <= '0;
    end else begin
      o_valid <= c_valid;
      if (c_valid) o_tag <= c_tag;
      if (act) outc_q <= outc_d;
      if (c_valid && c_tag.mode == MODE_53) out53_qq <= out53_q;
    end
  end

  assign out_valid  = o_valid;
  assign out_mode   = o_tag.mode;
  assign out_lo_nhi = o_tag.lo_nhi;
  assign out_y      = (o_tag.mode == MODE_97) ? outc_q : out53_qq;

  // Constant latency: the output register is written 3 edges after the
  // sample edge (the assertion samples it one edge later, hence 4).
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> ##4 out_valid);

endmodule
