// rwf_filter: reconfigurable 9/7 <-> 5/3 wavelet filter for one alpha.
//
// Function: a streaming 1-D analysis filter.  Each clock it takes one sample
// x and produces both the low pass and the high pass output for the sample
// four positions back (the centre of the 9-tap window), computed as
//   low(i)  = sum_{k=-4..4} h0(k) x(i-k),   high(i) = sum_{k=-3..3} h1(k) x(i-k)
// where h0/h1 are the binary-coefficient 9/7 filter of the chosen VARIANT
// (alpha = -1.67, -1.8 or -2) in MODE_97, or the Le Gall 5/3 filter in
// MODE_53.  The mode is given with every sample and may change on any sample:
// the switch takes effect exactly at that sample, with no flush.
//
// Structure (after the published block diagram): rwf_tap_window (delay line
// and pre-adders w0..w4) -> rwf_core53 (5/3 part, always on) ->
// rwf_ext97 (9/7 extension).  In MODE_53 the extension and the pipeline
// register that carries w0..w4 to it are not clocked (enable low), which is
// the power saving of the 5/3 mode.  Decimation by two is left to the user
// of the outputs (keep low of even, high of odd positions, or as needed).
//
// Interface: in_x is a signed DATA_W-bit sample; out_low/out_high are signed
// IW-bit words scaled by 2^FRAC_W (value = word / 2^FRAC_W), exact.
// out_mode is the mode the output was computed in.
//
// Timing: fully pipelined, one sample per clock.  A sample accepted at edge n
// gives, at edge n+3, the outputs whose window has it as newest sample
// x(i+4); out_valid is high for that cycle.  Latency is the same in both
// modes.  The pipeline split (window register, w register, 5/3 register,
// output register) is this design's choice; the source gives no stages.
module rwf_filter
  import rwf_pkg::*;
#(
  parameter variant_e    VARIANT = VAR_C,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned FRAC_W  = 6,
  parameter int unsigned IW      = DATA_W + FRAC_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_x,
  input  mode_e                    in_mode,
  output logic                     out_valid,
  output mode_e                    out_mode,
  output logic signed [IW-1:0]     out_low,
  output logic signed [IW-1:0]     out_high
);

  logic                 w_valid, c_valid, e_valid;
  logic [0:0]           w_tag, c_tag;
  logic signed [IW-1:0] w   [NUM_W];
  logic signed [IW-1:0] w_q [NUM_W];
  logic signed [IW-1:0] low53, high53, low53_q, high53_q, low97, high97;
  logic                 v_q;
  mode_e                mode_q;

  rwf_tap_window #(
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW), .TAG_W(1)
  ) u_window (
    .clk, .rst_n,
    .in_valid, .in_x, .in_tag(in_mode),
    .w_valid, .w_tag, .w_o(w)
  );

  rwf_core53 #(.IW(IW), .TAG_W(1)) u_core53 (
    .clk, .rst_n,
    .in_valid(w_valid), .in_tag(w_tag), .w_i(w),
    .out_valid(c_valid), .out_tag(c_tag), .low53, .high53
  );

  // w0..w4 delayed to line up with the 5/3 outputs; only clocked for samples
  // in 9/7 mode.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_W; k++) w_q[k] <= '0;
    end else if (w_valid && mode_e'(w_tag) == MODE_97) begin
      w_q <= w;
    end
  end

  rwf_ext97 #(.VARIANT(VARIANT), .IW(IW)) u_ext97 (
    .clk, .rst_n,
    .in_valid(c_valid), .en(mode_e'(c_tag) == MODE_97),
    .low53, .high53, .w_i(w_q),
    .out_valid(e_valid), .low97, .high97
  );

  // 5/3 results delayed by the extension's stage so both modes have the same
  // latency; only clocked for samples in 5/3 mode.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q      <= 1'b0;
      mode_q   <= MODE_53;
      low53_q  <= '0;
      high53_q <= '0;
    end else begin
      v_q <= c_valid;
      if (c_valid) mode_q <= mode_e'(c_tag);
      if (c_valid && mode_e'(c_tag) == MODE_53) begin
        low53_q  <= low53;
        high53_q <= high53;
      end
    end
  end

  assign out_valid = v_q;
  assign out_mode  = mode_q;
  assign out_low   = (mode_q == MODE_97) ? low97  : low53_q;
  assign out_high  = (mode_q == MODE_97) ? high97 : high53_q;

  // The extension fires exactly for the samples that leave in 9/7 mode.
  a_ext_valid : assert property (@(posedge clk) disable iff (!rst_n)
    e_valid == (v_q && mode_q == MODE_97));
  // Constant latency: the sample taken at edge n leaves at edge n+3 (the
  // assertion samples registers one edge later, hence 4).
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> ##4 out_valid);

endmodule
