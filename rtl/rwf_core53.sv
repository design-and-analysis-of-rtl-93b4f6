// rwf_core53: Le Gall 5/3 filter datapath (the part every filter keeps on).
//
// Function: from the pre-added samples w0..w2 it forms the Le Gall 5/3
// analysis outputs
//   low53  = 6/8 w0 + 2/8 w1 - 1/8 w2
//   high53 = w0 - 1/2 w1
// using only shifts and four adder/subtractors, grouped as in the 5/3 part
// of the filter architecture:
//   low53  = ((w0>>1) + (w0>>2)) + ((w1>>2) - (w2>>3))
//   high53 = w0 - (w1>>1)
// Together with the four pre-adders of rwf_tap_window that is the eight
// adder/subtractor units the 5/3 filter is built from.
//
// Interface: w_i[k] is wk scaled by 2^FRAC_W (see rwf_pkg), so every shift
// here is exact.  Outputs use the same scale.
//
// Timing: one register stage; outputs for a w set valid at edge n appear at
// edge n+1 together with out_valid and the side-band tag.
module rwf_core53
  import rwf_pkg::*;
#(
  parameter int unsigned IW    = 26,
  parameter int unsigned TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic signed [IW-1:0] w_i [NUM_W],
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic signed [IW-1:0] low53,
  output logic signed [IW-1:0] high53
);

  logic signed [IW-1:0] sum_w0, diff_w12, low_d, high_d;

  always_comb begin
    sum_w0   = (w_i[0] >>> 1) + (w_i[0] >>> 2);
    diff_w12 = (w_i[1] >>> 2) - (w_i[2] >>> 3);
    low_d    = sum_w0 + diff_w12;
    high_d   = w_i[0] - (w_i[1] >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      low53     <= '0;
      high53    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        low53   <= low_d;
        high53  <= high_d;
      end
    end
  end

endmodule
