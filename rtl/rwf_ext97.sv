// rwf_ext97: 9/7 extension hardware of the reconfigurable wavelet filters.
//
// Function: turns the Le Gall 5/3 outputs of a sample, plus its pre-added
// taps w0..w4, into the low and high pass outputs of one of the binary-
// coefficient 9/7 filters.  Each 9/7 filter is written as a combination of
// low53/high53 and a few extra shifted w terms (l = low53, h = high53):
//
//   alpha = -1.67 (VAR_A), 11 adders:
//     low  = l/2 - h/4 - h/16 + w0/2 + w0/32 + w4/32 - w3/32
//     high = l/2 + h/2 + h/4 - w1/4 - w1/16 + w3/16
//   alpha = -1.8 (VAR_B), 9 adders:
//     low  = l/2 - h/4 + w0/2 + w4/32 - w2/32
//     high = l/2 + h/2 + h/4 - w1/4 - w1/16 + w3/16
//   alpha = -2 (VAR_C), 4 adders:
//     low  = l - w0/32 + w4/64
//     high = h/2 - w1/32 + w3/32
//
// With the eight adders of the 5/3 part this gives 19, 17 and 12 adders, the
// counts of the architecture it follows.  The A and C forms and the B high
// form are the published decompositions; the B low form is this design's own
// rearrangement, chosen so that it reproduces the published B low-pass
// coefficients (5/8, 1/4, -3/32, 0, 1/32) with the published adder count.
// The C high output is scaled by 1/2 against the C high-pass coefficient
// table (coefficients 1/2, -9/32, 0, 1/32 on w0..w3), following the
// published decomposition and the folded architecture.
//
// Power: when en is low (5/3 mode) the l/h operands are forced to zero
// (operand isolation) and the output registers keep their value, so the
// extension does not switch.
//
// Interface: all values scaled by 2^FRAC_W (see rwf_pkg); the shifts are
// exact for FRAC_W >= 6.  low53/high53/w_i must belong to the same sample.
// Timing: one register stage, outputs at the edge after in_valid && en.
module rwf_ext97
  import rwf_pkg::*;
#(
  parameter variant_e    VARIANT = VAR_C,
  parameter int unsigned IW      = 26
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 en,
  input  logic signed [IW-1:0] low53,
  input  logic signed [IW-1:0] high53,
  input  logic signed [IW-1:0] w_i [NUM_W],
  output logic                 out_valid,
  output logic signed [IW-1:0] low97,
  output logic signed [IW-1:0] high97
);

  logic                 act;
  logic signed [IW-1:0] l, h;
  logic signed [IW-1:0] low_d, high_d;

  assign act = in_valid && en;
  assign l   = act ? low53  : '0;
  assign h   = act ? high53 : '0;

  always_comb begin
    unique case (VARIANT)
      VAR_A: begin
        low_d  = (l >>> 1) - (h >>> 2) - (h >>> 4)
               + (w_i[0] >>> 1) + (w_i[0] >>> 5)
               + (w_i[4] >>> 5) - (w_i[3] >>> 5);
        high_d = (l >>> 1) + (h >>> 1) + (h >>> 2)
               - (w_i[1] >>> 2) - (w_i[1] >>> 4) + (w_i[3] >>> 4);
      end
      VAR_B: begin
        low_d  = (l >>> 1) - (h >>> 2) + (w_i[0] >>> 1)
               + (w_i[4] >>> 5) - (w_i[2] >>> 5);
        high_d = (l >>> 1) + (h >>> 1) + (h >>> 2)
               - (w_i[1] >>> 2) - (w_i[1] >>> 4) + (w_i[3] >>> 4);
      end
      default: begin // VAR_C
        low_d  = l - (w_i[0] >>> 5) + (w_i[4] >>> 6);
        high_d = (h >>> 1) - (w_i[1] >>> 5) + (w_i[3] >>> 5);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      low97     <= '0;
      high97    <= '0;
    end else begin
      out_valid <= act;
      if (act) begin
        low97  <= low_d;
        high97 <= high_d;
      end
    end
  end

endmodule
