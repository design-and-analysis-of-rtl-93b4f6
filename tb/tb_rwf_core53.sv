// tb_rwf_core53: self-checking testbench of the Le Gall 5/3 datapath.
//
// Random pre-added values w0..w2 (scaled by 2^6, as the delay line delivers
// them) are applied; one edge later low53 and high53 must equal the 5/3
// table (6/8, 2/8, -1/8 and 1, -1/2) applied to them, and the tag must follow.
module tb_rwf_core53;
  import rwf_pkg::*;

  localparam int IW = 26;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [0:0] in_tag = '0, out_tag;
  logic signed [IW-1:0] w [NUM_W];
  logic out_valid;
  logic signed [IW-1:0] low53, high53;

  rwf_core53 #(.IW(IW)) dut (.clk, .rst_n, .in_valid, .in_tag, .w_i(w),
                             .out_valid, .out_tag, .low53, .high53);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint W [3];
    longint exp_lo, exp_hi;
    bit exp_tag;
    bit prev = 0;
    foreach (w[k]) w[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5000) begin
      @(negedge clk);
      chk(out_valid == prev, "valid follows in_valid by one edge");
      if (prev) begin
        chk(longint'(low53) == exp_lo, $sformatf("low53 got %0d exp %0d", low53, exp_lo));
        chk(longint'(high53) == exp_hi, $sformatf("high53 got %0d exp %0d", high53, exp_hi));
        chk(out_tag == exp_tag, "tag");
      end
      prev = $urandom_range(0, 3) != 0;
      in_valid = prev;
      in_tag = 1'($urandom);
      // |x| < 2^15, so |w0| < 2^15, |w1|,|w2| < 2^16 before scaling
      W[0] = longint'($signed(16'($urandom)));
      W[1] = longint'($signed(17'($urandom)));
      W[2] = longint'($signed(17'($urandom)));
      for (int k = 0; k < 3; k++) w[k] = IW'(W[k] * 64);
      w[3] = IW'($urandom);  // unused by the 5/3 part
      w[4] = IW'($urandom);
      exp_lo = 48 * W[0] + 16 * W[1] - 8 * W[2];   // (6/8, 2/8, -1/8) * 64
      exp_hi = 64 * W[0] - 32 * W[1];              // (1, -1/2) * 64
      exp_tag = in_tag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
