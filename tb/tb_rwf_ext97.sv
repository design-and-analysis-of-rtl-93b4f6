// tb_rwf_ext97: self-checking testbench of the 9/7 extension, all alphas.
//
// Random w0..w4 (scaled by 2^6) with the matching 5/3 outputs are applied to
// the alpha = -1.67, -1.8 and -2 extensions, with en random.  When enabled the
// outputs one edge later must equal the 9/7 coefficient tables applied to w
// (rwf_tb_pkg); when disabled out_valid stays low and the outputs hold.
module tb_rwf_ext97;
  import rwf_pkg::*;
  import rwf_tb_pkg::*;

  localparam int IW = 26;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, en = 1'b0;
  logic signed [IW-1:0] low53 = '0, high53 = '0;
  logic signed [IW-1:0] w [NUM_W];
  logic ov [3];
  logic signed [IW-1:0] lo [3];
  logic signed [IW-1:0] hi [3];

  rwf_ext97 #(.VARIANT(VAR_A), .IW(IW)) u_a (.clk, .rst_n, .in_valid, .en, .low53, .high53,
    .w_i(w), .out_valid(ov[0]), .low97(lo[0]), .high97(hi[0]));
  rwf_ext97 #(.VARIANT(VAR_B), .IW(IW)) u_b (.clk, .rst_n, .in_valid, .en, .low53, .high53,
    .w_i(w), .out_valid(ov[1]), .low97(lo[1]), .high97(hi[1]));
  rwf_ext97 #(.VARIANT(VAR_C), .IW(IW)) u_c (.clk, .rst_n, .in_valid, .en, .low53, .high53,
    .w_i(w), .out_valid(ov[2]), .low97(lo[2]), .high97(hi[2]));

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

  // model: sum over w_k of coefficient (1/64 units) * W_k, W_k = w_k / 64
  function automatic longint conv(ref_e f, bit high, longint W [5]);
    longint acc = 0;
    for (int k = 0; k < 5; k++)
      acc += longint'(high ? high_coef(f, k) : low_coef(f, k)) * W[k];
    return acc;
  endfunction

  initial begin
    longint W [5];
    longint exp_lo [3], exp_hi [3];
    bit act = 0;
    int n_off = 0;
    foreach (w[k]) w[k] = '0;
    foreach (exp_lo[v]) begin exp_lo[v] = 0; exp_hi[v] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5000) begin
      @(negedge clk);
      for (int v = 0; v < 3; v++) begin
        chk(ov[v] == act, "out_valid");
        chk(longint'(lo[v]) == exp_lo[v], $sformatf("low v%0d got %0d exp %0d", v, lo[v], exp_lo[v]));
        chk(longint'(hi[v]) == exp_hi[v], $sformatf("high v%0d got %0d exp %0d", v, hi[v], exp_hi[v]));
      end
      in_valid = $urandom_range(0, 5) != 0;
      en = $urandom_range(0, 2) != 0;
      W[0] = longint'($signed(16'($urandom)));
      for (int k = 1; k < 5; k++) W[k] = longint'($signed(17'($urandom)));
      for (int k = 0; k < 5; k++) w[k] = IW'(W[k] * 64);
      low53  = IW'(48 * W[0] + 16 * W[1] - 8 * W[2]);
      high53 = IW'(64 * W[0] - 32 * W[1]);
      act = in_valid && en;
      if (!act) n_off++;
      if (act) begin
        for (int v = 0; v < 3; v++) begin
          exp_lo[v] = conv(ref_e'(v), 1'b0, W);
          exp_hi[v] = conv(ref_e'(v), 1'b1, W);
        end
      end
    end
    chk(n_off > 0, "disabled cycles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
