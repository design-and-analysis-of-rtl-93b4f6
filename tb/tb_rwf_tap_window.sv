// tb_rwf_tap_window: self-checking testbench of the delay line / pre-adders.
//
// Random samples with random gaps and a random 2-bit tag.  A queue model of
// the last nine accepted samples gives the expected w0..w4 (scaled by 2^6);
// the w registers must show them, with the tag, one edge after the sample
// edge, and hold while no sample arrives.
module tb_rwf_tap_window;
  import rwf_pkg::*;

  localparam int DATA_W = 16;
  localparam int FRAC_W = 6;
  localparam int IW     = DATA_W + FRAC_W + 4;
  localparam int NSAMP  = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_x = '0;
  logic [1:0] in_tag = '0;
  logic w_valid;
  logic [1:0] w_tag;
  logic signed [IW-1:0] w [NUM_W];

  rwf_tap_window #(.TAG_W(2)) dut (.clk, .rst_n, .in_valid, .in_x, .in_tag,
                                   .w_valid, .w_tag, .w_o(w));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint edges = 0;
  always @(posedge clk) edges++;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at edge %0d", what, edges);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [9];
  longint exp_w [NUM_W];
  logic [1:0] exp_tag;
  longint exp_edge;
  bit pending;

  initial begin
    automatic int sent = 0, n_gap = 0;
    automatic bit prev_valid = 0;
    foreach (hist[j]) hist[j] = 0;
    pending = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (NSAMP + 5) begin
      @(negedge clk);
      if (w_valid) begin
        chk(pending && edges - exp_edge == 1, "w latency 1");
        chk(w_tag == exp_tag, "tag");
        for (int k = 0; k < NUM_W; k++)
          chk(longint'(w[k]) == exp_w[k], $sformatf("w%0d", k));
        pending = 0;
      end else begin
        chk(!pending || edges - exp_edge < 1, "w_valid missing");
        // held values while idle
        for (int k = 0; k < NUM_W; k++)
          chk(longint'(w[k]) == exp_w[k] || edges < 6, $sformatf("w%0d held", k));
      end
      if (prev_valid) begin
        for (int j = 8; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'(in_x);
        exp_w[0] = hist[4] * 64;
        for (int k = 1; k <= 4; k++) exp_w[k] = (hist[4-k] + hist[4+k]) * 64;
        exp_tag = in_tag;
        exp_edge = edges;
        pending = 1;
      end
      prev_valid = 0;
      if (sent < NSAMP && $urandom_range(0, 4) != 0) begin
        in_valid = 1'b1;
        in_x = DATA_W'($urandom);
        in_tag = 2'($urandom);
        sent++;
        prev_valid = 1;
      end else begin
        if (sent < NSAMP) n_gap++;
        in_valid = 1'b0;
        in_x = DATA_W'($urandom);
        in_tag = 2'($urandom);
      end
    end
    chk(n_gap > 0, "gaps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
