// tb_rwf_filter: self-checking testbench of rwf_filter, all three alphas.
//
// Drives one random sample stream (random gaps, random 5/3 <-> 9/7 switches)
// into three rwf_filter instances (alpha = -1.67, -1.8, -2) and compares every
// low/high output with a direct 9-tap convolution by the coefficient tables
// (rwf_tb_pkg).  Also checks the 3-edge latency, the reported mode, and that
// the mode switch happens and takes effect on the exact sample.
module tb_rwf_filter;
  import rwf_pkg::*;
  import rwf_tb_pkg::*;

  localparam int DATA_W = 16;
  localparam int IW     = DATA_W + 6 + 4;
  localparam int NSAMP  = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_x = '0;
  mode_e in_mode = MODE_97;

  logic                 ov   [3];
  mode_e                om   [3];
  logic signed [IW-1:0] olow [3];
  logic signed [IW-1:0] ohigh[3];

  rwf_filter #(.VARIANT(VAR_A)) u_a (.clk, .rst_n, .in_valid, .in_x, .in_mode,
    .out_valid(ov[0]), .out_mode(om[0]), .out_low(olow[0]), .out_high(ohigh[0]));
  rwf_filter #(.VARIANT(VAR_B)) u_b (.clk, .rst_n, .in_valid, .in_x, .in_mode,
    .out_valid(ov[1]), .out_mode(om[1]), .out_low(olow[1]), .out_high(ohigh[1]));
  rwf_filter #(.VARIANT(VAR_C)) u_c (.clk, .rst_n, .in_valid, .in_x, .in_mode,
    .out_valid(ov[2]), .out_mode(om[2]), .out_low(olow[2]), .out_high(ohigh[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint edges = 0;
  always @(posedge clk) edges++;

  typedef struct {
    longint edge_no;
    mode_e  mode;
    longint lo [3];
    longint hi [3];
  } exp_t;
  exp_t q [$];

  longint win [9];
  int n_sw_up = 0, n_sw_down = 0, n_gap = 0, n_out97 = 0, n_out53 = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at edge %0d", what, edges);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    bit prev_valid = 0;
    mode_e prev_mode = MODE_97, last_acc_mode = MODE_97;
    foreach (win[j]) win[j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NSAMP || q.size() > 0) begin
      @(negedge clk);
      // inputs driven at the last negedge were taken at the edge just passed
      if (prev_valid) begin
        automatic exp_t e;
        for (int j = 8; j > 0; j--) win[j] = win[j-1];
        win[0] = longint'(in_x);
        e.edge_no = edges;
        e.mode = in_mode;
        for (int v = 0; v < 3; v++) begin
          automatic ref_e f = (in_mode == MODE_53) ? REF_53 : ref_e'(v);
          e.lo[v] = ref_out(f, 1'b0, win);
          e.hi[v] = ref_out(f, 1'b1, win);
        end
        q.push_back(e);
        if (in_mode != last_acc_mode) begin
          if (in_mode == MODE_97) n_sw_up++; else n_sw_down++;
        end
        last_acc_mode = in_mode;
      end
      // outputs: all three filters are in lock step
      chk(ov[0] == ov[1] && ov[1] == ov[2], "valid lock step");
      if (ov[0]) begin
        if (q.size() == 0) chk(1'b0, "output without input");
        else begin
          automatic exp_t e = q.pop_front();
          chk(edges - e.edge_no == 3, $sformatf("latency 3 (got %0d)", edges - e.edge_no));
          if (e.mode == MODE_97) n_out97++; else n_out53++;
          for (int v = 0; v < 3; v++) begin
            chk(om[v] == e.mode, "mode");
            chk(longint'(olow[v]) == e.lo[v], $sformatf("low v%0d", v));
            chk(longint'(ohigh[v]) == e.hi[v], $sformatf("high v%0d", v));
          end
        end
      end
      // next input
      prev_valid = 0;
      if (sent < NSAMP && $urandom_range(0, 9) != 0) begin
        in_valid = 1'b1;
        in_x = DATA_W'($urandom);
        if (sent % 200 < 3) in_x = (sent % 2) ? 16'sh7fff : -16'sh8000; // extremes
        if ($urandom_range(0, 15) == 0) in_mode = (in_mode == MODE_97) ? MODE_53 : MODE_97;
        sent++;
        prev_valid = 1;
      end else begin
        if (sent < NSAMP) n_gap++;
        in_valid = 1'b0;
        in_x = DATA_W'($urandom);   // garbage while idle
      end
    end
    chk(n_sw_up > 0,   "5/3 -> 9/7 switch exercised");
    chk(n_sw_down > 0, "9/7 -> 5/3 switch exercised");
    chk(n_gap > 0,     "input gap exercised");
    chk(n_out97 > 0 && n_out53 > 0, "both modes produced output");
    $display("switches 53->97=%0d 97->53=%0d gaps=%0d out97=%0d out53=%0d",
             n_sw_up, n_sw_down, n_gap, n_out97, n_out53);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
