// tb_rwf_folded_c: self-checking testbench of the folded alpha = -2 filter.
//
// Random sample stream with random gaps, random 5/3 <-> 9/7 switches and a
// lo/hi select that mostly alternates (the decimated DWT use) but also
// repeats.  Each output is compared with a direct 9-tap convolution by the
// alpha = -2 or Le Gall 5/3 coefficient table (rwf_tb_pkg); the latency
// (3 edges), the reported mode and lo/hi are checked too.
module tb_rwf_folded_c;
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
  logic in_lo_nhi = 1'b1;

  logic                 out_valid, out_lo_nhi;
  mode_e                out_mode;
  logic signed [IW-1:0] out_y;

  rwf_folded_c dut (.clk, .rst_n, .in_valid, .in_x, .in_mode, .in_lo_nhi,
                    .out_valid, .out_mode, .out_lo_nhi, .out_y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint edges = 0;
  always @(posedge clk) edges++;

  typedef struct {
    longint edge_no;
    mode_e  mode;
    logic   lo;
    longint y;
  } exp_t;
  exp_t q [$];

  longint win [9];
  int n_sw = 0, n_gap = 0, n_lo97 = 0, n_hi97 = 0, n_lo53 = 0, n_hi53 = 0;

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
    automatic int sent = 0;
    automatic bit prev_valid = 0;
    automatic mode_e last_mode = MODE_97;
    foreach (win[j]) win[j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NSAMP || q.size() > 0) begin
      @(negedge clk);
      if (prev_valid) begin
        automatic exp_t e;
        automatic ref_e f = (in_mode == MODE_53) ? REF_53 : REF_C;
        for (int j = 8; j > 0; j--) win[j] = win[j-1];
        win[0] = longint'(in_x);
        e.edge_no = edges;
        e.mode = in_mode;
        e.lo = in_lo_nhi;
        e.y = ref_out(f, !in_lo_nhi, win);
        q.push_back(e);
        if (in_mode != last_mode) n_sw++;
        last_mode = in_mode;
      end
      if (out_valid) begin
        if (q.size() == 0) chk(1'b0, "output without input");
        else begin
          automatic exp_t e = q.pop_front();
          chk(edges - e.edge_no == 3, $sformatf("latency 3 (got %0d)", edges - e.edge_no));
          chk(out_mode == e.mode, "mode");
          chk(out_lo_nhi == e.lo, "lo/hi");
          chk(longint'(out_y) == e.y,
              $sformatf("y mode=%0d lo=%0d got %0d exp %0d", e.mode, e.lo, out_y, e.y));
          case ({e.mode == MODE_97, e.lo})
            2'b11: n_lo97++;
            2'b10: n_hi97++;
            2'b01: n_lo53++;
            default: n_hi53++;
          endcase
        end
      end
      prev_valid = 0;
      if (sent < NSAMP && $urandom_range(0, 9) != 0) begin
        in_valid = 1'b1;
        in_x = DATA_W'($urandom);
        if (sent % 200 < 3) in_x = (sent % 2) ? 16'sh7fff : -16'sh8000;
        if ($urandom_range(0, 15) == 0) in_mode = (in_mode == MODE_97) ? MODE_53 : MODE_97;
        in_lo_nhi = ($urandom_range(0, 7) == 0) ? in_lo_nhi : !in_lo_nhi;
        sent++;
        prev_valid = 1;
      end else begin
        if (sent < NSAMP) n_gap++;
        in_valid = 1'b0;
        in_x = DATA_W'($urandom);
        in_lo_nhi = 1'($urandom);
      end
    end
    chk(n_sw > 0, "mode switch exercised");
    chk(n_gap > 0, "input gap exercised");
    chk(n_lo97 > 0 && n_hi97 > 0 && n_lo53 > 0 && n_hi53 > 0, "all four outputs kinds seen");
    $display("switches=%0d gaps=%0d lo97=%0d hi97=%0d lo53=%0d hi53=%0d",
             n_sw, n_gap, n_lo97, n_hi97, n_lo53, n_hi53);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
