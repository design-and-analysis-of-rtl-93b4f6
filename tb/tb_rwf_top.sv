// tb_rwf_top: end-to-end testbench of rwf_top at its default sizes.
//
// Two processes run side by side, one per part of the top:
//  * Filter bank: a 12000-sample stream (image-like ramps and edges plus
//    random samples, random input gaps, 5/3 <-> 9/7 switches every few dozen
//    samples, lo/hi mostly alternating) goes into all four filters; every
//    output is compared with a direct 9-tap convolution by the coefficient
//    tables.  While a filter outputs 5/3 results its 9/7 extension registers
//    must not change (the extension is switched off).
//  * 2-D transform: two full 1440 x 1080 frames (9/7 then 5/3 mode) are sent
//    and every sub-band coefficient is compared with a row/column reference
//    transform with symmetric extension.
// Each mechanism (switch up, switch down, input gap, lo and hi outputs,
// extension idle, 2-D frame in each mode) is counted and must occur.
module tb_rwf_top;
  import rwf_pkg::*;
  import rwf_tb_pkg::*;

  localparam int DATA_W = 16;
  localparam int IW  = DATA_W + 10;
  localparam int IW2 = IW + 10;
  localparam int R = 1080, C = 1440;
  localparam int RW = $clog2(R + 8), CW = $clog2(C + 8);
  localparam int NSAMP = 12000;

  logic clk = 1'b0, rst_n = 1'b0;

  // filter bank side
  logic in_valid = 1'b0, in_mode_97 = 1'b1, in_lo_nhi = 1'b1;
  logic signed [DATA_W-1:0] in_x = '0;
  logic a_valid, a_mode_97, b_valid, b_mode_97, c_valid, c_mode_97;
  logic f_valid, f_mode_97, f_lo_nhi;
  logic signed [IW-1:0] a_low, a_high, b_low, b_high, c_low, c_high, f_y;

  // 2-D side
  logic d_in_valid = 1'b0, d_in_ready, d_in_mode_97 = 1'b1;
  logic signed [DATA_W-1:0] d_in_pix = '0;
  logic d_out_valid, d_out_mode_97, d_busy;
  logic [1:0] d_out_band;
  logic [RW-1:0] d_out_row;
  logic [CW-1:0] d_out_col;
  logic signed [IW2-1:0] d_out_coef;

  rwf_top dut (.*);

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
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // filter bank
  // ------------------------------------------------------------------
  typedef struct {
    longint edge_no;
    bit     m97;
    bit     lo;
    longint lo_e [3];
    longint hi_e [3];
    longint f_e;
  } exp_t;
  exp_t q [$];
  longint win [9];
  int n_up = 0, n_down = 0, n_gap = 0, n_flo = 0, n_fhi = 0, n_idle = 0;
  bit bank_done = 0;

  function automatic logic signed [DATA_W-1:0] sample(int n);
    case ((n / 500) % 4)
      0: return DATA_W'(n % 256);                          // ramp
      1: return ((n / 7) % 2) ? DATA_W'(255) : DATA_W'(0); // edges
      2: return DATA_W'($urandom);                         // full range noise
      default: return DATA_W'($urandom_range(0, 255));     // 8-bit pixels
    endcase
  endfunction

  initial begin
    automatic int sent = 0;
    automatic bit prev_valid = 0, last_m = 1;
    automatic logic signed [IW-1:0] ext_lo_prev = '0, ext_hi_prev = '0;
    foreach (win[j]) win[j] = 0;
    repeat (3) @(negedge clk);
    while (sent < NSAMP || q.size() > 0) begin
      @(negedge clk);
      if (prev_valid) begin
        automatic exp_t e;
        for (int j = 8; j > 0; j--) win[j] = win[j-1];
        win[0] = longint'(in_x);
        e.edge_no = edges;
        e.m97 = in_mode_97;
        e.lo = in_lo_nhi;
        for (int v = 0; v < 3; v++) begin
          automatic ref_e f = in_mode_97 ? ref_e'(v) : REF_53;
          e.lo_e[v] = ref_out(f, 1'b0, win);
          e.hi_e[v] = ref_out(f, 1'b1, win);
        end
        e.f_e = ref_out(in_mode_97 ? REF_C : REF_53, !in_lo_nhi, win);
        q.push_back(e);
        if (in_mode_97 != last_m) begin
          if (in_mode_97) n_up++; else n_down++;
        end
        last_m = in_mode_97;
      end
      chk(a_valid == b_valid && b_valid == c_valid && c_valid == f_valid, "lock step");
      if (a_valid) begin
        if (q.size() == 0) chk(1'b0, "output without input");
        else begin
          automatic exp_t e = q.pop_front();
          chk(edges - e.edge_no == 3, "latency 3");
          chk(a_mode_97 == e.m97 && b_mode_97 == e.m97 && c_mode_97 == e.m97 &&
              f_mode_97 == e.m97, "mode tags");
          chk(longint'(a_low) == e.lo_e[0] && longint'(a_high) == e.hi_e[0], "alpha -1.67");
          chk(longint'(b_low) == e.lo_e[1] && longint'(b_high) == e.hi_e[1], "alpha -1.8");
          chk(longint'(c_low) == e.lo_e[2] && longint'(c_high) == e.hi_e[2], "alpha -2");
          chk(f_lo_nhi == e.lo && longint'(f_y) == e.f_e, "alpha -2 folded");
          if (e.lo) n_flo++; else n_fhi++;
          if (!e.m97) begin
            chk(dut.u_fa.low97 == ext_lo_prev && dut.u_fa.high97 == ext_hi_prev,
                "extension idle in 5/3 mode");
            n_idle++;
          end
        end
      end
      ext_lo_prev = dut.u_fa.low97;
      ext_hi_prev = dut.u_fa.high97;
      prev_valid = 0;
      if (sent < NSAMP && $urandom_range(0, 9) != 0) begin
        in_valid = 1'b1;
        in_x = sample(sent);
        if ($urandom_range(0, 39) == 0) in_mode_97 = !in_mode_97;
        in_lo_nhi = ($urandom_range(0, 9) == 0) ? in_lo_nhi : !in_lo_nhi;
        sent++;
        prev_valid = 1;
      end else begin
        if (sent < NSAMP) n_gap++;
        in_valid = 1'b0;
      end
    end
    bank_done = 1;
  end

  // ------------------------------------------------------------------
  // 2-D transform
  // ------------------------------------------------------------------
  typedef longint frame_t [R][C];
  frame_t img, rowt;
  longint expc [4][R/2][C/2];
  bit     seen [4][R/2][C/2];
  int     n_frames97 = 0, n_frames53 = 0, n_dgap = 0;
  bit     dwt_done = 0;

  function automatic int mir(int e, int n);
    if (e < 0) return -e;
    if (e >= n) return 2 * n - 2 - e;
    return e;
  endfunction

  task automatic build_ref(bit m97);
    longint w [9];
    ref_e f = m97 ? REF_C : REF_53;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        for (int j = 0; j < 9; j++) w[j] = img[r][mir(c + 4 - j, C)];
        rowt[r][(c % 2) ? C / 2 + c / 2 : c / 2] = ref_out(f, c % 2 == 1, w);
      end
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) begin
        for (int j = 0; j < 9; j++) w[j] = rowt[mir(r + 4 - j, R)][c];
        expc[{c >= C / 2, r % 2 == 1}][r / 2][c % (C / 2)] = ref_out(f, r % 2 == 1, w);
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 2; frame++) begin
      automatic bit m97 = (frame == 0);
      automatic int sent = 0, n_out = 0, bad = 0;
      // synthetic picture: gradients, a bright box, texture
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          automatic int v = (r + 2 * c) % 256;
          if (r > 300 && r < 500 && c > 600 && c < 900) v = 250;
          if (frame == 1) v = (v + $urandom_range(0, 31)) % 256;
          img[r][c] = v;
        end
      build_ref(m97);
      foreach (seen[b, r, c]) seen[b][r][c] = 0;
      @(negedge clk);
      chk(d_in_ready && !d_busy, "2-D idle before frame");
      while (sent < R * C) begin
        if ($urandom_range(0, 99) == 0) begin
          d_in_valid = 1'b0;
          n_dgap++;
        end else begin
          d_in_valid = 1'b1;
          d_in_pix = DATA_W'(img[sent / C][sent % C]);
          d_in_mode_97 = m97;
        end
        @(negedge clk);
        if (d_in_valid) sent++;
      end
      d_in_valid = 1'b0;
      while (d_busy) begin
        if (d_out_valid) begin
          n_out++;
          if (d_out_row >= R / 2 || d_out_col >= C / 2 || d_out_mode_97 != m97 ||
              seen[d_out_band][d_out_row][d_out_col] ||
              longint'(d_out_coef) != expc[d_out_band][d_out_row][d_out_col]) begin
            bad++;
            if (bad < 5) $display("2-D mismatch band %0d (%0d,%0d)", d_out_band, d_out_row, d_out_col);
          end else seen[d_out_band][d_out_row][d_out_col] = 1;
        end
        @(negedge clk);
      end
      chk(bad == 0, $sformatf("2-D coefficients frame %0d (%0d bad)", frame, bad));
      chk(n_out == R * C, "2-D coefficient count");
      if (m97) n_frames97++; else n_frames53++;
      $display("2-D frame %0d mode97=%0d: %0d coefficients checked", frame, m97, n_out);
    end
    dwt_done = 1;
  end

  initial begin
    wait (bank_done && dwt_done);
    chk(n_up > 0,   "mechanism: switch 5/3 -> 9/7");
    chk(n_down > 0, "mechanism: switch 9/7 -> 5/3");
    chk(n_gap > 0,  "mechanism: input gap");
    chk(n_flo > 0 && n_fhi > 0, "mechanism: folded lo and hi outputs");
    chk(n_idle > 0, "mechanism: extension idle in 5/3 mode");
    chk(n_frames97 > 0 && n_frames53 > 0, "mechanism: 2-D frame in both modes");
    chk(n_dgap > 0, "mechanism: 2-D input gap");
    $display("bank: up=%0d down=%0d gaps=%0d lo=%0d hi=%0d idle=%0d; 2-D: frames97=%0d frames53=%0d gaps=%0d",
             n_up, n_down, n_gap, n_flo, n_fhi, n_idle, n_frames97, n_frames53, n_dgap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
