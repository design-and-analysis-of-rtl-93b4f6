// tb_rwf_dwt2d: self-checking testbench of the one-level 2-D transform.
//
// Sends two random frames (the first in 9/7 mode, the second in 5/3 mode,
// with random gaps in the pixel stream) through an 18 x 12 instance (more rows
// than columns) and checks every LL/LH/HL/HH coefficient against a reference
// computed here: rows then columns, symmetric extension at the line ends,
// direct 9-tap convolution with the coefficient tables, decimation by two.
// Also checks that each coefficient comes out exactly once and the cycle
// count of the row and column passes.
module tb_rwf_dwt2d;
  import rwf_pkg::*;
  import rwf_tb_pkg::*;

  localparam int R = 18, C = 12;
  localparam int DATA_W = 16;
  localparam int IW1 = DATA_W + 10, IW2 = IW1 + 10;
  localparam int RW = $clog2(R + 8), CW = $clog2(C + 8);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_mode_97 = 1'b1;
  logic signed [DATA_W-1:0] in_pix = '0;
  logic out_valid, out_mode_97, busy;
  logic [1:0] out_band;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;
  logic signed [IW2-1:0] out_coef;

  rwf_dwt2d #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pix,
    .in_mode_97, .out_valid, .out_band, .out_row, .out_col, .out_coef, .out_mode_97, .busy);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint img [R][C];
  longint rowt [R][C];     // row pass result, L | H halves
  longint expc [4][R/2][C/2];
  bit     seen [4][R/2][C/2];

  function automatic int mir(int e, int n);
    if (e < 0) return -e;
    if (e >= n) return 2 * n - 2 - e;
    return e;
  endfunction

  task automatic build_ref(bit m97);
    longint win [9];
    ref_e f = m97 ? REF_C : REF_53;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        for (int j = 0; j < 9; j++) win[j] = img[r][mir(c + 4 - j, C)];
        rowt[r][(c % 2) ? C / 2 + c / 2 : c / 2] = ref_out(f, c % 2 == 1, win);
      end
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) begin
        for (int j = 0; j < 9; j++) win[j] = rowt[mir(r + 4 - j, R)][c];
        expc[{c >= C / 2, r % 2 == 1}][r / 2][c % (C / 2)] = ref_out(f, r % 2 == 1, win);
      end
  endtask

  int n_out;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 2; frame++) begin
      automatic bit m97 = (frame == 0);
      automatic int sent = 0;
      automatic longint t_last_in = 0, t_last_out = 0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          img[r][c] = (frame == 0 && r == 0) ? ((c % 2) ? 32767 : -32768)
                                             : longint'($signed(16'($urandom)));
      build_ref(m97);
      foreach (seen[b, r, c]) seen[b][r][c] = 0;
      n_out = 0;
      @(negedge clk);
      chk(in_ready && !busy, "idle before frame");
      // load
      while (sent < R * C) begin
        if ($urandom_range(0, 4) == 0) begin
          in_valid = 1'b0;
        end else begin
          in_valid = 1'b1;
          in_pix = DATA_W'(img[sent / C][sent % C]);
          in_mode_97 = (sent == 0) ? m97 : 1'($urandom);  // only the first counts
        end
        @(negedge clk);
        if (in_valid) begin
          sent++;
          t_last_in = edges;
        end
      end
      in_valid = 1'b0;
      chk(!in_ready, "not ready while transforming");
      // collect
      while (busy) begin
        if (out_valid) begin
          chk(out_mode_97 == m97, "mode tag");
          if (out_row < R / 2 && out_col < C / 2) begin
            chk(!seen[out_band][out_row][out_col], "coefficient once");
            seen[out_band][out_row][out_col] = 1;
            chk(longint'(out_coef) == expc[out_band][out_row][out_col],
                $sformatf("band %0d (%0d,%0d) got %0d exp %0d", out_band, out_row, out_col,
                          out_coef, expc[out_band][out_row][out_col]));
          end else chk(1'b0, "position in range");
          n_out++;
          t_last_out = edges;
        end
        @(negedge clk);
      end
      chk(n_out == R * C, $sformatf("coefficient count %0d", n_out));
      // row pass R*(C+8) reads, column pass C*(R+8) reads, plus pipeline fill
      chk(t_last_out - t_last_in >= R * (C + 8) + C * (R + 8) &&
          t_last_out - t_last_in <= R * (C + 8) + C * (R + 8) + 12,
          $sformatf("transform cycles %0d", t_last_out - t_last_in));
      $display("frame %0d mode97=%0d: %0d coefficients, %0d cycles after last pixel",
               frame, m97, n_out, t_last_out - t_last_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
