// rwf_dwt2d: one-level 2-D wavelet transform of a frame with the folded
// alpha = -2 filter.
//
// Function: takes a ROWS x COLS frame in raster order and streams out its
// four sub-bands LL, LH, HL, HH, each (ROWS/2) x (COLS/2).  As in the usual
// separable scheme, every row is filtered by the low and high pass filter and
// decimated by two (row-wise pass), then every column of the result is
// filtered and decimated again (column-wise pass):
//   band LL = row low,  column low     band LH = row low,  column high
//   band HL = row high, column low     band HH = row high, column high
// Both passes use rwf_folded_c, which produces one output per input sample;
// its lo/hi select alternates so that a line of N samples gives the N/2 even
// low pass and the N/2 odd high pass outputs, i.e. filtering and decimation
// in one.  in_mode_97 (sampled with the first pixel of a frame) selects the
// alpha = -2 9/7 filter or the Le Gall 5/3 filter for the whole frame.
//
// How it works (this design's own, simplest arrangement; the source only
// names the row-wise and column-wise stages):
//   LOAD  the frame is written into frame buffer A (one pixel per clock).
//   ROW   each row is read from A with 4 samples of symmetric extension at
//         each end (x(-k) = x(k), x(N-1+k) = x(N-1-k)), COLS+8 reads per row,
//         into the row filter; its outputs for centres 0..COLS-1 are written
//         to buffer B, low pass in columns 0..COLS/2-1 and high pass in
//         columns COLS/2..COLS-1.
//   COL   each column of B is read the same way (ROWS+8 reads) into the column
//         filter, whose kept outputs are the result stream.
// Buffers A and B are plain arrays with a registered read port.
//
// Interface: in_ready is high in IDLE/LOAD; a pixel is taken when in_valid
// && in_ready.  out_valid marks one coefficient: out_band (0 LL, 1 LH, 2 HL,
// 3 HH), out_row/out_col in the sub-band, out_coef signed, scaled by
// 2^(2*FRAC_W) (exact), out_mode_97 the mode used.  Coefficients come out
// column by column of buffer B.  busy is high from the first pixel until the
// last coefficient has left.
// Timing: per frame ROWS*COLS load cycles + ROWS*(COLS+8) row cycles +
// COLS*(ROWS+8) column cycles + a few pipeline cycles, one sample per clock
// in every phase.  ROWS and COLS must be even and at least 6.
module rwf_dwt2d
  import rwf_pkg::*;
#(
  parameter int unsigned ROWS   = 1080,
  parameter int unsigned COLS   = 1440,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC_W = 6,
  parameter int unsigned IW1    = DATA_W + FRAC_W + 4,  // row pass result
  parameter int unsigned IW2    = IW1 + FRAC_W + 4,     // column pass result
  parameter int unsigned RW     = $clog2(ROWS + 8),
  parameter int unsigned CW     = $clog2(COLS + 8)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // frame input
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_pix,
  input  logic                     in_mode_97,
  // sub-band output
  output logic                     out_valid,
  output logic [1:0]               out_band,
  output logic [RW-1:0]            out_row,
  output logic [CW-1:0]            out_col,
  output logic signed [IW2-1:0]    out_coef,
  output logic                     out_mode_97,
  output logic                     busy
);

  localparam int unsigned NPIX = ROWS * COLS;
  localparam int unsigned AW   = $clog2(NPIX);
  // line/position counters cover the longer of a row and a column
  localparam int unsigned LW   = $clog2(((ROWS > COLS) ? ROWS : COLS) + 8);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROW, S_COL} state_e;
  state_e state;

  // symmetric extension: index e in [-4, n+3] -> [0, n-1]
  function automatic int unsigned mirror(int e, int n);
    if (e < 0)       return unsigned'(-e);
    else if (e >= n) return unsigned'(2 * n - 2 - e);
    else             return unsigned'(e);
  endfunction

  // ---------------- frame buffers ----------------
  logic signed [DATA_W-1:0] buf_a [NPIX];
  logic signed [IW1-1:0]    buf_b [NPIX];

  logic [AW-1:0]            a_waddr, a_raddr, b_waddr, b_raddr;
  logic                     a_we, b_we, a_re, b_re;
  logic signed [DATA_W-1:0] a_rdata;
  logic signed [IW1-1:0]    b_wdata, b_rdata;

  always_ff @(posedge clk) begin
    if (a_we) buf_a[a_waddr] <= in_pix;
    if (a_re) a_rdata <= buf_a[a_raddr];
    if (b_we) buf_b[b_waddr] <= b_wdata;
    if (b_re) b_rdata <= buf_b[b_raddr];
  end

  // ---------------- read sequencer (both passes) ----------------
  // line = row index (ROW pass) or column index (COL pass) being read;
  // feed = position 0 .. len+7 in the extended line (extended index feed-4).
  logic [LW-1:0] line;
  logic [LW-1:0] feed;
  logic          rd_active; // reads still to be issued in this pass
  logic          mode_q;
  logic [AW-1:0] line_base; // ROW pass: line * COLS

  logic rd_last_feed, rd_last_line;
  assign rd_last_feed = (state == S_ROW) ? (32'(feed) == COLS + 7) : (32'(feed) == ROWS + 7);
  assign rd_last_line = (state == S_ROW) ? (32'(line) == ROWS - 1) : (32'(line) == COLS - 1);

  always_comb begin
    a_re    = (state == S_ROW) && rd_active;
    b_re    = (state == S_COL) && rd_active;
    a_raddr = AW'(line_base + AW'(mirror(int'(feed) - 4, COLS)));
    b_raddr = AW'(mirror(int'(feed) - 4, ROWS) * COLS + 32'(line));
  end

  // lo/hi select for the sample read now: the filter output it completes is
  // centred 4 samples back, at extended index feed-8; keep low at even
  // centres, high at odd ones.
  logic rd_lo_nhi;
  assign rd_lo_nhi = ~feed[0];

  // read data valid one cycle after the read
  logic rd_v_row, rd_v_col, rd_lo_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v_row <= 1'b0;
      rd_v_col <= 1'b0;
      rd_lo_q  <= 1'b0;
    end else begin
      rd_v_row <= a_re;
      rd_v_col <= b_re;
      rd_lo_q  <= rd_lo_nhi;
    end
  end

  // ---------------- filters ----------------
  logic                  rf_valid, rf_lo, cf_valid, cf_lo;
  mode_e                 rf_mode, cf_mode;
  logic signed [IW1-1:0] rf_y;
  logic signed [IW2-1:0] cf_y;

  rwf_folded_c #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .IW(IW1)) u_row_filter (
    .clk, .rst_n,
    .in_valid(rd_v_row), .in_x(a_rdata),
    .in_mode(mode_q ? MODE_97 : MODE_53), .in_lo_nhi(rd_lo_q),
    .out_valid(rf_valid), .out_mode(rf_mode), .out_lo_nhi(rf_lo), .out_y(rf_y)
  );

  rwf_folded_c #(.DATA_W(IW1), .FRAC_W(FRAC_W), .IW(IW2)) u_col_filter (
    .clk, .rst_n,
    .in_valid(rd_v_col), .in_x(b_rdata),
    .in_mode(mode_q ? MODE_97 : MODE_53), .in_lo_nhi(rd_lo_q),
    .out_valid(cf_valid), .out_mode(cf_mode), .out_lo_nhi(cf_lo), .out_y(cf_y)
  );

  // ---------------- output side counters ----------------
  // o_line/o_cnt follow the filter outputs in order; o_cnt = 0 .. len+7 and
  // the output is kept for centre c = o_cnt - 8 in 0 .. len-1.
  logic [LW-1:0] o_line, o_cnt;
  logic [AW-1:0] o_base;   // ROW pass: o_line * COLS
  logic          o_keep;
  int unsigned   o_c;
  logic          pass_done;

  assign o_c    = 32'(o_cnt) - 8;
  assign o_keep = (32'(o_cnt) >= 8);

  always_comb begin
    b_we    = (state == S_ROW) && rf_valid && o_keep;
    b_wdata = rf_y;
    b_waddr = AW'(o_base + AW'(o_c[0] ? (COLS / 2 + o_c / 2) : (o_c / 2)));
  end

  assign out_valid   = (state == S_COL) && cf_valid && o_keep;
  assign out_band    = {32'(o_line) >= COLS / 2, o_c[0]};
  assign out_row     = RW'(o_c / 2);
  assign out_col     = CW'((32'(o_line) >= COLS / 2) ? 32'(o_line) - COLS / 2 : 32'(o_line));
  assign out_coef    = cf_y;
  assign out_mode_97 = (cf_mode == MODE_97);

  // ---------------- control ----------------
  logic [AW-1:0] ld_addr;
  logic          o_valid_now;

  assign in_ready = (state == S_IDLE) || (state == S_LOAD);
  assign a_we     = in_valid && in_ready;
  assign a_waddr  = ld_addr;
  assign busy     = (state != S_IDLE);
  assign o_valid_now = (state == S_ROW) ? rf_valid : cf_valid;
  assign pass_done = o_valid_now &&
                     ((state == S_ROW) ? (32'(o_cnt) == COLS + 7 && 32'(o_line) == ROWS - 1)
                                       : (32'(o_cnt) == ROWS + 7 && 32'(o_line) == COLS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ld_addr   <= '0;
      mode_q    <= 1'b1;
      line      <= '0;
      feed      <= '0;
      line_base <= '0;
      rd_active <= 1'b0;
      o_line    <= '0;
      o_cnt     <= '0;
      o_base    <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_LOAD: begin
          if (a_we) begin
            if (state == S_IDLE) mode_q <= in_mode_97;
            state <= S_LOAD;
            if (32'(ld_addr) == NPIX - 1) begin
              ld_addr   <= '0;
              state     <= S_ROW;
              rd_active <= 1'b1;
              line      <= '0;
              feed      <= '0;
              line_base <= '0;
              o_line    <= '0;
              o_cnt     <= '0;
              o_base    <= '0;
            end else begin
              ld_addr <= ld_addr + 1'b1;
            end
          end
        end
        S_ROW, S_COL: begin
          // read side
          if (rd_active) begin
            if (rd_last_feed) begin
              feed      <= '0;
              line      <= line + 1'b1;
              line_base <= line_base + AW'(COLS);
              if (rd_last_line) rd_active <= 1'b0;
            end else begin
              feed <= feed + 1'b1;
            end
          end
          // output side
          if (o_valid_now) begin
            if ((state == S_ROW) ? (32'(o_cnt) == COLS + 7) : (32'(o_cnt) == ROWS + 7)) begin
              o_cnt  <= '0;
              o_line <= o_line + 1'b1;
              o_base <= o_base + AW'(COLS);
            end else begin
              o_cnt <= o_cnt + 1'b1;
            end
          end
          if (pass_done) begin
            o_line <= '0;
            o_cnt  <= '0;
            o_base <= '0;
            if (state == S_ROW) begin
              state     <= S_COL;
              rd_active <= 1'b1;
              line      <= '0;
              feed      <= '0;
              line_base <= '0;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a line of the column pass is read only after the row pass has written
  // all of buffer B, and the filters never see a stall
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_v_row && rd_v_col));

  // every kept output is the sub-band its position calls for, in the frame's mode
  a_row_lohi : assert property (@(posedge clk) disable iff (!rst_n)
    b_we |-> (rf_lo == ~o_c[0]) && (rf_mode == (mode_q ? MODE_97 : MODE_53)));
  a_col_lohi : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (cf_lo == ~o_c[0]));

  initial begin
    assert (ROWS % 2 == 0 && COLS % 2 == 0 && ROWS >= 6 && COLS >= 6)
      else $error("rwf_dwt2d: ROWS and COLS must be even and at least 6");
  end

endmodule
