// fast_corner_detector: streaming machine-learned FAST corner detector, one
// pixel per clock, built around a compressed corner pattern table.
//
// Data path: camera pixels enter a 7x7 flip-flop shift window;
// six line buffers in one block RAM give the window the six previous image
// lines. On every accepted pixel the window moves by one, so the focused pixel
// p and its 16-pixel ring are all available in parallel. The state converter
// compares the ring with p -/+ t, forming a darker and a brighter 16-bit pattern,
// and keeps the one with more ones ("split" compression: one 2^16-entry table,
// looked up once). With COMPRESSION = COMP_SYMMETRY the pattern is further
// replaced by the smallest of its rotations and mirror images, and a smaller
// table that lists only the representatives of the corner patterns is used
// ("symmetry" compression). Both tables are combinational logic.
//
// Interface: a pixel is accepted on each clock with pix_valid high; frame_start
// marks the first pixel of a frame (top-left), pixels follow in raster order
// with img_width pixels per line. img_width (8..MAX_WIDTH) and img_height are
// run-time inputs and must stay fixed during a frame. No result is produced
// while the 7x7 window still reaches outside the current frame, so no flush is
// needed between frames. The result stream gives, for every
// pixel (out_x, out_y) at least 3 pixels from each image border, out_valid with
// out_corner. out_bright tells which split pattern (1 = brighter) was looked up.
//
// Timing: the result for centre (x-3, y-3) leaves LATENCY clocks after the edge
// that accepted pixel (x, y): 2 clocks in SPLIT mode (converter stage, table
// stage), 3 in SYMMETRY mode (extra converter stage). Throughput is one pixel
// per clock with no stall. Border pixels give no result, as FAST defines no
// ring for them.
//
// Following the published design: the 7x7 window fed by the camera and a
// block-RAM line buffer, the split equations with the single shared table, the choice of the
// pattern with more ones, the symmetry representative, one pixel per clock.
// This design's own choices: 8-bit pixels, the run-time image size, the
// valid/frame_start stream interface, the register stages, the border rule,
// and the segment-test contents of the table (see corner_table).
module fast_corner_detector
  import fast_pkg::*;
#(
  parameter int unsigned  MAX_WIDTH   = 640,
  parameter int unsigned  MAX_HEIGHT  = 512,
  parameter int unsigned  FAST_N      = 10,
  parameter compression_e COMPRESSION = COMP_SPLIT,
  localparam int unsigned XW          = $clog2(MAX_WIDTH + 1),
  localparam int unsigned YW          = $clog2(MAX_HEIGHT + 1),
  localparam int unsigned LATENCY     = (COMPRESSION == COMP_SYMMETRY) ? 3 : 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] img_width,
  input  logic [YW-1:0] img_height,
  input  pixel_t        threshold,
  input  logic          pix_valid,
  input  logic          frame_start,
  input  pixel_t        pix_data,
  output logic          out_valid,
  output logic          out_corner,
  output logic          out_bright,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);

  localparam int unsigned FIFO_DEPTH = MAX_WIDTH - 8;
  localparam int unsigned FAW        = $clog2(FIFO_DEPTH + 1);

  // ---------------------------------------------------------------- position
  logic [XW-1:0] col_cnt, px;
  logic [YW-1:0] row_cnt, py;

  assign px = frame_start ? '0 : col_cnt;
  assign py = frame_start ? '0 : row_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0;
      row_cnt <= '0;
    end else if (pix_valid) begin
      if (px == img_width - 1'b1) begin
        col_cnt <= '0;
        row_cnt <= py + 1'b1;
      end else begin
        col_cnt <= px + 1'b1;
        row_cnt <= py;
      end
    end
  end

  // ------------------------------------------------- window and line buffer
  pixel_t                   win [WIN][WIN];
  logic [(WIN-1)*PIX_W-1:0] fifo_din, fifo_dout;
  logic [FAW-1:0]           fifo_depth;

  assign fifo_depth = FAW'(img_width - XW'(8));

  shift_window u_window (
    .clk, .rst_n,
    .en        (pix_valid),
    .pix_in    (pix_data),
    .fifo_dout (fifo_dout),
    .fifo_din  (fifo_din),
    .win       (win)
  );

  line_fifo #(
    .LANES     (WIN - 1),
    .PIX_W     (PIX_W),
    .MAX_DEPTH (FIFO_DEPTH)
  ) u_line_fifo (
    .clk, .rst_n,
    .en    (pix_valid),
    .depth (fifo_depth),
    .din   (fifo_din),
    .dout  (fifo_dout)
  );

  // Window position: valid once the newest pixel is 6 columns and 6 lines in.
  logic          w_valid;
  logic [XW-1:0] w_x;
  logic [YW-1:0] w_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid <= 1'b0;
      w_x     <= '0;
      w_y     <= '0;
    end else begin
      w_valid <= pix_valid && px >= XW'(WIN - 1) && py >= YW'(WIN - 1) && py < img_height;
      if (pix_valid) begin
        w_x <= px - XW'(RADIUS);
        w_y <= py - YW'(RADIUS);
      end
    end
  end

  // Window index of ring point x: the window is the image turned by 180 degrees.
  pixel_t center;
  pixel_t ring [RING_LEN];

  always_comb begin
    center = win[RADIUS][RADIUS];
    for (int x = 0; x < RING_LEN; x++)
      ring[x] = win[int'(RADIUS) - ring_dy(x)][int'(RADIUS) - ring_dx(x)];
  end

  // ------------------------------------------------ stage 1: state converter
  ring_pattern_t pattern;
  logic          sel_bright;

  state_converter u_converter (
    .center, .ring, .threshold,
    .sd (), .sb (), .pattern, .sel_bright
  );

  ring_pattern_t s1_pattern;
  logic          s1_valid, s1_bright;
  logic [XW-1:0] s1_x;
  logic [YW-1:0] s1_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_bright  <= 1'b0;
      s1_pattern <= '0;
      s1_x       <= '0;
      s1_y       <= '0;
    end else begin
      s1_valid   <= w_valid;
      s1_bright  <= sel_bright;
      s1_pattern <= pattern;
      s1_x       <= w_x;
      s1_y       <= w_y;
    end
  end

  // ---------------------------- optional stage: symmetry representative
  ring_pattern_t t_pattern;
  logic          t_valid, t_bright;
  logic [XW-1:0] t_x;
  logic [YW-1:0] t_y;

  if (COMPRESSION == COMP_SYMMETRY) begin : g_symmetry
    ring_pattern_t rep;

    symmetry_converter u_symmetry (
      .pattern        (s1_pattern),
      .representative (rep)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        t_valid   <= 1'b0;
        t_bright  <= 1'b0;
        t_pattern <= '0;
        t_x       <= '0;
        t_y       <= '0;
      end else begin
        t_valid   <= s1_valid;
        t_bright  <= s1_bright;
        t_pattern <= rep;
        t_x       <= s1_x;
        t_y       <= s1_y;
      end
    end
  end else begin : g_split
    assign t_valid   = s1_valid;
    assign t_bright  = s1_bright;
    assign t_pattern = s1_pattern;
    assign t_x       = s1_x;
    assign t_y       = s1_y;
  end

  // -------------------------------------------- last stage: pattern table
  logic hit;

  if (COMPRESSION == COMP_SYMMETRY) begin : g_rep_table
    symmetry_table #(.FAST_N(FAST_N)) u_table (
      .representative (t_pattern),
      .corner         (hit)
    );
  end else begin : g_full_table
    corner_table #(.FAST_N(FAST_N)) u_table (
      .pattern (t_pattern),
      .corner  (hit)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_corner <= 1'b0;
      out_bright <= 1'b0;
      out_x      <= '0;
      out_y      <= '0;
    end else begin
      out_valid  <= t_valid;
      out_corner <= t_valid && hit;
      out_bright <= t_bright;
      out_x      <= t_x;
      out_y      <= t_y;
    end
  end

  // Every window position leaves the pipeline exactly LATENCY clocks later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) w_valid |-> ##LATENCY out_valid);

  initial assert (MAX_WIDTH >= 10) else $error("fast_corner_detector: MAX_WIDTH too small");

endmodule
