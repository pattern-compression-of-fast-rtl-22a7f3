// fast_stream_agent: clock, reset, pixel-stream driver and result checker
// shared by the detector testbenches.
//
// run_frame(width, height, t, gap_pct) makes a test image, streams it in raster
// order (frame_start on the first pixel, a random idle clock before a pixel
// with probability gap_pct %), then waits until the last result is out. The
// checker compares every result with the reference detector: the results must
// come in raster order over exactly the pixels 3 or more away from each border,
// out_corner and out_bright must match, and each result must leave exactly
// LATENCY clocks after the clock edge that accepted pixel (x+3, y+3).
// Counters record how often each mechanism was seen.
module fast_stream_agent #(
  parameter int unsigned MAX_WIDTH  = 640,
  parameter int unsigned MAX_HEIGHT = 480,
  parameter int unsigned FAST_N     = 10,
  parameter int unsigned LATENCY    = 2,
  localparam int unsigned XW        = $clog2(MAX_WIDTH + 1),
  localparam int unsigned YW        = $clog2(MAX_HEIGHT + 1)
) (
  output logic          clk,
  output logic          rst_n,
  output logic [XW-1:0] img_width,
  output logic [YW-1:0] img_height,
  output logic [7:0]    threshold,
  output logic          pix_valid,
  output logic          frame_start,
  output logic [7:0]    pix_data,
  input  logic          out_valid,
  input  logic          out_corner,
  input  logic          out_bright,
  input  logic [XW-1:0] out_x,
  input  logic [YW-1:0] out_y
);
  import fast_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_results = 0, n_corner_dark = 0, n_corner_bright = 0, n_stall = 0;
  int n_border = 0, n_frames = 0, n_widths = 0;
  longint edges = 0;

  image_t img;
  longint accept_edge [];
  int cur_w = 0, cur_h = 0, cur_t = 0, last_w = -1;
  int exp_x = 3, exp_y = 3;
  bit frame_done = 1;
  bit reset_done = 0;

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  always @(posedge clk) edges++;

  initial begin
    rst_n = 0;
    pix_valid = 0;
    frame_start = 0;
    pix_data = '0;
    img_width = XW'(MAX_WIDTH);
    img_height = YW'(MAX_HEIGHT);
    threshold = 8'd50;
    repeat (3) @(negedge clk);
    rst_n = 1;
    reset_done = 1;
  end

  function automatic void fail(input string msg);
    failures++;
    if (failures <= 10) $display("FAIL %s", msg);
  endfunction

  task automatic run_frame(input int width, input int height, input int t, input int gap_pct);
    wait (reset_done);
    make_image(img, width, height);
    accept_edge = new[width * height];
    cur_w = width; cur_h = height; cur_t = t;
    exp_x = 3; exp_y = 3;
    frame_done = 0;
    if (width != last_w) n_widths++;
    last_w = width;
    @(negedge clk);
    img_width  = XW'(width);
    img_height = YW'(height);
    threshold  = 8'(t);
    for (int i = 0; i < width * height; i++) begin
      while (gap_pct > 0 && i > 0 && $urandom_range(0, 99) < gap_pct) begin
        pix_valid = 0;
        frame_start = 0;
        n_stall++;
        @(negedge clk);
      end
      pix_valid   = 1;
      frame_start = (i == 0);
      pix_data    = img[i];
      accept_edge[i] = edges + 1;
      if ((i % width) < 3 || (i % width) >= width - 3 || (i / width) < 3 || (i / width) >= height - 3)
        n_border++;
      @(negedge clk);
    end
    pix_valid = 0;
    frame_start = 0;
    repeat (LATENCY + 4) @(negedge clk);
    checks++;
    if (exp_y != height - 3) fail($sformatf("frame %0dx%0d ended at result (%0d,%0d)", width, height, exp_x, exp_y));
    frame_done = 1;
    n_frames++;
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic int x = int'(out_x);
      automatic int y = int'(out_y);
      n_results++;
      checks += 4;
      if (frame_done) fail("result outside a frame");
      else begin
        if (x != exp_x || y != exp_y)
          fail($sformatf("result for (%0d,%0d), expected (%0d,%0d)", x, y, exp_x, exp_y));
        else begin
          automatic bit c = ref_corner(img, cur_w, x, y, cur_t, int'(FAST_N));
          automatic bit b = ref_bright(img, cur_w, x, y, cur_t);
          automatic longint lat = edges - accept_edge[(y + 3) * cur_w + x + 3];
          if (out_corner !== c) fail($sformatf("(%0d,%0d) corner %b expected %b", x, y, out_corner, c));
          if (out_bright !== b) fail($sformatf("(%0d,%0d) bright %b expected %b", x, y, out_bright, b));
          if (lat != longint'(LATENCY)) fail($sformatf("(%0d,%0d) latency %0d expected %0d", x, y, lat, LATENCY));
          if (c && b)  n_corner_bright++;
          if (c && !b) n_corner_dark++;
        end
        if (exp_x == cur_w - 4) begin exp_x = 3; exp_y++; end
        else exp_x++;
      end
    end
  end

  // Pass/fail of a mechanism that must have been seen.
  function automatic void require(input string what, input int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) fail($sformatf("mechanism never exercised: %s", what));
  endfunction

endmodule
