// tb_fast_corner_detector: end-to-end test of the detector at its default
// parameters (640-pixel lines, FAST-10, split table).
//
// Streams one full 640x480 camera frame back to back at threshold 50 (one
// pixel per clock), a 512x512 frame (the size of the standard test image),
// then a 64x40 frame at threshold 30 with random
// idle clocks between pixels, then a 32x16 frame, so the line buffer length
// changes three times at run time. Every result is checked against the reference
// segment test, its position and its 2-clock latency. The test also requires
// darker and brighter corners, idle clocks, border pixels and width changes to
// have occurred.
module tb_fast_corner_detector;
  logic       clk, rst_n, pix_valid, frame_start;
  logic [9:0] img_width;
  logic [9:0] img_height;
  logic [7:0] threshold, pix_data;
  logic       out_valid, out_corner, out_bright;
  logic [9:0] out_x;
  logic [9:0] out_y;

  fast_corner_detector dut (.*);

  fast_stream_agent #(.MAX_WIDTH(640), .MAX_HEIGHT(512), .FAST_N(10), .LATENCY(2)) agent (.*);

  initial begin
    repeat (2_000_000) @(posedge clk);
    agent.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", agent.checks, agent.failures);
    $finish;
  end

  initial begin
    agent.run_frame(640, 480, 50, 0);
    agent.run_frame(512, 512, 50, 0);
    agent.run_frame(64, 40, 30, 20);
    agent.run_frame(32, 16, 50, 5);
    $display("mechanisms:");
    agent.require("results", agent.n_results);
    agent.require("darker corners", agent.n_corner_dark);
    agent.require("brighter corners", agent.n_corner_bright);
    agent.require("idle clocks (stall)", agent.n_stall);
    agent.require("border pixels, no result", agent.n_border);
    agent.require("line-width changes", agent.n_widths - 1);
    $display("TB_RESULT checks=%0d failures=%0d", agent.checks, agent.failures);
    $finish;
  end
endmodule
