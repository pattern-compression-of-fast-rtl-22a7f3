// tb_fast_corner_detector_modes: the detector's other build options, end to end.
//
// Three detectors run side by side, each with its own stream agent:
//   - FAST-9, split table, 512x512 maximum image (the size of the standard
//     test image used for the quality comparison), threshold 50;
//   - FAST-9, symmetry compression (latency 3), same image size;
//   - FAST-10, symmetry compression, 64-pixel lines with idle clocks.
// With a segment-test table the symmetry representative must give exactly the
// split result, so all three are checked against the reference segment test.
module tb_fast_corner_detector_modes;
  import fast_pkg::*;

  // ---- FAST-9 split, 512x512
  logic       a_clk, a_rst_n, a_pix_valid, a_frame_start;
  logic [9:0] a_img_width, a_out_x;
  logic [9:0] a_img_height, a_out_y;
  logic [7:0] a_threshold, a_pix_data;
  logic       a_out_valid, a_out_corner, a_out_bright;

  fast_corner_detector #(.MAX_WIDTH(512), .MAX_HEIGHT(512), .FAST_N(9),
                         .COMPRESSION(COMP_SPLIT)) dut_a (
    .clk(a_clk), .rst_n(a_rst_n), .img_width(a_img_width), .img_height(a_img_height),
    .threshold(a_threshold), .pix_valid(a_pix_valid), .frame_start(a_frame_start),
    .pix_data(a_pix_data), .out_valid(a_out_valid), .out_corner(a_out_corner),
    .out_bright(a_out_bright), .out_x(a_out_x), .out_y(a_out_y));

  fast_stream_agent #(.MAX_WIDTH(512), .MAX_HEIGHT(512), .FAST_N(9), .LATENCY(2)) agent_a (
    .clk(a_clk), .rst_n(a_rst_n), .img_width(a_img_width), .img_height(a_img_height),
    .threshold(a_threshold), .pix_valid(a_pix_valid), .frame_start(a_frame_start),
    .pix_data(a_pix_data), .out_valid(a_out_valid), .out_corner(a_out_corner),
    .out_bright(a_out_bright), .out_x(a_out_x), .out_y(a_out_y));

  // ---- FAST-9 symmetry, 512x512
  logic       b_clk, b_rst_n, b_pix_valid, b_frame_start;
  logic [9:0] b_img_width, b_out_x;
  logic [9:0] b_img_height, b_out_y;
  logic [7:0] b_threshold, b_pix_data;
  logic       b_out_valid, b_out_corner, b_out_bright;

  fast_corner_detector #(.MAX_WIDTH(512), .MAX_HEIGHT(512), .FAST_N(9),
                         .COMPRESSION(COMP_SYMMETRY)) dut_b (
    .clk(b_clk), .rst_n(b_rst_n), .img_width(b_img_width), .img_height(b_img_height),
    .threshold(b_threshold), .pix_valid(b_pix_valid), .frame_start(b_frame_start),
    .pix_data(b_pix_data), .out_valid(b_out_valid), .out_corner(b_out_corner),
    .out_bright(b_out_bright), .out_x(b_out_x), .out_y(b_out_y));

  fast_stream_agent #(.MAX_WIDTH(512), .MAX_HEIGHT(512), .FAST_N(9), .LATENCY(3)) agent_b (
    .clk(b_clk), .rst_n(b_rst_n), .img_width(b_img_width), .img_height(b_img_height),
    .threshold(b_threshold), .pix_valid(b_pix_valid), .frame_start(b_frame_start),
    .pix_data(b_pix_data), .out_valid(b_out_valid), .out_corner(b_out_corner),
    .out_bright(b_out_bright), .out_x(b_out_x), .out_y(b_out_y));

  // ---- FAST-10 symmetry, 64-pixel lines
  logic       c_clk, c_rst_n, c_pix_valid, c_frame_start;
  logic [6:0] c_img_width, c_out_x;
  logic [5:0] c_img_height, c_out_y;
  logic [7:0] c_threshold, c_pix_data;
  logic       c_out_valid, c_out_corner, c_out_bright;

  fast_corner_detector #(.MAX_WIDTH(64), .MAX_HEIGHT(48), .FAST_N(10),
                         .COMPRESSION(COMP_SYMMETRY)) dut_c (
    .clk(c_clk), .rst_n(c_rst_n), .img_width(c_img_width), .img_height(c_img_height),
    .threshold(c_threshold), .pix_valid(c_pix_valid), .frame_start(c_frame_start),
    .pix_data(c_pix_data), .out_valid(c_out_valid), .out_corner(c_out_corner),
    .out_bright(c_out_bright), .out_x(c_out_x), .out_y(c_out_y));

  fast_stream_agent #(.MAX_WIDTH(64), .MAX_HEIGHT(48), .FAST_N(10), .LATENCY(3)) agent_c (
    .clk(c_clk), .rst_n(c_rst_n), .img_width(c_img_width), .img_height(c_img_height),
    .threshold(c_threshold), .pix_valid(c_pix_valid), .frame_start(c_frame_start),
    .pix_data(c_pix_data), .out_valid(c_out_valid), .out_corner(c_out_corner),
    .out_bright(c_out_bright), .out_x(c_out_x), .out_y(c_out_y));

  int done = 0;

  initial begin
    repeat (2_000_000) @(posedge a_clk);
    $display("TB_RESULT checks=%0d failures=%0d",
             agent_a.checks + agent_b.checks + agent_c.checks,
             agent_a.failures + agent_b.failures + agent_c.failures + 1);
    $finish;
  end

  initial begin
    agent_a.run_frame(512, 512, 50, 0);
    done++;
  end
  initial begin
    agent_b.run_frame(512, 512, 50, 0);
    agent_b.run_frame(100, 30, 40, 10);
    done++;
  end
  initial begin
    agent_c.run_frame(64, 48, 50, 15);
    agent_c.run_frame(40, 20, 25, 0);
    done++;
  end

  initial begin
    wait (done == 3);
    $display("FAST-9 split:");
    agent_a.require("darker corners", agent_a.n_corner_dark);
    agent_a.require("brighter corners", agent_a.n_corner_bright);
    $display("FAST-9 symmetry:");
    agent_b.require("darker corners", agent_b.n_corner_dark);
    agent_b.require("brighter corners", agent_b.n_corner_bright);
    agent_b.require("idle clocks (stall)", agent_b.n_stall);
    $display("FAST-10 symmetry:");
    agent_c.require("darker corners", agent_c.n_corner_dark);
    agent_c.require("brighter corners", agent_c.n_corner_bright);
    agent_c.require("idle clocks (stall)", agent_c.n_stall);
    agent_c.require("line-width changes", agent_c.n_widths - 1);
    $display("TB_RESULT checks=%0d failures=%0d",
             agent_a.checks + agent_b.checks + agent_c.checks,
             agent_a.failures + agent_b.failures + agent_c.failures);
    $finish;
  end
endmodule
