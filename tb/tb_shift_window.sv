// tb_shift_window: checks that every window register holds the row input of
// the right number of steps ago and that each row's last pixel goes to the
// line buffer lane of that row.
//
// The line buffer is replaced by random pixels, so every row is checked as an
// independent 7-stage shift register. A history of the row inputs (the camera
// pixel for row 0, lane r-1 for row r) predicts win[r][c] = input of row r, c
// steps ago. Random enable gaps check that the window holds still.
module tb_shift_window;
  import fast_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  pixel_t pix_in;
  logic [(WIN-1)*PIX_W-1:0] fifo_dout, fifo_din;
  pixel_t win [WIN][WIN];
  pixel_t hist [$][WIN];   // hist[0] = newest step's row inputs

  shift_window dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_in = '0;
    fifo_dout = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      pixel_t row_in [WIN];
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      pix_in = pixel_t'($urandom);
      fifo_dout = ((WIN-1)*PIX_W)'({$urandom, $urandom});
      row_in[0] = pix_in;
      for (int r = 1; r < WIN; r++) row_in[r] = fifo_dout[(r-1)*PIX_W +: PIX_W];
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_front(row_in);
        if (hist.size() > WIN) void'(hist.pop_back());
      end
      if (hist.size() == WIN) begin
        for (int r = 0; r < WIN; r++)
          for (int c = 0; c < WIN; c++) begin
            checks++;
            if (win[r][c] !== hist[c][r]) begin
              failures++;
              if (failures < 10) $display("FAIL win[%0d][%0d]=%h expected %h", r, c, win[r][c], hist[c][r]);
            end
          end
        for (int r = 0; r < WIN - 1; r++) begin
          checks++;
          if (fifo_din[r*PIX_W +: PIX_W] !== hist[WIN-1][r]) begin
            failures++;
            if (failures < 10) $display("FAIL fifo_din lane %0d", r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
