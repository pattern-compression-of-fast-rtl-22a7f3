// shift_window: the 7x7 flip-flop window of the streaming detector.
//
// Each of the WIN rows is a WIN-stage pixel shift register that moves one place
// on every accepted pixel. Row 0 takes the camera pixel; row r (r >= 1) takes
// lane r-1 of the line buffer, and the right-most pixel of rows 0..WIN-2 goes to
// the line buffer (fifo_din lane r). With the line buffer delaying by one image
// line less the register length, row r holds image line y-r and column c holds
// image column x-c, where (x, y) is the newest pixel. The window is therefore the
// image turned by 180 degrees: win[3+dy'][3+dx'] with dy' = -dy, dx' = -dx.
// All WIN*WIN pixels are readable in parallel straight from the registers,
// which change at the clock edge that accepts a pixel.
// The 7x7 size and the way camera and line buffer feed the rows follow the
// published design; clearing the window on reset is this design's choice.
module shift_window
  import fast_pkg::*;
#(
  parameter int unsigned N_WIN = WIN
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  pixel_t                        pix_in,
  input  logic [(N_WIN-1)*PIX_W-1:0]    fifo_dout,  // lane r feeds row r+1
  output logic [(N_WIN-1)*PIX_W-1:0]    fifo_din,   // lane r is row r's last pixel
  output pixel_t                        win [N_WIN][N_WIN]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_WIN; r++)
        for (int c = 0; c < N_WIN; c++)
          win[r][c] <= '0;
    end else if (en) begin
      win[0][0] <= pix_in;
      for (int r = 1; r < N_WIN; r++)
        win[r][0] <= fifo_dout[(r-1)*PIX_W +: PIX_W];
      for (int r = 0; r < N_WIN; r++)
        for (int c = 1; c < N_WIN; c++)
          win[r][c] <= win[r][c-1];
    end
  end

  always_comb begin
    for (int r = 0; r < N_WIN - 1; r++)
      fifo_din[r*PIX_W +: PIX_W] = win[r][N_WIN-1];
  end

endmodule
