// tb_line_fifo: checks the line buffer's fixed delay of depth enabled clocks.
//
// A small buffer (2 lanes, 16 words) is driven with random words and random
// enable gaps, for several run-time depths including the maximum. A queue of
// the words written since the last depth change predicts dout: after each
// enabled clock it must equal the word written depth enables before, and it
// must not move on clocks without enable.
module tb_line_fifo;
  localparam int LANES = 2, PIX_W = 8, MAX_DEPTH = 16;
  localparam int AW = $clog2(MAX_DEPTH + 1);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [AW-1:0] depth;
  logic [LANES*PIX_W-1:0] din, dout;
  logic [LANES*PIX_W-1:0] hist [$];
  int gaps = 0;

  line_fifo #(.LANES(LANES), .PIX_W(PIX_W), .MAX_DEPTH(MAX_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int depths [4] = '{2, 5, 9, 16};
    depth = AW'(2);
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (depths[i]) begin
      depth = AW'(depths[i]);
      hist.delete();
      // fill one full loop before checking: words from the old depth are stale
      for (int n = 0; n < depths[i] + 1 + 200; n++) begin
        logic [LANES*PIX_W-1:0] prev;
        @(negedge clk);
        en  = ($urandom_range(0, 3) != 0);
        din = (LANES*PIX_W)'($urandom);
        prev = dout;
        @(posedge clk);
        #1;
        if (en) begin
          hist.push_back(din);
          if (hist.size() > depths[i]) begin
            checks++;
            if (dout !== hist[0]) begin
              failures++;
              if (failures < 10) $display("FAIL depth %0d dout %h expected %h", depths[i], dout, hist[0]);
            end
            void'(hist.pop_front());
          end
        end else begin
          gaps++;
          checks++;
          if (dout !== prev) begin failures++; $display("FAIL dout moved without enable"); end
        end
      end
    end
    $display("enable gaps: %0d", gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
