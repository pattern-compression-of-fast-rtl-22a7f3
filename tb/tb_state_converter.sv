// tb_state_converter: random and corner-case check of the darker/brighter split
// and of the choice of the pattern with more ones.
//
// The reference evaluates the ternary state of each ring point with signed
// integer arithmetic (darker when I(x) <= I(p) - t, brighter when
// I(p) + t <= I(x)), counts the states, and picks the brighter pattern only
// when it has strictly more ones. Half the vectors are built around p so that
// both long darker and long brighter arcs occur.
module tb_state_converter;
  import fast_pkg::*;

  int checks = 0, failures = 0;
  pixel_t center, threshold;
  pixel_t ring [RING_LEN];
  ring_pattern_t sd, sb, pattern;
  logic sel_bright;
  int n_sel_bright = 0, n_sel_dark = 0;

  state_converter dut (.center, .ring, .threshold, .sd, .sb, .pattern, .sel_bright);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      ring_pattern_t esd, esb;
      int cd, cb;
      center    = pixel_t'($urandom);
      threshold = pixel_t'($urandom_range(1, 80));
      if (n < 4) begin
        center    = (n % 2) ? 8'd255 : 8'd0;   // extremes: no wrap-around
        threshold = 8'd50;
      end
      for (int x = 0; x < RING_LEN; x++) begin
        case (n % 3)
          0: ring[x] = pixel_t'($urandom);
          1: begin
               int v = int'(center) + ($urandom_range(0, 1) ? 1 : -1) * int'($urandom_range(0, 120));
               ring[x] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
             end
          default: begin   // arc of darker or brighter points
               int v = (x < 11) ? int'(center) + ((n % 2) ? 60 : -60) : int'(center);
               ring[x] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
             end
        endcase
      end
      #1;
      cd = 0; cb = 0;
      for (int x = 0; x < RING_LEN; x++) begin
        esd[x] = int'(ring[x]) <= int'(center) - int'(threshold);
        esb[x] = int'(center) + int'(threshold) <= int'(ring[x]);
        cd += int'(esd[x]);
        cb += int'(esb[x]);
      end
      checks += 4;
      if (sd !== esd) begin failures++; $display("FAIL sd %h exp %h", sd, esd); end
      if (sb !== esb) begin failures++; $display("FAIL sb %h exp %h", sb, esb); end
      if (sel_bright !== (cb > cd)) begin failures++; $display("FAIL sel %b cd %0d cb %0d", sel_bright, cd, cb); end
      if (pattern !== ((cb > cd) ? esb : esd)) begin failures++; $display("FAIL pattern %h", pattern); end
      if (cb > cd) n_sel_bright++; else n_sel_dark++;
    end
    checks++;
    if (n_sel_bright == 0 || n_sel_dark == 0) begin
      failures++;
      $display("FAIL one selection never happened: bright %0d dark %0d", n_sel_bright, n_sel_dark);
    end
    $display("brighter chosen %0d, darker chosen %0d", n_sel_bright, n_sel_dark);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
