// tb_subimage_binarizer: random bursts with idle gaps between beats. Pixel
// values are drawn around the black threshold (including 127 and 128). The
// testbench builds the expected 8x8 mask and the black-pixel count from the
// pixels it sent and checks them, and the one-cycle strobe timing, against
// the DUT.
module tb_subimage_binarizer;
  import trojan_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic rd_valid = 1'b0;
  beat_t rd_data = '0;
  logic sub_valid;
  submask_t sub_mask;
  spectrum_t sub_spectrum;
  int checks = 0, failures = 0;
  int n_sub = 0;

  subimage_binarizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte unsigned pix(int mode);
    case (mode)
      0: return byte'($urandom_range(255));
      1: return byte'($urandom_range(1) ? 127 : 128);
      2: return 8'd0;
      default: return 8'd255;
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int b = 0; b < 2000; b++) begin
      automatic bit [63:0] m = '0;
      automatic int cnt = 0;
      automatic int mode = (b < 4) ? b : $urandom_range(3) == 0 ? 1 : 0;
      for (int r = 0; r < 8; r++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk); rd_valid = 0;
          checks++;
          if (sub_valid !== 1'b0) begin failures++; $display("spurious sub_valid"); end
        end
        @(negedge clk);
        rd_valid = 1;
        for (int c = 0; c < 8; c++) begin
          automatic byte unsigned p = pix(mode);
          rd_data[c*8 +: 8] = p;
          if (p < 128) begin m[r*8 + c] = 1; cnt++; end
        end
        if (r < 7) begin
          checks++;
          if (sub_valid !== 1'b0 && !(r == 0)) begin failures++; $display("early sub_valid"); end
        end
      end
      @(negedge clk);
      rd_valid = 0;
      checks++;
      if (sub_valid !== 1'b1 || sub_mask !== m || 32'(sub_spectrum) != cnt) begin
        failures++;
        if (failures < 10)
          $display("burst %0d: valid=%0b mask=%h exp %h spec=%0d exp %0d",
                   b, sub_valid, sub_mask, m, sub_spectrum, cnt);
      end else n_sub++;
    end
    @(negedge clk);
    checks++;
    if (sub_valid !== 1'b0) begin failures++; $display("sub_valid held"); end
    $display("subimages=%0d", n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
