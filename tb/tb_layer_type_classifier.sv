// tb_layer_type_classifier: layers with chosen read and write counts,
// including the exact ratio edge (reads == writes << 11 is not FC, one more
// read is), and random layers. Accesses issued in the boundary cycle belong
// to the next layer. The expected FC flag and counts are worked out in the
// testbench from the counts it issued.
module tb_layer_type_classifier;
  localparam int RW_SHIFT = 11;
  logic clk = 1'b0, rst = 1'b1;
  logic acc_valid = 1'b0, acc_write = 1'b0, boundary = 1'b0;
  logic layer_done, layer_fc;
  logic [31:0] layer_reads, layer_writes;
  int checks = 0, failures = 0;
  int carry_r = 0, carry_w = 0;
  int n_fc = 0, n_conv = 0;

  layer_type_classifier #(.CNT_W(32), .RW_SHIFT(RW_SHIFT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue nr reads and nw writes in random order with idle cycles, then a
  // boundary pulse that carries one more access of the next layer
  task automatic layer(int nr, int nw, int next_is_write);
    int r = nr - carry_r, w = nw - carry_w;
    longint unsigned er = nr, ew = nw;
    bit efc;
    while (r > 0 || w > 0) begin
      @(negedge clk);
      boundary = 0;
      acc_valid = ($urandom_range(9) != 0);
      if (!acc_valid) continue;
      if (w > 0 && (r == 0 || $urandom_range(r + w - 1) < w)) begin
        acc_write = 1; w--;
      end else begin
        acc_write = 0; r--;
      end
    end
    @(negedge clk);
    boundary = 1; acc_valid = 1; acc_write = next_is_write[0];
    carry_r = next_is_write ? 0 : 1;
    carry_w = next_is_write ? 1 : 0;
    @(negedge clk);
    boundary = 0; acc_valid = 0;
    efc = er > (ew << RW_SHIFT);
    checks++;
    if (layer_done !== 1'b1 || layer_fc !== efc ||
        layer_reads !== 32'(er) || layer_writes !== 32'(ew)) begin
      failures++;
      $display("layer r=%0d w=%0d: done=%0b fc=%0b (exp %0b) counts %0d/%0d",
               nr, nw, layer_done, layer_fc, efc, layer_reads, layer_writes);
    end
    if (efc) n_fc++; else n_conv++;
    @(negedge clk);
    checks++;
    if (layer_done !== 1'b0) begin failures++; $display("layer_done longer than one cycle"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    layer(5000, 800, 0);          // conv-like
    layer(2 << RW_SHIFT, 2, 0);   // ratio exactly 2048: not FC
    layer((2 << RW_SHIFT) + 1, 2, 1); // one read more: FC
    layer(300000, 110, 0);        // FC layer
    layer(40, 0, 0);              // no writes at all: FC
    for (int i = 0; i < 20; i++) begin
      automatic int w = 1 + $urandom_range(40);
      automatic int r = $urandom_range(1) ? w * (1 + $urandom_range(100)) : ((w + 1) << RW_SHIFT) + $urandom_range(5000);
      layer(r + 1, w + 1, $urandom_range(1));
    end
    checks++;
    if (n_fc < 3 || n_conv < 3) begin failures++; $display("type mix fc=%0d conv=%0d", n_fc, n_conv); end
    $display("fc=%0d conv=%0d", n_fc, n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
