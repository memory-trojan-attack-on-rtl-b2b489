// tb_payload_portion_select: checks the LFSR sequence against a model of
// x^16 + x^14 + x^13 + x^11 + 1 from the same seed, that the sequence has
// the full period 65535, that PORTION = 256 selects every beat and that
// PORTION = 64 selects close to a quarter of them, and that the state only
// moves on advance.
module tb_payload_portion_select;
  logic clk = 1'b0, rst = 1'b1;
  logic advance = 1'b0;
  logic sel_all, sel_q, sel_0;
  int checks = 0, failures = 0;
  logic [15:0] m = 16'hACE1;
  int n_q = 0, steps = 0;

  payload_portion_select                 dut_all (.clk, .rst, .advance, .sel(sel_all));
  payload_portion_select #(.PORTION(64)) dut_q   (.clk, .rst, .advance, .sel(sel_q));
  payload_portion_select #(.PORTION(0))  dut_0   (.clk, .rst, .advance, .sel(sel_0));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit wrapped = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (steps < 65535) begin
      @(negedge clk);
      checks++;
      if (dut_q.lfsr !== m || sel_all !== 1'b1 || sel_0 !== 1'b0 || sel_q !== (m[7:0] < 64)) begin
        failures++;
        if (failures < 10) $display("step %0d lfsr %h exp %h", steps, dut_q.lfsr, m);
      end
      advance = ($urandom_range(3) != 0);
      if (advance) begin
        if (sel_q) n_q++;
        m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
        steps++;
        if (m == 16'hACE1 && steps < 65535) wrapped = 1;
      end
    end
    @(negedge clk) advance = 0;
    checks++;
    if (wrapped || m !== 16'hACE1) begin failures++; $display("period is not 65535"); end
    checks++;
    if (n_q < 16000 || n_q > 16800) begin failures++; $display("quarter portion selected %0d", n_q); end
    $display("PORTION=64 selected %0d of 65535", n_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
