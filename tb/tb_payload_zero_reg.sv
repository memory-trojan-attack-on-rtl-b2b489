// tb_payload_zero_reg: both zero-setting circuits side by side under random
// load, data and zero. The testbench's own model of each circuit (OR into
// the reset: the register clears whenever zero is high; multiplexer: zero
// only replaces the word being loaded) predicts q after every edge.
module tb_payload_zero_reg;
  import trojan_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic load = 1'b0, zero = 1'b0;
  logic [63:0] d = '0;
  logic [63:0] q_or, q_mux;
  logic [63:0] e_or = '0, e_mux = '0;
  int checks = 0, failures = 0;
  int n_zeroed = 0, n_held_cleared = 0;

  payload_zero_reg #(.WIDTH(64), .STYLE(PAYLOAD_OR_RESET))  dut_or  (.clk, .rst, .load, .d, .zero, .q(q_or));
  payload_zero_reg #(.WIDTH(64), .STYLE(PAYLOAD_MUX_INPUT)) dut_mux (.clk, .rst, .load, .d, .zero, .q(q_mux));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      load = ($urandom_range(2) != 0);
      zero = ($urandom_range(3) == 0);
      d    = {$urandom, $urandom} | 64'h1;
      // model of the edge that follows
      if (zero) begin
        if (!load && e_or != 0) n_held_cleared++;
        e_or = '0;
      end else if (load) e_or = d;
      if (load) begin
        e_mux = zero ? '0 : d;
        if (zero) n_zeroed++;
      end
      @(posedge clk); #1;
      checks++;
      if (q_or !== e_or || q_mux !== e_mux) begin
        failures++;
        if (failures < 10) $display("i=%0d load=%0b zero=%0b: or %h/%h mux %h/%h",
                                    i, load, zero, q_or, e_or, q_mux, e_mux);
      end
    end
    @(negedge clk) rst = 1; load = 1;
    @(posedge clk); #1;
    checks++;
    if (q_or !== '0 || q_mux !== '0) begin failures++; $display("reset failed"); end
    checks++;
    if (n_zeroed < 100 || n_held_cleared < 100) begin failures++; $display("coverage"); end
    $display("zeroed loads=%0d held words cleared=%0d", n_zeroed, n_held_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
