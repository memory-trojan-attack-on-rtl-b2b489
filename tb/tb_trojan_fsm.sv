// tb_trojan_fsm: directed walk through every phase transition. The
// testbench plays layer ends (FC or Conv) and the trigger, and checks the
// phase, the analyse/payload decodes and the one-cycle start_image pulse
// against the expected sequence: first batch not analysed, analysis
// restarted on consecutive FC layers, fall back to monitoring after an
// untriggered Conv layer, payload until the next FC layer end.
module tb_trojan_fsm;
  import trojan_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic layer_done = 1'b0, layer_fc = 1'b0, img_trigger = 1'b0;
  trojan_state_e state;
  logic start_image, analyse, payload_active;
  int checks = 0, failures = 0;
  int n_start = 0;

  trojan_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (start_image) n_start++;

  task automatic expect_state(trojan_state_e s, bit start, string what);
    checks++;
    if (state !== s || start_image !== start || analyse !== (s == ST_ANALYSE) ||
        payload_active !== (s == ST_PAYLOAD)) begin
      failures++;
      $display("%s: state=%0d (exp %0d) start=%0b (exp %0b)", what, state, s, start_image, start);
    end
  endtask

  // one event, then check the state after it and one cycle later
  task automatic ev(bit done, bit fc, bit trig, trojan_state_e s, bit start, string what);
    @(negedge clk);
    layer_done = done; layer_fc = fc; img_trigger = trig;
    @(negedge clk);
    layer_done = 0; layer_fc = 0; img_trigger = 0;
    expect_state(s, start, what);
    @(negedge clk);
    expect_state(s, 1'b0, {what, " (+1)"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    expect_state(ST_MONITOR, 0, "after reset");
    ev(0, 0, 1, ST_MONITOR, 0, "trigger ignored while monitoring");
    ev(1, 0, 0, ST_MONITOR, 0, "conv end while monitoring");
    ev(1, 1, 0, ST_ANALYSE, 1, "fc end -> analyse");
    ev(1, 1, 0, ST_ANALYSE, 1, "fc after fc -> restart");
    ev(1, 0, 0, ST_MONITOR, 0, "conv end, no trigger -> monitor");
    ev(1, 1, 0, ST_ANALYSE, 1, "fc end -> analyse");
    ev(0, 0, 1, ST_PAYLOAD, 0, "trigger -> payload");
    ev(1, 0, 0, ST_PAYLOAD, 0, "conv end keeps payload");
    ev(1, 1, 1, ST_ANALYSE, 1, "fc end ends payload");
    ev(1, 0, 1, ST_PAYLOAD, 0, "trigger wins over layer end");
    // a trigger still high from the previous image must not count in the
    // cycle the analysis starts
    @(negedge clk); layer_done = 1; layer_fc = 1; img_trigger = 1;
    @(negedge clk); layer_done = 0; layer_fc = 0;
    expect_state(ST_ANALYSE, 1, "payload ends with stale trigger");
    @(negedge clk); img_trigger = 0;
    expect_state(ST_ANALYSE, 0, "stale trigger ignored");
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    expect_state(ST_MONITOR, 0, "reset from payload");
    checks++;
    if (n_start != 5) begin failures++; $display("start pulses %0d, expected 5", n_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
