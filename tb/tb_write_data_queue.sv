// tb_write_data_queue: random traffic with random back-pressure on the DRAM
// side and a random payload zero signal, run on a multiplexer-style and an
// OR-style queue. A model of the queue (a SystemVerilog queue of words plus
// the output register) predicts in_ready, out_valid and out_data every
// cycle; words must leave in order, zeroed exactly when the payload was
// active as they were loaded into the output register (and, for the OR
// style, while they wait there). Also checks the 2-cycle latency through an
// empty queue and that no word is lost or duplicated.
module tb_write_data_queue;
  import trojan_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_ready = 1'b0, zero = 1'b0;
  logic [63:0] in_data = '0;
  logic in_ready_m, out_valid_m, beat_load_m, in_ready_o, out_valid_o, beat_load_o;
  logic [63:0] out_data_m, out_data_o;
  int checks = 0, failures = 0;
  logic [63:0] fifo_m [$], fifo_o [$];
  bit ov_m = 0, ov_o = 0;
  logic [63:0] oq_m = '0, oq_o = '0;
  int n_in = 0, n_out = 0, n_zero = 0, n_stall = 0, n_full = 0;

  write_data_queue #(.WIDTH(64), .DEPTH(DEPTH), .STYLE(PAYLOAD_MUX_INPUT)) dut_m (
    .clk, .rst, .in_valid, .in_ready(in_ready_m), .in_data, .out_valid(out_valid_m),
    .out_ready, .out_data(out_data_m), .zero, .beat_load(beat_load_m));
  write_data_queue #(.WIDTH(64), .DEPTH(DEPTH), .STYLE(PAYLOAD_OR_RESET)) dut_o (
    .clk, .rst, .in_valid, .in_ready(in_ready_o), .in_data, .out_valid(out_valid_o),
    .out_ready, .out_data(out_data_o), .zero, .beat_load(beat_load_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock edge of the model for one queue
  task automatic model_step(ref logic [63:0] f [$], ref bit ov, ref logic [63:0] oq, input bit or_style);
    bit push = in_valid && (f.size() < DEPTH);
    bit pop  = (f.size() > 0) && (!ov || out_ready);
    logic [63:0] head = (f.size() > 0) ? f[0] : '0;
    if (pop) void'(f.pop_front());
    if (push) f.push_back(in_data);
    if (or_style) begin
      if (zero) oq = '0;
      else if (pop) oq = head;
    end else if (pop) oq = zero ? '0 : head;
    if (pop) ov = 1;
    else if (out_ready) ov = 0;
  endtask

  task automatic compare(string what);
    checks++;
    if (in_ready_m !== (fifo_m.size() < DEPTH) || out_valid_m !== ov_m || (ov_m && out_data_m !== oq_m) ||
        in_ready_o !== (fifo_o.size() < DEPTH) || out_valid_o !== ov_o || (ov_o && out_data_o !== oq_o)) begin
      failures++;
      if (failures < 10)
        $display("%s t=%0t: mux rdy %0b v %0b d %h (exp %0b %0b %h) or v %0b d %h (exp %0b %h)", what, $time,
                 in_ready_m, out_valid_m, out_data_m, fifo_m.size() < DEPTH, ov_m, oq_m,
                 out_valid_o, out_data_o, ov_o, oq_o);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // latency through the empty queue: accepted at edge 0, visible after edge 2
    in_valid = 1; in_data = 64'h1234; out_ready = 1;
    @(negedge clk) in_valid = 0;
    checks++; if (out_valid_m !== 0) begin failures++; $display("latency too short"); end
    @(negedge clk);
    checks++; if (out_valid_m !== 1 || out_data_m !== 64'h1234) begin failures++; $display("latency not 2"); end
    @(negedge clk);
    checks++; if (out_valid_m !== 0) begin failures++; $display("word repeated"); end
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      compare("pre");
      in_valid  = ($urandom_range(2) != 0);
      in_data   = {$urandom, $urandom} | 64'h1;
      out_ready = ($urandom_range(9) < ((i / 3000) % 2 ? 3 : 8));
      zero      = ((i / 500) % 3 == 1) ? ($urandom_range(3) != 0) : 1'b0;
      if (in_valid && in_ready_m) n_in++;
      if (in_valid && !in_ready_m) n_full++;
      if (out_valid_m && !out_ready) n_stall++;
      if (out_valid_m && out_ready) begin
        n_out++;
        if (out_data_m == 0) n_zero++;
      end
      @(posedge clk);
      model_step(fifo_m, ov_m, oq_m, 0);
      model_step(fifo_o, ov_o, oq_o, 1);
    end
    @(negedge clk) in_valid = 0; out_ready = 1; zero = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out + fifo_m.size() + (ov_m ? 1 : 0) < n_in - 8 || n_zero < 100 || n_stall < 100 || n_full < 100) begin
      failures++; $display("coverage in=%0d out=%0d zero=%0d stall=%0d full=%0d", n_in, n_out, n_zero, n_stall, n_full);
    end
    $display("words in=%0d out=%0d zeroed=%0d stalls=%0d full=%0d", n_in, n_out, n_zero, n_stall, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
