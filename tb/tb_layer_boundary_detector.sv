// tb_layer_boundary_detector: random access streams with quiet and
// write-heavy stretches. A behavioural model counts accesses and writes per
// window of 100 and predicts window_done, window_heavy and boundary (end of
// the first non-heavy window after heavy ones) for the cycle after each
// window's last access; the DUT outputs are compared every cycle.
module tb_layer_boundary_detector;
  localparam int WINDOW = 100, WR_THRESH = 50;
  logic clk = 1'b0, rst = 1'b1;
  logic acc_valid = 1'b0, acc_write = 1'b0;
  logic window_done, window_heavy, boundary;
  int checks = 0, failures = 0;
  int n_acc = 0, n_wr = 0;
  bit prev_heavy = 0;
  bit e_done = 0, e_heavy = 0, e_bnd = 0;
  int n_bnd = 0, n_heavy = 0;

  layer_boundary_detector #(.WINDOW(WINDOW), .WR_THRESH(WR_THRESH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model, evaluated on the same edge as the DUT
  always @(posedge clk) begin
    if (rst) begin
      n_acc = 0; n_wr = 0; prev_heavy = 0; e_done = 0; e_heavy = 0; e_bnd = 0;
    end else begin
      e_done = 0; e_bnd = 0;
      if (acc_valid) begin
        n_acc++;
        if (acc_write) n_wr++;
        if (n_acc == WINDOW) begin
          e_done  = 1;
          e_heavy = (n_wr > WR_THRESH);
          e_bnd   = prev_heavy && !e_heavy;
          prev_heavy = e_heavy;
          n_acc = 0; n_wr = 0;
        end
      end
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (window_done !== e_done || boundary !== e_bnd ||
        (e_done && window_heavy !== e_heavy)) begin
      failures++;
      if (failures < 10)
        $display("mismatch t=%0t done %0b/%0b heavy %0b/%0b bnd %0b/%0b", $time,
                 window_done, e_done, window_heavy, e_heavy, boundary, e_bnd);
    end
    if (boundary) n_bnd++;
    if (window_done && window_heavy) n_heavy++;
  end

  task automatic run(int n, int wr_pct, int idle_pct);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      acc_valid = ($urandom_range(99) >= idle_pct);
      acc_write = ($urandom_range(99) < wr_pct);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int l = 0; l < 40; l++) begin
      run(300 + $urandom_range(700), 5, 20);       // layer body: mostly reads
      run(100 + $urandom_range(300), 90, 10);      // drain: mostly writes
    end
    run(300, 5, 0);
    // exactly at the threshold: 50 writes is not heavy, 51 is
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < WINDOW; i++) begin
        @(negedge clk); acc_valid = 1; acc_write = (i < 50 + k);
      end
    end
    run(250, 0, 0);
    @(negedge clk) acc_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_bnd < 30) begin failures++; $display("too few boundaries %0d", n_bnd); end
    $display("boundaries=%0d heavy_windows=%0d", n_bnd, n_heavy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
