// tb_mc_trojan_variants: the same three-batch traffic as tb_mc_trojan_top,
// run on the other configurations of the Trojan: a single datum-spectrum
// set (datum range 16..47), the OR-into-reset zero circuit and a random
// half of the payload beats zeroed (PORTION = 128).
//
// Expected behaviour: with one set the noise image of batch 2 also
// triggers (the false positive that a second set removes), so the trigger
// fires in batches 1 and 2. During the payload every beat arrives either
// unchanged or as zero, and between 40 % and 70 % of them are zero (half
// are picked at load time; the OR circuit also clears a word that waits in
// the output register while the selector has moved on to a picked beat);
// outside the payload every beat arrives unchanged.
module tb_mc_trojan_variants;
  import trojan_pkg::*;
  localparam int N = 256, PLANES = 3;
  localparam int FC_READS = 240000, FC_WRITES = 110;

  logic clk = 1'b0, rst = 1'b1;
  logic cmd_valid = 1'b0, cmd_ready = 1'b0, cmd_write = 1'b0;
  logic rd_valid = 1'b0;
  logic [63:0] rd_data = '0;
  logic wr_in_valid = 1'b0, wr_in_ready;
  logic [63:0] wr_in_data = '0;
  logic wr_out_valid, wr_out_ready = 1'b0;
  logic [63:0] wr_out_data;
  logic [1:0] trojan_phase;
  logic layer_boundary, layer_done, layer_fc, image_start, image_trigger, payload_active;
  logic heavy_window;
  logic [31:0] last_layer_reads, last_layer_writes;
  logic [0:0] set_ref_valid, set_fired;

  mc_trojan_top #(
    .NUM_SETS(1), .SPEC_LO('{16, 0, 0, 0}), .SPEC_HI('{47, 0, 0, 0}),
    .SIM_THRESH('{40, 0, 0, 0}), .CNT_THRESH('{32, 0, 0, 0}),
    .STYLE(PAYLOAD_OR_RESET), .PORTION(128)
  ) dut (.*);
  int n_pay_beats = 0;

  int checks = 0, failures = 0;
  // scoreboard of write beats: data and whether it must arrive zeroed
  logic [63:0] sb_data [$];
  bit          sb_zero [$];
  logic [63:0] pend_data [$];
  bit          pend_zero [$];
  int batch = 0, layer_idx = 0;
  // mechanism counters
  int n_heavy = 0, n_bnd = 0, n_fc = 0, n_conv = 0, n_start = 0, n_restart = 0;
  int n_trig = 0, n_zeroed = 0, n_clean = 0, n_out_stall = 0, n_in_stall = 0, n_back_to_monitor = 0;
  int n_ref = 0;
  int layer_seen = 0;
  bit exp_fc [15] = '{0,0,1,1,1, 0,0,1,1,1, 0,0,1,1,1};
  int trig_batch = -1;
  bit prev_ref = 0;
  logic [1:0] prev_phase = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- write data producer and DRAM side -------------------
  // Inputs are driven on the falling edge. The handshakes are evaluated in
  // the same place: ready and the DUT's outputs only change on the rising
  // edge, so what is seen here is what the next rising edge will act on.
  always @(negedge clk) if (!rst) begin
    wr_in_valid  = (pend_data.size() > 0);
    wr_in_data   = wr_in_valid ? pend_data[0] : '0;
    wr_out_ready = ($urandom_range(3) != 0);
    if (wr_in_valid && wr_in_ready) begin
      sb_data.push_back(pend_data.pop_front());
      sb_zero.push_back(pend_zero.pop_front());
    end
    if (wr_in_valid && !wr_in_ready) n_in_stall++;
    if (wr_out_valid && !wr_out_ready) n_out_stall++;
    if (wr_out_valid && wr_out_ready) begin
      checks++;
      if (sb_data.size() == 0) begin
        failures++; $display("unexpected write beat %h", wr_out_data);
      end else begin
        automatic logic [63:0] d = sb_data.pop_front();
        automatic bit z = sb_zero.pop_front();
        if (z) n_pay_beats++;
        if (!(wr_out_data === d || (z && wr_out_data === 64'h0))) begin
          failures++;
          if (failures < 10) $display("batch %0d layer %0d: beat %h, expected %h", batch, layer_idx,
                                      wr_out_data, z ? 64'h0 : d);
        end
        if (wr_out_data === 64'h0) n_zeroed++; else n_clean++;
      end
    end
  end

  // ---------------- observation of the Trojan's events -------------------
  always @(negedge clk) if (!rst) begin
    if (heavy_window) n_heavy++;
    if (layer_boundary) n_bnd++;
    if (image_start) begin
      n_start++;
      if (prev_phase == 2'(ST_ANALYSE)) n_restart++;
    end
    if (set_ref_valid[0] && !prev_ref) n_ref++;
    prev_ref   = set_ref_valid[0];
    prev_phase = trojan_phase;
    if (layer_done) begin
      checks++;
      if (layer_seen >= 15 || layer_fc !== exp_fc[layer_seen]) begin
        failures++;
        $display("layer end %0d: fc=%0b reads=%0d writes=%0d", layer_seen, layer_fc,
                 last_layer_reads, last_layer_writes);
      end
      if (layer_fc) n_fc++; else n_conv++;
      layer_seen++;
    end
  end

  always @(posedge image_trigger) begin
    n_trig++;
    trig_batch = batch;
    checks++;
    if (batch == 0 || layer_idx != 0) begin
      failures++; $display("trigger in batch %0d layer %0d", batch, layer_idx);
    end
  end

  // an analysed layer that ended as a Conv layer without a trigger
  always @(negedge clk) if (!rst && trojan_phase == 2'(ST_ANALYSE) && layer_done && !layer_fc && !image_trigger)
    n_back_to_monitor++;

  // ---------------- accelerator traffic --------------------------------
  function automatic bit carpet_hole(int x, int y);
    int u = x * 243 / N, v = y * 243 / N;
    for (int k = 0; k < 5; k++) begin
      if (u % 3 == 1 && v % 3 == 1) return 1;
      u /= 3; v /= 3;
    end
    return 0;
  endfunction

  function automatic byte unsigned pixel(bit trig, int x, int y);
    int p = trig ? (carpet_hole(x, y) ? 20 : 200) + $urandom_range(60) - 30 : $urandom_range(255);
    return byte'(p < 0 ? 0 : p > 255 ? 255 : p);
  endfunction

  task automatic issue(bit wr);
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr;
    cmd_ready = ($urandom_range(9) != 0);
    while (!cmd_ready) begin
      @(negedge clk);
      cmd_ready = ($urandom_range(9) != 0);
    end
    @(negedge clk);
    cmd_valid = 0; cmd_ready = 0;
  endtask

  task automatic reads(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      cmd_valid = 1; cmd_write = 0; cmd_ready = ($urandom_range(9) != 0);
      if (!cmd_ready) i--;
    end
    @(negedge clk);
    cmd_valid = 0; cmd_ready = 0;
  endtask

  task automatic writes(int n, bit must_zero);
    for (int i = 0; i < n; i++) begin
      while (pend_data.size() != 0) @(negedge clk);
      for (int b = 0; b < BURST_LEN; b++) begin
        pend_data.push_back({$urandom, $urandom} | 64'h1);
        pend_zero.push_back(must_zero);
      end
      issue(1);
    end
  endtask

  task automatic image_layer(bit trig, bit must_zero);
    for (int pl = 0; pl < PLANES; pl++)
      for (int ty = 0; ty < N / 8; ty++)
        for (int tx = 0; tx < N / 8; tx++) begin
          issue(0);
          for (int r = 0; r < BURST_LEN; r++) begin
            @(negedge clk);
            rd_valid = 1;
            for (int c = 0; c < 8; c++) rd_data[c*8 +: 8] = pixel(trig, tx * 8 + c, ty * 8 + r);
          end
          @(negedge clk);
          rd_valid = 0;
        end
    reads(300);
    writes(300, must_zero);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (batch = 0; batch < 3; batch++) begin
      automatic bit hit = (batch >= 1);
      layer_idx = 0; image_layer(batch == 1, hit);
      layer_idx = 1; reads(4000);     writes(300, hit);
      layer_idx = 2; reads(FC_READS); writes(FC_WRITES, hit);
      layer_idx = 3; reads(FC_READS); writes(FC_WRITES, 0);
      layer_idx = 4; reads(FC_READS); writes(FC_WRITES, 0);
      $display("batch %0d done at %0t: layers seen %0d, phase %0d", batch, $time, layer_seen, trojan_phase);
    end
    layer_idx = 0;
    reads(300);                       // next batch starts: closes the last FC layer
    repeat (50) @(negedge clk);

    checks++; if (layer_seen != 15) begin failures++; $display("layer ends %0d of 15", layer_seen); end
    checks++; if (n_trig != 2 || trig_batch != 2) begin failures++; $display("triggers %0d", n_trig); end
    checks++; if (n_start != 9) begin failures++; $display("analysis starts %0d, expected 9", n_start); end
    checks++; if (n_pay_beats != 2 * (300 + 300 + FC_WRITES) * 8) begin failures++; $display("payload beats %0d", n_pay_beats); end
    checks++; if (n_zeroed * 10 < n_pay_beats * 4 || n_zeroed * 10 > n_pay_beats * 7) begin
      failures++; $display("zeroed %0d of %0d payload beats", n_zeroed, n_pay_beats);
    end
    checks++; if (sb_data.size() != 0 || pend_data.size() != 0) begin failures++; $display("beats left over"); end
    checks++; if (n_restart != 6) begin failures++; $display("restarts %0d, expected 6", n_restart); end
    checks++; if (trojan_phase != 2'(ST_ANALYSE)) begin failures++; $display("final phase %0d", trojan_phase); end
    // every mechanism must have happened
    if (n_heavy == 0)          begin failures++; $display("no write-heavy window"); end
    if (n_bnd == 0)            begin failures++; $display("no layer boundary"); end
    if (n_fc == 0)             begin failures++; $display("no FC layer detected"); end
    if (n_conv == 0)           begin failures++; $display("no Conv layer detected"); end
    if (n_start == 0)          begin failures++; $display("no input-image analysis"); end
    if (n_restart == 0)        begin failures++; $display("no analysis restart"); end
    if (n_ref < 2)             begin failures++; $display("too few reference tiles chosen"); end
    if (n_trig == 0)           begin failures++; $display("no trigger"); end
    if (n_zeroed == 0)         begin failures++; $display("no zeroed beat"); end
    if (n_clean == 0)          begin failures++; $display("no clean beat"); end
    if (n_out_stall == 0)      begin failures++; $display("no DRAM back-pressure"); end
    if (n_in_stall == 0)       begin failures++; $display("no full write queue"); end
    checks += 12;
    $display("heavy windows=%0d boundaries=%0d fc=%0d conv=%0d analyses=%0d restarts=%0d refs=%0d",
             n_heavy, n_bnd, n_fc, n_conv, n_start, n_restart, n_ref);
    $display("triggers=%0d untriggered analyses=%0d zeroed beats=%0d (of %0d under payload) clean beats=%0d dram stalls=%0d queue full=%0d",
             n_trig, n_back_to_monitor, n_zeroed, n_pay_beats, n_clean, n_out_stall, n_in_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
