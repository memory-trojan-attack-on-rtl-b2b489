// tb_similarity_checker: streams of 8x8 tiles made by flipping a random
// number of pixels of a base tile, plus unrelated random tiles, some with
// enable low and with clears in between. A model in the testbench keeps
// its own reference tile, counts pixels that agree, and predicts the
// reference, the similar-tile count and the fired flag after every tile.
module tb_similarity_checker;
  import trojan_pkg::*;
  localparam int LO = 8, HI = 24, SIM = 40, CNT = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic clear = 1'b0, enable = 1'b0, sub_valid = 1'b0;
  submask_t sub_mask = '0;
  spectrum_t sub_spectrum = '0;
  logic ref_valid;
  submask_t ref_mask;
  logic [15:0] sim_count;
  logic fired;
  int checks = 0, failures = 0;
  bit m_ref_valid = 0; bit [63:0] m_ref = '0; int m_cnt = 0; bit m_fired = 0;
  int n_fired = 0, n_similar = 0, n_dissimilar = 0;

  similarity_checker #(.SPEC_LO(LO), .SPEC_HI(HI), .SIM_THRESH(SIM), .CNT_THRESH(CNT),
                       .CNT_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(bit [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += v[i];
    return n;
  endfunction

  function automatic bit [63:0] rand_tile(int nblack);
    bit [63:0] t = '0;
    int placed = 0;
    while (placed < nblack) begin
      int i = $urandom_range(63);
      if (!t[i]) begin t[i] = 1; placed++; end
    end
    return t;
  endfunction

  task automatic send(bit [63:0] t, bit en);
    int sp = ones(t);
    @(negedge clk);
    sub_valid = 1; sub_mask = t; sub_spectrum = spectrum_t'(sp); enable = en;
    // model
    if (en && sp >= LO && sp <= HI) begin
      if (!m_ref_valid) begin m_ref_valid = 1; m_ref = t; end
      else if (64 - ones(t ^ m_ref) > SIM) begin
        m_cnt++; n_similar++;
        if (m_cnt > CNT) m_fired = 1;
      end else n_dissimilar++;
    end
    @(negedge clk);
    sub_valid = 0;
    checks++;
    if (ref_valid !== m_ref_valid || (m_ref_valid && ref_mask !== m_ref) ||
        32'(sim_count) != m_cnt || fired !== m_fired) begin
      failures++;
      if (failures < 10)
        $display("tile %h: ref %0b/%0b cnt %0d/%0d fired %0b/%0b", t, ref_valid, m_ref_valid,
                 sim_count, m_cnt, fired, m_fired);
    end
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    m_ref_valid = 0; m_ref = '0; m_cnt = 0;
    if (m_fired) n_fired++;
    m_fired = 0;
    checks++;
    if (ref_valid !== 0 || sim_count !== 0 || fired !== 0) begin failures++; $display("clear failed"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 30; run++) begin
      automatic bit [63:0] base = rand_tile(8 + $urandom_range(16));
      automatic int flips_max = (run % 3 == 0) ? 40 : 12;
      // tiles that are out of range come first, then the base becomes the reference
      send(rand_tile(0), 1);
      send(rand_tile(40), 1);
      send(base, (run % 5 != 4));
      for (int k = 0; k < 150; k++) begin
        automatic bit [63:0] t = base;
        automatic int nf = $urandom_range(flips_max);
        for (int f = 0; f < nf; f++) t[$urandom_range(63)] ^= 1'b1;
        if ($urandom_range(9) == 0) t = rand_tile($urandom_range(64));
        send(t, ($urandom_range(7) != 0));
      end
      do_clear();
    end
    // exact threshold: 23 flipped pixels = 41 equal (similar), 24 = 40 (not)
    begin
      automatic bit [63:0] base = rand_tile(16);
      automatic bit [63:0] t;
      send(base, 1);
      for (int nf = 22; nf <= 26; nf++) begin
        int placed = 0;
        t = base;
        while (placed < nf) begin
          automatic int i = $urandom_range(63);
          if (t[i] == base[i]) begin t[i] = ~t[i]; placed++; end
        end
        send(t, 1);
      end
    end
    checks++;
    if (n_fired < 5 || n_similar < 100 || n_dissimilar < 30) begin
      failures++; $display("coverage: fired=%0d similar=%0d dissimilar=%0d", n_fired, n_similar, n_dissimilar);
    end
    $display("fired=%0d similar=%0d dissimilar=%0d", n_fired, n_similar, n_dissimilar);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
