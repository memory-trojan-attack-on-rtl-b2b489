// tb_trigger_image_detector: whole 256x256x3 images are streamed as 8-beat
// read bursts, one 8x8 tile per burst, tiles in raster order plane by
// plane. The trigger image is a five-level Sierpinski carpet (dark holes on
// a light ground) with random pixel noise; the other images are uniform
// noise and a plain grey frame. A model in the testbench binarizes the same
// pixels, runs both datum-spectrum sets and predicts when the trigger
// rises: two cycles after the last beat of the tile that completes the
// count. Enable low and clear are checked too.
module tb_trigger_image_detector;
  import trojan_pkg::*;
  localparam int N = 256, PLANES = 3, NS = 2;
  localparam int LO [NS] = '{8, 16};
  localparam int HI [NS] = '{24, 47};
  localparam int SIM = 40, CNT = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic clear = 1'b0, enable = 1'b0, rd_valid = 1'b0;
  beat_t rd_data = '0;
  logic trigger, sub_valid;
  logic [1:0] set_fired, set_ref_valid;
  logic [31:0] sim_counts;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint exp_rise = -1;
  bit in_image = 0;
  int n_trig_images = 0, n_quiet_images = 0;

  trigger_image_detector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // continuous check of the trigger against the predicted rise time
  always @(negedge clk) if (in_image) begin
    checks++;
    if (trigger !== (exp_rise >= 0 && cyc >= exp_rise)) begin
      failures++;
      if (failures < 10) $display("cyc %0d: trigger=%0b, predicted rise at %0d", cyc, trigger, exp_rise);
    end
  end

  function automatic bit carpet_hole(int x, int y);
    int u = x * 243 / N, v = y * 243 / N;
    for (int k = 0; k < 5; k++) begin
      if (u % 3 == 1 && v % 3 == 1) return 1;
      u /= 3; v /= 3;
    end
    return 0;
  endfunction

  function automatic byte unsigned pixel(int kind, int x, int y);
    int p;
    case (kind)
      0: p = carpet_hole(x, y) ? 20 : 200;
      1: p = $urandom_range(255);
      default: p = 160;
    endcase
    if (kind == 0) p += $urandom_range(60) - 30;   // sensor noise
    if (p < 0) p = 0;
    if (p > 255) p = 255;
    return byte'(p);
  endfunction

  function automatic int ones(bit [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += v[i];
    return n;
  endfunction

  // stream one image; returns whether the model expects a trigger
  task automatic image(int kind, bit en, output bit model_trig);
    bit        rv [NS];
    bit [63:0] rm [NS];
    int        cnt [NS];
    bit        fired [NS];
    for (int s = 0; s < NS; s++) begin rv[s] = 0; rm[s] = '0; cnt[s] = 0; fired[s] = 0; end
    model_trig = 0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0; enable = en;
    exp_rise = -1; in_image = 1;
    for (int pl = 0; pl < PLANES; pl++)
      for (int ty = 0; ty < N / 8; ty++)
        for (int tx = 0; tx < N / 8; tx++) begin
          bit [63:0] m = '0;
          int sp;
          for (int r = 0; r < 8; r++) begin
            @(negedge clk);
            rd_valid = 1;
            for (int c = 0; c < 8; c++) begin
              byte unsigned p = pixel(kind, tx * 8 + c, ty * 8 + r);
              rd_data[c*8 +: 8] = p;
              m[r*8 + c] = (p < 128);
            end
          end
          @(negedge clk);
          rd_valid = 0;
          sp = ones(m);
          if (en) begin
            for (int s = 0; s < NS; s++)
              if (sp >= LO[s] && sp <= HI[s]) begin
                if (!rv[s]) begin rv[s] = 1; rm[s] = m; end
                else if (64 - ones(m ^ rm[s]) > SIM) begin
                  cnt[s]++;
                  if (cnt[s] > CNT) fired[s] = 1;
                end
              end
            if (!model_trig && fired[0] && fired[1]) begin
              model_trig = 1;
              exp_rise = cyc + 2;    // cyc here = edge after the last beat
            end
          end
        end
    repeat (4) @(negedge clk);
    $display("image kind %0d en %0b: set counts %0d %0d, trigger %0b", kind, en, cnt[0], cnt[1], trigger);
    in_image = 0;
  endtask

  initial begin
    bit t;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    image(0, 1, t);             // carpet: must trigger
    checks++; if (!t) begin failures++; $display("model: carpet did not trigger"); end
    if (t) n_trig_images++;
    image(1, 1, t);             // noise: must not
    checks++; if (t) begin failures++; $display("model: noise triggered"); end
    if (!t) n_quiet_images++;
    image(2, 1, t);             // flat grey: must not
    checks++; if (t) begin failures++; $display("model: grey triggered"); end
    image(0, 0, t);             // carpet while not enabled: must not
    checks++; if (t || trigger) begin failures++; $display("triggered while disabled"); end
    image(0, 1, t);             // carpet again after clear
    checks++; if (!t || !trigger) begin failures++; $display("carpet after clear did not trigger"); end
    if (t) n_trig_images++;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++; if (trigger) begin failures++; $display("clear did not drop trigger"); end
    checks++; if (n_trig_images != 2 || n_quiet_images != 1) begin failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
