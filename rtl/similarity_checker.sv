// similarity_checker: one datum-spectrum set of the trigger detector.
//
// A trigger image is a fractal with mirror symmetry, so many of its 8x8
// tiles look alike after binarization, while tiles of natural images rarely
// do. The checker keeps only tiles whose spectrum lies in its datum range
// [SPEC_LO, SPEC_HI]. The first such tile after clear becomes the reference.
// Every later in-range tile is a testing tile: it is XORed with the
// reference pixel by pixel, the XOR is popcounted, and the correlation is
// taken as the number of equal pixels, 64 - popcount. A tile whose
// correlation exceeds SIM_THRESH counts as similar; when the number of
// similar tiles exceeds CNT_THRESH the set fires. The steps follow the
// method; all four threshold values are this design's choices, set so that
// a Sierpinski-carpet image fires and plain or noisy images do not.
//
// Interface: clear (pulse) drops the reference and the count; enable gates
// which tiles are examined; sub_valid/sub_mask/sub_spectrum come from the
// binarizer. fired is sticky until clear and is registered, one cycle after
// the tile that crosses the threshold. Synchronous, active-high reset.
module similarity_checker
  import trojan_pkg::*;
#(
  parameter int unsigned SPEC_LO    = 8,
  parameter int unsigned SPEC_HI    = 24,
  parameter int unsigned SIM_THRESH = 40,
  parameter int unsigned CNT_THRESH = 32,
  parameter int unsigned CNT_W      = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             enable,
  input  logic             sub_valid,
  input  submask_t         sub_mask,
  input  spectrum_t        sub_spectrum,
  output logic             ref_valid,
  output submask_t         ref_mask,
  output logic [CNT_W-1:0] sim_count,
  output logic             fired
);

  logic      in_range;
  spectrum_t diff;
  spectrum_t corr;
  logic      similar;

  function automatic spectrum_t popcount64(input submask_t m);
    spectrum_t n = '0;
    for (int i = 0; i < SUB_PIX; i++) n += spectrum_t'(m[i]);
    return n;
  endfunction

  always_comb begin
    in_range = (32'(sub_spectrum) >= SPEC_LO) && (32'(sub_spectrum) <= SPEC_HI);
    diff     = popcount64(sub_mask ^ ref_mask);
    corr     = spectrum_t'(SUB_PIX) - diff;
    similar  = (32'(corr) > SIM_THRESH);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ref_valid <= 1'b0;
      ref_mask  <= '0;
      sim_count <= '0;
      fired     <= 1'b0;
    end else if (enable && sub_valid && in_range) begin
      if (!ref_valid) begin
        ref_valid <= 1'b1;
        ref_mask  <= sub_mask;
      end else if (similar) begin
        if (sim_count != '1) sim_count <= sim_count + 1'b1;
        if (32'(sim_count) + 1 > CNT_THRESH) fired <= 1'b1;
      end
    end
  end

endmodule
