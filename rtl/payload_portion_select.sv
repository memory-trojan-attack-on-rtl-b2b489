// payload_portion_select: chooses at random which written beats the payload
// zeroes.
//
// The attack can be tuned by zeroing only a fraction of the output feature
// map: accuracy falls roughly in proportion to that fraction when the
// errors hit FC layers. A 16-bit maximal-length LFSR (taps 16, 14, 13, 11)
// advances once per written beat, and a beat is selected when the low byte
// of the LFSR is below PORTION, so PORTION/256 of the beats are hit on
// average (PORTION = 256 selects every beat, the plain zero-setting
// payload, and is the default). The LFSR, its seed and the 1/256 step are
// this design's choices. With the default PORTION = 256 the comparison is
// always true, so synthesis keeps none of the LFSR and sel is a constant 1;
// the logic only exists for PORTION < 256.
//
// Interface: advance steps the LFSR; sel is combinational from the LFSR
// state and applies to the beat loaded in the same cycle as advance.
// Synchronous, active-high reset.
module payload_portion_select #(
  parameter int unsigned  PORTION = 256,        // out of 256
  parameter logic [15:0]  SEED    = 16'hACE1
) (
  input  logic clk,
  input  logic rst,
  input  logic advance,
  output logic sel
);

  logic [15:0] lfsr;
  logic        fb;

  assign fb  = lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10];
  assign sel = (32'(lfsr[7:0]) < PORTION);

  always_ff @(posedge clk) begin
    if (rst)          lfsr <= SEED;
    else if (advance) lfsr <= {lfsr[14:0], fb};
  end

endmodule
