// subimage_binarizer: turns each 64-byte read burst into a black/white 8x8
// sub-image and its spectrum.
//
// A read request returns BURST_LEN = 8 beats of 64 bits. For image data each
// byte is one pixel and each beat one row of eight pixels, so a burst is an
// 8x8 tile of the input image. Every pixel is binarized (black when its
// value is below BLACK_THRESH) as the beat arrives and shifted into a 64-bit
// mask; a population count of the mask gives the spectrum, the number of
// black pixels (the share of black pixels out of 64). Beats are counted
// modulo 8 from reset, since DRAM always returns whole bursts. The
// binarize/count steps follow the method; the pixel layout and the
// black threshold of 128 are this design's.
//
// Interface: rd_valid/rd_data carry read-data beats. sub_valid pulses the
// cycle after the eighth beat of a burst, with sub_mask (bit r*8+c is pixel
// row r, column c; 1 = black) and sub_spectrum. Throughput: one beat per
// cycle, no stall. Synchronous, active-high reset.
module subimage_binarizer
  import trojan_pkg::*;
#(
  parameter int unsigned BLACK_THRESH = 128
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      rd_valid,
  input  beat_t     rd_data,
  output logic      sub_valid,
  output submask_t  sub_mask,
  output spectrum_t sub_spectrum
);

  localparam int unsigned BW = $clog2(BURST_LEN);

  logic [BW-1:0]                 beat_cnt;
  logic [SUB_PIX-SUB_DIM-1:0]    rows_acc;   // rows 0..6 gathered so far
  logic [SUB_DIM-1:0]            row_bits;
  submask_t                      full_mask;

  always_comb begin
    for (int c = 0; c < SUB_DIM; c++)
      row_bits[c] = (32'(rd_data[c*PIX_W +: PIX_W]) < BLACK_THRESH);
    full_mask = {row_bits, rows_acc};
  end

  function automatic spectrum_t popcount64(input submask_t m);
    spectrum_t n = '0;
    for (int i = 0; i < SUB_PIX; i++) n += spectrum_t'(m[i]);
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      beat_cnt     <= '0;
      rows_acc     <= '0;
      sub_valid    <= 1'b0;
      sub_mask     <= '0;
      sub_spectrum <= '0;
    end else begin
      sub_valid <= 1'b0;
      if (rd_valid) begin
        beat_cnt <= beat_cnt + 1'b1;
        if (32'(beat_cnt) == BURST_LEN - 1) begin
          sub_valid    <= 1'b1;
          sub_mask     <= full_mask;
          sub_spectrum <= popcount64(full_mask);
        end else begin
          // row r lands in bits r*8 +: 8; shift older rows down as new arrive
          rows_acc <= {row_bits, rows_acc[SUB_PIX-SUB_DIM-1:SUB_DIM]};
        end
      end
    end
  end

endmodule
