// layer_type_classifier: tells fully connected layers from convolutional
// ones by their read/write ratio.
//
// FC layers stream a large weight matrix in and write back only a short
// output vector, so their reads outnumber their writes by three to four
// orders of magnitude, while convolutional layers stay well below that. The
// classifier counts the reads and writes issued since the previous layer
// boundary. When the boundary detector reports the end of a layer it
// declares the layer FC if reads > (writes << RW_SHIFT); the shift replaces
// a divider, as in the reference implementation. RW_SHIFT = 11 (ratio 2048)
// is this design's reading of the threshold line drawn between the 1e3 and
// 1e4 gridlines of the published ratio plot. Counters saturate at their
// maximum.
//
// Interface: acc_valid / acc_write as for the boundary detector; boundary is
// the detector's registered pulse. An access in the same cycle as boundary
// already belongs to the next layer. layer_done pulses one cycle after
// boundary with layer_fc and the finished layer's counts. Synchronous,
// active-high reset.
module layer_type_classifier #(
  parameter int unsigned CNT_W    = 32,
  parameter int unsigned RW_SHIFT = 11
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             acc_valid,
  input  logic             acc_write,
  input  logic             boundary,
  output logic             layer_done,
  output logic             layer_fc,
  output logic [CNT_W-1:0] layer_reads,
  output logic [CNT_W-1:0] layer_writes
);

  logic [CNT_W-1:0]          rd_cnt, wr_cnt;
  logic [CNT_W+RW_SHIFT-1:0] wr_scaled;
  logic                      is_fc;
  logic                      rd_inc, wr_inc;

  always_comb begin
    wr_scaled = (CNT_W+RW_SHIFT)'(wr_cnt) << RW_SHIFT;
    is_fc     = (CNT_W+RW_SHIFT)'(rd_cnt) > wr_scaled;
    rd_inc    = acc_valid && !acc_write;
    wr_inc    = acc_valid &&  acc_write;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_cnt       <= '0;
      wr_cnt       <= '0;
      layer_done   <= 1'b0;
      layer_fc     <= 1'b0;
      layer_reads  <= '0;
      layer_writes <= '0;
    end else begin
      layer_done <= 1'b0;
      if (boundary) begin
        layer_done   <= 1'b1;
        layer_fc     <= is_fc;
        layer_reads  <= rd_cnt;
        layer_writes <= wr_cnt;
        rd_cnt       <= CNT_W'(rd_inc);
        wr_cnt       <= CNT_W'(wr_inc);
      end else begin
        if (rd_inc && rd_cnt != '1) rd_cnt <= rd_cnt + 1'b1;
        if (wr_inc && wr_cnt != '1) wr_cnt <= wr_cnt + 1'b1;
      end
    end
  end

endmodule
