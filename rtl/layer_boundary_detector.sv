// layer_boundary_detector: finds the end of a network layer from the write
// density of the memory traffic.
//
// An accelerator keeps output feature maps on chip and drains them to DRAM
// when its buffer fills, which happens mostly near the end of a layer. The
// detector therefore cuts the access stream into windows of WINDOW accesses
// (100 in the reference configuration) and counts the writes in each one. A
// window with more than WR_THRESH writes is "write-heavy", i.e. close to a
// layer boundary. Several heavy windows usually follow each other while the
// buffer drains, so the boundary is reported once, at the end of the first
// window that is no longer heavy after one or more heavy ones; this way the
// drain writes are still counted in the layer that produced them. The
// windowing and the write count follow the method; the threshold value and
// the choice of the falling edge are this design's.
//
// Interface: acc_valid marks one accepted memory request in a cycle and
// acc_write says whether it is a write. All outputs are registered and
// appear the cycle after the access that closes a window: window_done and
// window_heavy for every window, boundary for the window that ends a layer.
// Reset is synchronous and active high.
module layer_boundary_detector #(
  parameter int unsigned WINDOW    = 100,  // accesses per window
  parameter int unsigned WR_THRESH = 50    // heavy if writes in window > this
) (
  input  logic clk,
  input  logic rst,
  input  logic acc_valid,
  input  logic acc_write,
  output logic window_done,
  output logic window_heavy,
  output logic boundary
);

  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] acc_cnt;
  logic [CW-1:0] wr_cnt;
  logic          prev_heavy;
  logic [CW-1:0] wr_next;
  logic          heavy_now;

  always_comb begin
    wr_next   = wr_cnt + CW'(acc_write);
    heavy_now = (32'(wr_next) > WR_THRESH);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_cnt      <= '0;
      wr_cnt       <= '0;
      prev_heavy   <= 1'b0;
      window_done  <= 1'b0;
      window_heavy <= 1'b0;
      boundary     <= 1'b0;
    end else begin
      window_done <= 1'b0;
      boundary    <= 1'b0;
      if (acc_valid) begin
        if (32'(acc_cnt) == WINDOW - 1) begin
          acc_cnt      <= '0;
          wr_cnt       <= '0;
          window_done  <= 1'b1;
          window_heavy <= heavy_now;
          boundary     <= prev_heavy && !heavy_now;
          prev_heavy   <= heavy_now;
        end else begin
          acc_cnt <= acc_cnt + 1'b1;
          wr_cnt  <= wr_next;
        end
      end
    end
  end

endmodule
