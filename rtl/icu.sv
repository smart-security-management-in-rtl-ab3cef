// icu: interrupt controller of the monitor. It turns events of the host
// (a message waiting in the host -> monitor FIFO, a trigger of the light or
// voltage sensor) into one interrupt request for the monitor controller.
//
// Each source sets a sticky pending bit (a level source keeps setting it).
// 'irq' is high while any unmasked source is pending and 'irq_id' names the
// lowest-numbered one (fixed priority). 'ack' with 'ack_id' clears that
// pending bit in the next cycle; a source that fires in the same cycle
// stays pending. 'mask' bits enable sources (1 = enabled). Priority scheme
// and ack protocol are this design's choice.
module icu #(
  parameter int unsigned N_SRC = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_SRC-1:0]         src,
  input  logic [N_SRC-1:0]         mask,
  input  logic                     ack,
  input  logic [$clog2(N_SRC)-1:0] ack_id,
  output logic                     irq,
  output logic [$clog2(N_SRC)-1:0] irq_id,
  output logic [N_SRC-1:0]         pending
);
  localparam int unsigned IW = $clog2(N_SRC);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pending <= '0;
    else begin
      logic [N_SRC-1:0] clr;
      clr = '0;
      if (ack) clr[ack_id] = 1'b1;
      pending <= (pending & ~clr) | src;
    end

  always_comb begin
    logic [N_SRC-1:0] act;
    act    = pending & mask;
    irq    = |act;
    irq_id = '0;
    for (int i = N_SRC-1; i >= 0; i--)
      if (act[i]) irq_id = IW'(i);
  end

endmodule
