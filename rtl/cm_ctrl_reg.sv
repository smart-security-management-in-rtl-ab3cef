// cm_ctrl_reg: countermeasure control register on the monitor side that
// drives the configuration inputs of a hardware countermeasure of the host.
//
// A write ('wr') loads wr_data and raises 'pending'; the register drives
// 'load' for that one cycle so the countermeasure takes the new setting.
// 'pending' falls when the countermeasure reports 'applied', and 'ready'
// (= !pending) tells the monitor the countermeasure is configured. The
// host cannot write it. The ready handshake is this design's choice.
module cm_ctrl_reg #(
  parameter int unsigned   W     = 8,
  parameter logic [W-1:0]  RESET = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [W-1:0] wr_data,
  output logic [W-1:0] cfg,
  output logic         load,
  input  logic         applied,
  output logic         ready
);
  logic pending;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cfg     <= RESET;
      load    <= 1'b0;
      pending <= 1'b0;
    end else begin
      load <= wr;
      if (wr) begin
        cfg     <= wr_data;
        pending <= 1'b1;
      end else if (applied) pending <= 1'b0;
    end

  assign ready = !pending;

endmodule
