// rpg: random power generator. It blurs the power consumption of the host
// by running R identical random number generators next to the computation.
//
// The bank has R_MAX generators; generator i runs while i < R. Each is a
// 16-bit maximal-length Galois LFSR (taps 16,14,13,11) with its own nonzero
// seed, advancing every cycle while enabled; its toggling register is the
// power load and its low bit is brought out as 'noise[i]'. A disabled
// generator holds its state and drives 0. A new R arrives with 'load'; the
// generators switch at once and 'applied' pulses WARMUP cycles later, when
// the new load is considered established. LFSR type, seeds and warm-up
// time are this design's choice.
module rpg #(
  parameter int unsigned R_MAX  = 10,
  parameter int unsigned WARMUP = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       r,        // requested number of active generators
  input  logic             load,
  output logic             applied,
  output logic [R_MAX-1:0] active,
  output logic [R_MAX-1:0] noise
);
  logic [15:0] lfsr [R_MAX];
  logic [3:0]  r_q;
  logic [$clog2(WARMUP+1)-1:0] wcnt;
  logic        warming;

  always_comb
    for (int i = 0; i < R_MAX; i++) begin
      active[i] = (4'(i) < r_q);
      noise[i]  = active[i] & lfsr[i][0];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < R_MAX; i++) lfsr[i] <= 16'hACE1 ^ 16'(i * 16'h1357);
      r_q     <= '0;
      wcnt    <= '0;
      warming <= 1'b0;
      applied <= 1'b0;
    end else begin
      for (int i = 0; i < R_MAX; i++)
        if (active[i])
          lfsr[i] <= {1'b0, lfsr[i][15:1]} ^ (lfsr[i][0] ? 16'hB400 : 16'h0000);
      applied <= 1'b0;
      if (load) begin
        r_q     <= (r > 4'(R_MAX)) ? 4'(R_MAX) : r;
        wcnt    <= '0;
        warming <= 1'b1;
      end else if (warming) begin
        if (wcnt == ($clog2(WARMUP+1))'(WARMUP - 1)) begin
          warming <= 1'b0;
          applied <= 1'b1;
        end
        wcnt <= wcnt + 1'b1;
      end
    end

endmodule
