// idi_sequencer: insertion of dummy instructions (IDI) into the host's
// instruction stream.
//
// Execution is a series of sequences, each made of a run of useful
// instructions followed by a run of dummy instructions. The useful run has
// a length drawn uniformly from 1..D and the dummy run from 0..N, so D and
// N are the maximum numbers of consecutive useful and dummy instructions;
// N = 0 switches the countermeasure off. One instruction is issued per
// issue slot: 'dummy' tells the core whether the slot it issues on
// 'issue' must be a dummy instruction. Lengths come from a 16-bit Galois
// LFSR reduced modulo D and N+1 (slightly non-uniform; this design's
// choice). D = 0 is treated as D = 1. A new (D, N) arrives with 'load',
// restarts the sequence at once with a one-instruction useful run (the
// host is halted while the monitor reconfigures it) and is acknowledged by 'applied' in the next cycle.
module idi_sequencer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] d,
  input  logic [3:0] n,
  input  logic       load,
  output logic       applied,
  input  logic       issue,      // the core issues an instruction this cycle
  output logic       dummy       // ...and it is a dummy one
);
  logic [15:0] lfsr;
  logic [3:0]  d_q, n_q;
  logic [3:0]  cnt;       // instructions left in the current run, >= 1
  logic        in_dummy;

  logic [3:0]  d_eff;
  logic [3:0]  useful_len, dummy_len;

  always_comb begin
    d_eff      = (d_q == 4'd0) ? 4'd1 : d_q;
    useful_len = 4'd1 + 4'(lfsr[7:0] % {4'd0, d_eff});
    dummy_len  = 4'(lfsr[15:8] % ({4'd0, n_q} + 8'd1));
  end

  assign dummy = in_dummy;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lfsr     <= 16'h1D0F;
      d_q      <= 4'd1;
      n_q      <= 4'd0;
      cnt      <= 4'd1;
      in_dummy <= 1'b0;
      applied  <= 1'b0;
    end else begin
      lfsr    <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      applied <= load;
      if (load) begin
        d_q      <= d;
        n_q      <= n;
        cnt      <= 4'd1;     // fresh sequence: a one-instruction useful run
        in_dummy <= 1'b0;
      end else if (issue) begin
        if (cnt != 4'd1) cnt <= cnt - 4'd1;
        else if (!in_dummy && dummy_len != 4'd0) begin
          in_dummy <= 1'b1;
          cnt      <= dummy_len;
        end else begin
          in_dummy <= 1'b0;
          cnt      <= useful_len;
        end
      end
    end

endmodule
