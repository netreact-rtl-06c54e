// nr_delay: a W-bit wide, N-stage shift register with reset to zero. Used to
// keep packet fields aligned with the results of the longer pipeline paths.
// It is a helper of this design, not a block of NETREACT.
// Timing: out equals in of N cycles before (N >= 1).
module nr_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);

  logic [W-1:0] sr [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else begin
      sr[0] <= in;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end

  assign out = sr[N-1];

endmodule
