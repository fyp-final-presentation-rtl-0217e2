// Fixed delay of a W-bit bundle by N clock cycles (N >= 1), built from a chain
// of registers. Used to keep pixel coordinates and sync signals aligned with
// pixel data that passes through pipelined processing stages.
// A helper of this implementation; the design only says that coordinate and
// sync signals are delayed to line up with the processing.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         i_clk,
  input  logic         i_rst_n,
  input  logic [W-1:0] i_d,
  output logic [W-1:0] o_q
);
  logic [W-1:0] pipe [N];

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int i = 0; i < int'(N); i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= i_d;
      for (int i = 1; i < int'(N); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign o_q = pipe[N-1];
endmodule
