// Unsigned sequential divider (restoring, one quotient bit per clock).
// i_start loads dividend and divisor; o_done pulses N clocks later with
// o_quot = i_num / i_den (o_quot is all ones when i_den is 0).
// A helper of this implementation: the design asks for averaged coordinates
// but does not say how the division is done.
module seq_div #(
  parameter int unsigned N = 32,   // dividend / quotient width
  parameter int unsigned D = 20    // divisor width
) (
  input  logic         i_clk,
  input  logic         i_rst_n,
  input  logic         i_start,
  input  logic [N-1:0] i_num,
  input  logic [D-1:0] i_den,
  output logic         o_busy,
  output logic         o_done,
  output logic [N-1:0] o_quot
);
  logic [N-1:0] num;
  logic [D-1:0] den;
  logic [D:0]   rem;
  logic [$clog2(N+1)-1:0] cnt;
  logic [D:0]   trial;

  assign trial = {rem[D-1:0], num[N-1]} - {1'b0, den};

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      num <= '0; den <= '0; rem <= '0; cnt <= '0;
      o_busy <= 1'b0; o_done <= 1'b0; o_quot <= '0;
    end else begin
      o_done <= 1'b0;
      if (i_start) begin
        num <= i_num; den <= i_den; rem <= '0;
        cnt <= ($clog2(N+1))'(N);
        o_busy <= 1'b1;
      end else if (o_busy) begin
        if (!trial[D]) rem <= trial;
        else           rem <= {rem[D-1:0], num[N-1]};
        num <= {num[N-2:0], !trial[D]};
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          o_busy <= 1'b0;
          o_done <= 1'b1;
          o_quot <= {num[N-2:0], !trial[D]};
        end
      end
    end
  end
endmodule
