// cfg_sync: brings quasi-static configuration bits into another clock domain
// through two flip-flops per bit. Meant for register values that software
// changes only while the receiving blocks are idle; the output follows the
// input two destination clock cycles later.
module cfg_sync #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin s1 <= '0; q <= '0; end
    else        begin s1 <= d;  q <= s1; end
endmodule
