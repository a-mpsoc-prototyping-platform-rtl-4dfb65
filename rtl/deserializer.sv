// deserializer: packs bits into bytes, first bit into bit 0 (802.11 order).
// The byte leaves with the ID of its eighth bit. The eighth bit is taken
// only when the byte output register is free.
module deserializer
  import radio_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_data,
  input  id_t        in_id,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output id_t        out_id
);
  logic [6:0] acc;
  logic [2:0] n;
  assign in_ready = (n != 3'd7) || !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0; n <= '0; out_valid <= 1'b0; out_data <= '0; out_id <= '0;
    end else if (init) begin
      n <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        n <= n + 1'b1;
        if (n == 3'd7) begin
          out_valid <= 1'b1;
          out_data  <= {in_data, acc};
          out_id    <= in_id;
        end else begin
          acc <= {in_data, acc[6:1]};
        end
      end
    end
endmodule
