// pattern_filter: holds back the bit stream until the configured pattern has
// gone by, then passes every following bit unchanged. Used to wait for the
// 802.11 Start of Frame Delimiter. While searching it takes every bit, keeps
// the last MAX_LEN bits and compares the last cfg_len of them with
// cfg_pattern, whose bit 0 is the first bit received. On a match it raises
// irq_detect for one cycle and turns into a combinational pass-through; the
// pattern bits themselves are not output. init restarts the search.
module pattern_filter
  import radio_pkg::*;
#(
  parameter int MAX_LEN = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic [MAX_LEN-1:0] cfg_pattern,
  input  logic [$clog2(MAX_LEN):0] cfg_len,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_data,
  input  id_t  in_id,
  output logic out_valid,
  input  logic out_ready,
  output logic out_data,
  output id_t  out_id,
  output logic locked,
  output logic irq_detect
);
  logic [MAX_LEN-1:0] sr, win, mask;
  logic [$clog2(MAX_LEN):0] seen;
  logic match;

  assign win   = {in_data, sr[MAX_LEN-1:1]};
  assign mask  = (cfg_len >= MAX_LEN) ? '1 : ((MAX_LEN'(1) << cfg_len) - 1'b1);
  assign match = (seen + 1'b1 >= cfg_len) &&
                 (((win >> (MAX_LEN - cfg_len)) & mask) == (cfg_pattern & mask));

  assign in_ready  = locked ? out_ready : 1'b1;
  assign out_valid = locked && in_valid;
  assign out_data  = in_data;
  assign out_id    = in_id;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr <= '0; seen <= '0; locked <= 1'b0; irq_detect <= 1'b0;
    end else if (init) begin
      sr <= '0; seen <= '0; locked <= 1'b0; irq_detect <= 1'b0;
    end else begin
      irq_detect <= 1'b0;
      if (!locked && in_valid) begin
        sr <= win;
        if (seen != MAX_LEN[$clog2(MAX_LEN):0]) seen <= seen + 1'b1;
        if (match) begin
          locked <= 1'b1; irq_detect <= 1'b1;
        end
      end
    end
endmodule
