// stream_demux: sends one stream to one of two paths. After init the path is
// cfg.init_sel. When an item whose ID equals cfg.sw_id arrives (and
// cfg.sw_en is set), the demux moves to path cfg.sw_sel, starting with that
// item, and stays there; irq_switch pulses for one cycle. Routing is
// combinational: the item goes to out_valid[path] and in_ready follows that
// path's out_ready. Switching on an ID label is the document's mechanism;
// the configuration fields are this design's.
module stream_demux
  import radio_pkg::*;
#(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  switch_cfg_t  cfg,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  input  id_t          in_id,
  output logic [1:0]   out_valid,
  input  logic [1:0]   out_ready,
  output logic [W-1:0] out_data,
  output id_t          out_id,
  output logic         irq_switch
);
  logic sel, route, hit;
  assign hit      = in_valid && cfg.sw_en && (in_id == cfg.sw_id);
  assign route    = hit ? cfg.sw_sel : sel;
  assign out_valid = in_valid ? (route ? 2'b10 : 2'b01) : 2'b00;
  assign in_ready = out_ready[route];
  assign out_data = in_data;
  assign out_id   = in_id;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sel <= 1'b0; irq_switch <= 1'b0;
    end else if (init) begin
      sel <= cfg.init_sel; irq_switch <= 1'b0;
    end else begin
      irq_switch <= in_valid && in_ready && (route != sel);
      if (in_valid && in_ready) sel <= route;
    end
endmodule
