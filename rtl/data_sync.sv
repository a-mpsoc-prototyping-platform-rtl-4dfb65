// data_sync: the Data Synchronizer of a processing chain. It carries a stream
// unchanged from one clock domain to another (RF sample clock <-> processor
// clock) through an asynchronous FIFO: Gray-coded read and write pointers,
// each passed to the other side through two flip-flops. Write side:
// in_valid/in_ready on wclk; read side: out_valid/out_ready on rclk.
// Crossing latency is a few cycles of the read clock. The FIFO structure is
// this design's choice; the block's role (adapter between two clock domains
// that leaves the data unchanged) is the document's.
module data_sync #(
  parameter int W = 8,
  parameter int DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_nx;
  assign in_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx  = wbin + AW'(in_valid && in_ready);
  always_ff @(posedge wclk) if (in_valid && in_ready) mem[wbin[AW-1:0]] <= in_data;
  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_nx; wgray <= bin2gray(wbin_nx);
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end

  // read side
  logic [AW:0] rbin_nx;
  assign out_valid = (rgray != wgray_r2);
  assign out_data  = mem[rbin[AW-1:0]];
  assign rbin_nx   = rbin + AW'(out_valid && out_ready);
  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_nx; rgray <= bin2gray(rbin_nx);
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
endmodule
