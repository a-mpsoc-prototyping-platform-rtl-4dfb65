// timer: down-counting timer of the MAC processor, used to time the 802.11
// inter-frame spaces (SIFS = 1000 cycles at 100 MHz). Byte offsets:
// 0x0 CTRL {auto_reload, enable}; 0x4 LOAD (a write also loads COUNT);
// 0x8 COUNT (read); 0xC STATUS bit 0 expired (write 1 to clear).
// While enabled COUNT decreases by one per cycle; the cycle it would go
// below 1 it sets expired and either reloads LOAD (auto_reload) or stops and
// clears enable. irq = expired. Expiry comes LOAD cycles after the write of
// CTRL.enable when COUNT was loaded with LOAD.
module timer
  import radio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  output logic        irq
);
  logic en, reload, expired;
  logic [31:0] load, count;
  logic wr;
  assign wr  = req.cs && req.we;
  assign irq = expired;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      en <= 1'b0; reload <= 1'b0; expired <= 1'b0; load <= '0; count <= '0; rdata <= '0;
    end else begin
      if (en) begin
        if (count <= 32'd1) begin
          expired <= 1'b1;
          if (reload) count <= load;
          else begin count <= '0; en <= 1'b0; end
        end else count <= count - 1'b1;
      end
      if (wr)
        case (req.addr[3:2])
          2'd0: begin en <= req.wdata[0]; reload <= req.wdata[1]; end
          2'd1: begin load <= req.wdata; count <= req.wdata; end
          2'd3: if (req.wdata[0]) expired <= 1'b0;
          default: ;
        endcase
      if (req.cs && !req.we)
        case (req.addr[3:2])
          2'd0: rdata <= {30'b0, reload, en};
          2'd1: rdata <= load;
          2'd2: rdata <= count;
          default: rdata <= {31'b0, expired};
        endcase
    end
endmodule
