// intc: interrupt controller in front of one processor. N sources are
// latched into the status register ISR on every cycle they are high (so
// both one-cycle pulses and levels are caught); IER masks them, MER bit 0
// enables the output, and irq is high while any enabled status bit is set.
// Writing 1s to IAR clears those status bits; a level source still high sets
// its bit again. Registers (byte offsets): 0x0 ISR, 0x4 IPR (ISR & IER,
// read only), 0x8 IER, 0xC IAR (write only), 0x10 MER. Reads return one
// cycle after the request. The register set is this design's choice.
module intc
  import radio_pkg::*;
#(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bus_req_t     req,
  output logic [31:0]  rdata,
  input  logic [N-1:0] src,
  output logic         irq
);
  logic [N-1:0] isr, ier, ack;
  logic mer;
  assign ack = (req.cs && req.we && req.addr[4:2] == 3'd3) ? req.wdata[N-1:0] : '0;
  assign irq = mer && |(isr & ier);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      isr <= '0; ier <= '0; mer <= 1'b0; rdata <= '0;
    end else begin
      isr <= (isr & ~ack) | src;
      if (req.cs && req.we) begin
        if (req.addr[4:2] == 3'd2) ier <= req.wdata[N-1:0];
        if (req.addr[4:2] == 3'd4) mer <= req.wdata[0];
      end
      if (req.cs && !req.we)
        case (req.addr[4:2])
          3'd0: rdata <= 32'(isr);
          3'd1: rdata <= 32'(isr & ier);
          3'd2: rdata <= 32'(ier);
          3'd4: rdata <= 32'(mer);
          default: rdata <= '0;
        endcase
    end
endmodule
