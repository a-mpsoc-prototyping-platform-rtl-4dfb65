// spi_master: writes control words to the RF front end (MAX19713) over SPI,
// from the PLCP processor's bus. Byte offsets: 0x0 write = send the low BITS
// bits, MSB first (ignored while busy); 0x4 read = status bit 0 busy;
// 0x8 = clock divider D (SCLK half period in clk cycles, at least 1, reset
// 4). Mode 0: cs_n falls, MOSI holds each bit from a falling SCLK edge to the
// next, the slave samples on rising edges; cs_n rises after the last bit and
// irq_done pulses for one cycle. A word takes 2*BITS*D clk cycles. Word
// length, mode and divider are this design's choices.
module spi_master
  import radio_pkg::*;
#(
  parameter int BITS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  output logic        sclk,
  output logic        cs_n,
  output logic        mosi,
  output logic        irq_done
);
  logic busy;
  logic [BITS-1:0] sh;
  logic [$clog2(BITS+1)-1:0] left;
  logic [15:0] div, cnt;
  assign mosi = sh[BITS-1];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; sh <= '0; left <= '0; div <= 16'd4; cnt <= '0;
      sclk <= 1'b0; cs_n <= 1'b1; irq_done <= 1'b0; rdata <= '0;
    end else begin
      irq_done <= 1'b0;
      if (busy) begin
        if (cnt >= div - 1'b1) begin
          cnt <= '0;
          if (!sclk) sclk <= 1'b1;
          else begin
            sclk <= 1'b0;
            sh   <= sh << 1;
            left <= left - 1'b1;
            if (left == 1) begin busy <= 1'b0; cs_n <= 1'b1; irq_done <= 1'b1; end
          end
        end else cnt <= cnt + 1'b1;
      end
      if (req.cs && req.we) begin
        if (req.addr[3:2] == 2'd0 && !busy) begin
          busy <= 1'b1; cs_n <= 1'b0; sh <= req.wdata[BITS-1:0];
          left <= ($clog2(BITS+1))'(BITS); cnt <= '0; sclk <= 1'b0;
        end
        if (req.addr[3:2] == 2'd2) div <= (req.wdata[15:0] == 0) ? 16'd1 : req.wdata[15:0];
      end
      if (req.cs && !req.we)
        rdata <= (req.addr[3:2] == 2'd1) ? {31'b0, busy} :
                 (req.addr[3:2] == 2'd2) ? {16'b0, div} : '0;
    end
endmodule
